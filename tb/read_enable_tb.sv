// Self-checking testbench for read_enable, with an addr_counter of
// DEPTH = 16 closing the loop and a model transmitter that raises tx_done
// a random number of cycles after each tx_dv. Checks that nothing happens
// before write_done, that each location is read, loaded into the output
// buffer and sent in that order (READ and LOAD on consecutive cycles, then
// one SEND per LOAD),
// that the read addresses run 0..DEPTH-1, that exactly DEPTH bytes are
// sent and read_done follows the last one, that no byte is offered while
// the transmitter is busy, and that a start restarts, also while a byte is
// still being sent.
module read_enable_tb;
  localparam int D = 16;
  logic clk = 0, rst = 1, start = 0, write_done = 0, tx_done = 0;
  logic mem_re, buf_load, tx_dv, cnt_clear, cnt_inc, reading, read_done;
  logic [3:0] addr;
  logic last;
  int checks = 0, failures = 0, sends = 0, reads = 0, next_addr = 0;
  logic re_d = 0, load_d = 0;
  int tx_busy_cnt = 0;

  logic tx_busy;
  assign tx_busy = (tx_busy_cnt != 0);

  read_enable dut (.clk, .rst, .start, .write_done, .addr_last(last), .tx_busy, .tx_done, .mem_re,
                   .buf_load, .tx_dv, .cnt_clear, .cnt_inc, .reading, .read_done);
  addr_counter #(.DEPTH(D)) cnt (.clk, .rst, .clear(cnt_clear), .inc(cnt_inc), .addr, .last);

  always #5 clk = ~clk;

  // Model transmitter.
  always @(posedge clk) begin
    tx_done <= 1'b0;
    if (tx_busy_cnt > 1) tx_busy_cnt <= tx_busy_cnt - 1;
    else if (tx_busy_cnt == 1) begin tx_busy_cnt <= 0; tx_done <= 1'b1; end
    if (tx_dv) begin
      if (tx_busy_cnt != 0) begin failures++; $display("tx_dv while transmitter busy"); end
      tx_busy_cnt <= $urandom_range(1, 20);
    end
  end

  always @(posedge clk) if (!rst) begin
    re_d <= mem_re;
    if (buf_load) load_d <= 1'b1;
    else if (tx_dv) load_d <= 1'b0;
    if (mem_re) begin
      reads++;
      if (addr != 4'(next_addr)) begin failures++; $display("read addr %0d want %0d", addr, next_addr); end
      next_addr++;
    end
    if (buf_load && !re_d) begin failures++; $display("load not after read"); end
    if (tx_dv) begin
      sends++;
      if (!load_d) begin failures++; $display("send without a load"); end
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_start();
    start <= 1;
    @(posedge clk);
    start <= 0;
    sends = 0; reads = 0; next_addr = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    write_done <= 1;            // done without start: must stay idle
    repeat (10) @(posedge clk);
    checks++;
    if (reads != 0 || read_done) begin failures++; $display("ran without start"); end
    write_done <= 0;
    for (int run = 0; run < 3; run++) begin
      pulse_start();
      repeat (20) @(posedge clk);
      checks++;
      if (reads != 0 || reading) begin failures++; $display("read before write_done"); end
      write_done <= 1;
      if (run == 1) begin       // restart in the middle of an upload
        while (sends < D / 2) @(posedge clk);
        @(posedge clk);
        write_done <= 0;
        pulse_start();          // restart while a byte is in flight
        write_done <= 1;
      end
      while (!read_done) @(posedge clk);
      repeat (30) @(posedge clk);
      checks++;
      if (sends != D || reads != D) begin failures++; $display("run %0d: %0d sends %0d reads", run, sends, reads); end
      checks++;
      if (!read_done || reading) begin failures++; $display("read_done not held"); end
      write_done <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
