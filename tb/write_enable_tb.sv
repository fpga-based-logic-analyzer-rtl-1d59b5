// Self-checking testbench for write_enable, with an addr_counter of
// DEPTH = 32 closing the loop as in the analyzer. Sample ticks come every
// PERIOD cycles. Checks per capture: the counter is cleared by start,
// exactly DEPTH writes happen, each one cycle after a buffer load, to
// addresses 0..DEPTH-1 in order, write_done rises after the last one and
// nothing is written afterwards though ticks continue. Captures are run at
// several tick periods, and one is restarted in the middle.
module write_enable_tb;
  localparam int D = 32;
  logic clk = 0, rst = 1, start = 0, sample_tick = 0;
  logic buf_load, mem_we, cnt_clear, cnt_inc, capturing, write_done;
  logic [4:0] addr;
  logic last;
  int checks = 0, failures = 0;
  int period = 4, writes = 0, loads = 0, next_addr = 0, tick_cnt = 0;
  logic load_d = 0;

  write_enable dut (.clk, .rst, .start, .sample_tick, .addr_last(last), .buf_load,
                    .mem_we, .cnt_clear, .cnt_inc, .capturing, .write_done);
  addr_counter #(.DEPTH(D)) cnt (.clk, .rst, .clear(cnt_clear), .inc(cnt_inc), .addr, .last);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    tick_cnt <= (tick_cnt + 1) % period;
    sample_tick <= (tick_cnt == 0);
  end

  always @(posedge clk) if (!rst) begin
    load_d <= buf_load;
    if (buf_load) loads++;
    if (mem_we) begin
      writes++;
      if (!load_d) begin failures++; $display("write without preceding load"); end
      if (addr != 5'(next_addr)) begin failures++; $display("write addr %0d want %0d", addr, next_addr); end
      next_addr++;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(input int p, input bit abort_half);
    period = p;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    writes = 0; loads = 0; next_addr = 0;
    #1;
    checks++;
    if (addr != 0 || !capturing || write_done) begin failures++; $display("start did not arm/clear"); end
    if (abort_half) begin
      while (writes < D / 2) @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      writes = 0; loads = 0; next_addr = 0;
    end
    while (!write_done) @(posedge clk);
    checks++;
    if (writes != D) begin failures++; $display("period %0d: %0d writes", p, writes); end
    repeat (10 * p) @(posedge clk);
    checks++;
    if (writes != D || loads != D || capturing) begin failures++; $display("activity after done: %0d writes %0d loads", writes, loads); end
    checks++;
    if (!write_done) begin failures++; $display("write_done dropped"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (capturing || write_done || writes != 0) begin failures++; $display("active without start"); end
    capture(4, 0);
    capture(16, 0);
    capture(7, 0);
    capture(8, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
