// Self-checking testbench for uart_tx.
// Offers random bytes at CLKS_PER_BIT = 8, samples the line in the middle
// of every bit and rebuilds the byte, checks start and stop bits, that a
// frame takes exactly 10 bit times (tx_active high) ending in tx_done, that tx_active
// covers the frame, and that tx_dv while busy is ignored.
module uart_tx_tb;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  logic [7:0] tx_byte = 0;
  logic tx_dv = 0, tx_active, tx_serial, tx_done;
  int checks = 0, failures = 0, active_cycles = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (tx_active) active_cycles++;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (tx_serial !== 1'b1 || tx_active) begin failures++; $display("not idle after reset"); end
    for (int n = 0; n < 100; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      logic [9:0] got;
      automatic int cycles = 0;
      active_cycles = 0;
      tx_byte <= b; tx_dv <= 1;
      @(posedge clk);
      tx_dv <= 0; tx_byte <= ~b;
      fork
        begin
          repeat (CPB / 2) @(posedge clk);
          for (int i = 0; i < 10; i++) begin
            got[i] = tx_serial;
            if (i == 3) begin   // a second offer while busy must be ignored
              tx_dv <= 1;
              @(posedge clk);
              tx_dv <= 0;
              repeat (CPB - 1) @(posedge clk);
            end else repeat (CPB) @(posedge clk);
          end
        end
        begin
          while (!tx_done) begin
            @(posedge clk); cycles++;
            if (!tx_active && !tx_done) begin failures++; $display("tx_active low mid-frame"); end
          end
        end
      join
      checks++;
      if (got !== {1'b1, b, 1'b0}) begin failures++; $display("frame %b want %b", got, {1'b1, b, 1'b0}); end
      @(posedge clk);
      checks++;
      if (active_cycles != 10 * CPB) begin failures++; $display("frame took %0d cycles", active_cycles); end
      repeat ($urandom_range(0, 5)) @(posedge clk);
      checks++;
      if (tx_serial !== 1'b1 || tx_active) begin failures++; $display("not idle after frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
