// Self-checking testbench for start_trigger.
// Drives random bytes with and without rx_dv, and checks that start pulses
// for exactly one cycle, one cycle after rx_dv, only for the start
// character 'S'.
module start_trigger_tb;
  logic clk = 0, rst = 1;
  logic [7:0] rx_byte = 0;
  logic rx_dv = 0, start;
  int checks = 0, failures = 0, starts = 0;
  logic expect_start = 0;

  start_trigger dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      automatic logic [7:0] b = ($urandom_range(0, 3) == 0) ? 8'h53 : 8'($urandom);
      automatic logic dv = 1'($urandom);
      rx_byte <= b; rx_dv <= dv;
      @(posedge clk);
      #1;
      expect_start = dv && (b == 8'h53);
      checks++;
      if (start !== expect_start) begin failures++; $display("cycle %0d: start %b want %b", n, start, expect_start); end
      if (start) starts++;
    end
    checks++;
    if (starts == 0) begin failures++; $display("no start seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
