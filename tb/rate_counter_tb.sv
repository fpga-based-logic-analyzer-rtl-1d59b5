// Self-checking testbench for rate_counter.
// Selects taps 1 to 8 with the rate commands 'a'..'h' and checks that
// sample_tick then pulses for one cycle every 2^(tap+1) master-clock cycles
// (f_mclk/4 for 'a', f_mclk/8 for 'b', ...). Also checks that the reset tap
// is 1 and that bytes outside the rate commands, or without rx_dv, leave the
// selection alone. The slowest command selects tap 31.
module rate_counter_tb;
  logic clk = 0, rst = 1;
  logic [7:0] rx_byte = 0;
  logic rx_dv = 0, sample_tick;
  logic [4:0] tap;
  int checks = 0, failures = 0;

  rate_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input logic [7:0] b, input logic dv);
    rx_byte <= b; rx_dv <= dv;
    @(posedge clk);
    rx_dv <= 0;
    @(posedge clk);
  endtask

  // Measure the distance between consecutive ticks and the tick width.
  task automatic measure(input int want);
    int gap;
    while (!sample_tick) @(posedge clk);
    @(posedge clk);
    checks++;
    if (sample_tick) begin failures++; $display("tick wider than one cycle"); end
    for (int k = 0; k < 4; k++) begin
      gap = 1;
      while (!sample_tick) begin @(posedge clk); gap++; end
      @(posedge clk);
      checks++;
      if (gap != want) begin failures++; $display("tap %0d gap %0d want %0d", tap, gap, want); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (tap != 5'd1) begin failures++; $display("reset tap %0d", tap); end
    measure(4);
    for (int t = 1; t <= 8; t++) begin
      cmd(8'h61 + 8'(t - 1), 1'b1);
      checks++;
      if (tap != 5'(t)) begin failures++; $display("tap %0d want %0d", tap, t); end
      measure(1 << (t + 1));
    end
    cmd(8'h53, 1'b1);      // start command: not a rate
    cmd(8'h61, 1'b0);      // no rx_dv
    cmd(8'h20, 1'b1);      // other byte
    checks++;
    if (tap != 5'd8) begin failures++; $display("tap changed to %0d", tap); end
    cmd(8'h7F, 1'b1);
    checks++;
    if (tap != 5'd31) begin failures++; $display("slowest tap %0d", tap); end
    cmd(8'h80, 1'b1);
    checks++;
    if (tap != 5'd31) begin failures++; $display("8'h80 changed tap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
