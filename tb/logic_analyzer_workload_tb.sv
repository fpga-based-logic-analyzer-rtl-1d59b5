// Clock-capture testbench for logic_analyzer_top: the demonstration
// captures of an 8-channel clock signal, at the full 4096-sample depth.
// The UART runs at 8 master-clock cycles per bit instead of 5208 so that
// the 4096-byte uploads take a third of a million cycles each; the
// master clock is 50 MHz (20 ns).
//
// Every probe channel carries the same square wave. Two captures:
//   1 MHz signal sampled at 6.25 MHz (rate 'b'): a sample every 8
//     cycles, 50 cycles per signal period -> 4096*8/50 = 655.36 periods
//   10 kHz signal sampled at 390.625 kHz (rate 'f'): 128 cycles per sample,
//     5000 cycles per period -> 4096*128/5000 = 104.86 periods
// The PC side counts the rising edges in the received samples (must be
// within one of the expected count), checks that all eight channels agree
// in every sample, and that the wave is high in about half of the samples.
// The 100 Hz demonstration (sample rate 23.84 Hz or kHz) is not run: at
// 2^21 cycles per sample one capture would take 8.6e9 cycles.
module logic_analyzer_workload_tb;
  localparam int D   = 4096;
  localparam int CPB = 8;

  logic       mclk = 0, rst = 1, rx_serial = 1;
  logic [7:0] data_in;
  logic       tx_serial, rx_dv, tx_active, tx_done, capturing, write_done;
  logic       reading, read_done;
  logic [7:0] led_show_write, led_show_read, data_out_2;
  logic [4:0] rate_tap;

  int checks = 0, failures = 0, n_captures = 0;
  int half_period = 25, pcnt = 0;
  logic sig = 0;
  logic [7:0] rxq[$];

  logic_analyzer_top #(.RX_CLKS_PER_BIT(CPB), .TX_CLKS_PER_BIT(CPB)) dut (.*);

  assign data_in = {8{sig}};
  always #10 mclk = ~mclk;

  always @(posedge mclk) begin
    if (pcnt + 1 >= half_period) begin pcnt <= 0; sig <= ~sig; end
    else pcnt <= pcnt + 1;
  end

  initial forever begin
    logic [7:0] b;
    @(negedge tx_serial);
    repeat (CPB / 2) @(posedge mclk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge mclk);
      b[i] = tx_serial;
    end
    repeat (CPB) @(posedge mclk);
    rxq.push_back(b);
  end

  task automatic pc_send(input logic [7:0] b);
    automatic logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx_serial <= f[i];
      repeat (CPB) @(posedge mclk);
    end
  endtask

  // sig_period and sample period in master-clock cycles.
  task automatic run(input logic [7:0] rate_cmd, input int sample_cycles, input int sig_period);
    automatic real expect_edges = real'(D) * sample_cycles / sig_period;
    automatic int edges = 0, highs = 0;
    half_period = sig_period / 2;
    rxq.delete();
    pc_send(rate_cmd);
    pc_send(8'h53);
    repeat (4) @(posedge mclk);
    while (!read_done) @(posedge mclk);
    repeat (20 * CPB) @(posedge mclk);
    n_captures++;
    checks++;
    if (rxq.size() != D) begin failures++; $display("got %0d samples", rxq.size()); end
    foreach (rxq[i]) begin
      if (rxq[i] != 8'h00 && rxq[i] != 8'hFF) begin
        failures++; $display("sample %0d: channels disagree (%h)", i, rxq[i]);
      end
      if (rxq[i][0]) highs++;
      if (i > 0 && rxq[i][0] && !rxq[i-1][0]) edges++;
    end
    checks++;
    if (real'(edges) < expect_edges - 1.0 || real'(edges) > expect_edges + 1.0) begin
      failures++; $display("rising edges %0d, expected %f", edges, expect_edges);
    end
    checks++;
    if (highs < D * 45 / 100 || highs > D * 55 / 100) begin failures++; $display("high in %0d samples", highs); end
    $display("signal period %0d cycles, sample every %0d: %0d rising edges (%f expected), %0d high",
             sig_period, sample_cycles, edges, expect_edges, highs);
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge mclk);
    rst <= 0;
    run(8'h62, 8, 50);       // 1 MHz at 6.25 MHz
    run(8'h66, 128, 5000);   // 10 kHz at 390.625 kHz
    checks++;
    if (n_captures != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
