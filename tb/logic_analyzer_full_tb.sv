// Full-size testbench for logic_analyzer_top with every parameter at its
// default: 4096 samples, 9600 baud at a 50 MHz master clock (20 ns period).
//
// Plays the PC for one complete operation: select the 390.625 kHz rate
// ('f', a sample every 128 master-clock cycles), send 'S', and receive the
// whole upload of 4096 bytes. The probes carry an 8-bit count advancing
// every 128 cycles, so consecutive samples must differ by exactly one.
// Checks the byte count, every sample, that the capture takes 4096 sample
// periods and that the upload takes 4096 UART frames (about 4.3 s of
// simulated time, some 213 million clock cycles).
module logic_analyzer_full_tb;
  localparam int D      = 4096;
  localparam int CPB    = 5208;
  localparam int PERIOD = 128;

  logic       mclk = 0, rst = 1, rx_serial = 1;
  logic [7:0] data_in;
  logic       tx_serial, rx_dv, tx_active, tx_done, capturing, write_done;
  logic       reading, read_done;
  logic [7:0] led_show_write, led_show_read, data_out_2;
  logic [4:0] rate_tap;

  int checks = 0, failures = 0;
  int pcnt = 0;
  logic [7:0] probe = 0;
  logic [7:0] rxq[$];
  logic wd_d = 0, rd_d = 0;
  longint cyc = 0, t_rx = 0, t_start = 0, t_wdone = 0, t_rdone = 0;

  logic_analyzer_top dut (.*);

  assign data_in = probe;
  always #10 mclk = ~mclk;

  always @(posedge mclk) begin
    cyc <= cyc + 1;
    if (pcnt + 1 >= PERIOD) begin pcnt <= 0; probe <= probe + 1'b1; end
    else pcnt <= pcnt + 1;
    if (rx_dv) t_rx = cyc;
    wd_d <= write_done;
    rd_d <= read_done;
    if (write_done && !wd_d) t_wdone = cyc;
    if (read_done && !rd_d) t_rdone = cyc;
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
    if (!tx_serial) begin failures++; $display("stop bit low"); end
    rxq.push_back(b);
  end

  task automatic pc_send(input logic [7:0] b);
    automatic logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx_serial <= f[i];
      repeat (CPB) @(posedge mclk);
    end
  endtask

  initial begin
    #6_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge mclk);
    rst <= 0;
    pc_send(8'h66);
    repeat (4) @(posedge mclk);
    checks++;
    if (rate_tap != 5'd6) begin failures++; $display("rate tap %0d", rate_tap); end
    pc_send(8'h53);
    t_start = t_rx;     // command byte received
    while (!read_done) @(posedge mclk);
    repeat (2 * 10 * CPB) @(posedge mclk);
    checks++;
    if (rxq.size() != D) begin failures++; $display("got %0d bytes", rxq.size()); end
    for (int i = 1; i < rxq.size(); i++) begin
      checks++;
      if (8'(rxq[i] - rxq[i-1]) != 8'd1) begin failures++; $display("sample %0d: %h after %h", i, rxq[i], rxq[i-1]); end
    end
    checks++;
    if (t_wdone - t_start < longint'((D - 1) * PERIOD) || t_wdone - t_start > longint'((D + 1) * PERIOD)) begin
      failures++; $display("capture took %0d cycles", t_wdone - t_start);
    end
    checks++;
    if (t_rdone - t_wdone < longint'(D * 10 * CPB) || t_rdone - t_wdone > longint'(D * (10 * CPB + 4) + 4)) begin
      failures++; $display("upload took %0d cycles", t_rdone - t_wdone);
    end
    $display("capture %0d cycles, upload %0d cycles", t_wdone - t_start, t_rdone - t_wdone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
