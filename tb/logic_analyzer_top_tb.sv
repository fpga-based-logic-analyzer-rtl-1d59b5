// End-to-end testbench for logic_analyzer_top at reduced size
// (DEPTH = 64 samples, 8 master-clock cycles per UART bit).
//
// The testbench plays the PC: it sends ASCII commands on rx_serial and
// decodes every byte the analyzer sends on tx_serial. The probes carry an
// 8-bit count that advances once every PSTEP master-clock cycles, so the
// samples of one capture must differ by (sample period / PSTEP) from one to
// the next, whatever the phase of the sample ticks. Four captures:
//   1. rate 'a' (every 4 cycles), PSTEP 4:   consecutive samples differ by 1
//   2. rate 'b' (every 8 cycles), PSTEP 4:   differ by 2 (rate switch)
//   3. rate 'd' (every 32 cycles), PSTEP 32, restarted by a second 'S'
//      in the middle of the capture
//   4. rate 'c' (every 16 cycles), PSTEP 16, with a second 'S' in the middle
//      of the upload
// Each capture must deliver exactly DEPTH bytes, only after write_done,
// with read_done after the last; the capture must take DEPTH sample
// periods and the upload DEPTH UART frames (plus three cycles per byte);
// data_out_2 must hold the last sample. Each mechanism (rate switch,
// capture complete, upload complete, restart during capture, restart during
// upload) is counted and must occur.
module logic_analyzer_top_tb;
  localparam int D   = 64;
  localparam int CPB = 8;

  logic       mclk = 0, rst = 1, rx_serial = 1;
  logic [7:0] data_in;
  logic       tx_serial, rx_dv, tx_active, tx_done, capturing, write_done;
  logic       reading, read_done;
  logic [7:0] led_show_write, led_show_read, data_out_2;
  logic [4:0] rate_tap;

  int checks = 0, failures = 0;
  int n_rate_switch = 0, n_capture = 0, n_upload = 0, n_restart_cap = 0, n_restart_up = 0;
  int pstep = 4, pcnt = 0;
  logic [7:0] probe = 0;
  logic [7:0] rxq[$];
  logic wd_d = 0, rd_d = 0;
  longint cyc = 0, t_start = 0, t_wdone = 0, t_rdone = 0;
  logic early_byte = 0;

  logic_analyzer_top #(.DEPTH(D), .RX_CLKS_PER_BIT(CPB), .TX_CLKS_PER_BIT(CPB)) dut (.*);

  assign data_in = probe;
  always #5 mclk = ~mclk;

  always @(posedge mclk) begin
    cyc <= cyc + 1;
    if (pcnt + 1 >= pstep) begin pcnt <= 0; probe <= probe + 1'b1; end
    else pcnt <= pcnt + 1;
    wd_d <= write_done;
    rd_d <= read_done;
    if (write_done && !wd_d) begin n_capture++; t_wdone = cyc; end
    if (read_done && !rd_d) begin n_upload++; t_rdone = cyc; end
  end

  // PC receiver: 8N1, sampled mid-bit.
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
    if (!write_done) early_byte = 1;
    rxq.push_back(b);
  end

  task automatic pc_send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx_serial <= f[i];
      repeat (CPB) @(posedge mclk);
    end
  endtask

  task automatic set_rate(input logic [7:0] c, input int want_tap);
    pc_send(c);
    repeat (4) @(posedge mclk);
    checks++;
    if (rate_tap != 5'(want_tap)) begin failures++; $display("rate tap %0d want %0d", rate_tap, want_tap); end
    else n_rate_switch++;
  endtask

  // mode 0: plain; 1: restart during capture; 2: restart during upload.
  task automatic capture(input int tap, input int ps, input int mode);
    int period = 1 << (tap + 1);
    int step = period / ps;
    pstep = ps;
    rxq.delete();
    early_byte = 0;
    pc_send(8'h53);
    t_start = cyc;
    repeat (4) @(posedge mclk);
    if (mode == 1) begin
      while (led_show_write < 8'(D / 2)) @(posedge mclk);
      checks++;
      if (!capturing) begin failures++; $display("not capturing mid-capture"); end
      pc_send(8'h53);
      t_start = cyc;
      repeat (4) @(posedge mclk);
      n_restart_cap++;
    end
    if (mode == 2) begin
      while (rxq.size() < D / 2) @(posedge mclk);
      pc_send(8'h53);
      t_start = cyc;
      // A byte already in flight still completes; drop it.
      while (tx_active) @(posedge mclk);
      repeat (CPB) @(posedge mclk);
      rxq.delete();
      early_byte = 0;
      n_restart_up++;
    end
    while (!read_done) @(posedge mclk);
    repeat (2 * 10 * CPB) @(posedge mclk);
    checks++;
    if (rxq.size() != D) begin failures++; $display("tap %0d: got %0d bytes want %0d", tap, rxq.size(), D); end
    checks++;
    if (early_byte) begin failures++; $display("byte sent before capture complete"); end
    for (int i = 1; i < rxq.size(); i++) begin
      checks++;
      if (8'(rxq[i] - rxq[i-1]) != 8'(step)) begin
        failures++; $display("tap %0d sample %0d: %h after %h, step want %0d", tap, i, rxq[i], rxq[i-1], step);
      end
    end
    checks++;
    if (rxq.size() > 0 && data_out_2 != rxq[rxq.size() - 1]) begin failures++; $display("data_out_2 %h", data_out_2); end
    checks++;
    if (t_wdone - t_start < longint'((D - 1) * period) || t_wdone - t_start > longint'((D + 1) * period + 8)) begin
      failures++; $display("capture took %0d cycles, period %0d", t_wdone - t_start, period);
    end
    checks++;
    if (t_rdone - t_wdone < longint'(D * 10 * CPB) || t_rdone - t_wdone > longint'(D * (10 * CPB + 4) + 4)) begin
      failures++; $display("upload took %0d cycles", t_rdone - t_wdone);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge mclk);
    rst <= 0;
    repeat (4) @(posedge mclk);
    checks++;
    if (capturing || reading || write_done || read_done || tx_serial !== 1'b1) begin
      failures++; $display("not idle after reset");
    end
    set_rate(8'h61, 1); capture(1, 4, 0);
    set_rate(8'h62, 2); capture(2, 4, 0);
    set_rate(8'h64, 4); capture(4, 32, 1);
    set_rate(8'h63, 3); capture(3, 16, 2);
    checks++; if (n_rate_switch < 2) begin failures++; $display("rate switch never happened"); end
    checks++; if (n_capture < 4)  begin failures++; $display("captures completed: %0d", n_capture); end
    checks++; if (n_upload < 4)   begin failures++; $display("uploads completed: %0d", n_upload); end
    checks++; if (n_restart_cap == 0) begin failures++; $display("no restart during capture"); end
    checks++; if (n_restart_up == 0)  begin failures++; $display("no restart during upload"); end
    $display("rate switches %0d, captures %0d, uploads %0d, restarts in capture %0d, in upload %0d",
             n_rate_switch, n_capture, n_upload, n_restart_cap, n_restart_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
