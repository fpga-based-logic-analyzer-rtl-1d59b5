// Eight-channel logic analyzer, FPGA side.
//
// The PC sends single ASCII commands over a 9600-baud UART (see la_pkg):
// a rate character selects the sample rate, 'S' starts a capture. After
// 'S' the analyzer samples the eight probe inputs at the selected rate into
// a 4096 x 8-bit sample memory until it is full, then reads the memory back
// location by location and sends every sample, oldest first, as one raw
// byte to the PC, which draws the eight waveforms.
//
// Blocks, as in the analyzer's block diagram: UART receiver -> start
// trigger and 32-bit rate counter; write controller, write address counter
// and input buffer fill the sample memory; read controller, read address
// counter and output buffer empty it into the UART transmitter. Everything
// runs on the master clock mclk (50 MHz assumed, which the default
// CLKS_PER_BIT values and the sample-rate table rely on); sample ticks are
// clock enables. The probe inputs pass a two-flip-flop synchroniser, so a
// sample reflects the probes three master-clock cycles before its tick
// reaches the input buffer.
//
// Status outputs: write_done / read_done (capture complete / upload
// complete), capturing / reading, led_show_write / led_show_read (the upper
// eight bits of each address counter, a progress display), data_out_2 (the
// last stored sample), rate_tap (the selected sample rate), the receiver's rx_dv and the transmitter's
// tx_active / tx_done.
//
// Synchronous reset input, the synchroniser and the status outputs beyond
// those named in the analyzer's schematic are this design's choices.
module logic_analyzer_top #(
  parameter int unsigned DEPTH           = 4096,
  parameter int unsigned RX_CLKS_PER_BIT = 5208,
  parameter int unsigned TX_CLKS_PER_BIT = 5208
) (
  input  logic       mclk,
  input  logic       rst,            // synchronous, active high
  input  logic [7:0] data_in,        // probe channels
  input  logic       rx_serial,      // from PC
  output logic       tx_serial,      // to PC
  output logic       rx_dv,
  output logic       tx_active,
  output logic       tx_done,
  output logic       capturing,
  output logic       write_done,
  output logic       reading,
  output logic       read_done,
  output logic [7:0] led_show_write,
  output logic [7:0] led_show_read,
  output logic [7:0] data_out_2,
  output logic [4:0] rate_tap        // selected rate-counter bit
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]    rx_byte;
  logic          start;
  logic          sample_tick;
  logic [7:0]    probe_s1, probe_s2;
  logic [7:0]    in_buf_q, out_buf_q, mem_rdata;
  logic          wr_buf_load, mem_we, wr_clear, wr_inc, wr_last;
  logic          rd_buf_load, mem_re, rd_clear, rd_inc, rd_last, tx_dv;
  logic [AW-1:0] waddr, raddr;

  // Probe synchroniser.
  always_ff @(posedge mclk) begin
    if (rst) begin
      probe_s1 <= '0;
      probe_s2 <= '0;
    end else begin
      probe_s1 <= data_in;
      probe_s2 <= probe_s1;
    end
  end

  uart_rx #(.CLKS_PER_BIT(RX_CLKS_PER_BIT)) u_rx (
    .clk(mclk), .rst, .rx_serial, .rx_byte, .rx_dv
  );

  start_trigger u_trigger (
    .clk(mclk), .rst, .rx_byte, .rx_dv, .start
  );

  rate_counter u_rate (
    .clk(mclk), .rst, .rx_byte, .rx_dv, .sample_tick, .tap(rate_tap)
  );

  write_enable u_wr_ctl (
    .clk(mclk), .rst, .start, .sample_tick, .addr_last(wr_last),
    .buf_load(wr_buf_load), .mem_we, .cnt_clear(wr_clear), .cnt_inc(wr_inc),
    .capturing, .write_done
  );

  data_buffer #(.W(8)) u_in_buf (
    .clk(mclk), .rst, .load(wr_buf_load), .d(probe_s2), .q(in_buf_q)
  );

  addr_counter #(.DEPTH(DEPTH)) u_wr_cnt (
    .clk(mclk), .rst, .clear(wr_clear), .inc(wr_inc), .addr(waddr), .last(wr_last)
  );

  sample_sram #(.W(8), .DEPTH(DEPTH)) u_sram (
    .clk(mclk), .rst, .we(mem_we), .waddr, .wdata(in_buf_q),
    .re(mem_re), .raddr, .rdata(mem_rdata), .last_wr(data_out_2)
  );

  read_enable u_rd_ctl (
    .clk(mclk), .rst, .start, .write_done, .addr_last(rd_last), .tx_busy(tx_active), .tx_done,
    .mem_re, .buf_load(rd_buf_load), .tx_dv, .cnt_clear(rd_clear),
    .cnt_inc(rd_inc), .reading, .read_done
  );

  addr_counter #(.DEPTH(DEPTH)) u_rd_cnt (
    .clk(mclk), .rst, .clear(rd_clear), .inc(rd_inc), .addr(raddr), .last(rd_last)
  );

  data_buffer #(.W(8)) u_out_buf (
    .clk(mclk), .rst, .load(rd_buf_load), .d(mem_rdata), .q(out_buf_q)
  );

  uart_tx #(.CLKS_PER_BIT(TX_CLKS_PER_BIT)) u_tx (
    .clk(mclk), .rst, .tx_byte(out_buf_q), .tx_dv, .tx_active, .tx_serial, .tx_done
  );

  // Progress display: upper eight bits of each address.
  always_comb begin
    logic [31:0] w32, r32;
    w32 = 32'(waddr);
    r32 = 32'(raddr);
    if (AW > 8) begin
      w32 = w32 >> (AW - 8);
      r32 = r32 >> (AW - 8);
    end
    led_show_write = w32[7:0];
    led_show_read  = r32[7:0];
  end

endmodule
