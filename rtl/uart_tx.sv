// UART transmitter, 8 data bits, no parity, one stop bit, LSB first.
//
// Sends the captured sample bytes to the PC. A one-cycle tx_dv while the
// transmitter is idle latches tx_byte and starts a frame: start bit, eight
// data bits, stop bit, each CLKS_PER_BIT master-clock cycles long. tx_active
// is high from the cycle after tx_dv until the stop bit ends; tx_done pulses
// for one cycle at the end of the stop bit, so a new byte may be offered in
// the same cycle. tx_dv while busy is ignored. A frame lasts
// 10 * CLKS_PER_BIT cycles.
//
// The default CLKS_PER_BIT, 5208, is 9600 baud at a 50 MHz master clock,
// the line rate the analyzer uses. Frame format and reset are this design's
// choices.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic [7:0] tx_byte,
  input  logic       tx_dv,      // start strobe, honoured while idle
  output logic       tx_active,
  output logic       tx_serial,  // idle high
  output logic       tx_done     // one-cycle strobe at end of stop bit
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] clk_cnt;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [9:0]    frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_active <= 1'b0;
      tx_serial <= 1'b1;
      tx_done   <= 1'b0;
      clk_cnt   <= '0;
      bit_idx   <= '0;
      frame     <= '1;
    end else begin
      tx_done <= 1'b0;
      if (!tx_active) begin
        tx_serial <= 1'b1;
        if (tx_dv) begin
          tx_active <= 1'b1;
          frame     <= {1'b1, tx_byte, 1'b0};
          tx_serial <= 1'b0;
          clk_cnt   <= '0;
          bit_idx   <= '0;
        end
      end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
        clk_cnt <= '0;
        if (bit_idx == 4'd9) begin
          tx_active <= 1'b0;
          tx_done   <= 1'b1;
          tx_serial <= 1'b1;
        end else begin
          bit_idx   <= bit_idx + 1'b1;
          tx_serial <= frame[bit_idx + 1'b1];
        end
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end

endmodule
