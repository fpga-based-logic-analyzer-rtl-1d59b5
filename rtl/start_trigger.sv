// Start trigger: turns the PC's start command into a capture start.
//
// Watches the bytes delivered by the UART receiver. When a byte equal to
// la_pkg::CMD_START ('S') arrives, start pulses high for one cycle, one
// cycle after rx_dv. The pulse clears both address counters and arms the
// write and read controllers. Every other byte is ignored here.
//
// The analyzer is started by a command from the PC rather than by a
// condition on the probe inputs; which character starts it, and the
// registered one-cycle pulse, are this design's choices.
module start_trigger
  import la_pkg::*;
(
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic [7:0] rx_byte,
  input  logic       rx_dv,
  output logic       start      // one-cycle pulse
);

  always_ff @(posedge clk) begin
    if (rst) start <= 1'b0;
    else     start <= rx_dv && (rx_byte == CMD_START);
  end

endmodule
