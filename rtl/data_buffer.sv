// Eight-bit data buffer.
//
// A holding register with a load enable: q takes d on a clock edge where
// load is high and keeps its value otherwise. The analyzer has two of them.
// The input buffer catches the probe byte on each sample tick and holds it
// while the sample memory writes it; the output buffer catches the byte read
// from the sample memory and holds it while the UART transmitter sends it.
// Reset clears q. Width W defaults to the analyzer's eight channels.
module data_buffer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
