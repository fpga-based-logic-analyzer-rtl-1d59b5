// Memory address counter, one for the write side and one for the read side
// of the sample memory.
//
// clear sets the address to 0; otherwise inc adds one, wrapping from
// DEPTH-1 to 0. clear wins over inc. last is high while the address is
// DEPTH-1, so a controller can stop after the final location. With the
// default DEPTH of 4096 the address is 12 bits wide, one per memory line.
module addr_counter #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,    // synchronous, active high
  input  logic          clear,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          last
);

  always_ff @(posedge clk) begin
    if (rst || clear)                     addr <= '0;
    else if (inc && addr == AW'(DEPTH-1)) addr <= '0;
    else if (inc)                         addr <= addr + 1'b1;
  end

  assign last = (addr == AW'(DEPTH - 1));

endmodule
