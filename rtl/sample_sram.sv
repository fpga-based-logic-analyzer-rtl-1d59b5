// Sample memory: DEPTH words of W bits with one write port and one read
// port on the master clock (a simple dual-port block RAM).
//
// A write stores wdata at waddr on the clock edge where we is high. A read
// with re high returns mem[raddr] on rdata after that clock edge, one cycle
// of latency; rdata holds otherwise. last_wr holds the most recently
// written word, a live view of the probes while a capture runs. The memory
// itself is not reset; rdata and last_wr are.
//
// The default 4096 x 8 bits is the analyzer's capture depth for its eight
// channels. The read latency and the last_wr output are this design's
// choices.
module sample_sram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, active high (outputs only)
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic [W-1:0]  last_wr
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata   <= '0;
      last_wr <= '0;
    end else begin
      if (re) rdata   <= mem[raddr];
      if (we) last_wr <= wdata;
    end
  end

endmodule
