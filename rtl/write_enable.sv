// Write controller ("write enable" / write-stop buffer).
//
// Runs one capture. The start pulse clears the write address counter
// (cnt_clear) and arms the controller. While capturing, each sample tick
// loads the probe byte into the input buffer (buf_load); in the next cycle
// the buffered byte is written to the sample memory (mem_we) and the write
// address counter advances (cnt_inc). The write into the last location
// (addr_last) ends the capture: capturing drops and write_done rises and
// stays high until the next start. A capture of DEPTH samples therefore
// takes DEPTH sample periods, and nothing is written after it.
//
// The analyzer always fills the whole memory; the number of samples the PC
// shows is chosen on the PC side. The one-cycle split between buffer load
// and memory write is this design's choice.
module write_enable (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic start,        // one-cycle start command
  input  logic sample_tick,  // from the rate counter
  input  logic addr_last,    // write address is the last location
  output logic buf_load,     // input buffer enable
  output logic mem_we,       // sample memory write enable
  output logic cnt_clear,    // clear write address counter
  output logic cnt_inc,      // advance write address counter
  output logic capturing,
  output logic write_done
);

  logic wr_pend;

  assign buf_load  = capturing && sample_tick && !start;
  assign mem_we    = wr_pend;
  assign cnt_inc   = wr_pend;
  assign cnt_clear = start;

  always_ff @(posedge clk) begin
    if (rst) begin
      capturing  <= 1'b0;
      write_done <= 1'b0;
      wr_pend    <= 1'b0;
    end else if (start) begin
      capturing  <= 1'b1;
      write_done <= 1'b0;
      wr_pend    <= 1'b0;
    end else begin
      wr_pend <= buf_load;
      if (wr_pend && addr_last) begin
        capturing  <= 1'b0;
        write_done <= 1'b1;
      end
    end
  end

endmodule
