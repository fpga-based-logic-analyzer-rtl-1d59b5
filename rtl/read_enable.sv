// Read controller ("read enable" / read-stop buffer).
//
// Uploads a finished capture to the PC. The start pulse clears the read
// address counter and arms the controller; it then waits for write_done.
// For each location it runs four steps:
//   READ   mem_re: the sample memory reads the current read address;
//   LOAD   buf_load: the output buffer takes the memory's read data;
//   SEND   once the transmitter is idle (tx_busy low), tx_dv: the UART
//          transmitter takes the output buffer;
//   WAIT   until tx_done; then advance the read address (cnt_inc), or, if
//          that was the last location (addr_last), finish.
// read_done then stays high until the next start. A start in any state
// restarts the sequence; a byte already handed to the transmitter is still
// sent, and the next upload waits for it to finish. Upload time is DEPTH UART frames plus three cycles
// per byte.
//
// Starting the upload by itself once the capture is complete, and the
// one-byte-at-a-time handshake with the transmitter, are this design's
// choices.
module read_enable (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic start,        // one-cycle start command
  input  logic write_done,   // capture complete
  input  logic addr_last,    // read address is the last location
  input  logic tx_busy,      // UART transmitter is sending
  input  logic tx_done,      // UART transmitter finished a byte
  output logic mem_re,       // sample memory read enable
  output logic buf_load,     // output buffer enable
  output logic tx_dv,        // start a UART byte
  output logic cnt_clear,    // clear read address counter
  output logic cnt_inc,      // advance read address counter
  output logic reading,      // upload in progress
  output logic read_done
);

  typedef enum logic [2:0] {IDLE, ARMED, READ, LOAD, SEND, WAIT, DONE} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else if (start) state <= ARMED;
    else begin
      unique case (state)
        IDLE:  state <= IDLE;
        ARMED: if (write_done) state <= READ;
        READ:  state <= LOAD;
        LOAD:  state <= SEND;
        SEND:  if (!tx_busy) state <= WAIT;
        WAIT:  if (tx_done) state <= addr_last ? DONE : READ;
        DONE:  state <= DONE;
        default: state <= IDLE;
      endcase
    end
  end

  assign cnt_clear = start;
  assign mem_re    = (state == READ) && !start;
  assign buf_load  = (state == LOAD) && !start;
  assign tx_dv     = (state == SEND) && !tx_busy && !start;
  assign cnt_inc   = (state == WAIT) && tx_done && !addr_last && !start;
  assign reading   = (state inside {READ, LOAD, SEND, WAIT});
  assign read_done = (state == DONE);

endmodule
