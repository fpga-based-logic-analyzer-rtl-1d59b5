// UART receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// Receives the ASCII command characters the PC sends to the analyzer. The
// serial input is synchronised with two flip-flops. A falling edge starts a
// frame; the start bit is checked again half a bit later, then every data
// bit is sampled in the middle of its bit time, CLKS_PER_BIT master-clock
// cycles apart. After the middle of the stop bit the byte appears on rx_byte
// and rx_dv pulses high for one cycle; rx_byte holds until the next byte.
// A frame whose stop bit is low is dropped.
//
// CLKS_PER_BIT = f_mclk / baud. The default, 5208, is 9600 baud at a 50 MHz
// master clock, the line rate the analyzer uses. Frame format, the
// synchroniser, the stop-bit check and the synchronous reset are this
// design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       rx_serial,  // idle high
  output logic [7:0] rx_byte,
  output logic       rx_dv       // one-cycle strobe: rx_byte is new
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t         state;
  logic [CW-1:0]  clk_cnt;
  logic [2:0]     bit_idx;
  logic [7:0]     shift;
  logic [1:0]     sync;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx_serial};
  end

  wire rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      shift   <= '0;
      rx_byte <= '0;
      rx_dv   <= 1'b0;
    end else begin
      rx_dv <= 1'b0;
      unique case (state)
        IDLE: begin
          clk_cnt <= '0;
          bit_idx <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (clk_cnt == CW'((CLKS_PER_BIT - 1) / 2)) begin
            clk_cnt <= '0;
            state   <= rx ? IDLE : DATA;   // glitch: not a start bit
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shift   <= {rx, shift[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= IDLE;
            if (rx) begin
              rx_byte <= shift;
              rx_dv   <= 1'b1;
            end
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
