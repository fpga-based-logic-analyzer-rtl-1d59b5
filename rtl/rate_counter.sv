// Sample-rate generator ("32-bit clock").
//
// A 32-bit counter runs freely on the master clock. A rate command from the
// PC (see la_pkg) selects one of its bits, tap n = 1..31; the analyzer takes
// one sample per rising edge of that bit, i.e. every 2^(n+1) master-clock
// cycles, at f_mclk / 2^(n+1). At 50 MHz this spans 12.5 MHz (tap 1) down to
// below 1 Hz, and includes the 6.25 MHz, 390.625 kHz and 23.84 Hz rates
// the analyzer was demonstrated with.
//
// Instead of clocking the sample logic from the divided signal, the design
// stays in the master-clock domain: sample_tick is a one-cycle enable on
// each rising edge of the selected bit. tap shows the current selection.
// After reset the fastest tap (1) is selected. Tap 0 (f_mclk/2) is not
// offered, so consecutive ticks are always at least four cycles apart.
// The tick-enable scheme, the command encoding and the reset tap are this
// design's choices.
module rate_counter
  import la_pkg::*;
(
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  logic [7:0] rx_byte,
  input  logic       rx_dv,
  output logic       sample_tick, // one-cycle sample enable
  output logic [4:0] tap          // selected counter bit
);

  logic [CNT_W-1:0] count;
  logic             tap_q;        // selected bit, one cycle late
  logic [5:0]       cmd;

  assign cmd = rate_cmd_tap(rx_byte);

  always_ff @(posedge clk) begin
    if (rst) begin
      count       <= '0;
      tap         <= TAP_MIN;
      tap_q       <= 1'b0;
      sample_tick <= 1'b0;
    end else begin
      count       <= count + 1'b1;
      if (rx_dv && cmd[5]) tap <= cmd[4:0];
      tap_q       <= count[tap];
      sample_tick <= count[tap] && !tap_q;
    end
  end

endmodule
