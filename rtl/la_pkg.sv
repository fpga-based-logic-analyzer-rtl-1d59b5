// Shared constants of the logic analyzer.
//
// The PC controls the analyzer with single ASCII characters sent over the
// UART. The command set is this design's own choice (the original text only
// says that ASCII characters carry the commands):
//   'S'            start a capture: clear both address counters, fill the
//                  sample memory at the selected rate, then upload it.
//   'a' + k        select sample-rate tap k+1 of the 32-bit master-clock
//                  counter, k = 0..30 ('a'..8'h7F). Tap n ticks at
//                  f_mclk / 2^(n+1): with a 50 MHz master clock 'a' gives
//                  12.5 MHz, 'b' 6.25 MHz, 'f' 390.625 kHz, 't' 23.84 Hz,
//                  'x' 1.49 Hz.
package la_pkg;

  localparam int unsigned CNT_W    = 32;       // width of the rate counter

  localparam logic [7:0] CMD_START     = 8'h53; // 'S'
  localparam logic [7:0] CMD_RATE_BASE = 8'h61; // 'a' selects tap 1
  localparam logic [4:0] TAP_MIN       = 5'd1;  // fastest tap: f_mclk/4
  localparam logic [4:0] TAP_MAX       = 5'd31; // slowest tap

  // Map a received byte to a counter tap; valid is 0 for other bytes.
  function automatic logic [5:0] rate_cmd_tap(input logic [7:0] b);
    logic [7:0] k;
    k = b - CMD_RATE_BASE;
    if (b >= CMD_RATE_BASE && k <= 8'(TAP_MAX - TAP_MIN))
      return {1'b1, 5'(k) + TAP_MIN};
    return '0;
  endfunction

endpackage
