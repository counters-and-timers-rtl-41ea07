// kt_pkg: constants shared by the kitchen-timer modules.
//
// The timer runs from a 50 MHz board clock, shows the time remaining on
// four LEDs (a 4-bit count) and starts from 8 + (n mod 8) seconds, where n
// is a digit chosen per board (the worked example uses n = 9, giving 9 s).
// These numbers follow the lab description. The debounce interval is this
// design's own choice: about 10 ms of stable input at 50 MHz.
package kt_pkg;

  // Board oscillator frequency, and so the length of one second in cycles.
  localparam int unsigned CLK_HZ = 50_000_000;

  // Width of the time-remaining register (four LEDs).
  localparam int unsigned SECONDS_W = 4;

  // Start value of the countdown: 8 + (n mod 8), so always in 8..15 and
  // always representable in SECONDS_W bits.
  function automatic logic [SECONDS_W-1:0] initial_seconds(int unsigned n);
    return SECONDS_W'(8 + (n % 8));
  endfunction

  // Digit used by the worked example; gives a 9-second countdown.
  localparam int unsigned ID_DIGIT = 9;
  localparam logic [SECONDS_W-1:0] INIT_SECONDS = initial_seconds(ID_DIGIT);

  // Cycles the synchronised pushbutton must stay at a new level before the
  // debounced output follows it (10 ms at 50 MHz).
  localparam int unsigned DEBOUNCE_CYCLES = 500_000;

endpackage
