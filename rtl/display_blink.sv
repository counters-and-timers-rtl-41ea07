// display_blink: blinking LED copy of the time remaining.
//
// While the timer runs, the LEDs show the time remaining during the first
// half of each second and are dark during the second half; when stopped they
// show it steadily. The blink comes from comparing the one-second count with
// half its period, which gives a 50% duty cycle at 1 Hz without a second
// clock. Blinking while running is an optional feature of the lab; the
// comparison scheme and the choice of which half is dark are this design's.
// The required seconds output is left unchanged; this module only feeds a
// separate LED output.
//
// Interface: count from second_timer (period N), run, seconds in; led out
// (combinational).
module display_blink #(
  parameter int unsigned N  = kt_pkg::CLK_HZ,
  parameter int unsigned SW = kt_pkg::SECONDS_W,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          run,
  input  logic [CW-1:0] count,
  input  logic [SW-1:0] seconds,
  output logic [SW-1:0] led
);

  logic dark;

  // count runs from N-1 down to 0: the lower half is the end of the second.
  assign dark = run && (count < CW'(N / 2));
  assign led  = dark ? '0 : seconds;

endmodule
