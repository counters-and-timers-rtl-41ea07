// seconds_counter: the time-remaining register of the kitchen timer.
//
// On a clock edge with reset_n low it loads the initial time INIT. Otherwise
// it counts down by one on each edge where the one-second timer is at zero
// (count == 0), the timer is running (run = 1) and time is left
// (seconds != 0); it never wraps below zero. This behaviour follows the lab
// description; reset is synchronous, as the description requires.
//
// Interface: count is the one-second timer's register (any width CW), run the
// run/stop state, seconds the value shown on the LEDs. Timing: seconds changes
// on the clock edge that ends the cycle in which count == 0.
module seconds_counter #(
  parameter int unsigned               CW   = $clog2(kt_pkg::CLK_HZ), // count width
  parameter int unsigned               SW   = kt_pkg::SECONDS_W,      // seconds width
  parameter logic [SW-1:0]             INIT = kt_pkg::INIT_SECONDS    // start value
) (
  input  logic          clk,
  input  logic          reset_n,  // low: reload INIT on the next edge
  input  logic          run,
  input  logic [CW-1:0] count,
  output logic [SW-1:0] seconds
);

  logic [SW-1:0] seconds_next;
  logic          tick;

  // One-second event, only counted while running and before reaching zero.
  assign tick = run && (count == '0) && (seconds != '0);

  always_comb begin
    if (!reset_n)  seconds_next = INIT;
    else if (tick) seconds_next = seconds - 1'b1;
    else           seconds_next = seconds;
  end

  always_ff @(posedge clk) seconds <= seconds_next;

  // Outside reset the time remaining only holds or drops by exactly one.
  a_monotonic : assert property (@(posedge clk)
      reset_n |=> (seconds == $past(seconds)) || (seconds == $past(seconds) - 1'b1))
    else $error("seconds_counter: time remaining changed by more than one step");

endmodule
