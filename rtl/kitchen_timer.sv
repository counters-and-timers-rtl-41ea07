// kitchen_timer: a countdown kitchen timer built from counters and a
// run/stop flip-flop, all clocked by one 50 MHz clock.
//
// After reset the timer shows its start time (INIT_SECONDS, 9 s by default)
// and is stopped. Each press of the run/stop pushbutton toggles between
// running and stopped. While running, the time remaining drops by one each
// second until it reaches zero; the alarm is on while the timer is running
// with no time left, and the next run/stop press turns it off.
//
// Structure (as in the lab's block diagram):
//   sync_debounce   cleans the raw run/stop pushbutton;
//   run_state       toggles run on each rising edge of the clean button;
//   second_timer    divides the clock by CLK_HZ: count == 0 once a second;
//   seconds_counter loads INIT_SECONDS on reset, counts down on those ticks;
//   alarm_logic     alarm = run and seconds == 0.
// Two optional displays are added beside the required outputs: led, a copy
// of seconds that blinks while running (display_blink), and seg, the time
// remaining as one hexadecimal 7-segment digit (seg7_decoder).
//
// All registers share clk and have no asynchronous set or clear; reset_n is
// sampled like any other input and only selects the value loaded on the next
// edge, as the lab requires. reset_n is used without a synchronizer, as in
// the lab; only run/stop is synchronised and debounced. The debouncer and the
// optional displays are this design's own, as is holding the one-second
// count while stopped.
//
// Timing: a run/stop press takes effect 3 + DEBOUNCE_CYCLES edges after it
// reaches run_stop_in; the first decrement follows CLK_HZ edges after run
// goes high, and one every CLK_HZ edges after that.
module kitchen_timer #(
  parameter int unsigned             CLK_HZ          = kt_pkg::CLK_HZ,
  parameter logic [kt_pkg::SECONDS_W-1:0] INIT_SECONDS = kt_pkg::INIT_SECONDS,
  parameter int unsigned             DEBOUNCE_CYCLES = kt_pkg::DEBOUNCE_CYCLES,
  parameter bit                      SEG_ACTIVE_LOW  = 1'b0
) (
  input  logic                         clk,          // 50 MHz board clock
  input  logic                         reset_n,      // reset pushbutton, low = pressed
  input  logic                         run_stop_in,  // raw run/stop pushbutton
  output logic [kt_pkg::SECONDS_W-1:0] seconds,      // time remaining (LEDs)
  output logic                         alarm,        // time is up (LED)
  output logic [kt_pkg::SECONDS_W-1:0] led,          // seconds, blinking while running
  output logic [6:0]                   seg           // seconds as a 7-segment digit
);

  localparam int unsigned SW = kt_pkg::SECONDS_W;
  localparam int unsigned CW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;

  logic          run_stop;  // debounced pushbutton level
  logic          run;       // 1 while the timer is running
  logic [CW-1:0] count;     // cycles left in the current second

  sync_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .sw_in  (run_stop_in),
    .clk    (clk),
    .sw_out (run_stop)
  );

  run_state u_run (
    .clk      (clk),
    .reset_n  (reset_n),
    .run_stop (run_stop),
    .run      (run)
  );

  second_timer #(.N(CLK_HZ)) u_timer (
    .clk     (clk),
    .reset_n (reset_n),
    .run     (run),
    .count   (count)
  );

  seconds_counter #(.CW(CW), .SW(SW), .INIT(INIT_SECONDS)) u_seconds (
    .clk     (clk),
    .reset_n (reset_n),
    .run     (run),
    .count   (count),
    .seconds (seconds)
  );

  alarm_logic #(.SW(SW)) u_alarm (
    .run     (run),
    .seconds (seconds),
    .alarm   (alarm)
  );

  display_blink #(.N(CLK_HZ), .SW(SW)) u_blink (
    .run     (run),
    .count   (count),
    .seconds (seconds),
    .led     (led)
  );

  seg7_decoder #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg (
    .value (seconds),
    .seg   (seg)
  );

endmodule
