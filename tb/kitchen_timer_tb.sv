// kitchen_timer_tb: end-to-end self-checking test of the kitchen timer.
//
// The timer is built with a 20-cycle "second" and a 4-cycle debounce so that
// whole countdowns take a few hundred cycles; everything else is as in the
// full design. Pushbutton presses are driven with contact bounce. The test
// follows the lab's demonstration list: correct start value and no counting
// after reset; count down on a press, stop on the next, restart on the
// third; reset during a run reloads the time and stops; the alarm comes on at
// zero and goes off on the next press. Timing is checked to the cycle: a
// clean press reaches the run state 3 + DEBOUNCE_CYCLES edges after it is
// applied, the first decrement follows CLK_HZ edges later, and decrements
// are CLK_HZ edges apart. A monitor checks that seconds only ever steps down
// by one (or reloads on reset) and that alarm, led and seg agree with it.
// Each mechanism is counted and one that never happened is a failure.
module kitchen_timer_tb;

  localparam int unsigned HZ   = 20;
  localparam int unsigned D    = 4;
  localparam logic [3:0]  INIT = 4'd9;

  logic       clk = 1'b0;
  logic       reset_n;
  logic       run_stop_in;
  logic [3:0] seconds;
  logic       alarm;
  logic [3:0] led;
  logic [6:0] seg;

  int checks   = 0;
  int failures = 0;

  kitchen_timer #(.CLK_HZ(HZ), .INIT_SECONDS(INIT), .DEBOUNCE_CYCLES(D)) dut (
    .clk, .reset_n, .run_stop_in, .seconds, .alarm, .led, .seg
  );

  always #5 clk = ~clk;

  // Clock edge counter and the edge of the latest change of seconds.
  longint unsigned edge_no = 0;
  always @(posedge clk) edge_no++;

  // Mechanisms of the design, counted as they happen.
  int n_reset_load, n_idle_hold, n_start, n_decrement, n_pause, n_restart;
  int n_reset_running, n_alarm_on, n_hold_zero, n_alarm_off, n_bounce_rejected;
  int n_blink_dark, n_blink_lit;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (edge=%0d seconds=%0d alarm=%0b led=%0d)", what, edge_no, seconds, alarm, led);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Segment pattern {g..a} expected for the few values the test looks at.
  function automatic logic [6:0] seg_of(input logic [3:0] v);
    case (v)
      4'd0:    return 7'b011_1111;
      4'd5:    return 7'b110_1101;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'bxxx_xxxx;
    endcase
  endfunction

  // Monitor: seconds moves only by -1 (or reloads during reset); outputs agree.
  logic [3:0] prev_seconds;
  bit         monitor_on = 1'b0;
  logic       reset_at_edge;
  always @(posedge clk) begin
    reset_at_edge = !reset_n;  // the value this edge acted on
    #2;
    if (monitor_on) begin
      if (seconds != prev_seconds && !reset_at_edge)
        check(seconds == prev_seconds - 4'd1, "seconds steps down by one");
      if (led == 4'd0 && seconds != 4'd0) n_blink_dark++;
      if (led == seconds && seconds != 4'd0 && dut.run) n_blink_lit++;
      check(led == seconds || led == 4'd0, "led shows seconds or is dark");
      if (!dut.run) check(led == seconds, "led steady while stopped");
      check(alarm == (dut.run && seconds == 4'd0), "alarm = run and seconds == 0");
      if (seconds inside {4'd0, 4'd5, 4'd8, 4'd9})
        check(seg == seg_of(seconds), "seg shows seconds");
    end
    prev_seconds = seconds;
  end

  // A bouncing press: short pulses, then steady high from the returned edge,
  // then a bouncing release. Returns the edge after which the level was steady.
  task automatic press(output longint unsigned steady_edge);
    repeat (3) begin
      run_stop_in = 1'b1; repeat ($urandom_range(1, D - 1)) @(posedge clk);
      run_stop_in = 1'b0; repeat ($urandom_range(1, 2)) @(posedge clk);
    end
    @(posedge clk); #1;
    steady_edge = edge_no;
    run_stop_in = 1'b1;
    repeat (D + 8) @(posedge clk);
    repeat (3) begin
      run_stop_in = 1'b0; repeat ($urandom_range(1, D - 1)) @(posedge clk);
      run_stop_in = 1'b1; repeat ($urandom_range(1, 2)) @(posedge clk);
    end
    #1 run_stop_in = 1'b0;
    repeat (D + 8) @(posedge clk);
    #1;
  endtask

  // Wait for the next change of seconds; return the edge it happened on.
  task automatic next_change(output longint unsigned at);
    logic [3:0] s;
    s = seconds;
    while (seconds == s) @(posedge clk);
    at = edge_no;
    #1;
  endtask

  longint unsigned t_press, t_dec, t_prev;
  logic [3:0] s_hold;

  initial begin
    reset_n = 1'b0;
    run_stop_in = 1'b0;
    repeat (3 * D + 10) @(posedge clk);
    #1;
    check(seconds == INIT, "reset loads the start time");
    check(alarm == 1'b0, "no alarm after reset");
    check(led == INIT, "led shows the start time");
    n_reset_load++;
    monitor_on = 1'b1;

    // After reset: shows the start time and does not count.
    reset_n = 1'b1;
    repeat (5 * HZ) @(posedge clk);
    #1 check(seconds == INIT, "no counting before run/stop");
    n_idle_hold++;

    // Bounce alone (every level shorter than the debounce time) does nothing.
    repeat (5) begin
      run_stop_in = 1'b1; repeat ($urandom_range(1, D - 1)) @(posedge clk);
      run_stop_in = 1'b0; repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    repeat (3 * HZ) @(posedge clk);
    #1 check(seconds == INIT && !dut.run, "bounce alone does not start the timer");
    n_bounce_rejected++;

    // First press: start. First decrement 3 + D + HZ edges after the press.
    fork
      press(t_press);
      next_change(t_dec);
    join
    check(t_dec == t_press + 3 + D + HZ,
          $sformatf("first decrement %0d edges after the press (expected %0d)",
                    t_dec - t_press, 3 + D + HZ));
    check(seconds == INIT - 1, "one second gone");
    n_start++; n_decrement++;
    repeat (2) begin
      t_prev = t_dec;
      next_change(t_dec);
      check(t_dec - t_prev == HZ, "decrements are CLK_HZ edges apart");
      n_decrement++;
    end
    check(seconds == INIT - 3, "three seconds gone");

    // Second press: stop. Time holds for several seconds.
    press(t_press);
    s_hold = seconds;
    repeat (4 * HZ) @(posedge clk);
    #1 check(seconds == s_hold && !alarm, "time holds while stopped");
    n_pause++;

    // Third press: counting resumes.
    fork
      press(t_press);
      next_change(t_dec);
    join
    check(seconds <= s_hold - 1 && t_dec - t_press <= 3 + D + HZ,
          "counting resumes within a second of the third press");
    n_restart++; n_decrement++;

    // Reset while running: start time reloaded, timer stopped.
    @(posedge clk); #1 reset_n = 1'b0;
    @(posedge clk); #1 reset_n = 1'b1;
    check(seconds == INIT && !dut.run, "reset while running reloads and stops");
    repeat (3 * HZ) @(posedge clk);
    #1 check(seconds == INIT, "stays stopped after reset");
    n_reset_running++;

    // Run to zero: alarm on, time stays at zero.
    press(t_press);
    while (seconds != 4'd0) begin
      next_change(t_dec);
      n_decrement++;
    end
    check(t_dec == t_press + 3 + D + INIT * HZ, "zero reached INIT seconds after the press");
    @(posedge clk); #1;
    check(alarm == 1'b1, "alarm on at zero while running");
    n_alarm_on++;
    repeat (3 * HZ) @(posedge clk);
    #1 check(seconds == 4'd0 && alarm, "time stays at zero, alarm stays on");
    n_hold_zero++;

    // Next press: alarm off.
    press(t_press);
    check(alarm == 1'b0 && seconds == 4'd0, "run/stop turns the alarm off");
    n_alarm_off++;

    // Every mechanism must have happened.
    check(n_reset_load > 0,      "mechanism: reset load");
    check(n_idle_hold > 0,       "mechanism: idle hold");
    check(n_bounce_rejected > 0, "mechanism: bounce rejected");
    check(n_start > 0,           "mechanism: start");
    check(n_decrement >= INIT,   "mechanism: one-second decrement");
    check(n_pause > 0,           "mechanism: pause");
    check(n_restart > 0,         "mechanism: restart");
    check(n_reset_running > 0,   "mechanism: reset while running");
    check(n_alarm_on > 0,        "mechanism: alarm on");
    check(n_hold_zero > 0,       "mechanism: hold at zero");
    check(n_alarm_off > 0,       "mechanism: alarm off");
    check(n_blink_dark > 0,      "mechanism: blink dark phase");
    check(n_blink_lit > 0,       "mechanism: blink lit phase");
    $display("mechanisms: reset_load=%0d idle_hold=%0d bounce_rejected=%0d start=%0d decrement=%0d pause=%0d restart=%0d reset_running=%0d alarm_on=%0d hold_zero=%0d alarm_off=%0d blink_dark=%0d blink_lit=%0d",
             n_reset_load, n_idle_hold, n_bounce_rejected, n_start, n_decrement, n_pause,
             n_restart, n_reset_running, n_alarm_on, n_hold_zero, n_alarm_off,
             n_blink_dark, n_blink_lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
