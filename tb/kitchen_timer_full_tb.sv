// kitchen_timer_full_tb: one complete countdown of the kitchen timer at its
// real size: 50 MHz clock, one second = 50,000,000 cycles, 10 ms debounce,
// 9-second start time (about 460 million clock cycles in all).
//
// After power-up and reset the timer must show 9 and stay stopped. A 20 ms
// run/stop press with contact bounce starts it; each of the nine decrements
// must land exactly CLK_HZ edges after the previous one, the first one
// 3 + DEBOUNCE_CYCLES + CLK_HZ edges after the button became steady. At zero
// the alarm must be on, and a second press must turn it off.
module kitchen_timer_full_tb;

  localparam longint unsigned HZ   = kt_pkg::CLK_HZ;
  localparam longint unsigned D    = kt_pkg::DEBOUNCE_CYCLES;
  localparam logic [3:0]      INIT = kt_pkg::INIT_SECONDS;

  logic       clk = 1'b0;
  logic       reset_n;
  logic       run_stop_in;
  logic [3:0] seconds;
  logic       alarm;
  logic [3:0] led;
  logic [6:0] seg;

  int checks   = 0;
  int failures = 0;

  kitchen_timer dut (.clk, .reset_n, .run_stop_in, .seconds, .alarm, .led, .seg);

  always #5 clk = ~clk;

  longint unsigned edge_no = 0;
  always @(posedge clk) edge_no++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (edge=%0d seconds=%0d alarm=%0b)", what, edge_no, seconds, alarm);
    end
  endtask

  initial begin : watchdog
    repeat (HZ * (INIT + 2)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A 20 ms press with 1 ms of bounce at each end; returns the edge after
  // which the button was steadily pressed.
  task automatic press(output longint unsigned steady_edge);
    repeat (5) begin
      run_stop_in = 1'b1; repeat (D / 10) @(posedge clk);
      run_stop_in = 1'b0; repeat (D / 50) @(posedge clk);
    end
    @(posedge clk); #1;
    steady_edge = edge_no;
    run_stop_in = 1'b1;
    repeat (2 * D) @(posedge clk);
    repeat (5) begin
      run_stop_in = 1'b0; repeat (D / 10) @(posedge clk);
      run_stop_in = 1'b1; repeat (D / 50) @(posedge clk);
    end
    #1 run_stop_in = 1'b0;
    repeat (2 * D) @(posedge clk);
    #1;
  endtask

  longint unsigned t_press, t_prev, t_now;
  logic [3:0] s;

  initial begin
    reset_n = 1'b0;
    run_stop_in = 1'b0;
    repeat (3 * D) @(posedge clk);
    #1;
    check(seconds == INIT && !alarm, "reset shows the start time, no alarm");
    reset_n = 1'b1;
    repeat (D) @(posedge clk);
    #1 check(seconds == INIT, "does not count before run/stop");

    fork
      press(t_press);
      begin
        s = seconds;
        t_prev = 0;
        repeat (INIT) begin
          @(seconds);
          t_now = edge_no;
          check(seconds == s - 4'd1, "steps down by one");
          if (t_prev == 0)
            check(t_now == t_press + 3 + D + HZ,
                  $sformatf("first second %0d edges after the press", t_now - t_press));
          else
            check(t_now - t_prev == HZ,
                  $sformatf("one second = %0d edges", t_now - t_prev));
          t_prev = t_now;
          s = seconds;
          $display("seconds=%0d at edge %0d", seconds, t_now);
        end
      end
    join
    check(seconds == 4'd0, "countdown reached zero");
    check(t_prev == t_press + 3 + D + INIT * HZ, "zero reached nine seconds after the press");
    @(posedge clk); #1;
    check(alarm, "alarm on at zero");

    press(t_press);
    check(!alarm && seconds == 4'd0, "run/stop turns the alarm off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
