// run_state_tb: self-checking test of the run/stop flip-flop.
//
// Checks that reset clears run, that each new press (a rising edge of
// run_stop) toggles it exactly once however long the button is held, that it
// changes on the first clock edge that samples run_stop high, and that reset
// wins over a press in the same cycle. Random presses are then compared with
// a toggle-count reference.
module run_state_tb;

  logic clk = 1'b0;
  logic reset_n;
  logic run_stop;
  logic run;
  logic expected;

  int checks   = 0;
  int failures = 0;

  run_state dut (.clk, .reset_n, .run_stop, .run);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t run=%0b expected=%0b)", what, $time, run, expected);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Press: run_stop high for `hold` cycles, then low for `gap` cycles.
  task automatic press(input int hold, input int gap);
    run_stop = 1'b1;
    @(posedge clk); #1;
    expected = !expected;
    check(run == expected, "toggle on the edge that samples the press");
    repeat (hold - 1) begin
      @(posedge clk); #1;
      check(run == expected, "no further toggle while held");
    end
    run_stop = 1'b0;
    repeat (gap) begin
      @(posedge clk); #1;
      check(run == expected, "no toggle on release");
    end
  endtask

  initial begin
    reset_n = 1'b0; run_stop = 1'b0; expected = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(run == 1'b0, "reset clears run");
    reset_n = 1'b1;
    repeat (3) @(posedge clk); #1;
    check(run == 1'b0, "stays stopped without a press");

    press(5, 3);   // run
    press(1, 1);   // stop
    press(20, 2);  // run again

    // Reset while running, with a press in the same cycle: reset wins.
    reset_n = 1'b0; run_stop = 1'b1;
    @(posedge clk); #1;
    expected = 1'b0;
    check(run == 1'b0, "reset wins over a simultaneous press");
    reset_n = 1'b1; run_stop = 1'b0;
    repeat (2) @(posedge clk); #1;
    check(run == 1'b0, "stopped after reset");

    repeat (100) press($urandom_range(1, 6), $urandom_range(1, 6));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
