// seconds_counter_tb: self-checking test of the time-remaining register.
//
// count, run and reset_n are driven with random values; a reference register
// in the testbench applies the rule "load INIT on reset, else subtract one
// when run and count == 0 and not yet zero" and is compared every cycle. A
// directed part runs the counter all the way to zero and checks it stays
// there.
module seconds_counter_tb;

  localparam int unsigned CW   = 3;
  localparam int unsigned SW   = 4;
  localparam logic [SW-1:0] INIT = 4'd9;

  logic          clk = 1'b0;
  logic          reset_n;
  logic          run;
  logic [CW-1:0] count;
  logic [SW-1:0] seconds;

  int checks   = 0;
  int failures = 0;
  int expected;

  seconds_counter #(.CW(CW), .SW(SW), .INIT(INIT)) dut (.clk, .reset_n, .run, .count, .seconds);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t seconds=%0d expected=%0d)", what, $time, seconds, expected);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, updated on the same edge from the values driven before it.
  task automatic step();
    @(posedge clk);
    if (!reset_n)                                   expected = INIT;
    else if (run && count == 0 && expected > 0)     expected = expected - 1;
    #1;
    check(seconds == SW'(expected), "seconds matches reference");
  endtask

  initial begin
    reset_n = 1'b0; run = 1'b0; count = '0; expected = 0;
    step();
    check(seconds == INIT, "reset loads INIT");

    // Counting only on run && count == 0.
    reset_n = 1'b1;
    count = 3'd0; run = 1'b0; step();
    check(seconds == INIT, "no decrement while stopped");
    count = 3'd2; run = 1'b1; step();
    check(seconds == INIT, "no decrement when count != 0");
    count = 3'd0; run = 1'b1; step();
    check(seconds == INIT - 1, "decrement on run && count == 0");

    // Run down to zero and stay there.
    repeat (20) step();
    check(seconds == '0, "reached zero");
    repeat (5) step();
    check(seconds == '0, "does not wrap below zero");

    // Random stimulus against the reference.
    repeat (2000) begin
      reset_n = ($urandom_range(0, 29) != 0);
      run     = $urandom_range(0, 3) != 0;
      count   = ($urandom_range(0, 1) != 0) ? '0 : CW'($urandom);
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
