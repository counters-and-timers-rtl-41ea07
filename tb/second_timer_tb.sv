// second_timer_tb: self-checking test of the one-second down-counter.
//
// A small instance (N = 6) runs next to a reference that simply counts clock
// cycles since reset: while running, count must equal (N-1) - (cycles mod N),
// so it repeats 5,4,3,2,1,0 with period 6. The test also checks that count
// holds while run is low, that reset_n reloads N-1 from any state, and that an
// instance at the default size reloads 49,999,999 (one second at 50 MHz).
module second_timer_tb;

  localparam int unsigned N = 6;
  localparam int unsigned W = $clog2(N);

  logic         clk = 1'b0;
  logic         reset_n;
  logic         run;
  logic [W-1:0] count;
  logic [$clog2(kt_pkg::CLK_HZ)-1:0] count_full;

  int checks   = 0;
  int failures = 0;

  second_timer #(.N(N)) dut (.clk, .reset_n, .run, .count);
  second_timer          dut_full (.clk, .reset_n, .run(1'b0), .count(count_full));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t count=%0d)", what, $time, count);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ticks;   // cycles counted while running since reset
  int unsigned zeros;   // how many times count == 0 was seen
  int unsigned last_zero, this_cycle;

  initial begin
    reset_n = 1'b0;
    run     = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(count == W'(N-1), "reset loads N-1");
    check(count_full == 26'(kt_pkg::CLK_HZ - 1), "default size reloads CLK_HZ-1");

    // Run for several periods and compare with the cycle-count reference.
    reset_n = 1'b1;
    run     = 1'b1;
    ticks = 0; zeros = 0; last_zero = 0; this_cycle = 0;
    repeat (5 * N) begin
      @(posedge clk); #1;
      ticks++;
      this_cycle++;
      check(count == W'((N - 1) - (ticks % N)), "count follows N-1 - (t mod N)");
      if (count == '0) begin
        if (zeros > 0) check(this_cycle - last_zero == N, "count == 0 once every N cycles");
        zeros++;
        last_zero = this_cycle;
      end
    end
    check(zeros == 5, "five periods seen in 5N cycles");

    // Stop: the count must hold.
    run = 1'b0;
    begin
      logic [W-1:0] held;
      @(posedge clk); #1;
      held = count;
      repeat (7) begin
        @(posedge clk); #1;
        check(count == held, "count holds while stopped");
      end
    end

    // Resume, then reset in the middle of a period.
    run = 1'b1;
    repeat (2) @(posedge clk);
    reset_n = 1'b0;
    @(posedge clk); #1;
    check(count == W'(N-1), "reset mid-period reloads N-1");
    reset_n = 1'b1;
    @(posedge clk); #1;
    check(count == W'(N-2), "counting restarts after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
