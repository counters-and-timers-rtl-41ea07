// rising_edge_detect_tb: self-checking test of the edge detector.
//
// sig is driven with random levels, changed just after each clock edge; the
// testbench remembers the level it drove in the previous cycle and expects
// sig_rising exactly when that level was 0 and the current one is 1. A long
// high level must give a single one-cycle pulse.
module rising_edge_detect_tb;

  logic clk = 1'b0;
  logic sig;
  logic sig_rising;
  logic prev;

  int checks   = 0;
  int failures = 0;
  int pulses;

  rising_edge_detect dut (.clk, .sig, .sig_rising);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t sig=%0b prev=%0b rising=%0b)", what, $time, sig, prev, sig_rising);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig = 1'b0;
    @(posedge clk); #1;
    prev = sig;

    // Long high level: exactly one pulse.
    sig = 1'b1; pulses = 0;
    repeat (10) begin
      #1 if (sig_rising) pulses++;
      @(posedge clk); #1;
    end
    check(pulses == 1, "one pulse for a long high level");
    sig = 1'b0;
    @(posedge clk); #1;
    prev = 1'b0;

    repeat (2000) begin
      sig = $urandom_range(0, 1) != 0;
      #1;
      check(sig_rising == (sig && !prev), "sig_rising == sig & ~previous");
      @(posedge clk); #1;
      prev = sig;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
