// sync_debounce_tb: self-checking test of the pushbutton debouncer.
//
// With DEBOUNCE_CYCLES = 8 the test checks that: the output settles to a
// steady input after power-up; bursts of bounce, each level lasting fewer
// than 8 cycles, never reach the output; and a clean change reaches the
// output exactly 2 + 8 clock edges after it is applied (two synchronizer
// edges, then eight stable cycles), for both a press and a release.
module sync_debounce_tb;

  localparam int unsigned D = 8;

  logic clk = 1'b0;
  logic sw_in;
  logic sw_out;

  int checks   = 0;
  int failures = 0;

  sync_debounce #(.DEBOUNCE_CYCLES(D)) dut (.sw_in, .clk, .sw_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t sw_in=%0b sw_out=%0b)", what, $time, sw_in, sw_out);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bounce around `level_from`: random short pulses of the other level.
  task automatic bounce(input logic level_from, input int n);
    repeat (n) begin
      sw_in = !level_from;
      repeat ($urandom_range(1, D - 2)) @(posedge clk);
      sw_in = level_from;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1 check(sw_out == level_from, "bounce does not reach the output");
    end
  endtask

  // Apply a clean change and measure the edges until the output follows.
  task automatic clean_change(input logic level);
    int edges;
    @(posedge clk); #1;
    sw_in = level;
    edges = 0;
    while (sw_out != level && edges < 100) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == 2 + D, $sformatf("latency 2+D edges (got %0d)", edges));
  endtask

  initial begin
    sw_in = 1'b0;
    repeat (3 * D + 10) @(posedge clk);
    #1 check(sw_out == 1'b0, "settles low after power-up");

    repeat (20) begin
      bounce(1'b0, 10);
      clean_change(1'b1);
      repeat (D + 4) @(posedge clk);
      bounce(1'b1, 10);
      clean_change(1'b0);
      repeat (D + 4) @(posedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
