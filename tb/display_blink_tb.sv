// display_blink_tb: exhaustive self-checking test of the blinking LED copy.
//
// With a period of N = 6 every combination of run, count (0..5) and seconds
// is applied. While stopped the LEDs must show seconds; while running they
// must show it for count 5..3 (first half of the second) and be dark for
// count 2..0.
module display_blink_tb;

  localparam int unsigned N = 6;

  logic       run;
  logic [2:0] count;
  logic [3:0] seconds;
  logic [3:0] led;

  int checks   = 0;
  int failures = 0;

  display_blink #(.N(N), .SW(4)) dut (.run, .count, .seconds, .led);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < N; c++)
        for (int s = 0; s < 16; s++) begin
          logic [3:0] exp_led;
          run = r[0]; count = c[2:0]; seconds = s[3:0];
          #1;
          exp_led = (r == 1 && c <= 2) ? 4'd0 : s[3:0];
          checks++;
          if (led !== exp_led) begin
            failures++;
            $display("FAIL run=%0d count=%0d seconds=%0d led=%0d", r, c, s, led);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
