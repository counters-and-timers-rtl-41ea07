// alarm_logic_tb: exhaustive self-checking test of the alarm output.
//
// Every combination of run and a 4-bit time remaining is applied; the alarm
// must be on only for run = 1 with zero time left.
module alarm_logic_tb;

  logic       run;
  logic [3:0] seconds;
  logic       alarm;

  int checks   = 0;
  int failures = 0;

  alarm_logic #(.SW(4)) dut (.run, .seconds, .alarm);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int s = 0; s < 16; s++) begin
        run = r[0];
        seconds = s[3:0];
        #1;
        checks++;
        if (alarm !== (r == 1 && s == 0)) begin
          failures++;
          $display("FAIL run=%0d seconds=%0d alarm=%0b", r, s, alarm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
