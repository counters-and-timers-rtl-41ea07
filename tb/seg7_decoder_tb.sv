// seg7_decoder_tb: self-checking test of the 7-segment decoder.
//
// The expected pattern is built per segment rather than per digit: for each
// segment a..g a 16-bit mask lists the hexadecimal digits that light it
// (bit k set: digit k lights the segment). Every value is checked on an
// active-high and an active-low instance.
module seg7_decoder_tb;

  // Digits lighting each segment, bit k = digit k (F..0 from left to right).
  localparam logic [15:0] SEG_A = 16'b1101_0111_1110_1101; // 0 2 3 5 6 7 8 9 A C E F
  localparam logic [15:0] SEG_B = 16'b0010_0111_1001_1111; // 0 1 2 3 4 7 8 9 A d
  localparam logic [15:0] SEG_C = 16'b0010_1111_1111_1011; // 0 1 3-9 A b d
  localparam logic [15:0] SEG_D = 16'b0111_1011_0110_1101; // 0 2 3 5 6 8 9 b C d E
  localparam logic [15:0] SEG_E = 16'b1111_1101_0100_0101; // 0 2 6 8 A b C d E F
  localparam logic [15:0] SEG_F = 16'b1101_1111_0111_0001; // 0 4 5 6 8 9 A b C E F
  localparam logic [15:0] SEG_G = 16'b1110_1111_0111_1100; // 2-6 8 9 A b d E F

  logic [3:0] value;
  logic [6:0] seg_hi, seg_lo;

  int checks   = 0;
  int failures = 0;

  seg7_decoder                   dut_hi (.value, .seg(seg_hi));
  seg7_decoder #(.ACTIVE_LOW(1)) dut_lo (.value, .seg(seg_lo));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] exp_seg;
      value = v[3:0];
      exp_seg = {SEG_G[v], SEG_F[v], SEG_E[v], SEG_D[v], SEG_C[v], SEG_B[v], SEG_A[v]};
      #1;
      checks += 2;
      if (seg_hi !== exp_seg) begin
        failures++;
        $display("FAIL value=%h seg=%b expected=%b", v, seg_hi, exp_seg);
      end
      if (seg_lo !== ~exp_seg) begin
        failures++;
        $display("FAIL active-low value=%h seg=%b expected=%b", v, seg_lo, ~exp_seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
