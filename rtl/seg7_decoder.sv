// seg7_decoder: shows a 4-bit value on one 7-segment digit.
//
// The value is shown as a hexadecimal digit (0-9, then A, b, C, d, E, F), so
// every start value of the timer (up to 15) fits on one digit. Output bit 0 is
// segment a and bit 6 segment g, in the usual clockwise a-f order with g in
// the middle. A 7-segment display is an optional feature of the lab; the
// digit style, bit order and polarity (ACTIVE_LOW) are this design's choices.
//
// Interface: value in, seg out (combinational).
module seg7_decoder #(
  parameter bit ACTIVE_LOW = 1'b0  // 1: a lit segment is driven low
) (
  input  logic [3:0] value,
  output logic [6:0] seg    // {g, f, e, d, c, b, a}
);

  logic [6:0] lit;

  always_comb begin
    unique case (value)
      4'h0: lit = 7'b011_1111;
      4'h1: lit = 7'b000_0110;
      4'h2: lit = 7'b101_1011;
      4'h3: lit = 7'b100_1111;
      4'h4: lit = 7'b110_0110;
      4'h5: lit = 7'b110_1101;
      4'h6: lit = 7'b111_1101;
      4'h7: lit = 7'b000_0111;
      4'h8: lit = 7'b111_1111;
      4'h9: lit = 7'b110_1111;
      4'hA: lit = 7'b111_0111;
      4'hB: lit = 7'b111_1100;
      4'hC: lit = 7'b011_1001;
      4'hD: lit = 7'b101_1110;
      4'hE: lit = 7'b111_1001;
      4'hF: lit = 7'b111_0001;
    endcase
  end

  assign seg = ACTIVE_LOW ? ~lit : lit;

endmodule
