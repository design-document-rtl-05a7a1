// hex7seg: active-low seven-segment decoder for one hexadecimal digit.
//
// seg[0] drives segment a, seg[1] b, ... seg[6] g (a on top, then
// clockwise, g in the middle); a segment is lit when its bit is 0, the
// polarity of the board's HEX displays. Digits 0-9 show the predicted class;
// 10-15 show A, b, C, d, E, F. Purely combinational. Active-low output and
// the 4-bit input follow the design description; the segment order and the
// shapes of 10-15 are this design's own choice (the usual DE1-SoC wiring).
module hex7seg (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  logic [6:0] lit;  // 1 = segment on, bit order g f e d c b a

  always_comb begin
    unique case (digit)
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
      default: lit = 7'b000_0000;
    endcase
  end

  assign seg = ~lit;

endmodule
