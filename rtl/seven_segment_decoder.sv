// seven_segment_decoder: drives one seven-segment digit from a 4-bit value.
//
// Values 0..9 show as decimal digits and 10..15 as the hexadecimal letters
// A b C d E F, as a hexadecimal display does. The voting machine only ever
// feeds it BCD digits from the decimal converter, so in normal use the
// letters never appear; they are what a raw count of ten or more would show.
// Segments are active high, seg[0] = a (top) clockwise to seg[5] = f, and
// seg[6] = g (middle); polarity and order are choices of this design.
// Purely combinational.
module seven_segment_decoder
  import voting_pkg::*;
(
  input  logic [3:0] digit,
  output seg7_t      seg
);
  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      4'hF: seg = 7'b111_0001;
    endcase
  end
endmodule
