// hex_to_decimal_converter: turns a 5-bit vote count (0..24) into a tens and
// a units BCD digit for two seven-segment displays.
//
// A count of ten or more is not a valid BCD digit, so the converter corrects
// it by adding six, in two stages built from 4-bit parallel adders:
//
//   Stage 1: with bits A B C D = count[3:0] and Cout = count[4], the
//     detector F1 = A(B + C) + Cout is true for 10..15 and for every count of
//     16 or more. When F1 is set, six (0110) is added to count[3:0]; F1 is
//     also the "1" of the tens digit.
//   Stage 2: counts of twenty and above (Cout and (A or B)) still leave a
//     stage-1 units value of 10..14. The detector F2 adds six again, which
//     wraps the units into 0..4 and carries out; a half adder adds that
//     carry to F1 and so raises the tens digit from 1 to 2.
//
// The detectors and the two add-six stages follow the converter's published
// design; taking F2 from the count itself is this design's reading of
// "detect twenty and above". The result is correct for counts 0..25, which
// covers a 24-voter machine; larger inputs are outside its range. Purely
// combinational. The stage-1 carry-out carries no information beyond F1
// and is left unused.
module hex_to_decimal_converter
  import voting_pkg::*;
(
  input  logic [COUNT_W-1:0] bin,
  output bcd2_t              dec
);
  logic       f1, f2;
  logic [3:0] units1;
  logic       c1_unused, c2;
  logic       tens0, tens1;

  // Detect 10..15 in the low nibble, or a fifth-bit carry (16 and above).
  assign f1 = (bin[3] & (bin[2] | bin[1])) | bin[4];
  // Detect twenty and above: 1_01xx or 1_1xxx.
  assign f2 = bin[4] & (bin[3] | bin[2]);

  parallel_adder_4bit u_add6_a (
    .a   (bin[3:0]),
    .b   ({1'b0, f1, f1, 1'b0}),
    .cin (1'b0),
    .sum (units1),
    .cout(c1_unused)
  );

  parallel_adder_4bit u_add6_b (
    .a   (units1),
    .b   ({1'b0, f2, f2, 1'b0}),
    .cin (1'b0),
    .sum (dec.units),
    .cout(c2)
  );

  half_adder u_tens (.a(f1), .b(c2), .sum(tens0), .carry(tens1));

  assign dec.tens = {2'b00, tens1, tens0};
endmodule
