// voting_machine: a 24-voter YES/NO voting machine built only from adders.
//
// Every voter has a three-position switch (YES, NO, undecided). The input
// section turns the switches into 24 YES lines and 24 NO lines. Each set of
// lines is counted by its own tree of full adders and 4-bit look-ahead
// parallel adders (vote_tally), giving a 5-bit binary count 0..24. Each
// count goes through an add-six binary-to-decimal converter and two
// seven-segment decoders, so the assembly sees two two-digit decimal
// displays, one for YES and one for NO.
//
// There is no clock, no reset and no storage: the displays follow the
// switches continuously, so a voter may change their vote at any time while
// voting is open and the totals change with it. The count of undecided
// voters is 24 - yes_count - no_count and is not shown.
//
// Ports: sw[i] is voter i's switch; yes_count/no_count are the binary
// totals; yes_dec/no_dec the decimal digits; *_seg_tens and *_seg_units the
// segment drives of the four display digits.
module voting_machine
  import voting_pkg::*;
(
  input  vote_e              sw [N_VOTERS],
  output logic [COUNT_W-1:0] yes_count,
  output logic [COUNT_W-1:0] no_count,
  output bcd2_t              yes_dec,
  output bcd2_t              no_dec,
  output seg7_t              yes_seg_tens,
  output seg7_t              yes_seg_units,
  output seg7_t              no_seg_tens,
  output seg7_t              no_seg_units
);
  logic [N_VOTERS-1:0] yes_lines, no_lines;

  vote_input_select #(.N(N_VOTERS)) u_inputs (
    .sw (sw),
    .yes(yes_lines),
    .no (no_lines)
  );

  vote_tally u_yes_tally (.votes(yes_lines), .count(yes_count));
  vote_tally u_no_tally  (.votes(no_lines),  .count(no_count));

  hex_to_decimal_converter u_yes_conv (.bin(yes_count), .dec(yes_dec));
  hex_to_decimal_converter u_no_conv  (.bin(no_count),  .dec(no_dec));

  seven_segment_decoder u_yes_tens  (.digit(yes_dec.tens),  .seg(yes_seg_tens));
  seven_segment_decoder u_yes_units (.digit(yes_dec.units), .seg(yes_seg_units));
  seven_segment_decoder u_no_tens   (.digit(no_dec.tens),   .seg(no_seg_tens));
  seven_segment_decoder u_no_units  (.digit(no_dec.units),  .seg(no_seg_units));
endmodule
