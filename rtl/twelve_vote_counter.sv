// twelve_vote_counter: counts how many of twelve vote lines are set (0..12).
//
// Twelve lines are the inputs of four full adders (3 x 4 = 12). They are
// taken as two six-vote cells (two full adders and one parallel adder each)
// whose 3-bit counts are summed by a further 4-bit parallel adder. The
// result, 0..12, fits the adder's four sum bits; its carry-out is never set
// and is left unused. Purely combinational.
module twelve_vote_counter (
  input  logic [11:0] votes,
  output logic [3:0]  count
);
  logic [2:0] lo_count, hi_count;
  logic       cout_unused;

  six_vote_counter u_lo (.votes(votes[5:0]),  .count(lo_count));
  six_vote_counter u_hi (.votes(votes[11:6]), .count(hi_count));

  parallel_adder_4bit u_add (
    .a   ({1'b0, lo_count}),
    .b   ({1'b0, hi_count}),
    .cin (1'b0),
    .sum (count),
    .cout(cout_unused)
  );
endmodule
