// vote_tally: counts how many of the 24 voters chose one option (0..24).
//
// The 24 lines of one option (all YES lines, or all NO lines) are split into
// two groups of twelve, each counted by a twelve_vote_counter. The outputs
// of these two parallel-adder stages feed one more 4-bit parallel adder; its
// four sum bits and its carry-out form the 5-bit count. One vote_tally is
// used for YES and one for NO. Purely combinational: the count follows the
// switches after the adder delays.
module vote_tally
  import voting_pkg::*;
(
  input  logic [N_VOTERS-1:0] votes,
  output logic [COUNT_W-1:0]  count
);
  logic [3:0] lo_count, hi_count;

  twelve_vote_counter u_lo (.votes(votes[11:0]),  .count(lo_count));
  twelve_vote_counter u_hi (.votes(votes[23:12]), .count(hi_count));

  parallel_adder_4bit u_add (
    .a   (lo_count),
    .b   (hi_count),
    .cin (1'b0),
    .sum (count[3:0]),
    .cout(count[4])
  );
endmodule
