// six_vote_counter: counts how many of six vote lines are set (0..6).
//
// Two full adders each take three vote lines and give a 2-bit count
// {carry, sum} of 0..3. The two counts go to the two lowest-order input
// pairs of a 4-bit parallel adder (A1/A2 and B1/B2, A3/A4 and B3/B4 held
// low, carry-in low), whose sum is the number of votes. This is the basic
// cell of the counting tree. Purely combinational.
//
// The adder's sum bit 3 and carry-out can never be set (6 < 8); they are
// left unused on purpose.
module six_vote_counter (
  input  logic [5:0] votes,
  output logic [2:0] count
);
  logic s0, c0, s1, c1;
  logic [3:0] sum;
  logic       cout_unused;

  full_adder u_fa0 (.a(votes[0]), .b(votes[1]), .cin(votes[2]), .sum(s0), .cout(c0));
  full_adder u_fa1 (.a(votes[3]), .b(votes[4]), .cin(votes[5]), .sum(s1), .cout(c1));

  parallel_adder_4bit u_add (
    .a   ({2'b00, c0, s0}),
    .b   ({2'b00, c1, s1}),
    .cin (1'b0),
    .sum (sum),
    .cout(cout_unused)
  );

  assign count = sum[2:0];
endmodule
