// vote_input_select: the input selection section of the voting machine.
//
// Each voter has one three-position switch: YES, NO or undecided. The
// switch closes exactly one contact, so each voter drives one line into the
// YES adder tree and one into the NO adder tree; the undecided position
// drives neither and is therefore never counted. Bit i of yes / no belongs
// to voter i. The code 2'b11 cannot come from a mechanical switch; it is
// treated as undecided so that no voter is ever counted twice (a choice of
// this design). Purely combinational.
module vote_input_select
  import voting_pkg::*;
#(
  parameter int unsigned N = N_VOTERS
) (
  input  vote_e          sw  [N],
  output logic [N-1:0]   yes,
  output logic [N-1:0]   no
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      yes[i] = (sw[i] == VOTE_YES);
      no[i]  = (sw[i] == VOTE_NO);
    end
  end
endmodule
