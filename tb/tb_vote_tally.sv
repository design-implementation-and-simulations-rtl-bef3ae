// tb_vote_tally: checks the 24-line vote counter. It applies no votes, all
// votes, every single vote, every count 0..24 as a contiguous run of votes
// starting at each position, and 20000 random patterns, and compares the
// 5-bit count with the number of lines set. Combinational.
module tb_vote_tally;
  import voting_pkg::*;
  logic [N_VOTERS-1:0] votes;
  logic [COUNT_W-1:0]  count;
  int checks = 0, failures = 0;

  vote_tally dut (.votes(votes), .count(count));

  task automatic check();
    #1;
    checks++;
    if (int'(count) != $countones(votes)) begin
      failures++;
      $display("FAIL votes=%b count=%0d expected %0d", votes, count, $countones(votes));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    votes = '0; check();
    votes = '1; check();
    for (int i = 0; i < N_VOTERS; i++) begin
      votes = '0; votes[i] = 1'b1; check();
    end
    for (int n = 0; n <= N_VOTERS; n++)
      for (int s = 0; s < N_VOTERS; s++) begin
        votes = '0;
        for (int k = 0; k < n; k++) votes[(s + k) % N_VOTERS] = 1'b1;
        check();
      end
    for (int r = 0; r < 20000; r++) begin
      votes = N_VOTERS'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
