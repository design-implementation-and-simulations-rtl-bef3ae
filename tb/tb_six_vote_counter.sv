// tb_six_vote_counter: all 64 patterns of six vote lines; the count must
// equal the number of lines set. Combinational.
module tb_six_vote_counter;
  logic [5:0] votes;
  logic [2:0] count;
  int checks = 0, failures = 0;

  six_vote_counter dut (.votes(votes), .count(count));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      votes = 6'(i);
      #1;
      checks++;
      if (int'(count) != $countones(votes)) begin
        failures++;
        $display("FAIL votes=%b count=%0d", votes, count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
