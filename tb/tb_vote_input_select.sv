// tb_vote_input_select: drives random switch positions (including the
// unused code 2'b11) to all 24 voters and checks that each YES line is set
// exactly for a YES switch and each NO line exactly for a NO switch, so no
// voter ever reaches both adder trees and undecided voters reach neither.
module tb_vote_input_select;
  import voting_pkg::*;
  vote_e               sw [N_VOTERS];
  logic [N_VOTERS-1:0] yes, no;
  int checks = 0, failures = 0;

  vote_input_select dut (.sw(sw), .yes(yes), .no(no));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      foreach (sw[i]) sw[i] = vote_e'($urandom_range(0, 3));
      #1;
      foreach (sw[i]) begin
        logic [1:0] code;
        code = sw[i];
        checks++;
        if (yes[i] !== (code == 2'b01) || no[i] !== (code == 2'b10)) begin
          failures++;
          $display("FAIL voter %0d code %b: yes=%b no=%b", i, code, yes[i], no[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
