// tb_seven_segment_decoder: checks all 16 input values. The expected
// pattern is rebuilt segment by segment from per-segment masks: bit d of
// LIT[s] is set when digit d lights segment s (a..g) on a hexadecimal
// display (digits 0-9, then A b C d E F).
module tb_seven_segment_decoder;
  import voting_pkg::*;
  logic [3:0] digit;
  seg7_t      seg;
  int checks = 0, failures = 0;

  //                              a         b         c         d         e         f         g
  localparam logic [15:0] LIT [7] = '{16'hD7ED, 16'h279F, 16'h2FFB, 16'h7B6D, 16'hFD45, 16'hDF71, 16'hEF7C};

  seven_segment_decoder dut (.digit(digit), .seg(seg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      for (int s = 0; s < 7; s++) begin
        checks++;
        if (seg[s] !== LIT[s][d]) begin
          failures++;
          $display("FAIL digit %h segment %0d = %b", digit, s, seg[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
