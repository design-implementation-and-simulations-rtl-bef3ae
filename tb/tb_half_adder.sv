// tb_half_adder: exhaustive check of the half adder against its truth
// table, written out here as literal rows. Combinational: each input pair
// is applied and the outputs are sampled one time step later.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  // Truth table rows {a, b, sum, carry}.
  localparam logic [3:0] ROWS [4] = '{4'b0000, 4'b0110, 4'b1010, 4'b1101};

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ROWS[r]) begin
      {a, b} = ROWS[r][3:2];
      #1;
      checks++;
      if ({sum, carry} !== ROWS[r][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b: sum=%b carry=%b, expected %b", a, b, sum, carry, ROWS[r][1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
