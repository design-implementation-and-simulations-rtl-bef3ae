// tb_parallel_adder_4bit: exhaustive check of the 4-bit look-ahead adder.
// All 512 combinations of a, b and cin are applied and {cout, sum} is
// compared with the integer a + b + cin. Combinational.
module tb_parallel_adder_4bit;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  parallel_adder_4bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
