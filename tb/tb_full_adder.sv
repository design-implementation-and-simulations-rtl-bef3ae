// tb_full_adder: exhaustive check of the full adder against the eight rows
// of its truth table, written out here as literal rows {a, b, cin, sum,
// cout}, and against the arithmetic a + b + cin. Combinational.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  localparam logic [4:0] ROWS [8] = '{
    5'b000_00, 5'b010_10, 5'b100_10, 5'b110_01,
    5'b001_10, 5'b011_01, 5'b101_01, 5'b111_11
  };

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ROWS[r]) begin
      {a, b, cin} = ROWS[r][4:2];
      #1;
      checks++;
      if ({sum, cout} !== ROWS[r][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: sum=%b cout=%b", a, b, cin, sum, cout);
      end
      checks++;
      if (2 * int'(cout) + int'(sum) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL arithmetic a=%b b=%b cin=%b", a, b, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
