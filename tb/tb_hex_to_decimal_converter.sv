// tb_hex_to_decimal_converter: applies every count of the converter's range
// (0..25) and checks that the tens digit is count / 10 and the units digit
// count % 10. It also counts how often each correction path is used: no
// correction (0..9), one add-six (10..19) and two add-six stages with the
// half-adder tens increment (20..25), and fails if one was never taken.
module tb_hex_to_decimal_converter;
  import voting_pkg::*;
  logic [COUNT_W-1:0] bin;
  bcd2_t              dec;
  int checks = 0, failures = 0;
  int n_plain = 0, n_one_fix = 0, n_two_fix = 0;

  hex_to_decimal_converter dut (.bin(bin), .dec(dec));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 25; v++) begin
      bin = COUNT_W'(v);
      #1;
      checks++;
      if (int'(dec.tens) != v / 10 || int'(dec.units) != v % 10) begin
        failures++;
        $display("FAIL %0d shown as %0d%0d", v, dec.tens, dec.units);
      end
      if (v < 10) n_plain++;
      else if (v < 20) n_one_fix++;
      else n_two_fix++;
    end
    $display("paths: plain=%0d one_add6=%0d two_add6=%0d", n_plain, n_one_fix, n_two_fix);
    checks++;
    if (n_plain == 0 || n_one_fix == 0 || n_two_fix == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
