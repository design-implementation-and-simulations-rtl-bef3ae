// half_adder: adds two 1-bit values into a sum and a carry.
//
// sum = a xor b, carry = a and b, exactly the truth table of the classic
// half adder. Purely combinational, no clock. In the voting machine it
// increments the tens digit of a display when the second add-six correction
// of the decimal converter carries out.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
