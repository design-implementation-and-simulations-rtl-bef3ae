// full_adder: adds three 1-bit values into a sum and a carry.
//
// sum = (a xor b) xor cin and cout = (a xor b) and cin, or a and b: the
// textbook gate form of the full adder. Purely combinational. In the voting
// machine the three inputs are three voters' lines, so {cout, sum} is the
// number of them that are set (0..3).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (p & cin) | (a & b);
endmodule
