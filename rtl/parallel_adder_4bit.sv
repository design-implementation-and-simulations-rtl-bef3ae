// parallel_adder_4bit: 4-bit binary adder with fast look-ahead carry,
// modelled on the 74HC283.
//
// Adds a[3:0] + b[3:0] + cin. Bit 0 carries weight 2^0 (pins A1/B1), bit 3
// weight 2^3 (A4/B4). Each bit's sum is formed as in a full adder,
// p xor c, but the carries into bits 1..3 and the carry out are computed
// directly from the generate (a and b) and propagate (a xor b) terms of the
// lower bits instead of rippling, which is what makes the part "fast
// look-ahead". cout is the fifth sum bit, or the carry into a next adder.
// Purely combinational.
module parallel_adder_4bit (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [3:0] g, p;
  logic [4:0] c;

  assign g = a & b;
  assign p = a ^ b;

  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
              | (p[2] & p[1] & p[0] & cin);
  assign c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
              | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & cin);

  assign sum  = p ^ c[3:0];
  assign cout = c[4];
endmodule
