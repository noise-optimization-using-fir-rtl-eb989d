// full_subtractor: one-bit full subtractor, d = a - b - c.
//
// d      = a ^ b ^ c
// borrow = (~a & b) | (~(a ^ b) & c)
// borrow is 1 when a < b + c. Inputs: a is the minuend, b the subtrahend and
// c the incoming borrow. The gate structure (two XORs, two ANDs each with one
// inverted input, one OR) follows the usual full-subtractor circuit.
// Purely combinational.
module full_subtractor (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d,
  output logic borrow
);
  logic x;

  assign x      = a ^ b;
  assign d      = x ^ c;
  assign borrow = (~a & b) | (~x & c);
endmodule
