// full_adder: one-bit full adder.
//
// s    = a ^ b ^ cin
// cout = (a & b) | (cin & (a ^ b))
// These are the sum and carry equations and the gate structure (two XORs,
// two ANDs, one OR) of the classic full adder; the carry equation shares the
// a ^ b term with the sum. The final OR could equally be an XOR, since its
// two inputs are never 1 together; the OR is kept. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;

  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
