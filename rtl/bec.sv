// bec: WIDTH-bit binary-to-excess-1 converter, y = a + 1 (mod 2^WIDTH).
//
// Bit 0 is inverted; every higher bit i is a[i] XOR (a[i-1] & ... & a[0]).
// The AND terms are formed as a chain, each stage ANDing one more input bit
// onto the previous term, as in the 4-bit circuit (E0 = ~A0, E1 = A1^A0,
// E2 = A2^(A1&A0), E3 = A3^(A2&A1&A0)). The default of 4 bits is that
// circuit; the carry-select group uses WIDTH+1 bits so that the carry-out of
// its ripple-carry adder is converted too. Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] all_ones;   // all_ones[i] = &a[i-1:0], all_ones[0] = 1

  assign all_ones[0] = 1'b1;
  assign y[0]        = ~a[0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    assign all_ones[i] = (i == 1) ? a[0] : (all_ones[i-1] & a[i-1]);
    assign y[i]        = a[i] ^ all_ones[i];
  end
endmodule
