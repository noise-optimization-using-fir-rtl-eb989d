// rca: WIDTH-bit ripple-carry adder, {cout, s} = a + b + cin.
//
// A cascade of full_adder cells, the carry of bit i feeding bit i+1. The
// default of 4 bits is the group size of the carry-select adder. Purely
// combinational; the delay grows linearly with WIDTH.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
