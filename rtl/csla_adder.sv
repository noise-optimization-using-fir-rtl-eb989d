// csla_adder: WIDTH-bit carry-select adder, {cout, s} = a + b + cin.
//
// The operands are cut into GROUP-bit groups. The lowest group is a plain
// ripple-carry adder fed by cin; every higher group is a csa_group (ripple-
// carry adder plus binary-to-excess-1 converter plus multiplexer), whose
// multiplexer is selected by the carry of the group below. All groups compute
// in parallel; only the carry chain through the multiplexers is serial.
// When WIDTH is not a multiple of GROUP the top group is padded with zeros
// and cout is taken from the first padding bit. Purely combinational; the
// default 4-bit group follows the circuit, the default width of 16 is a
// choice of this design (users set WIDTH). USE_BEC = 0 gives every higher
// group a second ripple-carry adder instead of the converter (see csa_group).
module csla_adder #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned GROUP   = 4,
  parameter bit          USE_BEC = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NG = (WIDTH + GROUP - 1) / GROUP;
  localparam int unsigned PW = NG * GROUP;

  logic [PW-1:0] ap, bp, sp;
  logic [NG:0]   c;

  assign ap   = PW'(a);
  assign bp   = PW'(b);
  assign c[0] = cin;

  rca #(.WIDTH(GROUP)) u_g0 (
    .a   (ap[GROUP-1:0]),
    .b   (bp[GROUP-1:0]),
    .cin (c[0]),
    .s   (sp[GROUP-1:0]),
    .cout(c[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_grp
    csa_group #(.WIDTH(GROUP), .USE_BEC(USE_BEC)) u_grp (
      .a   (ap[g*GROUP +: GROUP]),
      .b   (bp[g*GROUP +: GROUP]),
      .cin (c[g]),
      .s   (sp[g*GROUP +: GROUP]),
      .cout(c[g+1])
    );
  end

  assign s = sp[WIDTH-1:0];

  if (PW == WIDTH) begin : g_exact
    assign cout = c[NG];
  end else begin : g_padded
    assign cout = sp[WIDTH];
  end
endmodule
