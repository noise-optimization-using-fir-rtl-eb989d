// csa_group: one carry-select adder group, {cout, s} = a + b + cin.
//
// Instead of a second ripple-carry adder for carry-in 1, the group has one
// ripple-carry adder with carry-in 0 and a (WIDTH+1)-bit binary-to-excess-1
// converter that adds one to that adder's {carry, sum}. The real carry-in
// then only drives the select of a 2:1 multiplexer, so it passes through one
// multiplexer instead of rippling through WIDTH full adders. The default of
// 4 bits is the group size of the circuit this follows. Purely combinational.
//
// USE_BEC = 0 builds the form the converter replaces: a second ripple-carry
// adder with carry-in 1 gives r1 directly (two adders, one multiplexer).
// Both forms give the same {cout, s}; USE_BEC = 1 (the default) is the one
// the design is about.
module csa_group #(
  parameter int unsigned WIDTH   = 4,
  parameter bit          USE_BEC = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] r0;   // {carry, sum} for carry-in 0
  logic [WIDTH:0] r1;   // {carry, sum} for carry-in 1

  rca #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .s   (r0[WIDTH-1:0]),
    .cout(r0[WIDTH])
  );

  if (USE_BEC) begin : g_bec
    bec #(.WIDTH(WIDTH + 1)) u_bec (
      .a(r0),
      .y(r1)
    );
  end else begin : g_rca1
    rca #(.WIDTH(WIDTH)) u_rca1 (
      .a   (a),
      .b   (b),
      .cin (1'b1),
      .s   (r1[WIDTH-1:0]),
      .cout(r1[WIDTH])
    );
  end

  assign {cout, s} = cin ? r1 : r0;
endmodule
