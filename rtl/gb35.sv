// gb35: multiplication of a two's-complement sample by the constant 35 with
// two adder/subtractor stages that share an intermediate term.
//
// VARIANT 0:  t = x + 4x = 5x,   y = 8t - t = 35x
// VARIANT 1:  t = 8x - x = 7x,   y = 4t + t = 35x
// Additions use the carry-select adder and subtractions the ripple-borrow
// subtractor. The output is W + 6 bits wide, enough for 35 times any W-bit
// input. Purely combinational. The default input width of 16 bits is this
// design's choice.
module gb35 #(
  parameter int unsigned W       = 16,
  parameter int unsigned VARIANT = 0,
  localparam int unsigned OW     = W + 6
) (
  input  logic [W-1:0]  x,
  output logic [OW-1:0] y
);
  logic [OW-1:0] xe, t;
  logic          unused1, unused2;

  assign xe = OW'({{6{x[W-1]}}, x});

  if (VARIANT == 0) begin : g_v0
    csla_adder #(.WIDTH(OW)) u_t (
      .a(xe), .b(xe << 2), .cin(1'b0), .s(t), .cout(unused1)
    );
    ripple_subtractor #(.WIDTH(OW)) u_y (
      .a(t << 3), .b(t), .bin(1'b0), .d(y), .bout(unused2)
    );
  end else begin : g_v1
    ripple_subtractor #(.WIDTH(OW)) u_t (
      .a(xe << 3), .b(xe), .bin(1'b0), .d(t), .bout(unused1)
    );
    csla_adder #(.WIDTH(OW)) u_y (
      .a(t << 2), .b(t), .cin(1'b0), .s(y), .cout(unused2)
    );
  end
endmodule
