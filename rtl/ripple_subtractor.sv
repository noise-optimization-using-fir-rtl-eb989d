// ripple_subtractor: WIDTH-bit ripple-borrow subtractor,
// d = a - b - bin (mod 2^WIDTH), bout = 1 when the unsigned result is negative.
//
// A cascade of full_subtractor cells, the borrow of bit i feeding bit i+1.
// For two's-complement operands d is the two's-complement difference. The
// multiplier block uses it for the negative digits of a coefficient. Purely
// combinational.
module ripple_subtractor #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             bin,
  output logic [WIDTH-1:0] d,
  output logic             bout
);
  logic [WIDTH:0] br;

  assign br[0] = bin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_subtractor u_fs (
      .a     (a[i]),
      .b     (b[i]),
      .c     (br[i]),
      .d     (d[i]),
      .borrow(br[i+1])
    );
  end

  assign bout = br[WIDTH];
endmodule
