// d_latch: WIDTH-bit gated D latch.
//
// While en is 1 the latch is transparent (q follows d: the set input sees d
// and the reset input sees ~d); while en is 0 both gated inputs are 0 and q
// keeps its last value. q_n is the complement of q. This is a level-sensitive
// storage element on purpose, so synthesis reports it as a latch. It has no
// reset: the flip-flop built from it clears itself through its data input.
module d_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_n
);
  always_latch begin
    if (en) q = d;
  end

  assign q_n = ~q;
endmodule
