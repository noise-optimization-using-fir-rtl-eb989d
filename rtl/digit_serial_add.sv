// digit_serial_add: digit-serial adder, s = a + b, DIGIT bits per clock
// cycle, least significant digit first.
//
// Each cycle DIGIT full adders add a_dig and b_dig; the carry out of the top
// full adder is stored in a D flip-flop and used as the carry into the next
// digit. first = 1 marks the lowest digit of a new word and forces the
// carry-in to 0 for that cycle; rst (synchronous, active high) also clears
// the carry. s_dig is the sum digit of the current cycle (combinational).
// It is the adding counterpart of the digit-serial subtractor: the same
// cells, without the inversion of b and with the carry starting at 0.
// The carry path through the latch-based flip-flop is reported by lint as a
// combinational loop; the two latches are never open at once, so the clock
// breaks it.
module digit_serial_add #(
  parameter int unsigned DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             first,
  input  logic [DIGIT-1:0] a_dig,
  input  logic [DIGIT-1:0] b_dig,
  output logic [DIGIT-1:0] s_dig
);
  logic [DIGIT:0] c;
  logic           carry_q;

  assign c[0] = first ? 1'b0 : carry_q;

  for (genvar i = 0; i < DIGIT; i++) begin : g_bit
    full_adder u_fa (
      .a   (a_dig[i]),
      .b   (b_dig[i]),
      .cin (c[i]),
      .s   (s_dig[i]),
      .cout(c[i+1])
    );
  end

  dff #(.WIDTH(1), .RESET_VALUE(1'b0)) u_carry (
    .clk(clk),
    .rst(rst),
    .d  (c[DIGIT]),
    .q  (carry_q)
  );
endmodule
