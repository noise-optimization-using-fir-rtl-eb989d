// ds_mcm35: digit-serial multiplication by the constant 35, y = 35 * x,
// DIGIT bits per clock cycle, least significant digit first.
//
// It is the shared-term graph 5x = x + 4x, 35x = 8*(5x) - 5x (the same graph
// as gb35) in digit-serial form: the shifts by 2 and 3 bits are ds_shift
// registers of D flip-flops, the addition is a digit-serial adder and the
// subtraction the digit-serial subtractor (inverted subtrahend, carry
// flip-flop starting at 1). Every unit works on the same digit in the same
// cycle, so the output digit of a cycle is the digit of 35x at that position
// and there is no added latency.
//
// Operation: a word is fed over NDIG = ceil((W + 6) / DIGIT) cycles, with
// first = 1 on its lowest digit. x is W-bit two's complement and must be fed
// sign-extended to NDIG * DIGIT bits, since 35x needs W + 6 bits. Words may
// follow each other back to back. rst (synchronous, active high) clears all
// state. Building the multiplication digit-serially with shared terms is
// this design's arrangement of the digit-serial cells.
module ds_mcm35 #(
  parameter int unsigned DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             first,
  input  logic [DIGIT-1:0] x_dig,
  output logic [DIGIT-1:0] y_dig
);
  logic [DIGIT-1:0] x4, t, t8;
  logic             unused_cout;

  ds_shift #(.DIGIT(DIGIT), .SHIFT(2)) u_sh2 (
    .clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(x4)
  );

  digit_serial_add #(.DIGIT(DIGIT)) u_add (
    .clk(clk), .rst(rst), .first(first), .a_dig(x_dig), .b_dig(x4), .s_dig(t)
  );

  ds_shift #(.DIGIT(DIGIT), .SHIFT(3)) u_sh3 (
    .clk(clk), .rst(rst), .first(first), .x_dig(t), .y_dig(t8)
  );

  digit_serial_sub #(.DIGIT(DIGIT)) u_sub (
    .clk(clk), .rst(rst), .first(first), .a_dig(t8), .b_dig(t), .d_dig(y_dig),
    .cout(unused_cout)
  );
endmodule
