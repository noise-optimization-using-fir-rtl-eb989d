// digit_serial_sub: digit-serial two's-complement subtractor, d = a - b,
// DIGIT bits per clock cycle, least significant digit first.
//
// Each cycle DIGIT full adders add a_dig and the inverted b_dig; the carry out
// of the top full adder is stored in a D flip-flop and used as the carry into
// the next digit. Adding ~b + 1 is subtracting b, so the carry flip-flop
// starts at 1: rst (synchronous, active high) sets it to 1, and first = 1
// marks the lowest digit of a new word and forces the carry-in to 1 for that
// cycle, so words can follow each other without a reset. d_dig is the
// difference digit of the current cycle (combinational); cout is the carry
// out of the top bit (1 = no borrow when the operands are unsigned). A W-bit
// subtraction takes W/DIGIT cycles. Two bits per cycle is the circuit this
// follows; the first input is this design's addition.
// The carry path c[DIGIT] -> flip-flop -> c[0] is reported by lint as a
// combinational loop because the flip-flop is built from two latches; the
// latches are never open at the same time, so the loop is broken by the clock.
module digit_serial_sub #(
  parameter int unsigned DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             first,
  input  logic [DIGIT-1:0] a_dig,
  input  logic [DIGIT-1:0] b_dig,
  output logic [DIGIT-1:0] d_dig,
  output logic             cout
);
  logic [DIGIT:0] c;
  logic           carry_q;

  assign c[0] = first ? 1'b1 : carry_q;

  for (genvar i = 0; i < DIGIT; i++) begin : g_bit
    full_adder u_fa (
      .a   (a_dig[i]),
      .b   (~b_dig[i]),
      .cin (c[i]),
      .s   (d_dig[i]),
      .cout(c[i+1])
    );
  end

  dff #(.WIDTH(1), .RESET_VALUE(1'b1)) u_carry (
    .clk(clk),
    .rst(rst),
    .d  (c[DIGIT]),
    .q  (carry_q)
  );

  assign cout = c[DIGIT];
endmodule
