// ds_shift: left shift by SHIFT bit positions of a digit-serial stream
// (DIGIT bits per cycle, least significant digit first), y = x << SHIFT.
//
// In digit-serial form a shift is a delay: output bit j of a word is input
// bit j - SHIFT. A SHIFT-bit register of D flip-flops keeps the most recent
// SHIFT input bits; each cycle the output digit is the low DIGIT bits of
// {x_dig, history} and the register takes the top SHIFT bits. On the first
// digit of a word (first = 1) the history is taken as zeros, so zeros are
// shifted in at the bottom of every word. The output digit belongs to the
// same cycle as the input digit (no added latency); bits shifted out of the
// top of a word are dropped. rst (synchronous, active high) clears the
// history register. The path from the history register back to its own
// input is reported by lint as a combinational loop because the flip-flops
// are built from latches; the master and slave latches are never open at
// the same time, so the clock breaks it.
module ds_shift #(
  parameter int unsigned DIGIT = 2,
  parameter int unsigned SHIFT = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             first,
  input  logic [DIGIT-1:0] x_dig,
  output logic [DIGIT-1:0] y_dig
);
  logic [SHIFT-1:0]       hist_q, hist_eff;
  logic [DIGIT+SHIFT-1:0] v;

  assign hist_eff = first ? '0 : hist_q;
  assign v        = {x_dig, hist_eff};
  assign y_dig    = v[DIGIT-1:0];

  dff #(.WIDTH(SHIFT)) u_hist (
    .clk(clk),
    .rst(rst),
    .d  (v[DIGIT+SHIFT-1 -: SHIFT]),
    .q  (hist_q)
  );
endmodule
