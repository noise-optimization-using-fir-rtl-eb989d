// fir_top: top level of the noise-reducing FIR filter design.
//
// The main part is the transposed-form low-pass FIR filter (fir_transposed):
// one X_W-bit sample per clock cycle in, the filtered Y_W-bit sample out in
// the same cycle. Inside it, the multiplier block builds the coefficient
// 1120 = 35 << 5 with the shift-add multiply-by-35 graph, shares products
// between taps with the same odd part, and uses carry-select (RCA + BEC)
// adders, ripple-borrow subtractors and master-slave latch flip-flops.
// Beside the filter, on ports of its own, stands the digit-serial form of
// the same shift-add multiplication (ds_*): a multiply-by-35 unit that takes
// two bits per cycle and is built from the digit-serial adder, the
// digit-serial subtractor and D flip-flop shift registers. The bit-parallel
// filter does not use it. Both share clk and the synchronous, active-high
// rst. The digit-serial unit needs each word sign-extended to 22 bits and
// fed over 11 cycles, lowest digit first, with ds_first = 1 on that digit.
// USE_BEC = 0 swaps the converter in every carry-select group for a second
// ripple-carry adder, the form the converter replaces (same results).
// FORM = 1 puts the direct-form filter (fir_direct) in place of the
// transposed one; it has the same ports, latency and results, and exists
// for comparison (FORM = 0, transposed, is the design).
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned X_W      = fir_pkg::FIR_X_W,
  parameter int unsigned C_W      = fir_pkg::FIR_C_W,
  parameter int unsigned NTAPS    = fir_pkg::FIR_NTAPS,
  parameter coef_t       COEFS [NTAPS] = fir_pkg::DEFAULT_COEFS,
  parameter int unsigned DS_DIGIT = 2,
  parameter bit          USE_BEC  = 1'b1,
  parameter int unsigned FORM     = 0,
  localparam int unsigned Y_W     = acc_width(X_W, C_W, NTAPS)
) (
  input  logic                clk,
  input  logic                rst,
  // FIR filter
  input  logic [X_W-1:0]      x_in,
  output logic [Y_W-1:0]      y_out,
  // digit-serial multiply by 35
  input  logic                ds_first,
  input  logic [DS_DIGIT-1:0] ds_x,
  output logic [DS_DIGIT-1:0] ds_y
);
  if (FORM == 0) begin : g_transposed
    fir_transposed #(
      .X_W    (X_W),
      .C_W    (C_W),
      .NTAPS  (NTAPS),
      .COEFS  (COEFS),
      .USE_BEC(USE_BEC)
    ) u_fir (
      .clk  (clk),
      .rst  (rst),
      .x_in (x_in),
      .y_out(y_out)
    );
  end else begin : g_direct
    fir_direct #(
      .X_W    (X_W),
      .C_W    (C_W),
      .NTAPS  (NTAPS),
      .COEFS  (COEFS),
      .USE_BEC(USE_BEC)
    ) u_fir (
      .clk  (clk),
      .rst  (rst),
      .x_in (x_in),
      .y_out(y_out)
    );
  end

  ds_mcm35 #(.DIGIT(DS_DIGIT)) u_ds (
    .clk  (clk),
    .rst  (rst),
    .first(ds_first),
    .x_dig(ds_x),
    .y_dig(ds_y)
  );
endmodule
