// fir_transposed: transposed-form FIR filter,
// y(n) = sum_{k=0}^{NTAPS-1} h[k] * x(n-k).
//
// The multiplier block forms every product h[k]*x(n) of the current sample in
// the same cycle. The products then meet a chain of delay registers and
// carry-select adders running the other way: the register at the far end
// holds h[N-1]*x, and each register k holds h[k]*x(n) plus the register
// beyond it, so register k carries the partial sum of taps k..N-1 of past
// samples. The output is the combinational sum h[0]*x(n) + register 1; it
// answers x(n) in the same cycle (zero latency), and every rising clock edge
// moves the filter on by one sample. The registers are the master-slave dff
// cells; rst (synchronous, active high) clears them. Synthesis therefore
// lists two latch bits per register bit (see dff).
//
// Widths: x_in is X_W-bit two's complement, coefficients are unsigned C_W-bit
// numbers, y_out is Y_W = X_W + C_W + clog2(NTAPS) bits, two's complement,
// wide enough that it never overflows. NTAPS must be at least 2. The
// defaults (16-bit input, 11-bit coefficients, four symmetric taps
// 1120, 258, 258, 1120) are set in fir_pkg. USE_BEC = 0 builds every
// carry-select adder with two ripple-carry adders per group instead of one
// adder and a binary-to-excess-1 converter; the results are the same.
module fir_transposed
  import fir_pkg::*;
#(
  parameter int unsigned X_W   = fir_pkg::FIR_X_W,
  parameter int unsigned C_W   = fir_pkg::FIR_C_W,
  parameter int unsigned NTAPS = fir_pkg::FIR_NTAPS,
  parameter coef_t       COEFS [NTAPS] = fir_pkg::DEFAULT_COEFS,
  parameter bit          USE_BEC = 1'b1,
  localparam int unsigned Y_W  = acc_width(X_W, C_W, NTAPS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [X_W-1:0] x_in,
  output logic [Y_W-1:0] y_out
);
  localparam int unsigned P_W = X_W + C_W + 1;

  logic [P_W-1:0] prod [NTAPS];
  logic [Y_W-1:0] prod_ext [NTAPS];
  logic [Y_W-1:0] sum [NTAPS];   // input of delay register k (sum[0] is y)
  logic [Y_W-1:0] r   [NTAPS];   // delay register k, k = 1 .. NTAPS-1

  mult_block #(
    .X_W    (X_W),
    .C_W    (C_W),
    .NTAPS  (NTAPS),
    .COEFS  (COEFS),
    .USE_BEC(USE_BEC)
  ) u_mult (
    .x(x_in),
    .p(prod)
  );

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    assign prod_ext[k] = Y_W'({{(Y_W - P_W){prod[k][P_W-1]}}, prod[k]});

    if (k == NTAPS - 1) begin : g_last
      assign sum[k] = prod_ext[k];
    end else begin : g_add
      logic unused_c;
      csla_adder #(.WIDTH(Y_W), .USE_BEC(USE_BEC)) u_add (
        .a   (prod_ext[k]),
        .b   (r[k+1]),
        .cin (1'b0),
        .s   (sum[k]),
        .cout(unused_c)
      );
    end

    if (k == 0) begin : g_out
      assign r[k] = '0;   // no register in front of the output
    end else begin : g_reg
      dff #(.WIDTH(Y_W)) u_reg (
        .clk(clk),
        .rst(rst),
        .d  (sum[k]),
        .q  (r[k])
      );
    end
  end

  assign y_out = sum[0];
endmodule
