// fir_direct: direct-form FIR filter, y(n) = sum_{k=0}^{NTAPS-1} h[k] * x(n-k),
// the form the transposed filter (fir_transposed) is compared with.
//
// A delay line of NTAPS-1 master-slave dff registers holds the past input
// samples x(n-1) .. x(n-NTAPS+1); x(n) itself comes straight from the input.
// Every tap has its own shift-add multiplier (a one-coefficient mult_block),
// because each multiplies a different sample: products cannot be shared
// between taps the way the transposed form's multiplier block shares them.
// A chain of carry-select adders sums the products, so the adder path from
// the input to the output is NTAPS-1 adders long (one adder in the
// transposed form). The output answers x(n) in the same cycle (zero
// latency), and every rising clock edge moves the filter on by one sample,
// exactly as fir_transposed does: for the same parameters the two give the
// same y_out on every cycle. rst (synchronous, active high) clears the delay
// line.
//
// Widths as in fir_transposed: x_in X_W-bit two's complement, unsigned C_W-
// bit coefficients, y_out Y_W = X_W + C_W + clog2(NTAPS) bits. NTAPS must be
// at least 2. The delay registers are X_W bits wide (samples), not Y_W
// bits (partial sums) as in the transposed form. With the default
// coefficients, which are all even, bit 0 of y_out is always 0.
// What follows the source: the structure of the direct form (delay line on
// the input, one multiplier per tap, products summed). The adder order, the
// multiplier and adder types (the same cells as the transposed filter) and
// the widths are this design's choices.
module fir_direct
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

  logic [X_W-1:0] xd   [NTAPS];   // xd[k] = x(n-k)
  logic [P_W-1:0] prod [NTAPS];   // h[k] * x(n-k)
  logic [Y_W-1:0] sum  [NTAPS];   // sum of taps k .. NTAPS-1 (sum[0] is y)

  assign xd[0] = x_in;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    localparam coef_t CK [1] = '{COEFS[k]};
    logic [P_W-1:0] pk [1];
    logic [Y_W-1:0] prod_ext;

    if (k > 0) begin : g_delay
      dff #(.WIDTH(X_W)) u_reg (
        .clk(clk),
        .rst(rst),
        .d  (xd[k-1]),
        .q  (xd[k])
      );
    end

    mult_block #(
      .X_W    (X_W),
      .C_W    (C_W),
      .NTAPS  (1),
      .COEFS  (CK),
      .USE_BEC(USE_BEC)
    ) u_mult (
      .x(xd[k]),
      .p(pk)
    );

    assign prod[k]  = pk[0];
    assign prod_ext = Y_W'({{(Y_W - P_W){prod[k][P_W-1]}}, prod[k]});

    if (k == NTAPS - 1) begin : g_last
      assign sum[k] = prod_ext;
    end else begin : g_add
      logic unused_c;
      csla_adder #(.WIDTH(Y_W), .USE_BEC(USE_BEC)) u_add (
        .a   (prod_ext),
        .b   (sum[k+1]),
        .cin (1'b0),
        .s   (sum[k]),
        .cout(unused_c)
      );
    end
  end

  assign y_out = sum[0];
endmodule
