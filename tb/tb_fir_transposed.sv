// tb_fir_transposed: self-checking testbench of the transposed-form FIR
// filter at its default parameters (16-bit input, taps 1120, 258, 258, 1120).
//
// A reference model keeps the last NTAPS input samples and computes
// y(n) = sum h[k] x(n-k) with integer arithmetic. Inputs change on the
// falling clock edge and y_out is compared just before the next rising edge,
// which checks that the output answers the current sample with no latency.
// Stimulus: reset, an impulse (the response must read out the coefficients
// one per cycle), full-scale positive and negative steps, and random samples.
// A second reset in the middle checks that the delay registers clear. A
// second filter, built with two ripple-carry adders per carry-select group
// instead of the binary-to-excess-1 converter (USE_BEC = 0), sees the same
// input and must give the same output on every check.
module tb_fir_transposed;
  import fir_pkg::*;

  localparam int unsigned X_W   = FIR_X_W;
  localparam int unsigned NTAPS = FIR_NTAPS;
  localparam int unsigned Y_W   = acc_width(FIR_X_W, FIR_C_W, FIR_NTAPS);

  logic           clk = 1'b0;
  logic           rst;
  logic [X_W-1:0] x_in;
  logic [Y_W-1:0] y_out;
  logic [Y_W-1:0] y_rca;

  int checks = 0, failures = 0;
  longint hist [NTAPS];

  fir_transposed dut (.clk(clk), .rst(rst), .x_in(x_in), .y_out(y_out));
  fir_transposed #(.USE_BEC(1'b0)) dut_rca (.clk(clk), .rst(rst), .x_in(x_in), .y_out(y_rca));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s = 0;
    for (int k = 0; k < NTAPS; k++) s += longint'(DEFAULT_COEFS[k]) * hist[k];
    return s;
  endfunction

  // Apply one sample after a falling edge, check before the rising edge,
  // then let the rising edge shift the reference history.
  task automatic step(input logic signed [X_W-1:0] xs);
    longint exp_y;
    @(negedge clk);
    x_in = xs;
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(xs);
    #4;
    exp_y = ref_y();
    checks++;
    if (longint'(signed'(y_out)) != exp_y) begin
      failures++;
      if (failures < 10) $display("mismatch x=%0d y=%0d expected %0d", xs, signed'(y_out), exp_y);
    end
    checks++;
    if (longint'(signed'(y_rca)) != exp_y) begin
      failures++;
      if (failures < 10) $display("two RCA x=%0d y=%0d expected %0d", xs, signed'(y_rca), exp_y);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst  = 1'b1;
    x_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
  endtask

  initial begin
    rst  = 1'b1;
    x_in = '0;
    do_reset();
    // impulse: y reads out h[0], h[1], ... on consecutive cycles
    step(16'sd1);
    for (int k = 1; k < NTAPS + 2; k++) step(16'sd0);
    // full-scale steps
    repeat (NTAPS + 1) step(16'sh7fff);
    repeat (NTAPS + 1) step(16'sh8000);
    repeat (2000) step(X_W'($urandom));
    // reset in the middle of a stream clears the delay line
    do_reset();
    step(16'sd0);
    repeat (500) step(X_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
