// tb_fir_direct: self-checking testbench of the direct-form FIR filter.
//
// dut has the default parameters (16-bit input, taps 1120, 258, 258, 1120).
// dut5 has five taps that are not symmetric, 2047, 35, 1365, 1911, 70, and
// two ripple-carry adders per carry-select group (USE_BEC = 0). A reference
// model per instance keeps the last input samples and computes
// y(n) = sum h[k] x(n-k) with integer arithmetic. A transposed-form filter
// with the default parameters sees the same input and must give the same
// output as dut on every check. Inputs change on the falling clock edge and
// the outputs are compared just before the next rising edge (zero latency).
// Stimulus: reset, an impulse (the response must read out the
// coefficients one per cycle), full-scale steps, random samples, and a
// reset in the middle of the stream.
module tb_fir_direct;
  import fir_pkg::*;

  localparam int unsigned X_W = FIR_X_W;
  localparam int unsigned N4  = FIR_NTAPS;
  localparam int unsigned N5  = 5;
  localparam int unsigned Y4  = acc_width(FIR_X_W, FIR_C_W, N4);
  localparam int unsigned Y5  = acc_width(FIR_X_W, FIR_C_W, N5);
  localparam coef_t       C5 [N5] = '{2047, 35, 1365, 1911, 70};

  logic           clk = 1'b0;
  logic           rst;
  logic [X_W-1:0] x_in;
  logic [Y4-1:0]  y4, yt;
  logic [Y5-1:0]  y5;

  int checks = 0, failures = 0;
  longint hist [N5];

  fir_direct dut (.clk(clk), .rst(rst), .x_in(x_in), .y_out(y4));
  fir_direct #(.NTAPS(N5), .COEFS(C5), .USE_BEC(1'b0)) dut5 (
    .clk(clk), .rst(rst), .x_in(x_in), .y_out(y5)
  );
  fir_transposed ref_t (.clk(clk), .rst(rst), .x_in(x_in), .y_out(yt));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref4();
    longint s = 0;
    for (int k = 0; k < N4; k++) s += longint'(DEFAULT_COEFS[k]) * hist[k];
    return s;
  endfunction

  function automatic longint ref5();
    longint s = 0;
    for (int k = 0; k < N5; k++) s += longint'(C5[k]) * hist[k];
    return s;
  endfunction

  task automatic step(input logic signed [X_W-1:0] xs);
    @(negedge clk);
    x_in = xs;
    for (int k = N5 - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(xs);
    #4;
    checks += 3;
    if (longint'(signed'(y4)) != ref4()) begin
      failures++;
      if (failures < 10) $display("default x=%0d y=%0d expected %0d", xs, signed'(y4), ref4());
    end
    if (longint'(signed'(y5)) != ref5()) begin
      failures++;
      if (failures < 10) $display("5 taps x=%0d y=%0d expected %0d", xs, signed'(y5), ref5());
    end
    if (y4 != yt) begin
      failures++;
      if (failures < 10) $display("direct %0d, transposed %0d", signed'(y4), signed'(yt));
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst  = 1'b1;
    x_in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N5; k++) hist[k] = 0;
  endtask

  initial begin
    rst  = 1'b1;
    x_in = '0;
    do_reset();
    step(16'sd1);
    for (int k = 1; k < N5 + 2; k++) step(16'sd0);
    repeat (N5 + 1) step(16'sh7fff);
    repeat (N5 + 1) step(16'sh8000);
    repeat (2000) step(X_W'($urandom));
    do_reset();
    step(16'sd0);
    repeat (500) step(X_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
