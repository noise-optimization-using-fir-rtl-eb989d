// tb_fir_top: end-to-end testbench of the whole design at its default
// parameters (no parameter is overridden).
//
// FIR filter: a 16-bit sinusoid (period 200 samples, amplitude 12000) with
// added uniform noise (+-4000) is streamed through the filter, one sample per
// clock. Every output is compared with a reference model of
// y(n) = sum h[k] x(n-k). The testbench also filters the noise alone in its
// model and checks that the filter lowers the noise power, relative to the
// signal gain, to below half (for white noise the expected ratio is
// sum h^2 / (sum h)^2 = 0.35 with the default taps).
// Digit-serial multiply-by-35: at the same time, random 16-bit samples,
// sign-extended to 22 bits, are streamed two bits per cycle (11 cycles per
// word, back to back) and each collected result is checked against 35 * x.
//
// Mechanisms that must occur at least once, each counted: a reset that
// clears a non-empty delay line, a carry-select group of the output adder
// taking its carry-in-0 path and its carry-in-1 (excess-1) path, negative and
// positive filter outputs, negative and positive digit-serial products,
// and a word restart through ds_first. A mechanism that never occurs
// counts as a failure.
module tb_fir_top;
  import fir_pkg::*;

  localparam int unsigned X_W   = FIR_X_W;
  localparam int unsigned NTAPS = FIR_NTAPS;
  localparam int unsigned Y_W   = acc_width(FIR_X_W, FIR_C_W, FIR_NTAPS);
  localparam int          NSAMP = 2000;

  logic           clk = 1'b0;
  logic           rst;
  logic [X_W-1:0] x_in;
  logic [Y_W-1:0] y_out;
  logic           ds_first;
  logic [1:0]     ds_x, ds_y;

  int checks = 0, failures = 0;
  longint hist  [NTAPS];
  longint nhist [NTAPS];
  real    noise_in_pow, noise_out_pow;

  // mechanism counters
  int n_reset_clear, n_sel0, n_sel1, n_neg, n_pos, n_ds_neg, n_ds_pos, n_restart;

  fir_top dut (
    .clk(clk), .rst(rst),
    .x_in(x_in), .y_out(y_out),
    .ds_first(ds_first), .ds_x(ds_x), .ds_y(ds_y)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry-in of the fourth carry-select group (bits 12-15) of the output adder
  logic grp_cin;
  assign grp_cin = dut.g_transposed.u_fir.g_tap[0].g_add.u_add.g_grp[3].u_grp.cin;

  function automatic longint fir_ref(input longint h [NTAPS]);
    longint s = 0;
    for (int k = 0; k < NTAPS; k++) s += longint'(DEFAULT_COEFS[k]) * h[k];
    return s;
  endfunction

  // digit-serial multiply-by-35 stream state: 22-bit words, 11 digits
  logic [15:0] ds_wx;
  logic [21:0] ds_xe, ds_acc;
  int          ds_j;

  task automatic ds_drive();
    if (ds_j == 0) begin
      ds_wx = 16'($urandom);
      ds_xe = 22'({{6{ds_wx[15]}}, ds_wx});
    end
    ds_first = (ds_j == 0);
    ds_x = ds_xe[ds_j*2 +: 2];
  endtask

  task automatic ds_check();
    ds_acc[ds_j*2 +: 2] = ds_y;
    if (ds_first) n_restart++;
    if (ds_j == 10) begin
      checks++;
      if (longint'(signed'(ds_acc)) != 35 * longint'(signed'(ds_wx))) begin
        failures++;
        if (failures < 10) $display("ds 35*%0d -> %0d", signed'(ds_wx), signed'(ds_acc));
      end
      if (signed'(ds_acc) < 0) n_ds_neg++;
      if (signed'(ds_acc) > 0) n_ds_pos++;
      ds_j = 0;
    end else begin
      ds_j++;
    end
  endtask

  task automatic step(input logic signed [X_W-1:0] xs, input longint noise);
    longint exp_y, exp_n;
    @(negedge clk);
    x_in = xs;
    ds_drive();
    for (int k = NTAPS - 1; k > 0; k--) begin
      hist[k]  = hist[k-1];
      nhist[k] = nhist[k-1];
    end
    hist[0]  = longint'(xs);
    nhist[0] = noise;
    #4;
    exp_y = fir_ref(hist);
    exp_n = fir_ref(nhist);
    noise_in_pow  += real'(noise) * real'(noise);
    noise_out_pow += real'(exp_n) * real'(exp_n);
    checks++;
    if (longint'(signed'(y_out)) != exp_y) begin
      failures++;
      if (failures < 10) $display("fir x=%0d y=%0d expected %0d", xs, signed'(y_out), exp_y);
    end
    if (signed'(y_out) < 0) n_neg++;
    if (signed'(y_out) > 0) n_pos++;
    if (grp_cin) n_sel1++; else n_sel0++;
    ds_check();
  endtask

  initial begin
    real    gain;
    longint noise, s;

    rst = 1'b1; x_in = '0; ds_first = 1'b0; ds_x = '0;
    ds_j = 0; ds_wx = '0; ds_xe = '0; ds_acc = '0;
    noise_in_pow = 0.0; noise_out_pow = 0.0;
    n_reset_clear = 0; n_sel0 = 0; n_sel1 = 0; n_neg = 0; n_pos = 0;
    n_ds_neg = 0; n_ds_pos = 0; n_restart = 0;
    for (int k = 0; k < NTAPS; k++) begin hist[k] = 0; nhist[k] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;

    for (int n = 0; n < NSAMP; n++) begin
      s     = longint'($rtoi(12000.0 * $sin(2.0 * 3.14159265358979 * real'(n) / 200.0)));
      noise = longint'(int'($urandom_range(8000, 0)) - 4000);
      step(X_W'(s + noise), noise);
    end

    // reset in mid-stream: after it, y must be h0 * x alone
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst  = 1'b0;
    x_in = 16'sd100;
    #4;
    checks++;
    if (longint'(signed'(y_out)) == longint'(DEFAULT_COEFS[0]) * 100) n_reset_clear++;
    else failures++;

    gain = 0.0;
    for (int k = 0; k < NTAPS; k++) gain += real'(DEFAULT_COEFS[k]);
    checks++;
    if (noise_out_pow / (gain * gain) >= 0.5 * noise_in_pow) begin
      failures++;
      $display("noise not reduced: in %f out %f", noise_in_pow, noise_out_pow / (gain * gain));
    end
    $display("relative noise power after filtering: %f",
             noise_out_pow / (gain * gain) / noise_in_pow);

    $display("mechanisms: reset_clear=%0d sel_rca=%0d sel_bec=%0d neg=%0d pos=%0d ds_neg=%0d ds_pos=%0d restart=%0d",
             n_reset_clear, n_sel0, n_sel1, n_neg, n_pos, n_ds_neg, n_ds_pos, n_restart);
    checks += 8;
    if (n_reset_clear == 0) failures++;
    if (n_sel0 == 0) failures++;
    if (n_sel1 == 0) failures++;
    if (n_neg == 0) failures++;
    if (n_pos == 0) failures++;
    if (n_ds_neg == 0) failures++;
    if (n_ds_pos == 0) failures++;
    if (n_restart == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
