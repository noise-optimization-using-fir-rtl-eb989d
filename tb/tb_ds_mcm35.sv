// tb_ds_mcm35: checks the digit-serial multiply-by-35 unit. 16-bit
// two's-complement samples are sign-extended to 22 bits and streamed two
// bits per cycle (11 cycles per word, back to back, first = 1 on each
// lowest digit); the collected 22-bit output must equal 35 * x. Extreme
// values and random samples are used, and each word must take 11 cycles.
module tb_ds_mcm35;
  localparam int W = 16;
  localparam int DIGIT = 2;
  localparam int OW = 22;
  localparam int NDIG = OW / DIGIT;

  logic             clk = 1'b0;
  logic             rst, first;
  logic [DIGIT-1:0] x_dig, y_dig;
  int checks = 0, failures = 0;

  ds_mcm35 dut (.clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(y_dig));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [W-1:0] x);
    logic [OW-1:0] xe, y;
    int cycles;
    xe = OW'({{(OW - W){x[W-1]}}, x});
    cycles = 0;
    for (int j = 0; j < NDIG; j++) begin
      @(negedge clk);
      first = (j == 0);
      x_dig = xe[j*DIGIT +: DIGIT];
      #4;
      y[j*DIGIT +: DIGIT] = y_dig;
      cycles++;
    end
    checks += 2;
    if (longint'(signed'(y)) != 35 * longint'(signed'(x))) begin
      failures++;
      if (failures < 10) $display("x=%0d y=%0d", signed'(x), signed'(y));
    end
    if (cycles != NDIG) failures++;
  endtask

  initial begin
    rst = 1'b1; first = 1'b0; x_dig = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    word(16'h7fff);
    word(16'h8000);
    word(16'hffff);
    word(16'h0001);
    word(16'h0000);
    for (int i = 0; i < 400; i++) word(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
