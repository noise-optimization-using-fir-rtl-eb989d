// tb_ds_shift: checks the digit-serial shifter for shifts of 1, 2, 3 and 5
// bits on 16-bit words streamed two bits per cycle, words back to back:
// the collected output word must be (x << SHIFT) mod 2^16, with zeros shifted
// in at the bottom of each word (no bits of the previous word).
module tb_ds_shift;
  localparam int W = 16;
  localparam int DIGIT = 2;
  localparam int NDIG = W / DIGIT;

  logic             clk = 1'b0;
  logic             rst, first;
  logic [DIGIT-1:0] x_dig;
  logic [DIGIT-1:0] y1, y2, y3, y5;
  int checks = 0, failures = 0;

  ds_shift #(.SHIFT(1)) dut1 (.clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(y1));
  ds_shift              dut2 (.clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(y2));
  ds_shift #(.SHIFT(3)) dut3 (.clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(y3));
  ds_shift #(.SHIFT(5)) dut5 (.clk(clk), .rst(rst), .first(first), .x_dig(x_dig), .y_dig(y5));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [W-1:0] x);
    logic [W-1:0] o1, o2, o3, o5;
    for (int j = 0; j < NDIG; j++) begin
      @(negedge clk);
      first = (j == 0);
      x_dig = x[j*DIGIT +: DIGIT];
      #4;
      o1[j*DIGIT +: DIGIT] = y1;
      o2[j*DIGIT +: DIGIT] = y2;
      o3[j*DIGIT +: DIGIT] = y3;
      o5[j*DIGIT +: DIGIT] = y5;
    end
    checks += 4;
    if (o1 != W'(x << 1)) failures++;
    if (o2 != W'(x << 2)) failures++;
    if (o3 != W'(x << 3)) failures++;
    if (o5 != W'(x << 5)) begin
      failures++;
      if (failures < 10) $display("x=%h <<5 -> %h", x, o5);
    end
  endtask

  initial begin
    rst = 1'b1; first = 1'b0; x_dig = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    word(16'hffff);
    word(16'h0000);   // nothing of the all-ones word may leak in
    word(16'h8001);
    for (int i = 0; i < 300; i++) word(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
