// tb_digit_serial_add: checks the digit-serial adder on 16-bit words, two
// bits per cycle, least significant digit first, words back to back with
// first = 1 on each lowest digit. The collected sum digits must equal
// (a + b) mod 2^16, and each word must take 16 / 2 = 8 cycles. Carries out of
// the top digit of a word must not leak into the next word.
module tb_digit_serial_add;
  localparam int W = 16;
  localparam int DIGIT = 2;
  localparam int NDIG = W / DIGIT;

  logic             clk = 1'b0;
  logic             rst, first;
  logic [DIGIT-1:0] a_dig, b_dig, s_dig;
  int checks = 0, failures = 0;

  digit_serial_add dut (
    .clk(clk), .rst(rst), .first(first), .a_dig(a_dig), .b_dig(b_dig), .s_dig(s_dig)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] s;
    int cycles;
    cycles = 0;
    for (int j = 0; j < NDIG; j++) begin
      @(negedge clk);
      first = (j == 0);
      a_dig = a[j*DIGIT +: DIGIT];
      b_dig = b[j*DIGIT +: DIGIT];
      #4;
      s[j*DIGIT +: DIGIT] = s_dig;
      cycles++;
    end
    checks += 2;
    if (s != W'(a + b)) begin
      failures++;
      if (failures < 10) $display("%h + %h -> %h", a, b, s);
    end
    if (cycles != NDIG) failures++;
  endtask

  initial begin
    rst = 1'b1; first = 1'b0; a_dig = '0; b_dig = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    word(16'hffff, 16'h0001);   // carry out of the top digit
    word(16'h0001, 16'h0001);   // must not see that carry
    word(16'h5555, 16'haaaa);
    for (int i = 0; i < 300; i++) word(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
