// tb_digit_serial_sub: checks the digit-serial subtractor on a stream of
// 16-bit words, two bits per cycle, least significant digit first, words
// back to back with first = 1 on each lowest digit. The collected difference
// digits must equal (a - b) mod 2^16, and the carry out of the last digit
// must be 1 exactly when a >= b (no borrow). Each word must take exactly
// 16 / 2 = 8 cycles. The very first word starts from the reset value of the
// carry flip-flop (first = 0) to check that it is 1 after reset.
module tb_digit_serial_sub;
  localparam int W = 16;
  localparam int DIGIT = 2;
  localparam int NDIG = W / DIGIT;

  logic             clk = 1'b0;
  logic             rst, first, cout;
  logic [DIGIT-1:0] a_dig, b_dig, d_dig;
  int checks = 0, failures = 0;

  digit_serial_sub dut (
    .clk(clk), .rst(rst), .first(first),
    .a_dig(a_dig), .b_dig(b_dig), .d_dig(d_dig), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [W-1:0] a, input logic [W-1:0] b, input logic use_first);
    logic [W-1:0] d;
    int cycles;
    cycles = 0;
    for (int j = 0; j < NDIG; j++) begin
      @(negedge clk);
      first = use_first && (j == 0);
      a_dig = a[j*DIGIT +: DIGIT];
      b_dig = b[j*DIGIT +: DIGIT];
      #4;
      d[j*DIGIT +: DIGIT] = d_dig;
      cycles++;
    end
    checks += 3;
    if (d != W'(a - b)) begin
      failures++;
      if (failures < 10) $display("%h - %h -> %h", a, b, d);
    end
    if (cout != (a >= b)) begin
      failures++;
      if (failures < 10) $display("%h - %h carry %b", a, b, cout);
    end
    if (cycles != NDIG) failures++;
  endtask

  initial begin
    rst = 1'b1; first = 1'b0; a_dig = '0; b_dig = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    word(16'd5, 16'd7, 1'b0);   // carry from reset
    word(16'd7, 16'd5, 1'b1);
    word(16'd0, 16'hffff, 1'b1);
    word(16'h1234, 16'h1234, 1'b1);
    for (int i = 0; i < 300; i++) word(W'($urandom), W'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
