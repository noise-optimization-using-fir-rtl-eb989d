// tb_full_subtractor: exhaustive check of the one-bit full subtractor:
// d = (a - b - c) mod 2 and borrow = 1 exactly when a < b + c.
module tb_full_subtractor;
  logic a, b, c, d, borrow;
  int checks = 0, failures = 0;

  full_subtractor dut (.a(a), .b(b), .c(c), .d(d), .borrow(borrow));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int diff;
      {a, b, c} = 3'(i);
      #1;
      diff = int'(a) - int'(b) - int'(c);
      checks++;
      if (d != diff[0] || borrow != (diff < 0)) begin
        failures++;
        $display("a=%b b=%b c=%b -> d=%b borrow=%b", a, b, c, d, borrow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
