// tb_bec: checks the binary-to-excess-1 converter exhaustively at its
// default 4 bits and at 5 bits (the size used in a carry-select group):
// y must equal a + 1, wrapping to 0 for the all-ones input.
module tb_bec;
  logic [3:0] a4, y4;
  logic [4:0] a5, y5;
  int checks = 0, failures = 0;

  bec               dut4 (.a(a4), .y(y4));
  bec #(.WIDTH(5))  dut5 (.a(a5), .y(y5));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      a5 = 5'(i);
      a4 = 4'(i);
      #1;
      checks += 2;
      if (y5 != 5'(i + 1)) begin
        failures++;
        $display("5-bit a=%0d y=%0d", a5, y5);
      end
      if (y4 != 4'(i + 1)) begin
        failures++;
        $display("4-bit a=%0d y=%0d", a4, y4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
