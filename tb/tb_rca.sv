// tb_rca: checks the ripple-carry adder exhaustively at 4 bits and with
// random operands at 13 bits against {cout, s} = a + b + cin.
module tb_rca;
  logic [3:0]  a4, b4, s4;
  logic [12:0] a13, b13, s13;
  logic        cin, c4, c13;
  int checks = 0, failures = 0;

  rca            dut4  (.a(a4),  .b(b4),  .cin(cin), .s(s4),  .cout(c4));
  rca #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(c13));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, b4, a4} = 9'(i);
      a13 = 13'($urandom);
      b13 = 13'($urandom);
      #1;
      checks += 2;
      if ({c4, s4} != 5'(int'(a4) + int'(b4) + int'(cin))) begin
        failures++;
        $display("4-bit %0d+%0d+%0d -> %0d", a4, b4, cin, {c4, s4});
      end
      if ({c13, s13} != 14'(int'(a13) + int'(b13) + int'(cin))) begin
        failures++;
        $display("13-bit %0d+%0d+%0d -> %0d", a13, b13, cin, {c13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
