// tb_csa_group: exhaustive check of the 4-bit carry-select group
// (ripple-carry adder, binary-to-excess-1 converter and multiplexer) against
// {cout, s} = a + b + cin, for both values of the carry-in. A second group
// uses two ripple-carry adders instead of the converter and is checked the
// same way.
module tb_csa_group;
  logic [3:0] a, b, s, s2;
  logic       cin, cout, cout2;
  int checks = 0, failures = 0;

  csa_group dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  csa_group #(.USE_BEC(1'b0)) dut2 (.a(a), .b(b), .cin(cin), .s(s2), .cout(cout2));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, b, a} = 9'(i);
      #1;
      checks++;
      if ({cout, s} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("%0d+%0d+%0d -> %0d", a, b, cin, {cout, s});
      end
      checks++;
      if ({cout2, s2} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("two RCA: %0d+%0d+%0d -> %0d", a, b, cin, {cout2, s2});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
