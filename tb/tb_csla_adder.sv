// tb_csla_adder: checks the carry-select adder at its default 16 bits and at
// 29 bits (not a multiple of the group size, so the top group is padded)
// against {cout, s} = a + b + cin. Operands are random, plus patterns that
// make a carry ripple through every group (all ones plus one). A third
// adder, 16 bits with two ripple-carry adders per group instead of the
// converter, must give the same results.
module tb_csla_adder;
  logic [15:0] a16, b16, s16, s16r;
  logic [28:0] a29, b29, s29;
  logic        cin, c16, c29, c16r;
  int checks = 0, failures = 0;

  csla_adder                dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));
  csla_adder #(.WIDTH(29))  dut29 (.a(a29), .b(b29), .cin(cin), .s(s29), .cout(c29));
  csla_adder #(.USE_BEC(1'b0)) dut16r (.a(a16), .b(b16), .cin(cin), .s(s16r), .cout(c16r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks += 2;
    if ({c16, s16} != 17'(longint'(a16) + longint'(b16) + longint'(cin))) begin
      failures++;
      if (failures < 10) $display("16: %h+%h+%b -> %h", a16, b16, cin, {c16, s16});
    end
    if ({c29, s29} != 30'(longint'(a29) + longint'(b29) + longint'(cin))) begin
      failures++;
      if (failures < 10) $display("29: %h+%h+%b -> %h", a29, b29, cin, {c29, s29});
    end
    checks++;
    if ({c16r, s16r} != 17'(longint'(a16) + longint'(b16) + longint'(cin))) begin
      failures++;
      if (failures < 10) $display("two RCA: %h+%h+%b -> %h", a16, b16, cin, {c16r, s16r});
    end
  endtask

  initial begin
    a16 = '1; b16 = '0; a29 = '1; b29 = '0; cin = 1'b1; check();
    a16 = '1; b16 = 16'd1; a29 = '1; b29 = 29'd1; cin = 1'b0; check();
    a16 = '1; b16 = '1; a29 = '1; b29 = '1; cin = 1'b1; check();
    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a29 = 29'($urandom); b29 = 29'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
