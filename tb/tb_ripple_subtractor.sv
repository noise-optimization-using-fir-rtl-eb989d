// tb_ripple_subtractor: checks the 16-bit ripple-borrow subtractor with random
// and corner operands: d = (a - b - bin) mod 2^16, bout = 1 when a < b + bin.
module tb_ripple_subtractor;
  logic [15:0] a, b, d;
  logic        bin, bout;
  int checks = 0, failures = 0;

  ripple_subtractor dut (.a(a), .b(b), .bin(bin), .d(d), .bout(bout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint diff;
    #1;
    diff = longint'(a) - longint'(b) - longint'(bin);
    checks++;
    if (d != 16'(diff) || bout != (diff < 0)) begin
      failures++;
      if (failures < 10) $display("%h-%h-%b -> d=%h bout=%b", a, b, bin, d, bout);
    end
  endtask

  initial begin
    a = 16'd0; b = 16'd1; bin = 1'b0; check();
    a = 16'd0; b = 16'd0; bin = 1'b1; check();
    a = 16'hffff; b = 16'hffff; bin = 1'b0; check();
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); bin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
