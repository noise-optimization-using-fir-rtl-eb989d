// tb_gb35: checks both shift-add graphs for multiplication by 35
// (5x then 8*5x - 5x, and 7x then 4*7x + 7x) against 35 * x for random and
// extreme 16-bit two's-complement inputs.
module tb_gb35;
  logic [15:0] x;
  logic [21:0] y0, y1;
  int checks = 0, failures = 0;

  gb35                  dut0 (.x(x), .y(y0));
  gb35 #(.VARIANT(1))   dut1 (.x(x), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    #1;
    e = 35 * longint'(signed'(x));
    checks += 2;
    if (longint'(signed'(y0)) != e) begin
      failures++;
      if (failures < 10) $display("variant 0: x=%0d y=%0d", signed'(x), signed'(y0));
    end
    if (longint'(signed'(y1)) != e) begin
      failures++;
      if (failures < 10) $display("variant 1: x=%0d y=%0d", signed'(x), signed'(y1));
    end
  endtask

  initial begin
    x = 16'h7fff; check();
    x = 16'h8000; check();
    x = 16'hffff; check();
    x = 16'h0001; check();
    for (int i = 0; i < 2000; i++) begin
      x = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
