// tb_dff: checks the master-slave D flip-flop: q takes the value d had just
// before a rising clock edge, does not change at the falling edge or while
// d changes in between, and takes RESET_VALUE on a rising edge while rst = 1.
// An 8-bit instance with reset value 8'hA5 is used.
module tb_dff;
  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] d, q;
  logic [7:0] expect_q;
  int checks = 0, failures = 0;

  dff #(.WIDTH(8), .RESET_VALUE(8'hA5)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string where);
    checks++;
    if (q != expect_q) begin
      failures++;
      if (failures < 10) $display("%s: q=%h expected %h", where, q, expect_q);
    end
  endtask

  initial begin
    rst = 1'b1;
    d   = 8'h00;
    @(posedge clk);
    #1;
    expect_q = 8'hA5;
    chk("reset");
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      // change d several times during the cycle; only the last value counts
      @(negedge clk);
      d = 8'($urandom);
      #1;
      chk("low phase");
      d = v;
      if (i % 50 == 49) rst = 1'b1;
      @(posedge clk);
      #1;
      expect_q = rst ? 8'hA5 : v;
      chk("after rise");
      rst = 1'b0;
      d = ~v;
      #2;
      chk("high phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
