// tb_d_latch: checks the gated D latch: while en = 1 q follows every change
// of d, while en = 0 q keeps the value it had when en fell, and q_n is
// always the complement of q.
module tb_d_latch;
  logic [7:0] d, q, q_n;
  logic       en;
  logic [7:0] held;
  int checks = 0, failures = 0;

  d_latch #(.WIDTH(8)) dut (.en(en), .d(d), .q(q), .q_n(q_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [7:0] e);
    checks++;
    if (q != e || q_n != ~e) begin
      failures++;
      if (failures < 10) $display("en=%b d=%h q=%h q_n=%h expected %h", en, d, q, q_n, e);
    end
  endtask

  initial begin
    en = 1'b1;
    d  = 8'h00;
    #1;
    for (int i = 0; i < 200; i++) begin
      // transparent phase: several changes of d, each passed through
      en = 1'b1;
      repeat (3) begin
        d = 8'($urandom);
        #1;
        expect_q(d);
      end
      held = d;
      en = 1'b0;
      #1;
      // hold phase: d changes, q must not
      repeat (3) begin
        d = 8'($urandom);
        #1;
        expect_q(held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
