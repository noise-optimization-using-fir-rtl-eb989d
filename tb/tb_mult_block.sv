// tb_mult_block: checks the multiplier block against p[k] = h[k] * x, and
// checks the plan the intermediate-constant search builds.
// dut1 has the default coefficients (1120, 258, 258, 1120): 1120 goes
// through the multiply-by-35 graph, 258 = 129 << 1 is one plan node, and
// symmetric taps share products. dut3 has the same coefficients with the
// graph switched off: the search must then find 129 = (1 << 7) + 1, the
// intermediate 5 = (1 << 2) + 1 and 35 = (5 << 3) - 5, the same graph again.
// dut7 builds the default set from signed digits only. dut2 has
// coefficients chosen to exercise the search and the sharing: 2047 (its
// signed-digit recoding has a digit above the top coefficient bit), 0, 1,
// 35, 1365 (alternating bits), 1911 (several -1 digits), 70 (= 35 << 1,
// shared with 35) and 2047 again (shared with the first tap). dut4 to dut6
// have a set where most fundamentals are one stage away from others: 45,
// 37, 5, 35, 77, 7, 1911 and 0; dut4 runs the full search, dut5 uses signed
// digits only, dut6 allows no intermediate constants. All products must
// equal h * x for random and extreme x.
module tb_mult_block;
  import fir_pkg::*;

  localparam coef_t C2 [8] = '{2047, 0, 1, 35, 1365, 1911, 70, 2047};
  localparam coef_t C4 [8] = '{45, 37, 5, 35, 77, 7, 1911, 0};

  logic [15:0] x;
  logic [27:0] p1 [4];
  logic [27:0] p2 [8];
  logic [27:0] p3 [4];
  logic [27:0] p4 [8];
  logic [27:0] p5 [8];
  logic [27:0] p6 [8];
  logic [27:0] p7 [4];
  int checks = 0, failures = 0;

  mult_block dut1 (.x(x), .p(p1));
  mult_block #(.NTAPS(8), .COEFS(C2)) dut2 (.x(x), .p(p2));
  mult_block #(.USE_GB35(1'b0)) dut3 (.x(x), .p(p3));
  mult_block #(.NTAPS(8), .COEFS(C4)) dut4 (.x(x), .p(p4));
  mult_block #(.NTAPS(8), .COEFS(C4), .USE_SYNTH(1'b0)) dut5 (.x(x), .p(p5));
  mult_block #(.NTAPS(8), .COEFS(C4), .USE_IC(1'b0)) dut6 (.x(x), .p(p6));
  mult_block #(.USE_GB35(1'b0), .USE_SYNTH(1'b0)) dut7 (.x(x), .p(p7));

  // value of node n of an instance's plan
  function automatic int pval(logic [64*17+31:0] pl, int n);
    return int'(pl[64*n +: 32]);
  endfunction

  // Plans: node values in order, and the node counts
  initial begin
    checks += 5;
    if (dut3.NNODE != 4 || pval(dut3.PLAN, 1) != 129 || pval(dut3.PLAN, 2) != 5 ||
        pval(dut3.PLAN, 3) != 35) begin
      failures++;
      $display("plan of the default set without the graph is wrong");
    end
    if (dut1.NNODE != 2) begin
      failures++;
      $display("default plan has %0d nodes", dut1.NNODE);
    end
    if (dut7.NNODE != 1 || dut5.NNODE != 1) begin
      failures++;
      $display("signed-digit instances have plan nodes");
    end
    // full search: 7 targets (45 37 5 77 7 1911, 35 on the graph) and one
    // intermediate; without intermediates 1911 stays on signed digits
    if (dut4.NNODE != 8) begin
      failures++;
      $display("set 4 plan has %0d nodes", dut4.NNODE);
    end
    if (dut6.NNODE != 6) begin
      failures++;
      $display("set 6 plan has %0d nodes", dut6.NNODE);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (longint'(signed'(p1[k])) != longint'(DEFAULT_COEFS[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("default k=%0d x=%0d p=%0d", k, signed'(x), signed'(p1[k]));
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (longint'(signed'(p3[k])) != longint'(DEFAULT_COEFS[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("no graph k=%0d x=%0d p=%0d", k, signed'(x), signed'(p3[k]));
      end
      checks++;
      if (longint'(signed'(p7[k])) != longint'(DEFAULT_COEFS[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("csd only k=%0d x=%0d p=%0d", k, signed'(x), signed'(p7[k]));
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks += 2;
      if (longint'(signed'(p4[k])) != longint'(C4[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("set 4 k=%0d x=%0d p=%0d", k, signed'(x), signed'(p4[k]));
      end
      if (longint'(signed'(p5[k])) != longint'(C4[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("set 5 k=%0d x=%0d p=%0d", k, signed'(x), signed'(p5[k]));
      end
      checks++;
      if (longint'(signed'(p6[k])) != longint'(C4[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("set 6 k=%0d x=%0d p=%0d", k, signed'(x), signed'(p6[k]));
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (longint'(signed'(p2[k])) != longint'(C2[k]) * longint'(signed'(x))) begin
        failures++;
        if (failures < 10) $display("set 2 k=%0d x=%0d p=%0d", k, signed'(x), signed'(p2[k]));
      end
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
