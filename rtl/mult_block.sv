// mult_block: multiplier block of a transposed-form FIR filter. It multiplies
// one input sample x by every coefficient at once, p[k] = COEFS[k] * x, with
// shifts, adders and subtractors only (multiple constant multiplication).
//
// Sharing: every coefficient is split into an odd "fundamental" and a power
// of two, COEFS[k] = f << s. Each distinct fundamental is multiplied once;
// every tap with that fundamental takes the same product, shifted left by
// its own s (wiring only). Symmetric taps therefore share one chain, and
// with the defaults 1120 = 35 << 5 and 258 = 129 << 1 the four products
// cost three adder/subtractor stages in all.
//
// Each fundamental is built in the first of these ways that applies:
//  1. from the plan of the MINAS-DS search (USE_SYNTH = 1), run at
//     elaboration time over all fundamentals (see minas() below). The plan
//     is a list of nodes, node 0 being x itself; every other node is one
//     adder or subtractor, (a << i) + b, (a << i) - b or b - (a << i), on
//     two earlier nodes. Fundamentals one operation away from the plan are
//     added first (Synthesize); while some are still missing, the search
//     adds the intermediate constant that leaves the cheapest rest
//     (USE_IC = 1), and tries again. With the defaults, 129 = (1 << 7) + 1
//     is one node; without the graph of step 2, the search adds the
//     intermediate 5 = (1 << 2) + 1 and builds 35 = (5 << 3) - 5, which is
//     the graph of step 2 again;
//  2. fundamental 35 uses the two-stage shared-term graph of gb35
//     (5x = x + 4x, 35x = 8*5x - 5x) when USE_GB35 = 1; it is then left out
//     of the search;
//  3. otherwise it is recoded at elaboration time into canonical signed digits
//     (fir_pkg::csd_digit) and built from the most significant digit down: the
//     leading +1 digit is x shifted into place, every further +1 digit adds
//     x << i with a carry-select adder (csla_adder), every -1 digit subtracts
//     x << i with a ripple-borrow subtractor (ripple_subtractor), and a 0
//     digit costs nothing.
// Adders in the plan are carry-select adders, subtractors ripple-borrow
// subtractors; USE_BEC selects the carry-select group form (see csa_group).
// What follows the source: the outline of MINAS-DS (R = {1}, Synthesize, the
// search over odd j below 2^(C_W+1) with ComputeCost and ComputeTCost, the
// cheapest intermediate joins R). This design's own choices, as the document
// does not define them: the cost of a target is 1 if it is one operation away
// and its signed-digit adder count otherwise; only candidates that bring some
// target one operation closer are scored; ties go to the smallest sum of the
// two shifts (fewer digit-serial delay flip-flops), then to the smallest
// constant; operations shift one operand left only (no right-shifted sums);
// at most NTAPS intermediates are added; the final SynthesizeMinArea step
// keeps, for each node, the first operation found rather than searching
// again.
//
// x is two's complement, X_W bits; coefficients are unsigned, C_W bits (NTAPS
// up to 127: plan node numbers are 8 bits). Each product is P_W = X_W + C_W +
// 1 bits, two's complement (the extra bit holds the CSD digit that can sit
// one place above the coefficient's top bit). Purely combinational. Because
// even coefficients are shifted odd products, their low product bits are
// constant 0 or copies of input bits.
module mult_block
  import fir_pkg::*;
#(
  parameter int unsigned X_W      = fir_pkg::FIR_X_W,
  parameter int unsigned C_W      = fir_pkg::FIR_C_W,
  parameter int unsigned NTAPS    = fir_pkg::FIR_NTAPS,
  parameter coef_t       COEFS [NTAPS] = fir_pkg::DEFAULT_COEFS,
  parameter bit          USE_GB35 = 1'b1,
  parameter bit          USE_SYNTH = 1'b1,
  parameter bit          USE_IC   = 1'b1,
  parameter bit          USE_BEC  = 1'b1,
  localparam int unsigned P_W     = X_W + C_W + 1
) (
  input  logic [X_W-1:0] x,
  output logic [P_W-1:0] p [NTAPS]
);
  localparam int unsigned NDIG = C_W + 1;

  localparam int unsigned MAXV = 1 << NDIG;        // constants stay below 2^(C_W+1)
  localparam int unsigned MAXN = 2 * NTAPS + 1;     // x, the targets, the intermediates
  localparam int unsigned NIC  = NTAPS;             // most intermediate constants added

  // Plan: node n (0 = x itself) in bits [64n +: 64]: value in 31:0, op in
  // 35:32 (1: (a << sh) + b, 2: (a << sh) - b, 3: b - (a << sh)), sh in
  // 47:40, a in 55:48, b in 63:56; number of nodes in the top 32 bits.
  typedef logic [64*MAXN+31:0] plan_t;
  typedef logic [MAXV-1:0]     vset_t;             // bit v set: v is a node value

  // lowest tap index with the same fundamental as tap k
  function automatic int unsigned leader(int unsigned k);
    for (int unsigned j = 0; j < k; j++)
      if (odd_part(COEFS[j]) == odd_part(COEFS[k])) return j;
    return k;
  endfunction

  function automatic longint nval(plan_t pl, int n);
    return longint'(pl[64*n +: 32]);
  endfunction

  function automatic int ncount(plan_t pl);
    return int'(pl[64*MAXN +: 32]);
  endfunction

  function automatic int nfind(plan_t pl, longint v);
    for (int n = 0; n < ncount(pl); n++)
      if (nval(pl, n) == v) return n;
    return -1;
  endfunction

  function automatic bit inset(vset_t vs, longint v);
    return v > 0 && v < longint'(MAXV) && vs[NDIG'(v)];
  endfunction

  // One operation that gives f from two nodes of pl (an A-operation with one
  // side shifted left): op | sh << 8 | a << 16 | b << 24, or 0 if there is none.
  function automatic int reach(plan_t pl, vset_t vs, longint f);
    longint s;
    for (int a = 0; a < ncount(pl); a++)
      for (int i = 1; i <= int'(NDIG); i++) begin
        s = nval(pl, a) << i;
        if (inset(vs, f - s)) return (nfind(pl, f - s) << 24) | (a << 16) | (i << 8) | 1;
        if (inset(vs, s - f)) return (nfind(pl, s - f) << 24) | (a << 16) | (i << 8) | 2;
        if (inset(vs, f + s)) return (nfind(pl, f + s) << 24) | (a << 16) | (i << 8) | 3;
      end
    return 0;
  endfunction

  function automatic plan_t add_node(plan_t pl, longint v, int op);
    int n;
    n = ncount(pl);
    pl[64*n +: 64] = {8'(op >> 24), 8'(op >> 16), 8'(op >> 8), 4'd0, 4'(op), 32'(v)};
    pl[64*MAXN +: 32] = 32'(n + 1);
    return pl;
  endfunction

  // odd fundamental to build for tap k, or 0 if the tap needs no node
  function automatic longint target(int unsigned k);
    longint f;
    f = longint'(odd_part(COEFS[k]));
    if (leader(k) != k || f <= 1 || (USE_GB35 && f == 35)) return 0;
    return f;
  endfunction

  // MINAS-DS at elaboration time. R starts as {1}; Synthesize moves every
  // target that is one operation away from R into R, until none is. While
  // targets remain, every odd j below 2^(C_W+1) that is one operation away
  // from R and helps at least one target is scored: one for j, plus one for
  // each target that j brings one operation away, plus the signed-digit
  // adder count of every other target. The cheapest j (then the smallest sum
  // of the two shifts, then the smallest j) joins R, and Synthesize runs
  // again. Targets left after NIC intermediates fall back to the graph or
  // signed digits below.
  function automatic plan_t minas();
    plan_t  pl, pl2;
    vset_t  vs, vs2;
    longint t    [NTAPS];
    int     tw   [NTAPS];
    bit     done [NTAPS];
    bit     more;
    longint j, s;
    int     op, jop, tr, cost, best_cost, best_sh, best_op, nleft;
    longint best_j;

    pl = '0;
    pl = add_node(pl, 1, 0);
    vs = '0;
    vs[1] = 1'b1;
    for (int k = 0; k < int'(NTAPS); k++) begin
      t[k]    = USE_SYNTH ? target(k) : 0;
      tw[k]   = (t[k] > 0) ? int'(csd_weight(coef_t'(t[k]), NDIG)) - 1 : 0;
      done[k] = (t[k] == 0);
    end

    for (int round = 0; round <= int'(NIC); round++) begin
      // Synthesize(R, T)
      more = 1'b1;
      while (more) begin
        more = 1'b0;
        for (int k = 0; k < int'(NTAPS); k++)
          if (!done[k]) begin
            op = reach(pl, vs, t[k]);
            if (op != 0) begin
              pl = add_node(pl, t[k], op);
              vs[NDIG'(t[k])] = 1'b1;
              done[k] = 1'b1;
              more = 1'b1;
            end
          end
      end
      nleft = 0;
      for (int k = 0; k < int'(NTAPS); k++) if (!done[k]) nleft++;
      if (nleft == 0 || round == int'(NIC) || !USE_IC) break;

      // intermediate constant search
      best_cost = 1 << 30;
      best_sh   = 1 << 30;
      best_j    = 0;
      best_op   = 0;
      for (int k = 0; k < int'(NTAPS); k++)
        if (!done[k])
          for (int a = 0; a < ncount(pl) + 1; a++)
            for (int i = 1; i <= int'(NDIG); i++)
              for (int form = 0; form < 6; form++) begin
                // candidates j with t[k] = (a << i) +- j, j - (a << i), or
                // (j << i) +- a, a - (j << i); a = ncount(pl) stands for j itself
                s = (a < ncount(pl)) ? nval(pl, a) : 0;
                case (form)
                  0: j = t[k] - (s << i);
                  1: j = (s << i) - t[k];
                  2: j = t[k] + (s << i);
                  3: j = ((t[k] - s) % (1 << i) == 0) ? (t[k] - s) >> i : 0;
                  4: j = ((t[k] + s) % (1 << i) == 0) ? (t[k] + s) >> i : 0;
                  default: j = ((s - t[k]) % (1 << i) == 0) ? (s - t[k]) >> i : 0;
                endcase
                if (a == ncount(pl)) begin
                  // t[k] = (j << i) + j or (j << i) - j
                  j = 0;
                  if (form == 0 && t[k] % ((1 << i) + 1) == 0) j = t[k] / ((1 << i) + 1);
                  if (form == 1 && t[k] % ((1 << i) - 1) == 0) j = t[k] / ((1 << i) - 1);
                end
                if (j <= 1 || j >= longint'(MAXV) || j % 2 == 0 || vs[NDIG'(j)]) continue;
                jop = reach(pl, vs, j);                 // ComputeCost({j}, R)
                if (jop == 0) continue;
                pl2 = add_node(pl, j, jop);
                vs2 = vs;
                vs2[NDIG'(j)] = 1'b1;
                cost = 1;                               // + ComputeTCost(T, R + j)
                op = 0;
                for (int m = 0; m < int'(NTAPS); m++)
                  if (!done[m]) begin
                    tr = reach(pl2, vs2, t[m]);
                    cost += (tr != 0) ? 1 : tw[m];
                    if (m == k) op = tr;
                  end
                if (op == 0) continue;
                if (cost < best_cost ||
                    (cost == best_cost && ((jop >> 8) & 255) + ((op >> 8) & 255) < best_sh) ||
                    (cost == best_cost && ((jop >> 8) & 255) + ((op >> 8) & 255) == best_sh &&
                     j < best_j)) begin
                  best_cost = cost;
                  best_sh   = ((jop >> 8) & 255) + ((op >> 8) & 255);
                  best_j    = j;
                  best_op   = jop;
                end
              end
      if (best_j == 0) break;
      pl = add_node(pl, best_j, best_op);
      vs[NDIG'(best_j)] = 1'b1;
    end
    return pl;
  endfunction

  localparam plan_t PLAN  = minas();
  localparam int    NNODE = ncount(PLAN);

  logic [P_W-1:0] xs   [NDIG];    // x sign-extended and shifted left by i
  logic [P_W-1:0] fund [NTAPS];   // fundamental product, valid where leader(k) == k

  for (genvar i = 0; i < NDIG; i++) begin : g_shift
    assign xs[i] = P_W'({{(P_W - X_W){x[X_W-1]}}, x} << i);
  end

  // node[n] = value of node n of the plan times x
  logic [P_W-1:0] node [NNODE];

  assign node[0] = xs[0];

  for (genvar n = 1; n < NNODE; n++) begin : g_node
    localparam int NOP = int'(PLAN[64*n+32 +: 4]);
    localparam int NSH = int'(PLAN[64*n+40 +: 8]);
    localparam int NA  = int'(PLAN[64*n+48 +: 8]);
    localparam int NB  = int'(PLAN[64*n+56 +: 8]);
    logic [P_W-1:0] a_sh;
    logic           unused_c;

    assign a_sh = node[NA] << NSH;

    if (NOP == 1) begin : g_add
      csla_adder #(.WIDTH(P_W), .USE_BEC(USE_BEC)) u_add (
        .a(a_sh), .b(node[NB]), .cin(1'b0), .s(node[n]), .cout(unused_c)
      );
    end else if (NOP == 2) begin : g_sub
      ripple_subtractor #(.WIDTH(P_W)) u_sub (
        .a(a_sh), .b(node[NB]), .bin(1'b0), .d(node[n]), .bout(unused_c)
      );
    end else begin : g_rsub
      ripple_subtractor #(.WIDTH(P_W)) u_sub (
        .a(node[NB]), .b(a_sh), .bin(1'b0), .d(node[n]), .bout(unused_c)
      );
    end
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    localparam coef_t       F   = odd_part(COEFS[k]);
    localparam int unsigned SH  = pow2_shift(COEFS[k]);
    localparam int unsigned LDR = leader(k);
    localparam int          NF  = (F > 1) ? nfind(PLAN, longint'(F)) : -1;

    if (LDR != k) begin : g_shared
      assign fund[k] = '0;   // unused: this tap takes the leader's product
    end else if (F == 0) begin : g_none
      assign fund[k] = '0;
    end else if (NF > 0) begin : g_plan
      assign fund[k] = node[NF];
    end else if (USE_GB35 && F == 35) begin : g_gb35
      logic [X_W+5:0] y35;
      gb35 #(.W(X_W), .VARIANT(0)) u_gb (
        .x(x),
        .y(y35)
      );
      assign fund[k] = P_W'({{(P_W - X_W - 6){y35[X_W+5]}}, y35});
    end else begin : g_csd
      // part[i] = x times the digits of F at positions i and above
      logic [P_W-1:0] part [NDIG+1];

      assign part[NDIG] = '0;

      for (genvar i = 0; i < NDIG; i++) begin : g_dig
        localparam int DIG = csd_digit(F, i);
        localparam int MSB = csd_msb(F, NDIG);

        if (DIG == 0) begin : g_zero
          assign part[i] = part[i+1];
        end else if (i == MSB) begin : g_lead
          assign part[i] = xs[i];
        end else if (DIG > 0) begin : g_add
          logic unused_c;
          csla_adder #(.WIDTH(P_W), .USE_BEC(USE_BEC)) u_add (
            .a   (part[i+1]),
            .b   (xs[i]),
            .cin (1'b0),
            .s   (part[i]),
            .cout(unused_c)
          );
        end else begin : g_sub
          logic unused_b;
          ripple_subtractor #(.WIDTH(P_W)) u_sub (
            .a   (part[i+1]),
            .b   (xs[i]),
            .bin (1'b0),
            .d   (part[i]),
            .bout(unused_b)
          );
        end
      end

      assign fund[k] = part[0];
    end

    assign p[k] = fund[LDR] << SH;
  end
endmodule
