# Low-pass FIR noise filter built from shift-add arithmetic

This design is a small digital low-pass FIR filter that smooths a noisy
sampled signal, for example a sine with broadband noise on it. It takes one
sample per clock. It uses no general multiplier: every coefficient product
is built from shifts, adders and subtractors. Every arithmetic cell is
written out explicitly:

- the adders are carry-select adders, in which a *binary-to-excess-1
  converter* (BEC) takes the place of the second ripple-carry adder;
- the subtractors are chains of full subtractors;
- the delay registers are master-slave flip-flops made of two gated D
  latches.

The filter is in **transposed form**. The current input sample is
multiplied by all coefficients at once, and the products run into a chain
of adders and registers. The same shift-add multiplication also exists in
digit-serial form: a multiply-by-35 unit that handles two bits per clock. It
sits beside the filter on its own ports.

For comparison, two parameters of `fir_top` build the forms the design
improves on. `FORM = 1` gives a direct-form filter, and `USE_BEC = 0` gives
carry-select adders with two ripple-carry adders per group. Both give the
same outputs as the default design.

With the default coefficients (1120, 258, 258, 1120) the filter passes DC
with a gain of 2756. It has zeros at 0.19 of the sample rate and at half the
sample rate. For white noise it leaves 0.35 of the noise power relative to
the signal, which is about 4.6 dB of noise reduction.

## Signal flow

```
 x_in ──┬──────────────┬───────────────┬───────────────┐
        │    multiplier block (shared shift-add products) │
      h3·x           h2·x            h1·x            h0·x
        │              │               │               │
        └─▶[reg 3]──▶(+)──▶[reg 2]──▶(+)──▶[reg 1]──▶(+)──▶ y_out
```

- Register 3 holds h3·x(n−1).
- Register 2 holds h2·x(n−1) + h3·x(n−2).
- Register 1 holds h1·x(n−1) + h2·x(n−2) + h3·x(n−3).

So `y_out = h0·x(n) + reg1 = Σ h[k]·x(n−k)`.

There is no register between the last adder and `y_out`, so the output
answers the sample that is on `x_in` in the same cycle (zero latency). The
timing path therefore runs from the input, through the multiplier block and
one carry-select adder, to the output. A rising clock edge moves the filter
on by one sample.

## The multiplier block: shared shift-add products

`mult_block` forms every product h[k]·x. Each coefficient is split into an
odd *fundamental* times a power of two, h = f·2^s:

| tap | h    | f   | s | how f·x is built                                   |
|-----|------|-----|---|----------------------------------------------------|
| 0   | 1120 | 35  | 5 | 5x = x + 4x, then 35x = 8·(5x) − 5x (`gb35`)        |
| 1   | 258  | 129 | 1 | (x << 7) + x (one adder)                           |
| 2   | 258  | 129 | 1 | shared with tap 1                                  |
| 3   | 1120 | 35  | 5 | shared with tap 0                                  |

Each distinct fundamental is built once, and each tap takes it shifted left
by its own s, which is only wiring. The four products cost three
adder/subtractor stages. A tap-by-tap canonical-signed-digit build would
need six.

Each fundamental is built in the first of three ways that applies:

1. **The MINAS-DS search** (`USE_SYNTH = 1`). The search runs once at
   elaboration time over all fundamentals and produces a *plan*: a list of
   nodes. Node 0 is x itself. Every other node is one adder or subtractor
   on two earlier nodes: (a << i) + b, (a << i) − b or b − (a << i).
   - *Synthesize*: every fundamental that is one operation away from the
     plan joins it. This repeats until none is left that can.
   - *Intermediate constants* (`USE_IC = 1`): if fundamentals are still
     missing, the search tries the odd constants j below 2^(C_W+1) that are
     one operation away from the plan. Each j is scored: 1 for j itself,
     plus 1 for each missing fundamental that j brings one operation away,
     plus the signed-digit adder count of each fundamental it does not.
     The cheapest j joins the plan, and Synthesize runs again.
   - Ties go to the smallest total shift (fewer delay flip-flops in a
     digit-serial build), then to the smallest j.
   - With the default taps, 129 = (1 << 7) + 1 is one node.
   - With taps such as 45, 37, 5, 77, the plan is 5 = 4 + 1, 45 = 40 + 5,
     37 = 45 − 8 and 77 = 32 + 45. Adding 1911 brings the intermediate
     637 = (37 << 4) + 45 and then 1911 = (637 << 1) + 637.
2. **The ×35 graph.** When `USE_GB35 = 1`, the fundamental 35 is left out
   of the search and built by `gb35`.
3. **Canonical signed digits**, as described below, for anything the
   search did not reach (it adds at most NTAPS intermediate constants).

The fundamental 35 uses the two-stage graph in `gb35`, in which the term 5x
is shared. The multiplier block uses this graph. `gb35` with `VARIANT = 1`
builds the other graph, 7x = 8x − x and then 35x = 4·(7x) + 7x. You can
switch the graph off with `USE_GB35 = 0`.

Every other fundamental is recoded at elaboration time into canonical
signed digits (CSD): digits −1, 0 and +1, with no two non-zero digits next
to each other. The product is then built from the top digit down:

- the leading +1 digit is x, shifted into place;
- each further +1 digit adds `x << i` with a carry-select adder;
- each −1 digit subtracts `x << i` with a ripple-borrow subtractor.

The recoding functions live in `fir_pkg` (`csd_digit`, `odd_part`,
`pow2_shift`). Any coefficient set you pass as a parameter is built the
same way.

With `USE_GB35 = 0`, the search itself picks the intermediate 5 and
builds 35 = (5 << 3) − 5. This is the same graph as in `gb35`.

## Carry-select adder with BEC

A classic carry-select adder computes every 4-bit group twice, once for
carry-in 0 and once for carry-in 1, and then picks one. Here each group
(`csa_group`) has only one 4-bit ripple-carry adder, run with carry-in 0.
Its 5-bit result {carry, sum} goes into a 5-bit BEC, which adds one and so
gives the result for carry-in 1.

The BEC is only an XOR/AND chain:

- E0 = ¬A0
- E1 = A1 ⊕ A0
- E2 = A2 ⊕ (A1·A0)
- E3 = A3 ⊕ (A2·A1·A0)
- and so on for wider BECs.

The real carry-in only drives the select of a 2:1 multiplexer. `csla_adder`
chains the groups: the lowest group is a plain ripple-carry adder, and each
higher group is selected by the carry of the group below. All groups
compute in parallel, so the serial path is the chain of multiplexers. If a
width is not a multiple of 4, the top group is padded with zeros.

The classic form is there too. With `USE_BEC = 0`, each group uses a
second 4-bit ripple-carry adder with carry-in 1 instead of the BEC. The
results are the same, so you can compare the two forms in area and delay.
The parameter passes down from `fir_top` through `fir_transposed` and
`mult_block` to every carry-select adder.

## Storage: latches and master-slave flip-flops

`d_latch` is a gated D latch: transparent while `en` = 1, holding while
`en` = 0.

`dff` puts two of them in series:

- the master is open while `clk` = 0;
- the slave is open while `clk` = 1.

The result behaves as a rising-edge D flip-flop (`q` takes the value `d`
had just before the edge). Reset is synchronous and active high. It is
applied at the master's data input, so the latches need no reset pin.

Consequences:

- Synthesis reports latches, not flip-flops: two latch bits per register
  bit, 188 in the whole design.
- Lint tools treat a latch as combinational logic. A register whose output
  feeds back to its own input (a digit-serial carry or shift register) is
  therefore reported as a combinational loop. The two latches are never open at the
  same time, so the loop is broken by the clock.
- In silicon, `clk` and its inverse must not overlap at the master/slave
  hand-over. As with any latch pair, this needs attention in layout. In
  simulation it behaves as an ideal flip-flop.

## Digit-serial multiplication

In digit-serial arithmetic a word moves through the hardware two bits per
clock cycle, least significant digit first. Each cell is only two bits
wide, and it keeps its carry in a flip-flop from one digit to the next. A
signal `first` = 1 marks the lowest digit of each word, so words can follow
each other back to back without a reset. There are three cells:

- **`digit_serial_sub`** computes a − b. Two full adders add `a_dig` and the
  inverted `b_dig`, and the carry flip-flop starts at 1, because
  a − b = a + ~b + 1. `cout` of the last digit is 1 when there is no borrow.
- **`digit_serial_add`** is the same with no inversion, and its carry starts
  at 0.
- **`ds_shift`** computes x << s. In a digit stream a left shift is a
  delay. An s-bit register of flip-flops keeps the last s input bits, and
  each output digit is the low two bits of {current digit, those bits}. At
  the start of a word it shifts in zeros.

`ds_mcm35` puts these cells together into the ×35 graph:

- x4 = x << 2
- t = x + x4 (= 5x)
- t8 = t << 3
- y = t8 − t (= 35x)

All cells work on the same digit position in the same cycle. The output
digit therefore comes out in the cycle its input digit goes in, and there
is no added latency.

A 16-bit sample needs 22 result bits. The caller sign-extends each word to
22 bits and feeds it over 11 cycles. This unit needs 14 latch bits (7
flip-flops), where the bit-parallel `gb35` graph needs about 230 gates. The
cost is 11 cycles per sample.

## Parameters and widths

| parameter  | default                  | meaning                                    |
|------------|--------------------------|--------------------------------------------|
| `X_W`      | 16                       | input width, two's complement              |
| `C_W`      | 11                       | coefficient width, unsigned                |
| `NTAPS`    | 4                        | number of taps (at least 2)                |
| `COEFS`    | '{1120, 258, 258, 1120}  | coefficients, h0 first                     |
| `USE_GB35` | 1                        | build the fundamental 35 with the `gb35` graph |
| `USE_SYNTH`| 1                        | build fundamentals from the MINAS-DS plan |
| `USE_IC`   | 1                        | let the search add intermediate constants |
| `USE_BEC`  | 1                        | 1: RCA + BEC groups; 0: two RCAs per group |
| `FORM`     | 0                        | `fir_top` only. 0: transposed filter; 1: direct form |
| `DS_DIGIT` | 2                        | bits per cycle of the digit-serial ×35 unit |

- The output `y_out` is `X_W + C_W + clog2(NTAPS)` = 29 bits, two's
  complement. It cannot overflow.
- Products inside the multiplier block are `X_W + C_W + 1` bits.
- If you change `NTAPS`, pass a `COEFS` array of that size as well.

## Top level `fir_top`

| port       | dir | width | meaning                                       |
|------------|-----|-------|-----------------------------------------------|
| `clk`      | in  | 1     | clock, rising edge                            |
| `rst`      | in  | 1     | synchronous reset, active high                |
| `x_in`     | in  | 16    | input sample                                  |
| `y_out`    | out | 29    | filtered sample (same cycle as `x_in`)        |
| `ds_first` | in  | 1     | lowest digit of a word for the ×35 unit       |
| `ds_x`     | in  | 2     | input digit (22-bit sign-extended word)       |
| `ds_y`     | out | 2     | output digit of 35·x                          |

Change inputs after the falling edge of `clk`. Read `y_out` and `ds_y`
before the next rising edge.

## Files

- `rtl/fir_pkg.sv` holds the default widths and coefficients, and the
  signed-digit and odd-part functions.
- `rtl/fir_top.sv` is the top level: `fir_transposed` (or `fir_direct`)
  and `ds_mcm35`.
- `rtl/fir_transposed.sv` is the filter: `mult_block`, `csla_adder`, `dff`.
- `rtl/fir_direct.sv` is the direct-form filter, for comparison: a delay
  line of `dff`, one `mult_block` per tap, and `csla_adder`.
- `rtl/mult_block.sv` builds the shared shift-add products: `gb35`,
  `csla_adder`, `ripple_subtractor`.
- `rtl/gb35.sv` is the multiply-by-35 graph.
- The adder hierarchy is `rtl/csla_adder.sv`, `rtl/csa_group.sv`,
  `rtl/rca.sv`, `rtl/bec.sv` and `rtl/full_adder.sv`.
- The subtractor hierarchy is `rtl/ripple_subtractor.sv` and
  `rtl/full_subtractor.sv`.
- `rtl/dff.sv` and `rtl/d_latch.sv` are the storage.
- The digit-serial unit is `rtl/ds_mcm35.sv`, built from
  `rtl/digit_serial_add.sv`, `rtl/digit_serial_sub.sv` and `rtl/ds_shift.sv`.
- `tb/tb_<module>.sv` is one self-checking testbench per module.

## Simulating

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

To run another testbench, change both `tb_fir_top` names. Each testbench
ends by printing `TB_RESULT checks=N failures=M`, and has a watchdog that
ends a hung run with a failure.

What the testbenches check:

- **`tb_fir_top`** runs the whole design at its default parameters. It
  streams 2000 samples of a sine (amplitude 12000, period 200 samples) with
  ±4000 uniform noise. Every output is compared with an integer model of
  Σ h[k]·x(n−k). The test then checks:
  - that the output noise power, relative to the signal gain, is below half
    the input noise power (measured: about 0.35);
  - that a reset mid-stream empties the delay line.

  At the same time it streams 181 random samples through the digit-serial
  ×35 unit and checks each result. It counts events that must each happen
  at least once: the carry-select multiplexer taking the ripple-carry path
  and the BEC path, negative and positive filter outputs, negative and
  positive digit-serial products, and word restarts.
- **`tb_fir_transposed`** checks the impulse response, full-scale steps,
  random samples and a reset mid-stream. A second filter built with
  `USE_BEC = 0` must give the same outputs.
- **`tb_fir_direct`** runs the same kind of stimulus through the direct
  form. It checks the default taps and five asymmetric taps
  (2047, 35, 1365, 1911, 70) with `USE_BEC = 0`. A transposed filter with
  the default taps runs beside it, and the two must agree on every cycle.
- **`tb_mult_block`** checks the products of seven instances against
  h·x:
  - the default coefficients with the 35 graph, with the search only, and
    with signed digits only;
  - (2047, 0, 1, 35, 1365, 1911, 70, 2047), which needs subtractions and
    sharing;
  - (45, 37, 5, 35, 77, 7, 1911, 0) with the full search, without
    intermediate constants, and with signed digits only.

  It also checks the plans: without the graph the default set must give
  the nodes 129, 5 and 35, in that order, and the node counts of the other
  instances must match.
- **The arithmetic cells** are tested exhaustively at 4 and 5 bits, and
  with random operands at 13, 16 and 29 bits. `tb_csa_group` and
  `tb_csla_adder` also check the two-RCA form of the group.
- **`tb_dff`** checks that `q` changes only at a rising edge, whatever `d`
  does in between.
- **The digit-serial cells:**
  - `tb_digit_serial_sub` and `tb_digit_serial_add` check about 300 16-bit
    words each, and that each word takes exactly 8 cycles.
  - `tb_ds_shift` checks shifts of 1, 2, 3 and 5 bits, including that no
    bits leak in from the previous word.
  - `tb_ds_mcm35` checks 405 products at 11 cycles each.

All of them pass.

## What is this design's own choice

The overall structure is fixed: transposed form, a multiplier block of
constant shift-add products, carry-select adders with a BEC in place of the
second ripple-carry adder, 4-bit groups, full-adder and full-subtractor
equations, a two-bit-per-cycle subtractor whose carry flip-flop starts at 1,
and the two ×35 graphs. The following points were chosen here:

- **Coefficients and tap count.** The source gives only two 11-bit
  coefficient values, h0 = 10001100000b (1120) and h1 = 00100000010b (258).
  The filter mirrors them into four symmetric taps so that it has linear
  phase.
- **Use of the ×35 graph for h0.** The ×35 graph is used for h0 because
  1120 = 35·32. The graph itself comes from the source. Placing it here is
  an interpretation.
- **Search details.** The source prints only the outline of MINAS-DS. It
  does not define the cost functions or the final area step. The costs,
  the tie-breaking, the limit of NTAPS intermediate constants and the
  left-shift-only operations were chosen here. Each node keeps the first
  operation found for it; there is no separate area-minimising pass.
- **Widths.** The 16-bit input width and all internal widths were chosen
  here.
- **Reset.** Reset is synchronous and active high.
- **Digit-serial cells.** The `first` input of the digit-serial cells was
  added here. The source describes digit-serial constant multiplication,
  with shifts held in D flip-flops, but shows only the digit-serial
  subtractor. The digit-serial adder, the shifter and their arrangement
  into the ×35 unit are this design's.
- **Latch placement.** The storage element is described as a gated D latch
  placed between the BEC and the multiplexer of the adder. Here the latches
  are used only inside the master-slave flip-flops, and the adder stays
  combinational. No enable for such a latch stage is defined, so putting
  one inside the adder would add a pipeline stage of unknown timing.
- **Output register.** The output is not registered, as in the transposed
  form as drawn. Add a `dff` on `y_out` if the path from input to output is
  too long for your clock.
- **Comparison forms.** The direct-form filter (`FORM = 1`) and the
  carry-select group with two ripple-carry adders (`USE_BEC = 0`) are
  built so that they can be compared with the design. Which cells they
  use, and that the direct form has the same zero-latency timing, were
  chosen here.
- **Not included.**
  - The MATLAB generation of the noisy test signal is replaced by the
    testbench's own generator.
  - The source also names an exact common-subexpression method, solved as
    a 0-1 integer program, but says the graph-based (GB) method is the one
    used. Only the GB method (MINAS-DS) is built.
  - The general GB graph for 35 that the source draws next to the
    simplified one does not give 35 with the edge values printed, so it is
    not built.

## Tool reports to expect

- Lint reports combinational loops through the digit-serial carries and
  the shift registers. See the storage section above for why they stand.
- Lint notes that some latch bits reduce to constants. These are the low
  product bits, which are always 0 (1120·x has five zero low bits).
- Lint reports unused high carry bits in padded adders and unused
  complement outputs of the latches.
- Lint reports unused bits of two plan helper functions in `mult_block`
  (they read only part of the packed plan). With some coefficient sets it
  also reports the plan's node array as unused, when every product comes
  from the ×35 graph or from signed digits.
