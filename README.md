# Reconfigurable-precision Booth multiplier with Wallace, Dadda and hybrid reduction

A multiplier that does not always pay for its full width. Each operation is
inspected before it is computed: if both operands fit in a quarter or a half of
the datapath, only that many low bits are allowed into the array, so the upper
Booth digits and partial-product rows stay at zero and do not switch. An
application can also cap the precision outright and accept a truncated result.
The partial products are then summed by one of three carry-save reduction trees
built side by side: a Wallace tree (shallow, many adders), a Dadda tree (fewest
adders) or a hybrid of the two. Only the selected tree receives the matrix; the
other two see zeros and stay quiet.

The design follows the architecture of the article *"A Reconfigurable Precision
Hybrid Booth-Encoded Wallace–Dadda Multiplier for Energy-Efficient DSP and AI
Hardware"*. The article gives the block chain and what each block is for, but
few internals; the internals here (Booth sign handling, tree schedules, the
control rules, the clocking) are this implementation's own and are marked as
such below and in each file's header.

Default size: 16 × 16 bit unsigned operands, 32-bit product, precision modes of
4, 8 and 16 bits.

## Datapath

```
 a, b ──► input_analyzer ──► precision_control ──► booth_encoder ──► pp_generator
                │ sig_a, sig_b, activity │ a_m, b_m, tree_en            │ pp matrix
                └────────────────────────┘                              ▼
                                          ┌──────────── wallace_tree ───┐
                                          ├──────────── dadda_tree ─────┤ (one enabled)
                                          └──────────── hybrid_tree ────┘
                                                         │ row_a, row_b (OR of the three)
                                                         ▼
                                                    cla_adder ──► output register ──► product
```

| file | role |
|---|---|
| `rtl/mult_pkg.sv` | enums, matrix shape, tree schedules (elaboration-time functions) |
| `rtl/input_analyzer.sv` | significant bits of each operand, toggle count vs. the previous operation |
| `rtl/precision_control.sv` | precision mode, operand masking, truncation flag, tree choice and enables |
| `rtl/booth_encoder.sv` | radix-4 Booth recoding of `b` |
| `rtl/pp_generator.sv` | partial-product bit matrix |
| `rtl/wallace_tree.sv`, `rtl/dadda_tree.sv`, `rtl/hybrid_tree.sv` | reduction to two rows |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 3:2 and 2:2 counters used by the trees |
| `rtl/cla_adder.sv` | final carry look-ahead adder |
| `rtl/rp_hybrid_multiplier.sv` | top level |

## Interface and timing of the top (`rp_hybrid_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `a`, `b`, `prec_max`, `mode_req` hold an operation |
| `a`, `b` | in | N | unsigned multiplicand and multiplier |
| `prec_max` | in | `prec_t` | highest precision the application allows: `PREC_QUARTER` (N/4), `PREC_HALF` (N/2), `PREC_FULL` (N); the spare code 3 means full |
| `mode_req` | in | `req_t` | `REQ_SPEED` → Wallace, `REQ_AREA` → Dadda, `REQ_BALANCED` → hybrid, `REQ_AUTO` → decided per operation |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `product` | out | 2N | product of the (possibly truncated) operands |
| `prec_used`, `tree_used` | out | 2 | what the operation actually used |
| `truncated` | out | 1 | significant operand bits above `prec_max` were dropped |
| `activity` | out | clog2(2N+1) | switching estimate of the operation (see below) |

The array from the analyzer to the final adder is combinational; the result,
`prec_used`, `tree_used`, `truncated` and `activity` are registered. An
operation presented with `in_valid` high at a rising edge appears with
`out_valid` high after the next rising edge, so the latency is one clock and a
new operation can be issued every clock. The output registers hold their value
while `in_valid` is low. There is no back-pressure.

## Precision control

`input_analyzer` reports, for each operand, the position of its leading one
plus one (`sig_a`, `sig_b`; 0 for zero). `precision_control` takes the larger
of the two and picks the smallest mode that holds it: N/4, N/2 or N bits. That
mode is then capped at `prec_max`. If the cap wins, the operand bits above the
cap are discarded, `truncated` is raised, and the product is that of the
truncated operands (`(a mod 2^p) · (b mod 2^p)`). Otherwise the result is exact.

The chosen mode is applied as an AND mask on both operands (`a_m`, `b_m`). The
array itself is always N bits wide. Masking is what saves switching: above the
mask every Booth digit is zero, every partial-product row is zero, and the tree
columns they feed do not toggle. The article describes this as truncating or
bypassing unneeded high-order bits and as selectively activating operand bits.
The three mode widths and the "smallest mode that fits" rule are choices made
here. The article names 8- and 16-bit modes; the 4-bit mode matches the 4-bit
example it simulates.

## Booth recoding and the partial-product matrix

`b_m` is zero-extended by two bits and read in overlapping 3-bit groups,
giving D = N/2 + 1 radix-4 digits in {−2 … +2} with Σ dᵢ·4ⁱ = b. The extra
top digit is needed because the operands are unsigned. Each digit is sent to
the generator as three select lines, `one`, `two` and `neg`. The group `111`
is encoded as +0, so a zero digit never carries a negate.

Row i is `A` or `2A` (N+1 bits), inverted when `neg` is set, and placed at
column 2i. The sign is handled without sign-extending every row:

* the row's sign bit is stored inverted at column 2i+N+1;
* the `+1` that completes the two's-complement negation is the `neg` bit itself,
  added at column 2i;
* the constant −Σᵢ 2^(2i+N+1), reduced mod 2^(2N), is added as one more row.

Everything is summed modulo 2^(2N), which holds any N×N unsigned product. The
carry out of the final adder therefore has no meaning and is left unconnected.

The generator outputs the matrix **column-packed**. `pp[r][c]` is the r-th bit of
column c, valid for `r < mult_pkg::col_height(N, c)`; slots above that height
are zero. At N = 16 the matrix has 32 columns and at most 11 bits per column
(9 rows, a negate bit and a constant bit). `col_height()` and the generator
describe the same matrix. Change one and you must change the other.

## The three reduction trees

All three trees turn the column-packed matrix into two 2N-bit rows whose sum
(mod 2^(2N)) is the matrix value. They are **generated**, not written out.
`mult_pkg::tree_schedule(kind, N, what)` replays the reduction on column
heights at elaboration time. For every stage and column it records the height,
the number of full adders and the number of half adders. The tree module then
instantiates exactly those adders. Bits are wired by one fixed convention:

* full adder j of a column takes the column's bits 3j, 3j+1 and 3j+2;
* the half adder (at most one) takes the next two bits;
* the remaining bits pass through unchanged.

In the next stage a column holds three groups in this order. First come the
carries from the column below, then its own sums, then its passed bits.
Carries out of the top column are dropped.

| tree | stage rule |
|---|---|
| Wallace | every column, every stage: ⌊h/3⌋ full adders, plus a half adder if h mod 3 = 2 |
| Dadda | target d = largest of 2, 3, 4, 6, 9, 13, … below the tallest column; each column gets just enough full adders (−2 bits each) and at most one half adder (−1) to reach d, counting the carries arriving from below |
| hybrid | stage 0 as Wallace, all later stages as Dadda |

Cost from the schedule (stages / full adders / half adders):

| N | Wallace | Dadda | hybrid |
|---|---|---|---|
| 8 | 3 / 26 / 20 | 3 / 25 / 10 | 3 / 25 / 12 |
| 16 | 5 / 114 / 73 | 5 / 113 / 22 | 5 / 113 / 30 |
| 32 | 6 / 482 / 157 | 6 / 481 / 46 | 6 / 481 / 60 |

The adder counts come out in the order the article claims: Dadda is smallest,
the hybrid is a little larger and Wallace is largest. The stage count is the same
for all three at these sizes. Any speed difference between them is therefore
only in the gates inside each stage and in the final adder's input timing, not
in the number of adder levels. The article's split of the hybrid tree is not
specified; "one Wallace stage, then Dadda" is this implementation's reading.

Each tree has an `en` input that ANDs its whole input matrix. With `en` low both
output rows are zero. The top uses this for operand isolation and simply ORs
the three trees' rows together before the final adder.

## Choosing the tree

`mode_req` chooses the tree directly: speed → Wallace, area → Dadda,
balanced → hybrid. Under `REQ_AUTO` the control unit uses the switching
estimate from `input_analyzer`. That estimate, `activity`, is the number of bits
of `a` and `b` together that differ from the last operation accepted with
`in_valid`; reset clears the stored pair. If `activity` is larger than the
chosen mode's bit count (more than half of the active operand bits of both
operands flipped), the Dadda tree is selected, because it has the fewest adders
to toggle. Otherwise the hybrid tree is selected. The article says that a
control unit picks the tree at run time from performance requirements and
switching estimates, but gives no rule. This threshold is this implementation's
choice and the first thing to tune.

The final adder is a carry look-ahead adder in 4-bit groups. Carries inside a
group are formed in parallel. Group generate/propagate terms pass the carry from
one group to the next.

## Departures from the article and limits

* **Unsigned operands.** The article's simulation is unsigned (8 × 5 = 28h,
  c × d = 9ch), and so is this design. Signed multiplication would need a
  different top Booth digit and sign constant.
* **One clock of latency.** The article's waveform shows the product following
  the inputs with no clock. Here the result is registered.
* **The Dadda tree is exact.** The article's waveform shows its Dadda output
  disagreeing with the expected product in several cycles. Here all three trees
  give identical, exact products.
* **No timing, power or area figures.** The article evaluates delay, power and
  LUT count on an FPGA but prints no numbers. Nothing here is calibrated
  against them; the adder counts above are the only cost measure given.
* The precision mode widths, the automatic tree rule, the hybrid split, the
  Booth sign scheme, the CLA grouping and the handshake are this
  implementation's choices.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | digits rebuilt from the select lines sum to b; each digit matches its bit group; no illegal select combination |
| `tb_pp_generator` | the matrix sums to a·b; nothing is set above the column heights |
| `tb_wallace_tree`, `tb_dadda_tree`, `tb_hybrid_tree` | random bits in the valid slots, garbage above them: the two rows sum to the matrix; `en` low gives zeros; adder/stage ordering of the three schedules |
| `tb_cla_adder` | random and carry-chain cases at widths 32 and 30 |
| `tb_input_analyzer` | leading-one counts; toggle count against a tracked previous pair; `in_valid` gating; reset |
| `tb_precision_control` | precision, truncation, masks, tree and enables against a reference model |
| `tb_rp_hybrid_multiplier` | end to end at default size (see below) |
| `tb_fig2_vectors` | the whole multiplier built at N = 4, the article's simulated size: the six waveform vectors, then all 256 operand pairs, through each tree |

The end-to-end test first runs the six 4-bit operand pairs of the article's
waveform through each tree:

| a × b | product |
|---|---|
| 2 × e | 1c |
| 8 × 5 | 28 |
| c × d | 9c |
| d × 5 | 41 |
| 3 × a | 1e |
| 0 × 0 | 00 |

Then it runs 3000 random operations with random operand widths, limits and
requests, with idle cycles mixed in. Every output is compared with a reference
model one clock after issue. The test counts how often each mechanism occurred
and fails if any never did:

* each precision mode and each tree;
* truncation;
* automatic choice of Dadda and of hybrid;
* back-to-back operations and idle cycles.

It runs in well under a minute.

Running a testbench with Verilator (the package first; `-y rtl` lets Verilator
find the other modules by file name):

```
verilator --binary --timing --assert -y rtl rtl/mult_pkg.sv \
    tb/tb_rp_hybrid_multiplier.sv --top-module tb_rp_hybrid_multiplier -o sim
./obj_dir/sim
```

The same command works for every block's testbench.

## Changing the size

`N` (operand width) is the only parameter of the top. It must be a positive
multiple of 4 and at most 32: the schedule tables in `mult_pkg` have room for
64 columns and 10 stages, and an elaboration error reports a larger N. The
design lints cleanly at N = 8, 12, 16 and 32 and is simulated at N = 4 and 16:
the block testbenches and the end-to-end test use N = 16, `tb_fig2_vectors`
uses N = 4. Lint reports the unconnected carry pins of the top-column adders
and of the final adder; these carry weight 2^(2N) and are unused on purpose.
