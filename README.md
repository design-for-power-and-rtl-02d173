# Speculative carry-save multiplier with error flag

An unsigned N x N multiplier (N = 8 by default) that shortens the partial-product
reduction by betting on rare events. Some of the partial products are recoded so that
a few of the resulting terms are almost always zero. These terms are summed by cheap
"speculative" counters that are exact only while no more than three of their inputs
are high. The circuit gives three outputs in parallel:

* `spec_p`: the speculative product. It comes from the short path and is correct
  whenever `err` is low.
* `err`: the error flag. It is high when a counter or the speculative final adder
  guessed wrong.
* `exact_p`: the non-speculative product. It comes from a second, slower path that
  adds the counters' shortfall back in. It is always exact.

A system that can tolerate an occasional wrong result takes `spec_p` and ignores the
rest. A system that needs exact results uses `spec_p` when `err` is low and waits for
`exact_p` otherwise. The design is purely combinational: it has no clock, registers or
reset.

The design follows the architecture of *Design for Power and Area Efficient
Approximate Multipliers*: recoding, speculative (m:2) counters, correction blocks, two
three-dimensional (TDM) carry-save trees, a speculative adder, an exact adder and an
OR-ed error flag. Many details are this RTL's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
 a, b ──► pp_recode ──► a_ij, O_ij, a_ii ───────────────┐
              │                                         ▼
              ├── A_ij ──► spec_counter (one per column) ─ S, C ──► tdm_tree #1 ──► row0,row1
              │                                                        │
              └── A_ij ──► correction_block ── EW ──► tdm_tree #2 ◄────┤
                                  │                      │              ▼
                                  E                 exact_adder     spec_adder ── miss
                                  │                      │              │        │
                                  └──────► error_flag ◄──┼──────────────┼────────┘
                                               │         ▼              ▼
                                              err     exact_p        spec_p
```

| module | role |
|---|---|
| `mult_pkg` | Constant functions that work out the shape of the partial-product matrix and of every reduction level. |
| `pp_recode` | Forms the partial products a_ij = a[i] & b[j] and recodes pairs in the tall columns. |
| `spec_counter` | Speculative (m:2) counter: S = parity, C = "two or more inputs high". |
| `correction_block` | Flags a counter that saw four or more high inputs (E) and gives its shortfall (EW). |
| `tdm_tree` | Full-adder carry-save tree that reduces a bit matrix to two rows. It is used twice. |
| `full_adder` | The cell the trees are built from. |
| `spec_adder` | "Almost correct" adder: each sum bit looks back only K bits. It has an exact miss detector. |
| `exact_adder` | Plain W-bit adder. |
| `error_flag` | OR of all miss signals. |
| `approx_mult` | The top module, which wires the blocks together. |

## Recoding: making rare terms

The partial product a_ij has weight 2^(i+j), so a_ij and a_ji sit in the same column.
For random operands each one is high with probability 1/4. In the recoded columns
(`RLO`..`RHI`), each pair with i < j is replaced by

    A_ij = a_ij & a_ji      (high with probability 1/16)
    O_ij = a_ij | a_ji      (high with probability 7/16)

Since A + O = a_ij + a_ji, the column sum does not change, and neither does the number
of bits. The O terms and the unpaired diagonal a_ii go into the ordinary carry-save
tree. Only the rare A terms go to the speculative counter of their column. Columns
outside the recoded range send all their a_ij to the tree unchanged.

In the default 8 x 8 build, columns 5..9 are recoded. These are the five tallest
columns, with heights 6, 7, 8, 7 and 6. They hold 3, 3, 4, 3 and 3 A terms. In the
16 x 16 arrangement (N = 16, RLO = 11, RHI = 22), the middle column holds eight A
terms.

## Speculative counters, and how their errors are repaired

An (m:2) counter has only two outputs, S (weight 1) and C (weight 2). That is enough
for a count of 0..3. The counter computes

    S = x0 ^ x1 ^ ... ^ x(m-1)
    C = at least two inputs high

so 2C + S is the exact count n whenever n <= 3. For M = 5, C is the OR of three terms:

* the "two of three" output of a modified full adder on x0..x2;
* the "both" output of a modified half adder on x3, x4;
* (any of x0..x2) AND (any of x3, x4).

`spec_counter` computes the same function for any M with a chain of "any so far" and
"two so far" signals.

With n >= 4 high inputs the counter falls short by n - 2 - (n mod 2). This amount is
always even. `correction_block` sees the same inputs and computes two outputs:

* `e`: high when n > 3.
* `ew`: (n >> 1) - 1 when `e` is high, else 0. This is half the shortfall, so `ew`
  carries the weight of the column above the counter.

A counter with three or fewer inputs can never be wrong, so it gets no correction
block. In the 8 x 8 default only column 7 has one. There, a misprediction needs all
four A terms high, which happens for a = b = 255 only. In the 16 x 16 arrangement the
correction words are up to two bits wide. With uniformly random operands about 0.3 % of
products mispredict.

The two trees share their work. Tree #1 reduces the direct bits plus every S and C.
Its two output rows go to the speculative adder, and they are also the first two rows
of tree #2. Tree #2 adds the EW bits, each at the column above its counter, and
reduces again. Its two rows then go through the exact adder. The correction therefore
costs a few full-adder levels behind tree #1, not a second multiplier.

## The carry-save trees (`tdm_tree`)

`tdm_tree` takes a bit matrix column by column. The parameter `HEIGHT`, of type
`mult_pkg::hvec_t` with 8 bits per column, gives how many bits each column holds. The
tree reduces the matrix with full adders, level by level, until every column has at
most two bits. Each column is treated as a queue in arrival order:

* The earliest bits are taken three at a time into full adders.
* Bits left over go to the front of the next level's queue.
* They are followed by this level's sums, then by the carries from the column below.

Late-produced bits thus meet other late bits. This is the idea behind the
three-dimensional reduction method. That method also chooses, for each full adder,
which pin a late signal enters; this is a netlist timing choice and is not modelled.
Because the structure comes from constant functions, any shape works. The number of
levels is `mult_pkg::num_levels(HEIGHT, W)`. Carries out of column W-1 are dropped, so
the result is exact modulo 2^W.

## The speculative adder (`spec_adder`)

Sum bit i uses only the carry that the K bits below it generate on their own, so the
adder's depth grows with K, not W. The default is K = 8 for a 16-bit sum.

The result is wrong exactly when three things hold:

* a carry is generated at some bit j-1;
* it runs through K or more propagate bits j..j+K-1;
* it continues into a bit j+K that is still inside the word.

The `err` output tests for exactly this condition, one (K+1)-input AND per position.
The adder's `err` is therefore high exactly when its sum differs from a + b. On the
8 x 8 default this costs 10 of the 65536 products; in the 16 x 16 arrangement about
0.4 % of random products.

## Error flag

`err` is the OR of every correction block's `e` and the speculative adder's miss
signal. So `err = 0` guarantees `spec_p == a * b`. When `err = 1`, `spec_p` is usually
wrong, but not always. Only `exact_p` is then trustworthy.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N` | 8 | Operand width. The product is 2N bits. |
| `RLO`, `RHI` | 5, 9 | First and last recoded column. Use 11, 22 for N = 16. |
| `K` | 8 | Carry window of the speculative adder. |

A wider window makes speculative adder misses rarer but the adder slower. A wider
recoded range moves more bits into the counters and out of tree #1. `mult_pkg` limits
a tree to 64 columns of at most 255 bits each, which means N <= 32.

## Departures and own choices

These follow the published architecture:

* the recoding equations;
* the counter's rule that 2C + S is exact for up to three high inputs, and the
  structure drawn for a 5-input counter;
* the block structure: counters and correction blocks fed by the A terms, E to the
  flag, EW to a second tree, a speculative and an exact adder;
* the 8-bit operands and 16-bit product.

These are this design's own choices:

* the 8 x 8 recoded range (5..9). The publication gives a range only for 16 x 16;
* one counter per column taking all of that column's A terms;
* the S output (parity);
* the correction block's internals and the EW encoding;
* the queue-order full-adder tree;
* the adder window K and the adder's miss detector;
* the inclusion of that miss in `err`;
* unsigned operands.

The FPGA implementation this design is based on reports only 32 I/O pins (a, b and one
16-bit product). This RTL brings out both products and the flag, 49 I/O bits in all.

The architecture is aimed at speed, power and area. No timing, power or area figures
are claimed for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_approx_mult` | Top module at its defaults. Runs all 65536 operand pairs and the reference products 25 x 36 = 900, 45 x 69 = 3105 and 250 x 56 = 14000. Checks `exact_p` always, `spec_p` whenever `err` is low, and that `err` is high when a counter must mispredict. Requires a counter misprediction, an adder miss and a clean result to each occur at least once. |
| `tb_approx_mult_16` | The 16 x 16 arrangement, 200000 random and bit-dense operand pairs, with the same checks. |
| `tb_pp_recode` | All 65536 operand pairs: column sums preserved, weighted sum = a * b, individual A, O and diagonal bits. |
| `tb_spec_counter`, `tb_correction_block` | All input patterns for M = 5 and M = 8. |
| `tb_tdm_tree` | Random matrices on the 8 x 8 shape and on a 12 x 10 shape. |
| `tb_spec_adder` | Random operands, long carry chains, and every pair of an 8-bit, K = 3 instance. `err` must be high exactly when the sum is wrong. |
| `tb_exact_adder`, `tb_error_flag` | Random and corner cases. |

All pass. Each block-level testbench (all but `tb_approx_mult_16`) was also run
against a deliberately broken copy of its module, and each of those runs failed.

Simulation with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/mult_pkg.sv tb/tb_approx_mult.sv --top-module tb_approx_mult
./obj_dir/Vtb_approx_mult
```

To run another testbench, replace `tb_approx_mult` with its name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/mult_pkg.sv rtl/<module>.sv`. The remaining
lint warnings are about unused bits: padding rows above a column's height, and the
carry out of the top column. They are intended.
