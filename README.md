# Fixed-width replica ANT multiplier

A 12 x 12-bit unsigned multiplier built to keep working when its supply is
lowered below the voltage its critical path needs. This is voltage
overscaling, which saves power but lets long carry chains miss the clock edge.
The scheme is algorithmic noise tolerance (ANT). A small replica multiplier is
short enough to stay correct at the lowered supply, and it runs beside the main
multiplier. When the two disagree by more than a fixed threshold, the main
result is taken to be corrupted and the replica's coarser estimate is output
instead.

The replica here is a **fixed-width** multiplier. It multiplies only the upper
6 bits of each operand and produces only the upper 6 bits of the product. This
costs about half the adder cells of a full-width replica. The precision lost to
truncation is won back by a compensation vector built from the bits just below
the kept columns.

```
 x, y ─┬──────────────► mdsp_array_mult ── y_a (24 b) ──┐
       │                                                  ├─► ant_ec_block ─► y_hat (24 b), err
       └─ x[11:6], y[11:6] ─► rpr_fixed_width ─ y_r (6 b)─┘
                                   └─ rpr_comp_vector
```

## Blocks

| module | role |
|---|---|
| `ant_multiplier` | top level: main multiplier, replica and error correction |
| `mdsp_array_mult` | main block: exact N x N array multiplier, one ripple row of `fa_cell` full adders per multiplier bit |
| `rpr_fixed_width` | reduced-precision replica: keeps the most significant partial products, adds the compensation bits |
| `rpr_comp_vector` | compensation bits C_1..C_(N/2) and the correction term C_m |
| `ant_ec_block` | input registers, difference, magnitude, threshold compare, output multiplexer |
| `ant_pkg` | defaults `N_DEFAULT = 12` and `TH_DEFAULT = 455553` |
| `fa_cell` | one-bit full adder |

## The fixed-width replica and its compensation

Write the operands as X = sum x_i 2^i and Y = sum y_j 2^j with N = 12 and
h = N/2 = 6. The replica sees only x_i and y_j with i, j >= h. Among the
partial products x_i y_j of those bits, it sorts them by the column weight
2^(i+j):

* **MSP**, i + j >= 3h (= 18). These are kept and summed exactly. Their sum,
  divided by 2^18, is the replica's raw 6-bit result.
* **ICV** column, i + j = 3h - 1. These are the terms x_(N-1-k) y_(h+k),
  k = 0..h-1. Their count is beta.
* **MICV** column, i + j = 3h - 2. These are the terms x_(N-2-k) y_(h+k),
  k = 0..h-2. Their count is alpha.
* Everything lower is simply discarded.

The ICV column is the most significant part that is dropped. Its first h-1
terms go into the replica unchanged as C_1..C_(h-1), and are added at the LSB
column of the kept part. That is twice their own weight, which makes up on
average for the ICV column together with everything below it. This costs no
gates at all.

The last bit, C_h, covers a case the plain injection gets wrong. The injected
ICV terms may all be zero while the MICV column still holds ones. The
compensation would then be zero although the truncated part is not:

```
C_m1 = NOR(C_1 .. C_(h-1))            injected ICV terms all zero
C_m2 = OR(MICV terms)                 MICV column not empty
C_m  = C_m1 AND C_m2
C_h  = (x_h AND y_(N-1)) OR C_m
```

So the replica result is

```
y_r = MSP / 2^(3h) + C_1 + ... + C_(h-1) + C_h          (6 bits)
```

In the array of full-adder cells, C_1..C_(h-1) are the carry-ins of the
rightmost cells of rows 1..h-1. C_h enters in a final row at the bottom. That
is as far from the critical path as it can be, so the C_m logic does not
lengthen the replica's delay. The sum cannot overflow 6
bits: with all inputs one the MSP gives 2^h - h - 1 and the compensation gives
h, so the total is 2^h - 1.

Over all 4096 pairs of upper halves, this compensation cuts the summed
absolute error against the exact upper-half product to 102640, from 328704 for
the MSP alone. C_m fires for 506 of the 4096 pairs.

## Error detection and correction

`ant_ec_block` registers y_a and y_r on the rising clock edge. It lines the
replica value up with the product, y_r * 2^18, so its low 18 bits are zero,
and then applies:

```
y_hat = y_a             if |y_a - y_r * 2^18| <= TH
y_hat = y_r * 2^18      otherwise (err = 1)
```

TH is the largest difference that can occur when the main block is correct. It
is the maximum of |X*Y - y_r * 2^18| over every 12-bit operand pair. For a
given pair of upper halves, only the smallest and largest full product need to
be examined, so the maximum comes from 4096 cases. For N = 12 it is
**455553**, which is about 2^18.8. Any larger difference must come from an
error in the main block. Main-block errors in the low bits stay below TH and
pass through uncorrected, but they are bounded by TH. In both cases
|y_hat - X*Y| <= TH.

TH depends on N and on the exact replica arithmetic. If you change N or the
compensation, recompute it: N = 8 gives 5985 and N = 4 gives 57.
`tb_rpr_fixed_width` recomputes TH for N = 12 and fails if it differs from
`ant_pkg::TH_DEFAULT`.

## Interface and timing

`ant_multiplier #(N = 12, TH = 455553)`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active-low; clears the two registers |
| `x`, `y` | in | N | unsigned operands |
| `y_hat` | out | 2N | corrected product |
| `err` | out | 1 | the replica value was substituted |

The operands are sampled on every rising edge. `y_hat` and `err` are
combinational from the registers and are valid one cycle later, so the design
delivers one product per cycle. There is no valid/ready handshake.

## Where this departs from, or goes beyond, the published scheme

* **Operand coding.** The design's equations treat both operands as unsigned,
  and that is what is built. The main array is an unsigned carry-propagate
  array, not a signed Baugh-Wooley array.
* **C_m condition.** The prose describing the gates (NOR, OR, AND) and a later
  sentence ("beta = 0 and beta_1 = 0") do not agree. The gate description is
  followed, so C_m fires when the injected ICV terms are all zero and the MICV
  column is non-zero.
* **Term lists.** The ICV injection ends at x_(h+1) y_(N-2) and the MICV list
  ends at x_h y_(N-2). These are the terms that lie in those columns.
* **Threshold, alignment and reset are this design's own choices.** No value
  for TH is published. The value here follows the threshold's definition,
  applied to this replica. Lining y_r up at 2^18 with low bits zero, and the
  reset, are also choices made here.
* **Voltage overscaling is not modelled in the RTL.** In RTL the main block is
  always exact. The top-level testbench imitates timing errors by forcing the
  `y_a` net on chosen cycles.
* **Array details.** Both arrays use plain ripple rows of full-adder cells.
  Which replica row each C_1..C_(h-1) enters is a choice made here; only the
  bottom position of C_h is prescribed.
* Area, power and minimum-supply figures of a silicon implementation (90 nm,
  200 MHz, 0.6 V) cannot be checked at this level.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.
Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mdsp_array_mult` | corner operands and 20000 random pairs against X*Y |
| `tb_rpr_comp_vector` | all 4096 upper-half pairs: every C_k and C_m against the rules above |
| `tb_rpr_fixed_width` | all 4096 pairs against a reference model; recomputes TH; checks that the compensation beats plain truncation |
| `tb_ant_ec_block` | reset value, one-cycle latency, differences exactly at TH and TH+1 on both sides, random pairs |
| `tb_ant_multiplier` | end to end at the default N = 12, back to back for 20000 cycles (see below) |

In `tb_ant_multiplier`, about 10% of the cycles have a high product bit
flipped, which must be detected and replaced. Another 10% have a low bit
flipped, which must pass through. Every output must be within TH of X*Y. The
testbench counts clean products, replaced errors, tolerated errors and C_m
events, and fails if any count is zero. The shared reference arithmetic is in
`tb/ant_ref_pkg.sv`.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ant_pkg.sv rtl/fa_cell.sv rtl/mdsp_array_mult.sv rtl/rpr_comp_vector.sv \
  rtl/rpr_fixed_width.sv rtl/ant_ec_block.sv rtl/ant_multiplier.sv \
  tb/ant_ref_pkg.sv tb/tb_ant_multiplier.sv --top-module tb_ant_multiplier
./obj_dir/Vtb_ant_multiplier
```

Each testbench finishes in well under a second.
