# Approximate 8 × 8 Dadda multipliers with ultra-compact compressors and an approximate full adder

Multipliers for error-tolerant signal processing (image blending, filtering,
neural-network inference) do not need every product bit to be right. This RTL
builds an unsigned N × N multiplier (N = 8 by default) whose partial-product
reduction is cheapened in three ways:

1. In the N−1 least significant columns, every group of four partial-product
   bits is collapsed into **one** bit of the same weight by an
   *ultra-compact approximate compressor* (UCAC). The compressor can only
   under-count.
2. Because all those errors have the same sign, a single **correcting bit** is
   added just above the compressor chain, in column N−1. It is either a
   constant 1, or comes from an **error-correcting module** (ECM). The ECM
   drops the correction in the one input case where the top compressor is
   exact.
3. The remaining matrix is reduced to two rows by a Dadda tree. Its full
   adders in the N−1 low columns are an **approximate full adder**: one AND,
   one OR and one inverter.

The high half of the product is computed exactly, with exact 4-2
compressors, full adders and half adders. A carry-propagate adder finishes it.

Four configurations are provided side by side in `approx_mul_top`:

| output | name | compressor | correcting bit |
|--------|------|-----------|----------------|
| `p[0]` | design 1 (MUL1) | UCAC1 | constant 1 |
| `p[1]` | design 2 (MUL2) | UCAC1 | ECM |
| `p[2]` | design 3 (MUL3) | UCAC2 | ECM |
| `p[3]` | design 4 (MUL4) | UCAC3 | ECM |

Everything is combinational: there is no clock, reset or handshake, and a
product is valid one logic delay after the operands.

## The approximate compressors

A UCAC reads four bits `y1..y4` of one column and returns one bit `s` of the
same weight. Its error distance, `s − (y1+y2+y3+y4)`, is 0 or negative:

| variant | function | gates |
|---------|----------|-------|
| UCAC1 | `s = y1y2 + (y1+y2)(y3+y4) + y3y4` (1 when two or more inputs are 1) | AND-OR |
| UCAC2 | `s = (y1+y2)(y3+y4)` (UCAC1 without its first and last term) | 2 OR, 1 AND |
| UCAC3 | `s = y2 + y4` | 1 OR |

Each partial-product bit is 1 with probability 1/4. So the all-zero input
occurs with probability 81/256. UCAC1 errs by at most −1 in every case with
at most two ones. Only the cases with three or four ones, 13/256 of the
total, err by −2 or −3. UCAC2 and UCAC3 are smaller and err more often.

**Why one correcting bit works.** A chain of compressors in columns 0..N−2
makes an error that is a sum of negative multiples of 2^c. A single +1 at
weight 2^(N−1) offsets the typical case, where most compressors are off by
−1. When the top compressor's inputs are all zero, the chain is usually
nearly exact, and adding 2^(N−1) would be pure error. The ECM is a 4-input OR
of exactly those inputs, and outputs 0 in that case. MUL1 omits the ECM and
always adds the 1.

## The approximate full adder

```
carry = a | (b & c)
sum   = ~carry
```

Its value `2·carry + sum` is wrong for three of the eight input patterns:

| a b c | exact | approximate |
|-------|-------|-------------|
| 0 0 0 | 0 | 1 |
| 1 0 0 | 1 | 2 |
| 1 1 1 | 3 | 2 |

So the sum bit is wrong in three rows and the carry bit in one. Port `a` is
the operand that feeds the OR gate. Which tree bit lands on `a` is set by the
bit ordering described below.

## How the tree is planned (`approx_mul_pkg`)

This is the part of the design that takes the most care to follow. The
reduction tree is not drawn by hand. Constant functions in the package plan
it at elaboration time, and the generate blocks in `approx_mul` wire up the
plan. Changing `N`, `APPROX_COLS` or `USE_42` therefore re-plans the whole
tree.

**Levels.** `lev[0]` is the partial-product matrix. Column `c` holds rows
`max(0, c−N+1) .. min(c, N−1)`, in row order, with `pp[i][j] = a[j] & b[i]`.

`lev[1]` is the result of the single approximate stage. In every column
`c < APPROX_COLS`, each complete group of four bits (rows 0–3, 4–7, …) becomes
one UCAC output. The fewer than four bits left over pass through. The
correcting bit is appended to column `APPROX_COLS`.

`lev[2..]` are Dadda stages.

**Dadda targets.** The heights are d₁ = 2, dⱼ₊₁ = ⌊1.5·dⱼ⌋, which gives
2, 3, 4, 6, 9, 13, 19, 28, … One stage is used per target below the tallest
`lev[1]` column. For N = 8 the tallest column is column 7: 8 products plus
the correcting bit, 9 bits. That gives four stages, with targets 6, 4, 3 and 2.

**Counter choice.** In each stage, columns are processed from the LSB up. The
height a column will have at the next level is its own bits plus what the
column below sends it. While that exceeds the target, the column adds:

* an exact 4-2 compressor, if it must lose three or more bits and has four
  bits left;
* otherwise a full adder, if it must lose two;
* otherwise a half adder.

The k-th compressor of a column takes the COUT of the k-th compressor one
column below as its CIN, if there is one. Since COUT does not depend on CIN,
the chain never ripples.

**Bit order at the next level** (this decides which bits meet in later
counters, and so where approximate adders err):

1. compressor sums, full-adder sums, half-adder sums;
2. bits passed through;
3. from the column below: compressor CARRYs, full-adder carries, half-adder
   carries;
4. compressor COUTs from below that no compressor here consumed.

For the default N = 8 tree this gives 4 exact 4-2 compressors, 18 full
adders and 3 half adders. Only one of the full adders, in column 6 of the
last stage, lies in the approximate columns. The planner checks at
elaboration that every column ends with at most two bits. The two rows go to
a `+`, and the carry out of bit 2N−1 is dropped.

## Parameters of `approx_mul`

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | operand width (2 ≤ N ≤ 64) |
| `UCAC` | `UCAC1` | compressor variant (`approx_mul_pkg::ucac_kind_e`) |
| `CORR` | `CORR_ECM` | `CORR_NONE`, `CORR_CONST` or `CORR_ECM` |
| `APPROX_COLS` | N−1 | columns with approximate compressors; at least 4 with an ECM |
| `AFA_COLS` | N−1 | columns whose full adders are approximate |
| `USE_42` | 1 | allow exact 4-2 compressors in the Dadda stages |

Setting `APPROX_COLS=0, CORR=CORR_NONE, AFA_COLS=0` gives an exact Dadda
multiplier. Keeping the compressors but setting `AFA_COLS=0` gives the same
four multipliers without the approximate full adder. These are the
"existing" designs that the approximate full adder is meant to improve on.

## Measured behaviour

The top-level test runs all 65536 operand pairs. The four designs have:

| design | error rate | mean error distance |
|--------|-----------|---------------------|
| 1 (UCAC1, const) | 98.9 % | 82.6 |
| 2 (UCAC1, ECM)   | 95.6 % | 50.4 |
| 3 (UCAC2, ECM)   | 94.9 % | 50.0 |
| 4 (UCAC3, ECM)   | 92.1 % | 69.6 |

The mean error distance is the average |p − a·b|, out of products up to 65025.

The ECM drops the correction for 20736 of 65536 operand pairs, which is
exactly 81/256. Multiplying two generated 64 × 64 8-bit images pixel by
pixel, with the products scaled back to 8 bits, gives a PSNR of 52.8 / 56.0 /
56.0 / 54.1 dB for designs 1–4.

## Where this RTL departs from, or fills in, the source description

The source publication names the blocks and gives their logic equations and
truth tables. It does not give the wiring of the 8-bit tree. The following
are therefore choices made here:

* **Grouping.** Compressors take complete groups of four rows in row order.
  Leftovers are reduced by the Dadda stages.
* **Correcting bit.** It is an ordinary extra bit of column N−1, not a carry
  input of a particular compressor.
* **ECM inputs.** The ECM watches the rows 0–3 group of column N−2.
* **Dadda stages.** The placement rules and bit ordering above, including the
  use of exact 4-2 compressors inside Dadda stages, are this design's own.
* **Scope of the approximate full adder.** The source only says it is used
  "in the reduction stages". Here it is limited to the N−1 low columns. Used
  in every column, it turns 0 × 0 into a large number, because it outputs 1
  for three zero inputs. `AFA_COLS = 2*N` gives that variant.
* **Compressor formulas.** UCAC2 is taken as `(y1+y2)(y3+y4)`, which agrees
  with its truth table and with its derivation from UCAC1.
* **Dadda heights.** They are rounded down, matching the published height
  sequence 2, 3, 4, 6, 9, 13, 19, 28.
* **Final adder.** It is a plain `+`; no adder structure is specified.
* **Not reproduced.** The published area, delay and power figures were
  FPGA synthesis results and are not reproduced. The published example
  waveform could not be matched, because its operand and product values do
  not line up in time.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `approx_mul_pkg.sv` | enums, column-plan struct, the tree planner |
| `pp_array.sv` | AND array |
| `ucac.sv` | approximate 4-2 compressor, three variants |
| `ecm.sv` | error-correcting module |
| `compressor42_exact.sv` | exact 4-2 compressor |
| `fa_exact.sv`, `fa_approx.sv`, `half_adder.sv` | counters |
| `approx_mul.sv` | one configurable multiplier |
| `approx_mul_top.sv` | the four designs side by side (default N = 8) |

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=… failures=…`.

* `mul_ref_pkg.sv` holds two independent reference models:
  * an error-distance model, which computes `a·b` plus each compressor's
    error plus the correcting bit;
  * a bit-level model that rebuilds the tree from queues at run time.
* `tb_approx_mul` checks several configurations exhaustively. These include
  exact trees with and without 4-2 compressors, which must equal `a·b`, the
  variant with approximate full adders in every column (`AFA_COLS = 2*N`), and
  N = 12 with random operands.
* `tb_approx_mul_top` is the full-size end-to-end test.
* `tb_image_mul` runs the image workload.

Running one test with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/approx_mul_pkg.sv tb/mul_ref_pkg.sv tb/tb_approx_mul_top.sv \
    --top-module tb_approx_mul_top -o sim
./obj_dir/sim
```

(`-Wno-fatal` because the testbenches pass narrow operands to the 64-bit
reference functions, which Verilator reports as width warnings.)
Elaborating `approx_mul` takes tens of seconds, because the planner is
re-run for every column of every level. Simulation of the exhaustive tests
takes about ten seconds each.
