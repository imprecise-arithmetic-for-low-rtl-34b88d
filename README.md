# Imprecise arithmetic for low-power signal processing

Image and video code spends most of its arithmetic on long sums of products: transforms,
filters, convolutions. The last few bits of those sums are usually thrown away at the end, by
a right shift or by rounding to an 8-bit pixel. The circuits still pay full price to compute
them, though. The carry chain of the low bits sets the adder's critical path. The low partial
products of a multiplier fill most of its compression tree.

This design gives up exactness in the low part of the operators on purpose. Each adder and
multiplier here has an imprecision width `q`:

- Everything at or above bit `q` is computed exactly, from whatever reaches it.
- Below `q`, the result is estimated with little or no logic. No carry travels through the
  low part, or the carries are moved to a column where they cost less.

The resulting errors are systematic. Their mean and worst case can be written in closed
form as functions of `q`, so `q` can be chosen to give a known error. In return, the
operators need less area, have a shorter critical path and switch fewer nodes.

The RTL contains:

- a two-level carry-lookahead adder, used as the exact part of everything else;
- five imprecise adder schemes;
- a radix-4 multiplier framework, with an exact configuration and seven imprecise schemes;
- a multiply-accumulate (MAC) unit that combines an imprecise multiplier with an imprecise
  adder;
- a top level that places the preferred configuration of each operator side by side.

All of it is parameterised SystemVerilog, checked by self-checking testbenches. The
testbenches include exhaustive checks of the error statistics.

## Measuring the error

All error statistics below use `e = imprecise result - exact result`. The values are
interpreted as two's complement for the multipliers and as unsigned for the adders.
Published tables for this kind of design are not consistent about the sign:

- The multiplier tables use `exact - imprecise`. For example, TEPPE's mean error is printed
  as `1/4 - 2^(q-3)`.
- The adder tables use `imprecise - exact`.

The testbenches use the one convention above throughout. They therefore check, for example,
a TEPPE mean of `2^(q-3) - 1/4`. The formulas quoted below use the same convention.

## The imprecise adders

Every adder splits a `WIDTH`-bit addition (32 by default) in two:

- The upper `WIDTH-q` bits are added by the exact carry-lookahead adder (`cla_adder`), with
  carry-in 0.
- The lower `q` bits, the *tail*, are produced by a scheme-specific rule that never
  generates a carry into the upper part. Carry-one is the one partial exception.

`cla_adder` is a classic two-level design: 4-bit groups, group generate and propagate, and
sum-of-products group carries.

| Scheme (module) | Tail bit `i` | Mean error | Range of `e` | Default `q` |
|---|---|---|---|---|
| Trunc (`trunc_adder`) | `0` | `1 - 2^q` | `[2 - 2^(q+1), 0]` | 14 |
| Freeze0.5 (`freeze05_adder`) | `1` at `q-1`, else `0` | `1 - 2^(q-1)` | `[-(3*2^(q-1) - 2), 2^(q-1)]` | 14 |
| OR-tail (`or_tail_adder`) | `a[i] \| b[i]` | `1/4 - 2^(q-2)` | `[1 - 2^q, 0]` | 14 |
| XOR-tail (`xor_tail_adder`) | `a[i] ^ b[i]` | `1/2 - 2^(q-1)` | `[2 - 2^(q+1), 0]` | 14 |
| Carry-one (`carry_one_adder`) | `(a[i]^b[i]) \| (a[i-1]&b[i-1])` | `1/4 - 2^(q-2)` | `[-2^q * sum_{i=1}^{ceil(q/2)} 2^(2-2i), 0]` | 15 |

Notes on the table:

- The statistics are taken over all pairs of tails, uniformly distributed.
- Trunc and Freeze0.5 ignore the low operand bits altogether. Their tails are constants.
- Freeze0.5 sets the top tail bit to 1. That centres its error, at the cost of a positive
  worst case.
- OR-tail gives the best estimate of a bit that costs one gate. It is exact whenever the
  operands have no common 1 in the tail.
- Carry-one builds the tail from half adders. Each half adder's carry moves exactly one
  place and is OR-ed, not added, into the next sum bit. The carry of the top tail bit is
  OR-ed into the lowest bit of the exact upper sum. This "pseudo carry" is the only way
  information crosses the boundary in any of the five schemes. As a result, Carry-one keeps
  its error small even over long sums.
- The default widths are the largest at which the IDCT of 8x8 blocks stays within a mean absolute
  pixel error of 2.

`imprecise_adder` picks one scheme with a `SCHEME` parameter of type
`imprecise_pkg::add_scheme_e`. `ADD_EXACT` is also available. The MAC uses this selector.

## The radix-4 multiplier framework

All multipliers are 16x16 two's complement multipliers with a 32-bit product (`N = 16`).
They share one structure:

```
 y --> nrp3a_recoder --digits--> pp_generator --17 rows--> pp_reducer --s,c--> cla_adder --> p
 z --------------------------------^
```

**Recoding (`nrp3a_recoder`).** The multiplier `y` is cut into `N/2` overlapping 3-bit
groups `(y[2j+1], y[2j], y[2j-1])`, with `y[-1] = 0`. Each group becomes one digit
`d_j` in `{-2, -1, 0, 1, 2}`, so that `y = sum d_j * 4^j`. A digit is sent as three signals:
`one`, `two` and `sign`. This digit set is the one called NRP3a. It differs from ordinary
Booth recoding in one way: the group `111` gives `+0` rather than `-0`. A zero digit
therefore never asserts `sign`, never inverts a partial product and never adds a carry
bit. That saves switching on strings of ones.

**Partial products (`pp_generator`).** Digit `j` selects `0`, `z` or `2z`, giving an `N+1`
bit magnitude. When `sign` is set, the magnitude is inverted bitwise. The `+1` that completes
the two's complement negation is kept as a separate *carry bit* `C_j = sign_j` at column
`2j`.

Sign extension is not replicated across the array. Instead, each partial product's top bit
is inverted, and one constant row `-sum_j 2^(N+2j)` is added. The sum of the inverted top
bits and this constant equals the sign-extended sum exactly, modulo `2^(2N)`.

The generator outputs 17 rows of 32 bits:

- rows 0-7: the partial products;
- rows 8-15: one row per carry bit, zero wherever a scheme drops the carry;
- row 16: the sign-extension constant.

**Reduction and final addition.** `pp_reducer` compresses the 17 rows with levels of (3,2]
counters (`csa_3to2`, a row of full adders). The rows go 17 → 12 → 8 → 6 → 4 → 3 → 2, which
is six full-adder delays. Columns that hold only constant zeros are left for synthesis to
simplify into half adders or wires. The exact `cla_adder` then adds the two remaining
vectors.

`r4_mult_core` is recoder + generator + reducer. `r4_multiplier` adds the final adder.
`imprecise_pkg::mul_scheme_e` selects the scheme, and the `Q` parameter sets its width.

## The seven imprecise multiplier schemes

The schemes differ only in which partial-product bits are generated and where the carry
bits `C_j` go. In all but TMCB the error per partial product stays below about `2^q`.
The schemes trade logic, bias and spread very differently.

The diagrams below show an 8x8 multiplier (four partial products, 16 product columns) so
the shapes fit on a page. The symbols are:

- `o`: generated bit.
- `n`: inverted top bit.
- `.`: bit that is not generated.
- `h`: bit generated from the reduced "hybrid" digit set.
- `C`: carry bit. A number in front of it (`2C`, `3C`) counts how many carry bits land in
  that column.

The carries of the unchanged configuration sit at columns 0, 2, 4 and 6:

```
EXACT
col    15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
PP0                          n  o  o  o  o  o  o  o  o
PP1                    n  o  o  o  o  o  o  o  o
PP2              n  o  o  o  o  o  o  o  o
PP3        n  o  o  o  o  o  o  o  o
carries                             C     C     C     C
```

**TEPPE** (truncated each partial product, default `q = 2`). The `q` lowest bits of every
partial product are not generated. Each carry bit moves up by `q` places, to column
`2j+q`. This keeps the row count unchanged while removing `q` bits from every row. Mean
error `2^(q-3) - 1/4`.

```
TEPPE q=2
PP0                          n  o  o  o  o  o  o  .  .
PP1                    n  o  o  o  o  o  o  .  .
PP2              n  o  o  o  o  o  o  .  .
PP3        n  o  o  o  o  o  o  .  .
carries                       C     C     C     C
```

**H2** (hybrid per partial product, default `q = 2`). In the `q` low bits of each partial
product, the digit is taken from the reduced set `{-2, 0, 2}`. A `±1` digit contributes
nothing there, and only `±2z` is generated. The lowest bit of `±2z` is always `0`, so after
inversion it equals `sign`, which equals `C_j`. Two equal bits in one column are one bit in
the column above. So that bit is not generated, and `C_j` moves up one column instead
(`2j+1`). Its error has mean 0.

```
H2 q=2
PP0                          n  o  o  o  o  o  o  h  .
PP1                    n  o  o  o  o  o  o  h  .
PP2              n  o  o  o  o  o  o  h  .
PP3        n  o  o  o  o  o  o  h  .
carries                          C     C     C     C
```

**LLL** (low times low left out, default `q = 8`). The product of the `q` low bits of `y` and
the `q` low bits of `z` is omitted. That means the `q` low bits of partial products
`j < q/2`. Their carry bits move to column `2j+q`. `q` must be even. Worst case
`(2^q - 1)^2 / 3`.

```
LLL q=4
PP0                          n  o  o  o  o  .  .  .  .
PP1                    n  o  o  o  o  .  .  .  .
PP2              n  o  o  o  o  o  o  o  o
PP3        n  o  o  o  o  o  o  o  o
carries                            2C    2C
```

**R4T** (radix-4 truncation, default `q = 15`, the preferred scheme). No bit below column
`q` is generated in any row. Every carry bit that would fall below column `q` is kept and
added at column `q` instead. Keeping them makes the error nearly symmetric and bounded, but
it raises the height of column `q`. The error mean is `2^(q-3) - 1/4`, and its worst case is
`sum_{a=1}^{q} ceil(a/2) * 2^(a-1)`.

```
R4T q=5
PP0                          n  o  o  o  .  .  .  .  .
PP1                    n  o  o  o  o  o  .  .  .
PP2              n  o  o  o  o  o  o  o  .
PP3        n  o  o  o  o  o  o  o  o
carries                             C 3C
```

**H1** (hybrid per column, default `q = 15`). Every bit below column `q` uses the reduced
digit set `{-2, 0, 2}`. As in H2, the lowest bit of each affected partial product is
dropped, and its carry moves to `2j+1`. This applies to every partial product that starts
below column `q`. The mean is 0, and the worst case is the same as R4T's.

```
H1 q=5
PP0                          n  o  o  o  h  h  h  h  .
PP1                    n  o  o  o  o  o  h  h  .
PP2              n  o  o  o  o  o  o  o  .
PP3        n  o  o  o  o  o  o  o  o
carries                             C  C     C     C
```

**TNCB** (truncated, no carry bits below `q`, default `q = 12`). The same bits as R4T, but
the carry bits below column `q` are dropped instead of moved. The error is never positive.
Carry bits at or above `q` remain.

```
TNCB q=5
PP0                          n  o  o  o  .  .  .  .  .
PP1                    n  o  o  o  o  o  .  .  .
PP2              n  o  o  o  o  o  o  o  .
PP3        n  o  o  o  o  o  o  o  o
carries                             C
```

**TMCB** (truncated, all carry bits removed, default `q = 11`). As TNCB, but every carry bit
is dropped. Each negative digit then loses its `+1` at column `2j`, worth `2^(2j)`. For the
upper digits that is far more than `2^q`, so the error is large and data-dependent. Its statistics look
poor, but it still works in sums where negative digits are rare, such as smoothing.

```
TMCB q=5
PP0                          n  o  o  o  .  .  .  .  .
PP1                    n  o  o  o  o  o  .  .  .
PP2              n  o  o  o  o  o  o  o  .
PP3        n  o  o  o  o  o  o  o  o
carries
```

Two practical points apply to all the schemes:

- **Operand order matters.** The recoded operand `y` decides how many partial products are
  nonzero. Put the operand with the smaller magnitude on `y`. The testbenches do this for
  all workloads.
- **Many outputs are constant.** The low product bits of the truncating schemes are
  constant by construction. For R4T with `q = 15`, bits `[14:0]` are always zero, and similar
  bits exist for TNCB and TMCB. Synthesis removes the logic behind them. A lint tool may
  report the related inputs as unused.

## The multiply-accumulate unit

`imprecise_mac` computes `acc <= acc + y*z` at one operation per cycle. The imprecise
arithmetic is inside the loop:

```
 y,z --> r4_mult_core --s,c--> csa_3to2 --cs,cc--> imprecise_adder --> acc register --+
                                  ^                                                  |
                                  +---------- (clear ? 0 : acc) <--------------------+
```

The multiplier's sum and carry vectors are merged with the fed-back accumulator by one row
of (3,2] counters. Only then does the imprecise adder resolve the carries. The full adder
row therefore passes one carry across the adder's precise/imprecise boundary, like a
one-bit carry chain. For most adder schemes, this makes the MAC more accurate than a
separate multiplier followed by the same adder.

The interface is as follows:

| `en` | `clear` | effect at the clock edge |
|---|---|---|
| 1 | 1 | `acc <= y*z` (start a new sum) |
| 1 | 0 | `acc <= acc + y*z` |
| 0 | x | `acc` holds |

`rst_n` is an asynchronous active-low reset to 0. The result appears one cycle after the
operands.

There are two configurations:

- the preferred one, R4T (`q = 15`) with OR-tail (`q = 17`), which is the default;
- TNCB (`q = 12`) with Freeze0.5 (`q = 16`).

## Top level

`imprecise_arith_top` has no internal connection between its three groups. Each group has
its own ports:

- `add_a`, `add_b` → `add_sum[0..4]`: Trunc14, Freeze0.5_14, OR-tail14, XOR-tail14 and
  Carry-one15, all on the same operands. `add_cout` gives the carry out of each precise part.
- `mul_y`, `mul_z` → `mul_p[0..6]`: TEPPE2, H2_2, LLL8, R4T15, H1_15, TNCB12 and TMCB11.
  `mul_y` is the recoded operand.
- `mac_en`, `mac_clear`, `mac_y`, `mac_z` → `mac_acc_a` (R4T15 / OR-tail17) and `mac_acc_b`
  (TNCB12 / Freeze0.5_16). `clk` and `rst_n` are used only by the MACs.

The adder and multiplier banks are purely combinational.

## Verification

Each building block has its own testbench in `tb/`. Every testbench does the following:

- compares against an independent reference model (`tb/add_ref_pkg.sv` and
  `tb/mul_ref_pkg.sv`, which compute each bit from the scheme's definition, not from the
  RTL's structure);
- has a cycle watchdog;
- prints `TB_RESULT checks=<n> failures=<n>`.

What the testbenches cover:

- **Adders.** Random and corner operands at the default size. A worked 8-bit example with
  `q = 4`. A 12-bit adder with `q = 6`, checked exhaustively over every tail combination:
  the minimum, maximum and total error must equal the closed forms in the table above.
- **Multipliers** (one testbench per scheme, plus the exact one). Random and corner
  operands at 16x16 with the default `q`, each checked against the reference and the
  scheme's error bound. Then all 65,536 operand pairs of 8x8 multipliers with `q = 2`, 4
  and 6, with the mean, extreme and sign of the error compared to the closed forms above.
- **Building blocks.** The recoder exhaustively, plus the CSA row, the reducer and the
  generator against row-sum references.
- **MAC.** Three MACs (the two configurations and an exact one) run random streams with
  random `en`/`clear`, checked every cycle.
- **`tb_imprecise_arith_top`** (end to end, all defaults). It checks both banks on random
  operands, then runs a 2-D 8x8 IDCT on two coefficient blocks with both MACs:

  ```
  P = ((A^T F) >> 16) A >> 16
  ```

  Here `A` is the DCT basis scaled by `2^16`. The testbench compares the pixels with an
  exact integer model. It counts each mechanism: pseudo carries in Carry-one, negative
  digits, MAC clears, accumulations and holds, and IDCT pixels that differ from the exact
  result. A mechanism that never occurs counts as a failure.
- **`tb_workload_filters`** (full size). It runs 5x5 Gaussian smoothing (weights
  `round(w * 65536 / 159)`, result shifted right by 16) and Sobel edge enhancement
  (`|Gx| + |Gy|`) on a 14x14 test image on both MACs. It checks every accumulator value
  against the schemes' error bound.

Measured results:

| Workload | R4T15 / OR-tail17 | TNCB12 / Freeze0.5_16 |
|---|---|---|
| IDCT, mean absolute pixel error (2 blocks) | 1.36, 1.47 | 0.77, 1.06 |
| Smoothing, mean absolute pixel error | 7.4 | 1.6 |
| Sobel, mean absolute error | 222 | about 65,000 |

The IDCT target of a mean pixel error of at most 2 is met. In all three workloads the operand with the smaller
magnitude drives `y`. The reverse order gives larger errors.

The Sobel row shows the limit of these configurations. Sobel is pure integer arithmetic,
with products smaller than 2^10. Tails of 15-17 bits are then larger than the data itself,
and Freeze0.5_16 adds `2^15` per accumulation. The MACs are sized for the fixed-point
workloads (IDCT, smoothing). Integer filters need much smaller `q` values, which the
parameters allow.

## Where this RTL makes its own choices

The arithmetic of every scheme follows the published definitions. Its error statistics
match the published closed forms exactly. The following are choices of this implementation:

- **Compression tree.** The tree is a row-wise Wallace arrangement of (3,2] counters. The
  original assigns (3,2] and (2,2] counters column by column. The sum is identical, but
  delay and area after synthesis will differ somewhat.
- **Sign extension and carry bits.** Sign extension uses one constant row, and each carry
  bit has a row of its own. This is functionally identical to packing them into the
  matrix, and synthesis removes the constant zeros.
- **R4T carry bits.** R4T keeps the carry bits that fall below column `q` and adds them at
  column `q`. This reading reproduces the published mean and worst-case errors. TNCB drops
  exactly these bits.
- **OR-tail width in the MAC.** The preferred MAC uses OR-tail with `q = 17`. One
  description of the same MAC gives 16. The summary tables give 17, which is followed here.
- **MAC interface.** The `en`/`clear` interface, the asynchronous reset and the 32-bit
  accumulator without overflow detection are choices of this design. Every evaluated
  workload fits in 32 bits (the IDCT sums stay below 2^29).
- **MAC placement of the CSA.** The CSA row sits after the multiplier's reducer, so the
  final adder is in the loop. Merging the accumulator at the top of the tree is not built.
- **Not built.** The exact reference operators and Booth recoding exist only
  as comparison points in the original study. Of these, only the exact configuration is
  reachable, through `ADD_EXACT`/`MUL_EXACT`. The same applies to an exact adder with frozen
  low inputs.
- **No power or timing model.** Power, area and delay come from synthesis of these
  modules. No power model is included.

## Simulating

Everything runs with plain Verilator 5. Compile the package first, then the reference
packages, then the testbench; the RTL is found through `-y rtl`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/imprecise_pkg.sv tb/mul_ref_pkg.sv tb/add_ref_pkg.sv tb/tb_mul_r4t.sv \
    --top-module tb_mul_r4t
./obj_dir/Vtb_mul_r4t
```

Replace `tb_mul_r4t` with any testbench in `tb/`. The two full-size testbenches take a few
seconds each. Every testbench prints its result line at the end.

To change a configuration, override the parameters:

- `SCHEME` and `Q` on `r4_multiplier`;
- `MUL_SCHEME`, `MUL_Q`, `ADD_SCHEME` and `ADD_Q` on `imprecise_mac`;
- `WIDTH` and `Q` on the adders.

`N` must be even. `Q` may not exceed `N` in a multiplier. LLL needs an even `Q`.

## Files

| File | Contents |
|---|---|
| `rtl/imprecise_pkg.sv` | scheme enums, digit struct |
| `rtl/cla_adder.sv` | exact two-level carry-lookahead adder |
| `rtl/{trunc,freeze05,or_tail,xor_tail,carry_one}_adder.sv` | the imprecise adders |
| `rtl/imprecise_adder.sv` | adder scheme selector |
| `rtl/nrp3a_recoder.sv` | radix-4 NRP3a recoder |
| `rtl/pp_generator.sv` | partial-product matrix for every scheme |
| `rtl/csa_3to2.sv`, `rtl/pp_reducer.sv` | (3,2] counter row and compression tree |
| `rtl/r4_mult_core.sv`, `rtl/r4_multiplier.sv` | multiplier without/with final adder |
| `rtl/imprecise_mac.sv` | multiply-accumulate unit |
| `rtl/imprecise_arith_top.sv` | top level |
| `tb/*_ref_pkg.sv` | bit-level reference models |
| `tb/tb_*.sv` | self-checking testbenches |
