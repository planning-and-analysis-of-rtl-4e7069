# Dadda multipliers with dual-quality 4:2 compressors

A multiplier that can trade accuracy for speed and power *while it runs*.
The partial-product tree of a Dadda multiplier is built from 4:2
compressors, and every compressor here is *dual-quality*: next to the exact
compressor it carries a tiny approximate circuit, and one signal,
`exact_mode`, decides which of the two drives the outputs. With
`exact_mode = 1` the multiplier returns the exact product; with
`exact_mode = 0` it returns an approximate one from a much shorter logic
path. Switching takes no extra cycle and needs no correction unit.

Four approximate circuits (variants C1 to C4) are defined, each a different
point between cost and accuracy. A multiplier uses one variant throughout, or
the *mixed* arrangement that is recommended for use: C1 in the less
significant half of the product columns, C4 in the more significant half.
Multipliers are provided at 8x8, 16x16 and 32x32 bits; the wider ones are
assembled from 8x8 blocks. The top level places the five 32x32 multipliers
(C1, C2, C3, C4, mixed) side by side on the same operands.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). The multipliers are
unsigned.

## The 4:2 compressor

A 4:2 compressor takes four bits `a1..a4` of one product column and a carry
`cin` from the column below. It produces `sum` in the same column, and
`carry` and `cout`, both of twice the weight:

    a1 + a2 + a3 + a4 + cin == sum + 2*(carry + cout)

`exact_42_compressor` is the usual pair of full adders. The first adds
`a1, a2, a3` and yields `cout`; the second adds that partial sum, `a4` and
`cin` and yields `sum` and `carry`. Because `cout` does not depend on `cin`,
a row of compressors whose `cout` feeds the next column's `cin` has no ripple.
Its delay is that of one compressor.

## The four approximate circuits

In approximate mode a compressor ignores `cin` and computes:

| variant | `sum`                    | `carry`                  | `cout` | wrong cases of 16 (error rate) |
|---------|--------------------------|--------------------------|--------|--------------------------------|
| C1      | `a1`                     | `a4`                     | 0      | 10 (62.5 %)                    |
| C2      | `a1`                     | `a4`                     | `a3`   | 10 (62.5 %)                    |
| C3      | `(a1^a2) \| (a3^a4)`     | `a4`                     | 0      | 8 (50 %)                       |
| C4      | `(a1^a2) \| (a3^a4)`     | `(a1&a2) \| (a3&a4)`     | 0      | 5 (31.25 %)                    |

The error rate counts the combinations of `a1..a4` for which
`sum + 2*(carry + cout)` differs from `a1 + a2 + a3 + a4`.

- **C1 and C2** are just wires. C2 keeps `a3` as `cout`. It is wrong in as
  many cases as C1, and no more accurate in a single cell. In a multiplier,
  though, it gives smaller errors: the mean error distance of the 8x8
  multiplier is 2361 against 2907 for C1.
- **C3** improves the sum. It is computed as
  `NAND(XNOR(a1,a2), XNOR(a3,a4))`, so the XNORs can be shared with the exact
  part and only the NAND gate serves the approximate mode alone.
- **C4** also improves the carry with `(a1&a2) | (a3&a4)`. With C3's sum and
  no `cout`, 5 wrong cases is the best possible: both bits set in one pair
  and one in the other, and all four bits set.

The wiring of C1 and C2 is specified exactly by the original design. For C3
and C4 it gives the error rates, which output each one improves, and the
gate that only the approximate mode uses. The formulas above are the ones
that meet all of those constraints. They are a reconstruction, and the
testbenches check each error rate.

### Exact mode and power gating

In the original circuit the part used only in exact mode is power-gated off
in approximate mode. The part used only in approximate mode is gated off in
exact mode, and tri-state buffers disconnect its outputs. Supply switching
has no logic function. Here both parts are always computed, and a
multiplexer on each output (`exact_mode ? exact : approximate`) stands for the
tri-state buffers. The outputs are the same. The power saving of the
approximate mode is not modelled: in this RTL, approximate mode is faster on
its logic path but not lower in power.

## The 8x8 Dadda tree (`dadda_dq42_8x8`)

1. **Partial products.** `pp[i] = (a & {8{b[i]}}) << i`, which gives eight rows.
2. **Stage 1.** Rows 0-3 and rows 4-7 each pass through a row of 4:2
   compressors (`comp42_row`). This turns 8 rows into 4.
3. **Stage 2.** One more compressor row turns 4 rows into 2.
4. **Final adder.** The last two rows are added with an exact carry-propagate
   adder.

Heights 8 -> 4 -> 2 are the Dadda sequence for 4:2 compressors. The
critical path is two compressors and one adder.

**Which cell sits in which column.** A compressor row spans all 16 product
columns. At its ends, some columns hold fewer than four real bits: the
others are padding zeros. An approximate cell fed zeros loses bits it need
not lose. For example, C1 drops everything but `a1` and `a4`, so a lone carry
arriving at the top of the row would vanish. So only columns whose four
inputs can all carry a bit get the dual-quality variant. The partly empty
columns get an exact compressor that ignores `exact_mode`. The occupied
columns are computed at elaboration from the row shapes:

- stage 1, rows 0-3: columns 3-7;
- stage 1, rows 4-7: columns 7-11;
- stage 2: columns 5-11.

The bits above column 15 are dropped. In exact mode they are always zero.

**Mixed arrangement.** `VARIANT = DQ_MIXED` uses C1 in product columns
below `MIX_SPLIT` and C4 from `MIX_SPLIT` up. `COL_OFFSET` tells a block
where its column 0 sits in the product of a wider multiplier. The switch
therefore falls at the middle of the *whole* product, not the middle of each
8x8 block.

## Wider multipliers

`dadda_dq42_16x16` splits each operand into 8-bit halves. It computes four
8x8 products and adds them exactly:

    p = al*bl + ((al*bh + ah*bl) << 8) + ((ah*bh) << 16)

`dadda_dq42_32x32` does the same with four 16x16 blocks, so it contains
sixteen 8x8 trees. Column offsets are passed down: the high-high 8x8 block of
a 32x32 multiplier has offset 48. The mixed switch sits at product column 16
(16x16) or 32 (32x32). In approximate mode, any overflow of the merge adders
wraps modulo the product width.

## Top level (`dadda_dq42_top`)

| port                                        | dir | width | meaning                                  |
|---------------------------------------------|-----|-------|------------------------------------------|
| `clk`                                       | in  | 1     | clock, rising edge                       |
| `clr`                                       | in  | 1     | synchronous active-high clear            |
| `exact_mode`                                | in  | 1     | 1 = exact, 0 = approximate               |
| `ri1`, `ri2`                                | in  | 32    | operands                                 |
| `p_c1`, `p_c2`, `p_c3`, `p_c4`, `p_mixed`   | out | 64    | products of the five multipliers         |

The operands and `exact_mode` are registered together, and the products are
registered one edge later. A result appears two clock edges after its
operands, one operation per cycle. The mode can change on every operation.
`clr` zeroes all registers and sets the registered mode to exact. These
register stages are this implementation's choice; the multipliers themselves
are combinational.

## Parameters

| module                                              | parameter    | default            | meaning                                  |
|-----------------------------------------------------|--------------|--------------------|------------------------------------------|
| `dadda_dq42_8x8`, `dadda_dq42_16x16`, `dadda_dq42_32x32` | `VARIANT`    | `DQ_MIXED`         | `DQ_C1`..`DQ_C4` or `DQ_MIXED`           |
|                                                     | `COL_OFFSET` | 0                  | column of bit 0 within an outer product  |
|                                                     | `MIX_SPLIT`  | 8 / 16 / 32        | first column that uses C4 when mixed     |
| `dq42_compressor`                                   | `VARIANT`    | `DQ_C1`            | the cell for one column (`DQ_EXACT` too) |

The type `dq_variant_e` and the per-column rule `column_variant` are in
`dq42_pkg`.

## Measured accuracy

These figures come from an exhaustive run over all 65536 operand pairs of the
8x8 multiplier in approximate mode.

| variant | inexact products | mean error distance |
|---------|------------------|---------------------|
| C1      | 64526            | 2907                |
| C2      | 64486            | 2361                |
| C3      | 60323            | 2333                |
| C4      | 54801            | 1016                |
| mixed   | 63298            | 1123                |

Almost every product is inexact. The mixed multiplier is nearly as accurate
as C4, because its cheap C1 cells sit in the low columns, where errors weigh
little. For 32-bit random operands, practically every approximate product
differs from the exact one.

## How far to trust it, and where it departs from the original

Taken from the original design:

- the exact compressor;
- C1 and C2 exactly;
- C3 and C4 through their error rates and qualitative descriptions;
- exact/approximate switching by one signal;
- the mixed C1/C4 arrangement;
- building 16x16 and 32x32 from 8x8 blocks.

Choices made here:

- **the reconstructed C3 and C4 formulas;**
- **where the compressors sit in the tree, including exact cells at the row
  ends;**
- the exact final adder and exact merge adders;
- the mixed split at half the product width;
- unsigned operands;
- the register stages and clear of the top.

Not modelled:

- power gating;
- tri-state isolation, other than as multiplexers;
- any delay, power or FPGA resource figures. The original reports them from
  synthesis; nothing here is calibrated against them.

In exact mode every multiplier is checked against `a*b`. This covers all
inputs at 8x8 and random and corner operands at 16x16, 32x32 and the top.
Approximate results are checked bit for bit against a separate behavioural
model, `tb/dq42_ref_pkg.sv`. That model evaluates the same tree column by
column on integer arrays. So the approximate results are exactly what the
described structure computes, but that structure is itself partly a choice
(see above).

## Files

`rtl/`, from leaf cells to the top:

- `dq42_pkg.sv`: variant type and the per-column variant rule.
- `full_adder.sv` and `exact_42_compressor.sv`: the exact compressor.
- `dq42_c1.sv` to `dq42_c4.sv`: the dual-quality compressors.
- `dq42_compressor.sv`: picks one of the above for a column.
- `comp42_row.sv`: one row of compressors with its cin/cout chain.
- `dadda_dq42_8x8.sv`, `dadda_dq42_16x16.sv` and `dadda_dq42_32x32.sv`: the
  multipliers.
- `dadda_dq42_top.sv`: the five 32x32 multipliers with registers.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
the reference model `dq42_ref_pkg.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- The compressor testbenches are exhaustive, in both modes, and check the
  error rates in the table above.
- The 8x8 testbench is exhaustive.
- The end-to-end testbench `tb_dadda_dq42_top` runs the full-size top for
  20000 operations. The mode is random for each operation, and a clear comes
  mid-run. It checks the two-cycle latency. It also counts exact and
  approximate operations, mode switches, clears, and inexact products for
  each multiplier, and fails if any of these never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dq42_pkg.sv tb/dq42_ref_pkg.sv tb/tb_dadda_dq42_top.sv \
        --top-module tb_dadda_dq42_top
    ./obj_dir/Vtb_dadda_dq42_top

For any other testbench, replace `tb_dadda_dq42_top` with its name. Each runs
in a second or two.

Lint a module on its own with:

    verilator --lint-only -Wall -Irtl rtl/dq42_pkg.sv rtl/<module>.sv

To build another arrangement, instantiate a multiplier with another
`VARIANT`. To add a fifth compressor variant:

1. write `dq42_c5.sv` with the same ports;
2. add a value to `dq_variant_e`;
3. add a branch to `dq42_compressor`.
