# 54×54-bit Booth / Wallace-tree multiplier with a dual-rail lookahead adder

This is synthesizable SystemVerilog for an unsigned 54×54-bit multiplier. 54 bits is the width of an
IEEE 754 double-precision mantissa. The product takes three steps, each built to reduce logic depth:

1. **Radix-4 recoding with a unique zero.** The multiplier `y` becomes 28 digits in
   {−2, −1, 0, +1, +2}, which halves the number of partial products. Each digit is coded as
   `neg/two/one`, and a zero digit is always coded as +0, never as −0.
2. **A Wallace tree built from 4-2 compressors.** It reduces the 28 partial-product rows to two rows
   in four levels. Each level is one compressor cell deep, because a cell's carry to its neighbour
   does not depend on the carry it receives.
3. **A dual-rail, self-timed carry-lookahead adder (DICLA).** It adds the two remaining rows, and a
   completion signal says when every product bit is valid.

The architecture follows the paper "A Novel High-Speed 54×54 bit Multiplier": the recoder
equations, the 4-2 compressor gate structure, the 8×4 partial-product tile, the four-level tree
grouping, and the C- and D-module equations of the adder. Several details are this design's own,
and the paper does not give them: the partial-product sign handling, the exact column ranges in
the tree, the adder padding and the `eval` interface. They are called out below.

## Interface and timing

```
module mult54 #(parameter mult_pkg::recode_e RECODE = RECODE_PARALLEL)
  (input  logic [53:0]  x, y,   // unsigned operands
   input  logic         eval,   // 0: spacer, 1: evaluate
   output logic [107:0] p,      // x*y
   output logic         done);  // adder completion
```

The whole multiplier is combinational. It has no clock, registers or reset. The final adder uses
dual-rail codes, so operations use a four-phase, return-to-zero protocol:

| phase | drive | observe |
|---|---|---|
| spacer | `eval = 0`; change `x`, `y` only here | every dual-rail adder signal is 00, `p = 0`, `done = 0` |
| evaluate | `eval = 1` | `done` rises once every product bit and the adder carry-out are valid; then `p = x*y` |

In silicon, the time from `eval` to `done` depends on the data: carries that are killed or generated
close to their source settle early. In a zero-delay RTL simulation, `done` follows `eval` at once. If
you register `p` in a synchronous system, clock it on `done`, or allow the worst-case delay.
`RECODE = RECODE_SERIAL` swaps in the serial recoder described below. The product is identical.

## Radix-4 digits with a unique zero

Digit `i` looks at the bit triple `y[2i+1] y[2i] y[2i-1]`, with `y[-1] = 0` and `y[54] = y[55] = 0`.
Because the operand is unsigned, the top digit (i = 27) sees padded zeros and is only ever +0 or +X.

Parallel recoder (`booth_recoder_par`):

| y[2i+1] y[2i] y[2i-1] | digit | neg two one | crt |
|---|---|---|---|
| 000 | +0 | 0 0 0 | 0 |
| 001, 010 | +X | 0 0 1 | 0 |
| 011 | +2X | 0 1 0 | 0 |
| 100 | −2X | 1 1 0 | 1 |
| 101, 110 | −X | 1 0 1 | 1 |
| 111 | 0 | 0 0 0 | 0 |

With ordinary neg/two/one coding, the group 111 gives "−0": an all-ones row plus a correction
bit. Here it gives a row of zeros. The logic is `neg = y[2i+1]·¬(y[2i]·y[2i-1])`,
`two = ¬y[2i+1]·y[2i]·y[2i-1] + y[2i+1]·¬y[2i]·¬y[2i-1]`, `one = y[2i] ⊕ y[2i-1]` and
`crt = neg`.

Serial recoder (`booth_recoder_ser`): a carry `c[i]` from the digit below takes the place of
`y[2i-1]`. The digit equals `2·y[2i+1] + y[2i] + c[i] − 4·c[i+1]` and lies in {−1, 0, +1, +2}.
The logic is `two = ¬y[2i+1]·y[2i]·c[i] + y[2i+1]·¬y[2i]·¬c[i]`, `one = y[2i] ⊕ c[i]`,
`neg = y[2i+1]·one`, `crt = neg` and `c[i+1] = y[2i+1]·(y[2i] + c[i])`. Its carry ripples across
the digits, which suits a linear-array multiplier better than a tree. That is why the parallel
recoder is the default.

## Partial products and sign handling

The "P" tile (`pp_gen_8x4`) covers 8 multiplicand bits × 4 digits. Each output bit is
`((one & x[b]) | (two & x[b-1])) ^ neg`, an AOI22 select followed by an XOR. A grid of 7 × 7
tiles covers the 28 digits and a 56-bit zero-extended `x`. Bit 55 of each row is then exactly the
row's sign `S_i = neg_i`.

`pp_array` places row `i` at weight 2^(2i) in a 108-bit frame and makes the sum of the rows exact
modulo 2^108. This arrangement is this design's own:

- The sign bit is inverted. The constant this inversion owes, −Σ 2^(55+2i), equals
  2^55 + Σ 2^(56+2i) modulo 2^108. It is folded into the rows:
  - row 0 ends in `{~S0, S0, S0}` at bits 57..55;
  - each row i > 0 ends in `~S_i` at bit 55+2i and a constant 1 at bit 56+2i.
- The two's-complement correction `crt_(i-1)` of a negative digit goes in the two free low bits of
  row i, at weight 2^(2i-2). `crt_27` is always 0 and is not placed.

As a result, row `i` occupies only weights [2i−2, 2i+56], or [0, 57] for row 0. The tree relies on
these ranges.

## The 4-2 compressor and the Wallace tree

`compressor42` follows the published gate diagram. A 4-input XOR of `i1..i4` drives two 2-input
multiplexers:

- the carry `y` is `(i1&i2 | i3&i4)` when the XOR is 0, and `cin` when it is 1;
- the sum `x` is `cin` when the XOR is 0, and `~cin` when it is 1;
- the lateral carry is `co = (i1|i2)&(i3|i4)`, which does not depend on `cin`.

Together these satisfy `i1+i2+i3+i4+cin = x + 2(y+co)`. A row of these cells (`c42_strip`, the
"8C" tile when W = 8) chains `co` into the neighbour's `cin` without rippling.

`wallace_tree` groups the rows as in the published floor plan. The multiplier bytes Y0, Y8, …, Y48
each form a group of four rows.

| level | operation | module |
|---|---|---|
| 1 | each group → one (sum, carry) pair | `c42_level`: 8C strips over the frame |
| 2 | Y0+Y8, Y16+Y24, Y32+Y40 → one pair each; Y48 waits | `c42_merge` |
| 3 | (Y0..Y24) → one pair; (Y32+Y40)+Y48 → one pair | `c42_merge` |
| 4 | the two halves → the final pair | `c42_merge` |

A merge (`c42_merge`) of a lower pair spanning weights [a0, a1] with an upper pair spanning
[b0, b1] has three regions:

- `[a0, b0)`: only the lower pair has bits there. They pass through unchanged, and these product
  bits are finished early.
- `[b0, a1]`: one 4-2 compressor strip.
- `(a1, top]`: an "H" strip (`hf_strip`). Its first cell is a full adder that also takes the
  compressor strip's last carry. The remaining cells are half adders, with no carry between
  cells.

Group g spans [8g−2, 8g+63] after level 1. From that, the merges work out as follows:

| merge | compressor columns | H strip | low bits passed |
|---|---|---|---|
| Y0+Y8 | 6..63 | 1F + 7H | 6 |
| Y16+Y24 | 22..79 | 1F + 7H | 8 |
| Y32+Y40 | 38..95 | 1F + 7H | 8 |
| (Y0..Y24) | 14..72 | 1F + 15H | 14 |
| (Y32..Y48) | 46..104 | 1F + 2H | 16 |
| final | 30..89 | 1F + 17H | 30 |

The published floor plan names 6H, 15H and 21H+1F strips, and 6-, 8- and 16-bit early outputs.
These counts agree in kind and partly in size. They differ where this design's sign-extension
layout and the 108-bit frame differ from the original layout. Assertions in `c42_merge` check that
each input pair stays inside its range. In every simulation so far, the carry from a compressor
strip into the full adder of its H strip has been 0. The sign-extension constants appear to hold it
there, which would make these F cells half adders in practice. They are kept as full adders
because this has not been proven. Since every row is kept at its absolute weight, the
published 8- and 16-bit "wire shifters" between levels are plain index offsets.

## Dual-rail carry-lookahead adder

Every signal in `dicla` is dual-rail, `dr_t = {r1, r0}`: 00 is the spacer, 01 a valid 0 and 10 a
valid 1. The internal block status `kgp_t = {k, g, p}` is one-hot, or all zeros while waiting.

- **C-module** (`dicla_c`, one per bit) computes `k = A0B0`, `g = A1B1` and `p = A0B1 + A1B0` from
  the operand bits alone. When the carry `C_i` arrives, it forms the dual-rail sum.
- **D-module** (`dicla_d`) combines the status of an upper block [i:j] and a lower block [j−1:k]:
  `P = P_hi·P_lo`, `K = K_hi + P_hi·K_lo` and `G = G_hi + P_hi·G_lo`. It sends back the carry into
  bit j: `C_j^0 = K_lo + P_lo·C_k^0` and `C_j^1 = G_lo + P_lo·C_k^1`.
- **Tree** (`dicla_tree`) is a binary tree of D-modules over the C-modules. Status flows up the
  tree and carries flow back down: each node's lower child takes the node's carry-in, and the
  node's D-module feeds the upper child. When a lower block kills or
  generates, its carry is valid before the block's own carry-in arrives. This is the source of the
  adder's short average completion time.
- **Completion**: `finish = (C_N^0 + C_N^1) · Π(S_i^0 + S_i^1)`.

For N = 108, the tree is padded to 128 bits with zero operands, which turn valid together with the
carry-in. Padding bit N therefore has a sum equal to the carry into bit N, and that sum is used as
the carry-out. When N is a power of two, a final D-module forms the carry-out instead, as in the
published 8-bit tree.

Where the printed equations are inconsistent, this design uses the one-hot readings:

- propagate is the exclusive case of A and B;
- block generate includes `P_hi·G_lo`;
- `C_j^1` uses `G_lo`, not `K_lo`.

## Departures and limits

- **Circuit level.** The published multiplier is a custom circuit: the partial-product generators
  use pre-charged dynamic logic and the compressor uses pre-discharged dynamic pass-transistor
  logic. Here every cell is its logic function. Delay, power, area and transistor-count figures
  (3.4 ns, 42 579 transistors, 0.89 mm²) do not carry over to this RTL.
- **Not built:**
  - the speed-up circuitry of the lookahead adder, which is mentioned but not specified;
  - the algorithms used to tune the reduction tree and the final adder (TDM, MLCSMA), which are
    not specified;
  - the P2/N2/P1/N1/ZERO and other recoding schemes, which serve only as comparisons.
- **Eighth tile column.** The published floor plan shows 8 tile columns per row, while this design
  uses 7, because 56 bits hold 2X of a 54-bit operand plus the sign. The H-strip sizes and
  early-output widths differ for the reasons given in the tree section.
- **No sequential wrapper.** Operand and product registers are left to the user.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against values computed
independently in the testbench, and each ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_compressor42` | all 32 input cases; weight balance; `co` independent of `cin` |
| `tb_c42_strip`, `tb_hf_strip` | random rows against integer sums; per-cell half/full-adder results |
| `tb_booth_recoder_par`, `tb_booth_recoder_ser` | every input case against the digit value and the unique-zero rule; a serial chain recodes all 8-bit values |
| `tb_pp_gen_8x4` | random tiles against X / 2X worked out arithmetically |
| `tb_wallace_tree` | 28 random rows inside their weight ranges; sum + carry = Σ rows mod 2^108 |
| `tb_dicla_c`, `tb_dicla_d` | every spacer / valid input combination |
| `tb_dicla` | 108- and 8-bit adders: spacer gives all 00; `finish` stays low while any bit is missing; sum, carry-out and `finish` are correct |
| `tb_mult54` (default parameters), `tb_mult54_ser` (serial recoder) | about 5 400 products of corner, random 54-bit, 32-bit and 24-bit operands, plus the 16-bit-value / 16-sign-bit patterns 0x0000B276 and 0xFFFF4D89; the spacer/evaluate protocol; every digit kind, including the 111 group, occurs |

Every testbench also passes with `+verilator+rand+reset+2`.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv tb/tb_mult54.sv --top-module tb_mult54
./obj_dir/Vtb_mult54
```

The `-I` paths let Verilator find each module in the file of the same name. The full-size
multiplier test runs in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/mult_pkg.sv rtl/mult54.sv`. The remaining warnings are
unused bits at the top of the 108-bit frame, which the design discards on purpose (arithmetic is
modulo 2^108).

## Files

`rtl/mult_pkg.sv` holds the shared widths and the `booth_t`, `dr_t`, `kgp_t` and `recode_e` types.
The datapath is, in order: `booth_encoder` (recoder array), `booth_recoder_par` and
`booth_recoder_ser`, `pp_array` with `pp_gen_8x4`, `wallace_tree` with `c42_level`, `c42_merge`,
`c42_strip`, `compressor42`, `hf_strip`, `half_adder` and `full_adder`, and `dicla` with
`dicla_tree`, `dicla_c` and `dicla_d`. The top is `mult54`.
