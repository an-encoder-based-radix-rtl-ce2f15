# Radix-16 Booth multiplier with an n/4-row partial-product array

An n x n unsigned multiplier (n = 64 by default) that recodes the multiplier
into radix-16 Booth digits, so that only about n/4 partial products are
generated instead of n/2 (radix-4) or n (plain array). Its distinguishing
property is the height of the partial-product array: for unsigned operands a
radix-16 recoding normally needs n/4 + 1 rows (17 for n = 64), because the
top multiplier bit produces an extra "transfer" digit. Here the array has
exactly **n/4 rows, so no column is taller than 16 bits for n = 64**. One
less row can save a level in the reduction tree, or leave room to add another
operand (for a fused multiply-add, say) without making the tree deeper.

The design is purely combinational: `p = x * y` one propagation delay after
the operands change. There are no clocks, resets or handshakes.

## Data path

```
 x ──► odd_multiples ──► 3X, 5X, 7X ─────────────┐
 │                                               ▼
 │   y ─► booth_r16_encoder (x15) ─► digit ─► pp_gen (x15) ─► pp_mag, neg ─┐
 │   y[63:59] ─────────────────────────────► msd_pp_gen ─► top_pp ─────────┤
 └──────────────────────────────────────────────▲                         ▼
                                                           pp_array: 16 rows x 128 bits
                                                                          ▼
                                                 csa_tree (3:2, 6 levels): sum, carry
                                                                          ▼
                                                              final_cpa ─► p
```

1. **Multiples.** Digits reach magnitude 8, so every multiple 1X..8X is
   needed. 1X, 2X, 4X, 8X are shifts; 6X is 3X shifted. 3X, 5X, 7X each take a
   carry-propagate adder (`odd_multiples`). This is the slow first step, and
   the recoding runs in parallel with it.
2. **Recoding** (`booth_r16_encoder`, one per digit). Digit *i* reads five
   bits, y(4i+3)..y(4i-1) with y(-1) = 0, and forms
   d = -8·y(4i+3) + 4·y(4i+2) + 2·y(4i+1) + y(4i) + y(4i-1), in -8..8.
   The digit is passed on as a one-hot magnitude `sel[8:1]` plus a `neg`
   flag (`booth_pkg::booth_digit_t`). When no select bit is set, the digit is
   zero. The pattern 11111 also gives a zero digit, and `neg` is cleared for
   it, so a zero digit always yields an all-zero row.
3. **Partial products** (`pp_gen`). The one-hot select drives an AND-OR
   multiplexer over the eight multiples, and an XOR row inverts the result
   for a negative digit. The "+1" that would complete the two's complement
   is not added here; it becomes a single bit in the array.
4. **Top row** (`msd_pp_gen`), described next.
5. **Array** (`pp_array`). It places the rows, the `neg` bits and the
   sign-extension bits; see below.
6. **Reduction and final addition.** `csa_tree` reduces the 16 rows to two
   with 3:2 carry-save adders in six levels (16 → 11 → 8 → 6 → 4 → 3 → 2).
   `final_cpa` adds those two rows. Both work modulo 2^(2n).

## Folding the transfer digit into the top row

With y(-1) = 0, the 16 signed digits d0..d15 of a 64-bit multiplier
represent y − 2^64·y(63), because d15 gives bit 63 the weight −2^63. The
unsigned value therefore needs a 17th digit, d16 = y(63) ∈ {0, 1}, with a row
y(63)·X·2^64. That row overlaps the first row and the sign-extension bits, so
some columns get 17 bits.

`msd_pp_gen` merges d15 and d16 into a single digit:

    D = d15 + 16·d16 = 8·y63 + 4·y62 + 2·y61 + y60 + y59,   0 ≤ D ≤ 16

Since D is never negative, its row D·X needs no complement bit and no sign
extension. It occupies bits 60..127 (its bits above 127 drop out modulo
2^128). It is selected by a one-hot 16:1 multiplexer. This needs the extra
multiples 9X, 11X, 13X and 15X, and each is computed directly from X:
8X+X, 8X+2X+X, 8X+4X+X and 16X−X. None of them waits for 3X/5X/7X, so they
are computed alongside those. They cost at most one more carry-save level
than the other multiples. 10X, 12X, 14X and 16X are shifts. No timing
analysis backs the claim that this adds no delay. The price is four more
adders and a wider multiplexer for this one row.

## Bit array and sign extension

Row *i* (i = 0..14) is the signed value PP_i = pp_mag_i − s_i·2^67 + s_i,
shifted left by 4i. Here s_i = neg_i, and pp_mag_i is the 67-bit output of
`pp_gen`. Rather than sign-extending each row to 128 bits, each row's
sign-extension constants are rewritten as a few bits placed above the row.
Let k = 4i + 67 be row i's sign position.

| row            | bit k | bits k+1 .. k+3 | bit k+4 |
|----------------|-------|-----------------|---------|
| 0              | s     | s s s           | ~s      |
| 1 .. 13        | ~s    | 1 1 1           | –       |
| 14 (= n/4 − 2) | ~s    | 1 1 1           | 1 (bit 127) |
| 15 (top, D·X)  | none: the row is non-negative |  |  |

Why this is correct: a middle row's bits add −s·2^k + (2^(k+4) − 2^k) to
the value it should have. Over the middle rows these error terms telescope.
The patterns of row 0 and row 14 are chosen so that what remains is
2^(2n) ≡ 0. `neg_i` (the +1) goes in bit 4i of row i+1, which is a free
position because row i+1 starts at bit 4i+4. `neg_14` goes in the top row.
Each row thus puts at most one bit in any column, and the height is 16.

The construction needs n to be a multiple of 4 and at least 12, and the
array module checks this at elaboration. Nothing else depends on n = 64.

## Interface

| module | parameters | ports |
|---|---|---|
| `booth_r16_mult` (top) | `N = 64` | `x[N-1:0]`, `y[N-1:0]` in; `p[2N-1:0]` out |

The submodules have their interfaces described at the top of each file. The
package `booth_pkg` holds the digit type and `pp_rows(n) = n/4`.

## What is given and what is chosen

Parts that follow the design's description:
- Radix-16 recoding from five-bit windows.
- One-hot digits driving an 8:1 multiplexer with an implicit zero output.
- An XOR row to complement negative digits.
- Odd multiples precomputed with carry-propagate adders.
- Sign extension replaced by bits concatenated to each row.
- Reduction to two rows with 3:2 carry-save adders, then a carry-propagate
  adder.
- n = 64 unsigned operands.
- A maximum array height of n/4.

Choices made in this implementation:
- How the height of n/4 is reached: folding the transfer digit into a
  non-negative top digit, plus the extra multiples.
- The exact sign-extension bit patterns and the slots for the `neg` bits.
- The row-wise tree shape.
- Adders written as `+`, leaving their architecture to synthesis.
- No pipeline registers. Registers can be placed around the top module, or
  between `pp_array` and `csa_tree`.
- `neg` cleared for the 11111 zero digit.

Signed and mixed signed/unsigned operation, radix-8 and 4:2 compressors are
not implemented.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares
the module's outputs with values the testbench computes in its own way.

- `tb_booth_r16_encoder`: all 32 windows.
- `tb_odd_multiples`, `tb_pp_gen`, `tb_msd_pp_gen`: every digit value with
  corner and random multiplicands.
- `tb_pp_array`: the testbench recodes the operands itself, and the 16 rows
  must add up to x·y. This exercises every sign-extension and `neg` bit.
- `tb_csa_tree`: 16-, 17-, 5- and 3-row trees against a plain sum.
- `tb_final_cpa`: carry chains and random operands.
- `tb_booth_r16_mult`: about 20,700 64-bit products with no parameter
  overrides, covering corner cases, every value at every digit position,
  and random operands of varying bit density. It also counts how often each
  digit value ±1..8, the 11111 zero digit and each top-row value 0..16
  occurred, and fails if any never occurred.
- `tb_booth_r16_mult_sizes`: n = 32, 16 and 12. For n = 12, all multipliers
  are run against eight multiplicands.

Functional behaviour is well covered. Timing, area and the claim of no
extra delay have not been checked.

## Simulating

Every testbench ends with `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/booth_pkg.sv \
    tb/tb_booth_r16_mult.sv --top-module tb_booth_r16_mult -Mdir obj
./obj/Vtb_booth_r16_mult
```

Use the same command with another `tb/tb_*.sv` file and its module name for
the other tests. `-Irtl` lets Verilator find each module in `rtl/<name>.sv`.
Lint a module with `verilator --lint-only -Wall -Irtl rtl/booth_pkg.sv
rtl/<module>.sv`.

To change the width, set `N` on `booth_r16_mult`. It must be a multiple of 4
and at least 12; the array then has N/4 rows and the tree adapts on its own.
