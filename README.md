# Vedic 16x16 multiplier

A 16x16-bit unsigned combinational multiplier built by the Vedic
"vertically and crosswise" (Urdhva Tiryakbhyam) rule. It is organised as a
tree. A 2x2 gate-level multiplier sits at the leaves. At each level above it,
four half-width products are joined by three ripple-carry adders: 2x2 → 4x4 →
8x8 → 16x16. The design has no clock, no registers and no control. The product
appears one combinational propagation delay after the operands change.

```
qout[31:0] = a[15:0] * b[15:0]        (unsigned)
```

## The vertically-and-crosswise rule

When two numbers are multiplied digit by digit, each result column is the sum
of the "vertical" product (same position) and the "crosswise" products
(opposite positions), plus the carry from the column below. Applied to two
halves of a word, the rule reads

```
a = aH·2^h + aL,   b = bH·2^h + bL
a·b = aH·bH·2^(2h)  +  (aH·bL + aL·bH)·2^h  +  aL·bL
       vertical (high)   crosswise               vertical (low)
```

The hardware uses this identity recursively. Each level multiplies the four
half pairs in parallel with the next smaller multiplier. It then adds the
shifted results with ripple-carry adders.

## The 2x2 leaf (`vedic2x2`)

For two 2-bit numbers, the rule becomes four AND gates and two half adders:

| output | logic                          | step                              |
|--------|--------------------------------|-----------------------------------|
| q0     | a0·b0                          | vertical, LSBs                    |
| q1     | a1·b0 ⊕ a0·b1                  | crosswise                         |
| q2     | a1·b1 ⊕ (a1·b0 · a0·b1)        | vertical MSBs + crosswise carry   |
| q3     | a1·b1 · (a1·b0 · a0·b1)        | carry out of q2                   |

## Combining four sub-products (`vedic4x4`, `vedic8x8`, `vedic16x16`)

This is the part of the design that takes some thought. Every level, of width
`n = 2h`, has the same structure:

```
 M1 = aL*bL   M2 = aH*bL   M3 = aL*bH   M4 = aH*bH      (each 2h bits wide)

 ADDER 1 (2h bits):  A1 = M2 + (M1 >> h)
 ADDER 2 (3h bits):  A2 = (M4 << h) + M3
 ADDER 3 (3h bits):  q[4h-1:h] = A2 + A1   (A1 zero-extended)
                     q[h-1:0]  = M1[h-1:0]
```

Compare this with the obvious form `M4<<2h + (M2+M3)<<h + M1`. The lowest `h`
bits of the product are just the low half of `M1`, which never reaches an
adder. The upper half of `M1` is the only part of it that overlaps the
crosswise terms. It is folded into `M2` by ADDER 1. ADDER 2 joins the high
vertical product to the other crosswise term. ADDER 3 adds the two partial
sums. All three adders work on data shifted right by `h`, so they are
narrower than the full product.

| level       | h | ADDER 1 | ADDER 2 | ADDER 3 | sub-multiplier |
|-------------|---|---------|---------|---------|----------------|
| `vedic4x4`  | 2 | 4 bits  | 6 bits  | 6 bits  | `vedic2x2`     |
| `vedic8x8`  | 4 | 8 bits  | 12 bits | 12 bits | `vedic4x4`     |
| `vedic16x16`| 8 | 16 bits | 24 bits | 24 bits | `vedic8x8`     |

**No adder ever carries out.** At the 16x16 level:
- `A1 ≤ 255·255 + 254 = 65279 < 2^16`.
- `A2 ≤ 65025·256 + 65025 = 16,711,425 < 2^24`.
- `A2 + A1 = qout >> 8 < 2^24`.

The same bounds hold at the 4x4 and 8x8 levels. So every adder's carry in is
tied to 0 and its carry out is dropped from the datapath. Each combining
module has an immediate assertion that the three carry outs are zero. In
simulation with `--assert` it reports any operand pair that breaks the bound.
In synthesis the assertion has no effect.

Whole design: 4 × 4 × 4 = 64 `vedic2x2` leaves. Below the top there are
3 + 4·3 + 16·3 = 63 ripple adders.

## Ripple-carry adders (`generic_adder`, `full_adder`)

`generic_adder #(N)` is a chain of `N` `full_adder` cells:

```
sum[i] = x[i] ^ y[i] ^ c[i-1]
c[i]   = x[i]y[i] | x[i]c[i-1] | y[i]c[i-1]        c[-1] = cin, cout = c[N-1]
```

Every adder in the tree is an instance of this one module, with the width set
by the instance. That is why the same structure scales to any power-of-two
width.

## Timing and cost

The product is purely combinational. The longest path runs through one chain
of levels: a 2x2 leaf, then at each level ADDER 1 or ADDER 2 and then ADDER 3.
The adder delays are ripple delays. The architecture does not try to be the
fastest possible multiplier. It is a regular, easily generated structure.

Published figures for this architecture on a Xilinx Spartan-II XC2S200PQ208-5:
- 475 of 2352 slices
- 823 of 4704 4-input LUTs
- 64 of 140 bonded IOBs
- 80.155 ns total delay (29.4 ns logic, 50.8 ns routing)

These figures were not reproduced here. A generic gate-level synthesis of this
RTL with yosys gives 2038 cells (1035 AND, 322 OR, 681 XOR), with no flip-flops,
latches or memories.

## Where this RTL makes its own choices

- **The 8x8 level.** The 16x16 multiplier is described as four 8x8 blocks.
  Only the 2x2, 4x4 and 16x16 levels are drawn out in detail. `vedic8x8`
  repeats the common pattern with `h = 4`. Its adders are 8, 12 and 12 bits.
- **ADDER 3's second operand.** `A1` is narrower than `A2`, so it is
  zero-extended to the adder width.
- **Carry ports.** `generic_adder` keeps its `cin` and `cout` ports. The
  multipliers tie `cin` to 0 and use `cout` only in the assertions.
- **`generic_adder` default width.** The default is `N = 16`. Every instance
  inside the multiplier sets `N` explicitly.
- **Unsigned only.** Operands are unsigned, and there is no signed mode.
- **Port names.** The top's product port is `qout`. The lower levels call their
  product `q`.

## Files

| file                    | module                                   |
|-------------------------|------------------------------------------|
| `rtl/full_adder.sv`     | 1-bit full adder                         |
| `rtl/generic_adder.sv`  | N-bit ripple-carry adder                 |
| `rtl/vedic2x2.sv`       | 2x2 leaf multiplier                      |
| `rtl/vedic4x4.sv`       | 4x4 from four 2x2                        |
| `rtl/vedic8x8.sv`       | 8x8 from four 4x4                        |
| `rtl/vedic16x16.sv`     | 16x16 top from four 8x8                  |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `full_adder_tb`: all 8 input combinations.
- `generic_adder_tb`:
  - At 16 bits: carries that ripple through every bit, plus 20,000 random
    operands.
  - A 4-bit instance checked exhaustively, including `cin`.
- `vedic2x2_tb`: all 16 pairs.
- `vedic4x4_tb`: all 256 pairs.
- `vedic8x8_tb`: all 65,536 pairs.
- `vedic16x16_tb`: about 2 million pairs, covering:
  - published example vectors (such as 8 × 65527 = 524216 and
    9 × 65526 = 589734);
  - all pairings of corner values;
  - 24 complete sweeps of `a` against fixed `b` values;
  - 400,000 random pairs.

  It also counts three situations: products wider than 16 bits, crosswise sums
  that carry past 16 bits, and carries that ripple 16 or more bits through the
  24-bit final adder. It fails if any of them never occurs.
- `vedic16x16_sweep_tb`: the ordered `a`-outer, `b`-inner sweep over 512 full
  rows (`a` = 0..255 and 65280..65535, 33.5 million pairs, about 70 s). The
  full 2^32 sweep would take a few hours in simulation.

The exhaustive tests of the lower levels and the sampled tests of the top all
pass.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
    -y rtl +libext+.sv --top-module vedic16x16_tb tb/vedic16x16_tb.sv -o sim
./obj_dir/sim
```

Replace `vedic16x16_tb` with any other testbench name. Each testbench applies
one operand pair per nanosecond.

## Changing it

- **A wider multiplier.** For example, a 32x32 multiplier is a new module with
  the same body as `vedic16x16`:
  - `h = 16`;
  - four `vedic16x16` instances;
  - adders of 32, 48 and 48 bits.
- **A pipelined version.** Registers can go between levels, on the four
  sub-products or on the adder outputs. The RTL has no clock today.
