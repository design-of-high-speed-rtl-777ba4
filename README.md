# 16x16 Vedic multiplier with latch-based carry select adders

An unsigned 16x16-bit multiplier built the "vertically and crosswise" way
(Urdhva-Tiryakbhyam, one of the sutras of Vedic mathematics). The operands are
split in halves and the multiplier is built recursively, 2x2 → 4x4 → 8x8 → 16x16.
At every level four half-size products are formed in parallel and then added.
The wide additions at the 8- and 16-bit levels use a carry select adder that
needs only one ripple carry adder per group, not two. The one adder works on
both clock phases: in the high phase it computes the carry-in-1 sum and stores
it in D latches, and in the low phase it computes the carry-in-0 sum. A
multiplexer then picks one of the two using the real incoming carry.

Because of this, the adders and so the whole multiplier are clocked, although
the multiplier has no registers. With the operands held, the product settles
after a fixed number of clock cycles (6 at 16 bits).

## Structure

```
vedic16x16                       (top)
├── 4 x vedic8x8                 AL*BL, AH*BL, AL*BH, AH*BH (8-bit halves)
│   ├── 4 x vedic4x4             (4-bit halves)
│   │   ├── 4 x vedic2x2         4 AND gates + 2 half_adder
│   │   └── 3 x rca #(4)         ripple carry adders of full_adder cells
│   └── 3 x csla_dlatch #(8)     groups 2,2,4
└── 3 x csla_dlatch #(16)        groups 2,2,3,4,5
        ├── rca #(2)             lowest group, plain ripple carry
        ├── csla_group #(W)      upper groups: rca + d_latch bank + 2:1 muxes
        └── d_latch              output latch (transparent while clk is low)
vedic_pkg                        group sizing functions, latency constants
```

## Vertically and crosswise

**2x2 cell.** For `a = a1 a0` and `b = b1 b0`:

```
p0      = a0 b0              vertical, low bits
c1 p1   = a1 b0 + a0 b1      crosswise, half adder
p3 p2   = c1 + a1 b1         vertical, high bits, half adder
```

**Recombination (4x4, 8x8 and 16x16 alike).** For `N`-bit operands split into
halves `A = {AH, AL}` and `B = {BH, BL}` (`H = N/2` bits each), the four smaller
multipliers give `q0 = AL*BL`, `q1 = AH*BL`, `q2 = AL*BH` and `q3 = AH*BH`, each
`N` bits wide. Three `N`-bit adders follow:

| adder | inputs                                      | result   |
|-------|---------------------------------------------|----------|
| 1     | `q1 + q2` (the two crosswise terms)          | `s1, c1` |
| 2     | `s1 + {H zeros, q0[N-1:H]}`                  | `s2, c2` |
| 3     | `q3 + {zeros, c1 \| c2, s2[N-1:H]}`          | `p[2N-1:N]` |

The low half of the product is `{s2[H-1:0], q0[H-1:0]}`. The two lower carries
are ORed rather than added. This is exact because they are never both 1: if
`q1 + q2` overflows, then `s1` is small enough that adding `q0`'s upper half
cannot overflow again. The third adder's carry out is always 0 and is left
unconnected.

The 4x4 level uses plain 4-bit ripple carry adders. The 8x8 and 16x16 levels
use the latch-based carry select adder.

## The latch-based carry select adder (`csla_dlatch`)

A classic carry select adder splits the word into groups. Each upper group
computes its sum twice, for carry-in 0 and for carry-in 1, with two adders, and
the real carry from below picks one. Here each upper group (`csla_group`) has a
single ripple carry adder whose carry-in *is the clock*, and `2W+1` D latches:

```
                 clk high                        clk low
RCA              a + b + 1                       a + b + 0
one-latches      take sum and carry (a+b+1)      hold them
zero-latches     hold sum (a+b+0)                take sum (a+b+0)
mux              (output not meaningful)         sel ? one-latches : zero sum + live carry
```

`sel` is the real carry out of the group below. The carry-in-1 sum and carry
are latched on `clk`, and the carry-in-0 sum on `~clk`. The carry-in-0 carry
is taken live from the adder. That gives five latches for a 2-bit group, as
the adder's description counts them. The lowest group is a plain 2-bit ripple
carry adder fed by the adder's `cin`. Carries still ripple from group to group
through the multiplexers, but each group's own ripple is already done when the
select arrives. For a 2-bit group the multiplexer bank is the
"6:3 multiplexer": two sum bits and a carry.

**Group sizes.** 16 bits are split 2, 2, 3, 4, 5: the 2-bit LSB adder, then four
latch-based groups, five groups in all. Other widths follow the same sequence
(2, 2, 3, 4, 5, 6, ...). A group takes all the remaining bits when what would be
left after it could not fill the next, larger group, so 8 bits split 2, 2, 4.
The functions are in `vedic_pkg`. The first two sizes are given by the
description of the adder. The 3-4-5 tail and the rule for other widths are the
usual square-root split, chosen here.

**Output latch and latency.** The group outputs are valid only in the low phase.
In the high phase every group shows its carry-in-1 result. If one such adder fed
another directly, the second adder would latch that high-phase value as its own
carry-in-1 result, and a chain of adders would never settle. Each `csla_dlatch`
therefore ends in a latch that is transparent while `clk` is low and holds while
`clk` is high. Its output is then stable in both phases, so the next adder sees
a steady operand for a full cycle.

This output latch is this design's addition, and it costs one clock cycle per
adder level:

| block        | adder levels on the longest path | product valid from                 |
|--------------|----------------------------------|------------------------------------|
| `csla_dlatch`| 1                                | falling edge of cycle 1            |
| `vedic8x8`   | 3                                | falling edge of cycle 3            |
| `vedic16x16` | 3 (inside 8x8) + 3               | falling edge of cycle 6            |

"Cycle 1" is the first rising edge after the operands change. After that the
product stays correct, in both phases, for as long as the operands are held.
The testbenches measure these latencies and require the worst case over their
vectors to match them exactly (`VEDIC8_LATENCY`, `VEDIC16_LATENCY` in
`vedic_pkg`).

## Using `vedic16x16`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`| in  | 1     | clock for all adder latches and group carry-ins |
| `a`  | in  | 16    | multiplicand, unsigned |
| `b`  | in  | 16    | multiplier, unsigned |
| `p`  | out | 32    | product `a * b` |

Change `a` and `b` while `clk` is low, hold them, and read `p` in the low phase
of the 6th cycle or any time after. The interface has no reset, no valid or
ready, and no pipelining: a new operand pair restarts the 6-cycle settling.
Before the first 6 cycles `p` holds arbitrary latch contents. A user that needs
a handshake should add a 3-bit counter around the block.

## How far to trust it

- **Simulated, not timed.** All checks are functional, in a two-state
  simulator. The design has latches enabled by `clk` and by `~clk`, and it uses
  the clock as data (the group carry-ins). On silicon or an FPGA it therefore
  needs latch-aware timing analysis. Each group's ripple with carry-in 1 must
  finish within the high phase. The carry-in-0 ripple and the select chain
  through the groups must finish within the low phase, before the output latch
  closes at the rising edge. Nothing here has been checked against such constraints. The high and
  low phases also need not be equal. The described adder expects a short high
  phase and a longer low phase, because the low phase also holds the select
  ripple.
- **Intended latches.** Lint tools report latches (and Verilator's `NOLATCH`
  note for `always_latch` once the enable is a clock) in `d_latch`. They are
  the storage elements of the adder, not mistakes.
- **Unsigned only.** No sign handling is described or built.
- **Latency is this design's choice.** The described multiplier is discussed
  only as a combinational delay. The output latch in every carry select adder,
  and the 3- and 6-cycle latencies that follow from it, are what makes the
  clocked adders composable here.
- **Not reproduced.** The area (LUT count) and delay results that motivate the
  design were obtained with an FPGA vendor flow and are not reproduced. The
  baselines it is compared with (a ripple-carry-only multiplier and a
  dual-adder carry select adder) are not included.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench        | what it checks |
|------------------|----------------|
| `tb_vedic2x2`    | all 16 operand pairs |
| `tb_rca`         | 4-bit exhaustive with carry-in; 13-bit random |
| `tb_vedic4x4`    | all 256 pairs; both ORed carries occur |
| `tb_d_latch`     | transparency while enabled, hold while disabled |
| `tb_csla_group`  | 2- and 5-bit groups in the low phase, both mux paths, carry-in-0 sum held through the high phase |
| `tb_csla_dlatch` | 16- and 8-bit adders, random and carry-chain corners, low and high phase values, 1-cycle latency, every group selecting its latched result |
| `tb_vedic8x8`    | all 65,536 pairs, worst-case latency exactly 3 cycles |
| `tb_vedic16x16`  | end to end at full size: corners and 20,000 random pairs, worst-case latency exactly 6 cycles, value still held in the high phase; counts latched and live group selections and both carries into the OR, and fails if any never occurs |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/vedic_pkg.sv \
    tb/tb_vedic16x16.sv --top-module tb_vedic16x16 -o sim
./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -y rtl rtl/vedic_pkg.sv rtl/<module>.sv`.

## Changing it

- The multiplier sizes are fixed modules (`vedic2x2` … `vedic16x16`), one per
  level. A 32x32 version is one more module of the same shape: four
  `vedic16x16` and three `csla_dlatch #(32)`, with a latency of 9 cycles.
- `csla_dlatch` takes any `WIDTH` of 2 or more. The group split comes from
  `vedic_pkg::csla_group_size`; edit `csla_nominal_size` to try other splits.
- To use plain ripple carry adders at the 8- and 16-bit levels instead, replace
  `csla_dlatch` with `rca` (adding a `cin`). The multiplier then becomes purely
  combinational.
