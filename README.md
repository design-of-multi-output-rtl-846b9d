# Flagged binary adder with a pair-based prefix tree

A single carry-propagate adder that delivers several related results of
its two operands without a second carry chain: A+B, A+B+1, and the bitwise
complements of both, which in two's complement are -(A+B+1) and -(A+B+2).
If B is complemented on the way in, the same hardware gives A-B-1, A-B, B-A
and B-A-1. Two control bits, INCR and COMP, pick the result. The
increment is cheap because the carry tree also produces **flag bits**.
A flag marks every sum bit that a "+1" would flip, so turning A+B into
A+B+1 takes one OR gate per bit rather than another adder.

The carry tree works on two-bit pairs. It first forms the carry of each
pair, then combines the pairs. That keeps the gate count low: the 4-bit
adder is 38 two-input gates.

The default configuration is 16 bits wide with registered outputs. Any even
width works.

## Operations

`flagged_adder_top` computes, with B' = B when `sub` = 0 and ~B when `sub` = 1:

| sub | comp | incr | result `s_reg` (mod 2^N) | `cout_reg`           |
|-----|------|------|--------------------------|----------------------|
| 0   | 0    | 0    | A+B                      | carry of A+B         |
| 0   | 0    | 1    | A+B+1                    | carry of A+B+1       |
| 0   | 1    | 0    | -(A+B+1)  (= ~(A+B))     | carry of A+B         |
| 0   | 1    | 1    | -(A+B+2)  (= ~(A+B+1))   | carry of A+B+1       |
| 1   | 0    | 0    | A-B-1                    | carry of A+~B        |
| 1   | 0    | 1    | A-B                      | carry of A+~B+1      |
| 1   | 1    | 0    | B-A                      | carry of A+~B        |
| 1   | 1    | 1    | B-A-1                    | carry of A+~B+1      |

The package `flagged_adder_pkg` names the four {comp, incr} codes
(`fa_mode_e`: `FA_SUM`, `FA_SUM_INC`, `FA_NEG_INC`, `FA_NEG_INC2`).

## How the flags give the increment

For bit i, let p = a^b (propagate), g = a&b (generate), and let c[i] be the carry
into bit i of A+B. The plain sum is s[i] = p[i] ^ c[i].

With a carry-in of 1, the carry into bit i becomes c[i] | P[i-1:0]. Here
P[i-1:0] is 1 when every bit below i propagates: an incoming 1 then
travels all the way up to bit i. That group propagate is the flag:

    f[i] = p[i-1] & p[i-2] & ... & p[0]      (f[0] = 1)

So one result bit is

    s[i] = (c[i] | f[i] & incr) ^ (p[i] ^ comp)

The left term is the carry, forced to 1 where a flag is set and an increment
is requested. The right term is the propagate, inverted when `comp` is set.
Inverting p inverts the sum bit, so `comp` complements the whole result:
~X = -X-1 in two's complement. This per-bit expression is the
**flagged inversion cell** (`flag_inv_cell`). It is four gates per bit.

Worked example, 4 bits, A = 0111, B = 0101:
p = 0010, g = 0101, carries c[3:0] = 1110, flags f[3:0] = 0001.
The results are A+B = 1100, A+B+1 = 1101, ~(A+B) = 0011 and ~(A+B+1) = 0010.

## The pair-based carry tree

`mod_prefix_tree` produces c[i] and f[i] for i = 0..N. c[N] is the carry out,
and f[N] says that the whole word propagates.

1. **Pair carry** (`pair_carry`). Each pair k (bits 2k+1, 2k) gets the carry
   it would produce with no carry in:
   `G = a[2k+1]b[2k+1] | a[2k]b[2k](a[2k+1] | b[2k+1])`.
   This is five gates in all. The two ANDs and the OR on the operands are
   already in the preprocessing stage (`mod_preproc` outputs `g` and the
   pair OR `r`), so `pair_carry` adds the last AND and OR. The pair
   propagate is p[2k+1] & p[2k].
2. **Prefix over pairs.** The pair (G, P) signals pass through log2(N/2)
   levels. At level l, every pair whose index has bit l-1 set merges with
   the last pair of the block below it: G = G_hi | P_hi G_lo, P = P_hi P_lo.
   The result is the carry into every even bit (c[2k+2]) and its flag
   (f[2k+2] = P over bits 2k+1..0).
3. **Odd positions.** Each odd position takes one more step from the even
   position below it: c[2k+1] = g[2k] | p[2k] c[2k] and
   f[2k+1] = p[2k] f[2k].

At 4 bits this comes down to:

    C1 = g0                 F1 = p0
    C2 = G(1..0)            F2 = p1 p0
    C3 = g2 | p2 C2         F3 = p2 F2
    C4 = G(3..2) | p3p2 C2  F4 = p3p2 p1p0

Two-input gate counts after flattening, for the combinational adder with its
carry out:

| width | this RTL | published count for this adder |
|-------|----------|--------------------------------|
| 4     | 38       | 38                             |
| 8     | 85       | 82                             |
| 16    | 185      | 186                            |

The 4-bit circuit is fully determined by the published description. How
pairs combine beyond two pairs (4 bits) is this design's own choice. The
close 8- and 16-bit counts suggest a similar structure but do not prove one.
For comparison, a conventional flagged Kogge-Stone adder needs 58, 141 and
256 gates at these widths.

The carry of a pair uses `r = a|b` of its upper bit. The odd-position step
uses `p = a^b`. Both give the same carries.

## Module hierarchy and timing

    flagged_adder_top      output registers s_reg, cout_reg; B inversion (sub)
    └── flagged_adder      combinational core; cout = c[N] | f[N] & incr
        ├── mod_preproc    p = a^b, g = a&b, r[k] = a[2k+1] | b[2k+1]
        ├── mod_prefix_tree
        │   └── pair_carry  (one per pair)
        └── flag_inv_cell  s = (c | f&incr) ^ (p ^ comp)

- Everything below the top is combinational. The longest path (operand
  generate, pair carry, log2(N/2) prefix levels of AND then OR, the odd step,
  the inversion cell) is 2·log2(N/2) + 7 two-input gates: 13 at 16 bits.
- The top samples `a`, `b`, `sub`, `incr` and `comp` on the rising clock
  edge. The result appears in `s_reg` and `cout_reg` right after that edge.
  So the latency is one cycle, and a new operation can start every cycle.
- `rst_n` is an asynchronous, active-low reset. It clears `s_reg` and
  `cout_reg`.
- Parameter `N` (default 16, from `flagged_adder_pkg::FA_WIDTH`) must be even
  and at least 2. `mod_prefix_tree` raises an elaboration error otherwise.

## What follows the reference design and what is chosen here

These parts follow the reference design:

- The three stages (preprocessing, modified prefix tree, flagged inversion
  cell) and the signals between them (R, G, P; F, C).
- The pair carry equation and its truth table.
- The inversion-cell function, and the four results selected by
  {COMP, INCR}.
- The worked 4-bit example.
- The 16-bit main width, with the sum and carry out held in output
  registers.

These are this design's own choices:

- The prefix network that combines more than two pairs.
- The `sub` input. The subtraction results are specified, but the circuit
  that complements B is not; here it is a row of XOR gates.
- The clock and reset style, and the absence of input registers.
- The definition of `cout` as the carry of A+B'+incr, unaffected by `comp`.

Not provided:

- A decrement of the sum, A+B-1. The decremented results available are
  A-B-1 and B-A-1.
- Adding an arbitrary constant C to a sum. The adder can only add 0 or 1
  beyond A+B. The image application "I1 + I2 + C" is therefore
  demonstrated only for C = 1 and C = 0.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` at the end and has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_pair_carry`        | all 16 input combinations against the truth table and against 2-bit integer addition |
| `tb_mod_preproc`       | p, g, r bit by bit on corner and random operands |
| `tb_mod_prefix_tree`   | every carry and flag against integer arithmetic: 16 bits random, 4 bits and 6 bits exhaustive (6 bits = three pairs, not a power of two) |
| `tb_flag_inv_cell`     | each result bit against the propagate/carry selection rules, all four control settings |
| `tb_flagged_adder`     | the worked example; 4 bits exhaustive in all modes; 16 bits random with carry out; subtraction results via ~B |
| `tb_flagged_adder_top` | end to end at the default 16 bits: reset, one-cycle latency, 20,000 random operations over all eight operations, carry-out and multi-bit increment events counted |
| `tb_image_add`         | two generated 64x64 8-bit images summed pixel by pixel with C = 1 and C = 0, one pixel per clock |

To run one with plain Verilator:

    verilator --binary --timing --assert rtl/*.sv tb/tb_flagged_adder_top.sv \
              --top-module tb_flagged_adder_top
    ./obj_dir/Vtb_flagged_adder_top

Each testbench finishes in well under a second.

## Changing the width

Override `N` on `flagged_adder_top`, or on any module below it. Alternatively,
change `FA_WIDTH` in `flagged_adder_pkg`. Only even widths are accepted. An
odd operand can be zero-extended by one bit.
