# Redundant-binary modified Booth multiplier (32 x 32)

This multiplier takes two 32-bit two's complement numbers and returns their
exact 64-bit product. Most of the work in a parallel multiplier goes into
adding the partial-product rows, so the design cuts down both how many rows
there are and how much each addition costs:

* **Radix-4 modified Booth encoding (MBE)** recodes the multiplier into
  16 digits in {-2, -1, 0, +1, +2}. That gives 16 partial-product rows instead of 32.
* **Redundant binary (RB) pairing** packs two of those rows into one RB
  row, which gives 8 rows. An RB digit is a pair of bits worth +1, 0 or -1. The even
  row is used as the positive half and the negated odd row as the
  negative half, so forming an RB row takes no addition at all.
* **RB adders (RBAs)** sum the 8 RB rows pairwise, in a tree of 3 levels.
  RB addition has no carry chain: each output digit depends only on its
  own position and the two below it. Each tree level therefore costs a few
  gate delays, whatever the word width.
* **One carry-propagate adder**, a 64-bit parallel-prefix Ling adder,
  converts the final RB number `X+ - X-` back to ordinary binary. It is
  the only carry chain in the multiplier.

A plain RB Booth multiplier needs one more row than this, N/4 + 1 = 9 rows: an
*error-correcting word* (ECW) that collects the +1 bits of the negated
rows and the sign-extension constants. That ninth row would take a fourth
tree level. This design has no ECW. Every correction bit is placed in a
position that some other row leaves empty, so the tree has
log2(N/4) = 3 levels.

## Data path

```
 b ──► booth_encoder ──► 16 digits (neg, two, one)
                               │
 a ──────────────────────────► rb_ppg ──► 8 RB rows (X+, X-), 64 digits each
                                             │
                                rb_cancel x8 (digit (1,1) -> (0,0))
                                             │
                                rb_tree: 4 + 2 + 1 rba, 3 levels
                                             │  one RB number (X+, X-)
                                ling_adder: p = X+ + ~X- + 1
                                             │
                                             ▼ p (64 bits)
```

The whole path is combinational. There is no clock: `p` is valid one
propagation delay after `a` and `b` change. To pipeline the multiplier, put registers around
`mbe_multiplier` or between its stages.

## Redundant-binary digits

An RB number of W digits is held as two W-bit vectors. Digit i is the bit
pair `(X+[i], X-[i])` and is worth `X+[i] - X-[i]`. The value of the whole number is
`X+ - X-`. Every RB quantity in this design is taken modulo 2^(2N). That is exact,
because a signed N x N product always fits in 2N bits. Any carry or bit that
would land at or above position 2N is dropped on purpose.

The pair (1,1) is a second code for 0. `rb_cancel` rewrites it as (0,0)
before the tree. This matters because the RBA cell decides its transfer
from the `X-` bits of the position below: it treats a set `X-` bit as a
digit of -1. The rows from the generator do contain (1,1) pairs, since both halves
are dense words. The RBA outputs are always canonical.

## The partial-product generator (`rb_ppg`)

This is the least obvious part of the design. The equations in this section use
N = 32, RW = N + 2 = 34 (the width of one Booth row) and k = 0..7 for the RB
row index.

**Booth rows.** For digit d(j), `booth_decoder` selects |d|·a (0, a or 2a,
sign-extended to RW bits). If the digit is negative, it XORs the multiple with the sign.
This gives `q(j)` with `d(j)·a = q(j) + neg(j)`. The +1 bit `neg(j)` still has to be
added at the row's least significant bit (LSB), at weight 4^j.

**Pairing.** RB row k must equal `P(2k)·4^(2k) + P(2k+1)·4^(2k+1)`. The
positive vector holds row 2k at offset 4k. The negative vector must hold
`-P(2k+1)`. That is just the Booth row of the digit with its sign flipped, at
offset 4k+2, so no negation circuit is needed.

**Sign bits.** Each row keeps its sign bit, inverted, instead of
sign-extending to 64 bits. For a positive vector whose sign s sits at
position p, the extension is worth `-s·2^p`. This equals `~s·2^p - 2^p`. For the negative
vector (sign s' at p+2), `-s'·2^(p+2) = ~s'·2^(p+2) - 2^(p+2)`. Because the negative vector
is subtracted, its constant becomes +2^(p+2). The net constant per RB row
is therefore `2^(p+2) - 2^p = 3·2^p`. Adding 3 at position p to the bit `~s`
gives 4 - s. So the positive vector's top three bits become the fixed
pattern `{~s, s, s}`, and no constant needs a row of its own.

**Neg bits.** RB row k has two +1 bits: `neg(2k)` at position 4k, in the
positive half, and `neg'(2k+1)` at 4k+2, in the negative half (the flipped
digit's +1). Row k+1 starts at 4k+4 (positive half) and 4k+6 (negative half), so it has
both of these positions free. Each row's neg bits therefore ride in the next
row.

**The last row.** Row 7 has no row after it. Every row already uses
position 28 of its positive half and position 30 of its negative half. This is why a ninth row is normally needed. Here the last RB row
selects exact two's complement multiples instead: 0, +a, +2a, -a, -2a.
It takes them from a copy of -a that is computed once, in parallel with the Booth
encoding. Those rows need no +1 bit. The cost is one (N+1)-bit negation. It is the
only carry chain ahead of the tree, and it runs while the multiplier is being encoded.

Bit map of RB row k (`o = 4k`, `p = o + RW - 1`; bits at or above 64 are
dropped):

| vector | bits | contents |
|---|---|---|
| X+ | `[o +: RW-1]` | low bits of q(2k) |
| X+ | `[p +: 3]` | `{~s, s, s}`, s = sign of q(2k) |
| X+ | `[o-4]` (k >= 1) | neg(2k-2) |
| X- | `[o+2 +: RW-1]` | low bits of q'(2k+1) (negated digit) |
| X- | `[p+2]` | `~s'`, s' = sign of q'(2k+1) |
| X- | `[o-2]` (k >= 1) | neg'(2k-1) |

## The RBA cell (`rba`)

At each position the two input digits sum to z in [-2, 2]. The cell writes
`z = 2c + w` and passes the transfer c up one position, so that `s = w + c(from below)`.
For z = ±2 the split is forced. For z = ±1 it depends on the position below:

* If both digits below are non-negative, c(from below) can only be 0 or +1. The cell
  chooses w in {-1, 0}: z = +1 gives (c, w) = (1, -1), and z = -1 gives (0, -1).
* Otherwise c(from below) is 0 or -1. The cell chooses w in {0, +1}: z = +1 gives
  (0, 1), and z = -1 gives (-1, 1).

So s always stays in {-1, 0, +1}, and the sum has no carry chain at all.

## The RB-to-binary converter (`ling_adder`)

`X+ - X- = X+ + ~X- + 1`, which is a W-bit addition with carry-in 1. The adder
computes Ling pseudo-carries `H(i) = g(i) + c(i-1)` rather than carries,
with `g = a & b` and `t = a | b`. `H(i)` is the ordinary prefix generate
over the pairs `(g(i), t(i-1))`, that is, with every propagate taken from the
position below. The carry-in is an extra node at position -1. The prefix network is
Kogge-Stone, with ceil(log2(W+1)) levels (7 at W = 64). A real carry is
`c(i) = t(i)·H(i)`, and it is used only in the sum multiplexer
`s(i) = H(i-1) ? x(i) ^ t(i-1) : x(i)`. The module is a general adder
(`sum = a + b + cin`, `cout`). The testbench also runs it at 128 bits.

## Interface

`mbe_multiplier #(N = 32)`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N | multiplicand, two's complement |
| `b` | in | N | multiplier (the Booth-encoded operand), two's complement |
| `p` | out | 2N | product `a * b`, two's complement |

N must be a multiple of 8 with N/4 a power of two (8, 16, 32, 64, ...).
At N = 64 the tree has 16 rows and 4 levels.
`mbe_pkg` holds the Booth digit type `booth_t` (`neg`, `two`, `one`).
That type is shared by the encoder, the decoder and the generator.

## How far it follows the original design, and where it departs

These parts follow the published design:

* the 32 x 32 size;
* radix-4 MBE with Booth encoder and decoder;
* NB row pairs turned into RB rows by negating one row of each pair;
* inverted sign bits in place of sign extension;
* N/4 RB rows with no ECW;
* (1,1) -> (0,0) before the tree;
* a pairwise RBA summing tree;
* a parallel-prefix Ling adder doing the RB-to-NB conversion.

These are this design's own choices:

* **Signed operands.** Whether the operands are signed is not stated.
  N/2 radix-4 digits are exact for two's complement. Unsigned operands would
  need one more digit.
* **How the ECW is removed.** Only the result is stated: N/4 rows. The placement of the
  neg bits in the next row and the exact last row built from a precomputed -a are this
  design's construction.
* **The RBA cell, the RB digit code (p, n) and the Kogge-Stone topology.**
  These are standard choices. The source names the cells but does not specify them.
* **No registers.** No clocking or pipelining is specified.
* **Tree depth.** The source claims the accumulation drops from 5 to 4
  stages for the 32-bit multiplier. It also says the RB rows drop from N/4 + 1 to N/4.
  For N = 32 that is 9 to 8 rows, and so 4 to 3 RBA levels. 5 to 4 is the
  N = 64 figure. This RTL follows the row count: 3 levels at N = 32, 4 at N = 64.
* **Adder width.** The Ling adder is described as 128-bit. One 64-digit RB number
  is 128 input bits, but its conversion needs only a 64-bit adder, and that is
  what the multiplier instantiates.

No area, delay or power figures are given here. The RTL was checked for function only.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. Each one also has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_mbe_multiplier` | 32 x 32 at default parameters: 100 corner pairs and 202,000 random pairs against a 64-bit signed product. It also counts each datapath mechanism: each Booth digit value, the negative-zero digit, neg bits moved to the next row, the last row's exact negative multiples, (1,1) cancellations and a long carry in the converter. A mechanism never seen is a failure. |
| `tb_mbe_multiplier_sizes` | N = 8 exhaustively, N = 16 and N = 64 with random pairs |
| `tb_booth_encoder` | each digit against its triplet; the digit sum reproduces b |
| `tb_booth_decoder` | `q + neg = d·a` for every digit code |
| `tb_rb_ppg` | the 8 RB rows sum to a·b modulo 2^64; no row reaches below its span |
| `tb_rb_cancel` | the value is kept, no (1,1) remains, other digits are untouched |
| `tb_rba` | random 64-digit sums; random base-3 digit patterns at 8 digits; outputs canonical |
| `tb_rb_tree` | 8-row and 2-row trees against the sum of the rows |
| `tb_ling_adder` | 64 and 128 bits random, plus carry-rippling pairs; 5 bits exhaustively |

Running one testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mbe_pkg.sv \
    tb/tb_mbe_multiplier.sv --top-module tb_mbe_multiplier -o sim
./obj_dir/sim
```

Each of them finishes within seconds. To lint the RTL:
`verilator --lint-only -Wall -Irtl rtl/mbe_pkg.sv rtl/mbe_multiplier.sv`.
The remaining lint warnings are all `UNUSEDSIGNAL`, and they are intended. The RBA drops
its top transfer, the prefix network does not use its last-level propagates, and the
row assembly in `rb_ppg` is cut to 64 bits.

## Files

| file | contents |
|---|---|
| `rtl/mbe_pkg.sv` | `booth_t` digit type, `booth_value()` |
| `rtl/mbe_multiplier.sv` | top level |
| `rtl/booth_encoder.sv` | radix-4 MBE of the multiplier |
| `rtl/booth_decoder.sv` | one Booth row, `q + neg` form |
| `rtl/rb_ppg.sv` | RB partial-product generator, no ECW |
| `rtl/rb_cancel.sv` | (1,1) -> (0,0) |
| `rtl/rba.sv` | redundant-binary adder |
| `rtl/rb_tree.sv` | RBA summing tree |
| `rtl/ling_adder.sv` | parallel-prefix Ling adder / RB-to-binary converter |
