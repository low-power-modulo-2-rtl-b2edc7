# Data-aware modulo 2^n+1 multiplier

Modulo 2^n+1 multipliers are the core of residue-number-system filters and of
the IDEA cipher. This design computes `P = A·B mod 2^n+1`. It uses
radix-4 Booth encoding, so an n-bit multiplier needs only n/2 partial products.
The adder tree that sums them is *data aware*. In front of every carry-save
stage, a small detector looks for upper bit groups that carry no information
(they only repeat the sign of the bits below) in all three operands. Those
groups are frozen in the stage's input register, so the adder bits behind them
do not switch. A restoration network then rebuilds the frozen groups of the
result from one bit. The product is always exact. Only the switching activity,
and with it the dynamic power, depends on the data.

The RTL follows the architecture of the article *Low Power Modulo 2^n + 1
Multiplier Using Data Aware Adder Tree*:

- Booth encoder and selector rows
- correction term
- inverted end-around carry-save adder (IECSA) tree with master latch, dynamic
  range detection, slave latch and bit restoration in every stage
- diminished-1 final adder

The article gives the structure but leaves out several details: how the encoder
ends are wired, the constant bookkeeping, and clocking. These were worked out
for this implementation and are marked below.

Default size: n = 8 (modulus 257), bit groups of 4. The multiplier is also
verified at n = 4, 16 and 32.

## Number formats

| signal | format | range |
|---|---|---|
| `a_dim`, `a_zero` | multiplicand A in **diminished-1** form: `a_dim = A-1` on n bits; `a_zero = 1` means A = 0 (then `a_dim` is ignored) | A in 0..2^n |
| `b` | multiplier B, ordinary **weighted** binary on n+1 bits; `b[n]` may be 1 only for B = 2^n | B in 0..2^n |
| `p` | product, weighted, n+1 bits | 0..2^n |

In diminished-1 arithmetic, an n-bit vector `d` stands for the residue `d+1`.
Two identities make it convenient:

- **Negation.** The one's complement `~d` stands for `-(d+1)`.
- **Scaling by 2^k.** The *inverted circular shift* `iCLS(d,k)` stands for
  `2^k·(d+1)`. It rotates `d` left by k places and complements the k bits that
  wrap around to the bottom. This works because 2^n = -1 mod 2^n+1.

These identities hold for every n-bit vector, including the all-zero and
all-one vectors. The correction term relies on that.

## Partial products: Booth digits made modular (`ppg`, `booth_encoder`, `booth_selector`)

Row i is the diminished-1 image of `D_i·4^i·A`, where D_i in {-2..+2} is
Booth digit i of B:

- The selectors pick A (`x1`) or 2A (`x2`). In diminished-1 form, 2A is
  `iCLS(a_dim,1)`.
- A negative digit complements the pick.
- The row is shifted by `iCLS(·, 2i)`.
- Cells at bit positions ≥ 2i are plain `BS+` cells. The 2i cells below hold
  wrapped bits, so they are `BS-` cells, which complement their output.

Ordinary Booth recoding of an unsigned n-bit number leaves a carry of
`b[n-1]·2^n` above the top digit. Modulo 2^n+1 that carry is worth
`-b[n-1]`, and it is folded into digit 0:

| encoder | triplet (b_hi, b_mid, b_lo) |
|---|---|
| 0 | (`b[1]^b[n-1]` \| `b[n]`, `b[0]`, `b[n-1]` \| `b[n]`) |
| 1 | (`b[3]`, `b[2]`, `b[1] & ~b[n-1]`) |
| i ≥ 2 | (`b[2i+1]`, `b[2i]`, `b[2i-1]`) |

Without the fix-up, the case `b[1] = b[n-1] = 1` would need the digit -3. The
XOR in encoder 0 and the AND in encoder 1 instead move a borrow of 4 into digit
1. `b[n]` (B = 2^n = -1) makes digit 0 equal to -1; all other digits are then
0. With these triplets, `Σ D_i·4^i = B (mod 2^n+1)`.

### Zero digits and the correction term (`ctg`)

A zero digit has no diminished-1 image. This design's encoder sets the `sign`
wire for every zero digit, so the row becomes `iCLS(all ones, 2i) = 2^n - 4^i`.
That row stands for `-4^i` where the bookkeeping expects zero. The correction
vector C puts a 1 in bit 2i for every zero digit (the XNOR of `x1` and `x2`),
which cancels it. A zero multiplicand (`a_zero`) forces every digit to zero,
and the same mechanism then produces P = 0. No special case is needed.

### Constant bookkeeping

Each row stands for its value minus 1, because that is what diminished-1 form
means. This gives, modulo 2^n+1:

- rows + C = A·B - n/2
- each IECSA stage adds +1 (its complemented end-around carry), and the tree
  has n/2 - 1 stages, so the sum/carry pair = A·B - 1
- the final adder adds the last +1, so P = A·B

This balance requires exactly n/2 - 1 three-input stages. See "Departures"
below.

## The data-aware IECSA stage (`da_iecsa`)

```
 x,y,z ─► master_latch ─► range_detect ─► slave_latch ─► csa_row ─► sign_ctrl/sign_gen ─► bit_restore ─► wrap ─► sum, carry
                              (hold)        (per-group     (full-adder            (top bit of highest       (held groups
                                             enable)        row)                   live group)               = that bit)
```

- **Full-adder row with inverted end-around carry.** The stage computes
  `s = x^y^z` and `c = maj(x,y,z)`. The top carry has weight 2^n = -1, so it
  re-enters bit 0 complemented: `carry = {c[n-2:0], ~c[n-1]}`. Then
  `sum + carry = x + y + z + 1 (mod 2^n+1)`.
- **Dynamic range detection.** The word is split into groups of `GW` bits. For
  each group g ≥ 1 and each operand, a comparator checks that the `GW+1` bits
  from the top of group g down to the top bit of group g-1 are all equal. For
  a 16-bit word these windows are bits [15:11], [11:7] and [7:3]. A group may
  be skipped only if its own window and every window above it pass for all
  three operands. The hold vector is therefore nested: `hold[g]` implies
  `hold[g+1]`.
- **Slave latch.** This register loads group 0 every time. It loads group
  g ≥ 1 only when `hold[g] = 0`. A held group keeps its old bits, so its full
  adders see no transition. The hold vector is registered alongside, so the
  restoration logic sees the controls that match the data.
- **Restoration.** The full-adder row has no carry between bit positions. So,
  if the inputs are constant over the bits from n-1 down to the top bit of the
  highest live group, both `s` and `c` are also constant over those bits. The
  sign control turns the hold vector into a one-hot select of the highest live
  group. The sign generator takes that group's top bit of `s`, and separately
  of `c`. The restoration multiplexers copy that bit into every held group.
  This happens before the end-around wrap, so the wrapped carry is correct
  too.

The stage's output is therefore bit-identical to a plain IECSA. The testbench
checks exactly that.

**How often it fires.** For random 8-bit residues the hold is rare, because
partial products of modular arithmetic look like random bits. Over all 257²
input pairs at n = 8, about 0.7 % of results had a held group in the first
tree level. The hold is much more frequent at n = 16 and n = 32 with groups of
4. It is also frequent for small operands and for many zero digits, for
example B = 0, whose rows are mostly ones. This design does not estimate
power.

## Tree and timing (`iecsa_tree`, `mod_mult_da`)

The tree takes its operands in threes, level by level. For n = 8 the
operands are PP0..PP3 and C:

1. (PP0, PP1, PP2)
2. (PP3, C, sum of stage 1)
3. (carry of stage 1, sum and carry of stage 2)

Operands that are not used at a level wait in a two-cycle delay. The master
latch and the slave latch are clocked registers on successive edges, so every
level takes 2 cycles. The final adder's result is registered.

- **Latency:** 2·L + 1 cycles, where L is the number of tree levels
  (`csa_levels(n/2+1)`). That is 7 cycles for n = 8, 9 for n = 16 and 13 for
  n = 32.
- **Throughput:** one operation per cycle. `in_valid` travels along as
  `out_valid`.
- **Reset:** `rst_n` is asynchronous and active low. It clears only the valid
  and hold flags; data registers are not reset.
- **`lv_skip[l]`:** an extra observation output. It is high while the result
  leaving tree level l had at least one held group.

## Final adder (`dm1_adder`)

The final adder computes `r = s + c + ~cout`, where `cout` is the carry out of
the n-bit sum. This equals `(s + c + 1) mod 2^n+1` as an (n+1)-bit weighted
number: the carry is dropped when `s + c ≥ 2^n`, otherwise 1 is added. The
article uses a fast parallel-prefix diminished-1 adder from earlier work. Here
the function is written with `+`, and synthesis chooses the carry structure.

## Modules

| module | role |
|---|---|
| `mdm_pkg` | `booth_t` (sign, x2, x1) and tree-shape functions |
| `mod_mult_da` | top level |
| `ppg` | Booth encoders and selector rows |
| `booth_encoder`, `booth_selector` | BE and BS+/BS- cells |
| `ctg` | correction vector |
| `iecsa_tree` | tree of data-aware stages |
| `da_iecsa` | one data-aware stage |
| `master_latch`, `range_detect`, `slave_latch`, `csa_row`, `sign_ctrl`, `sign_gen`, `bit_restore` | parts of the stage |
| `dm1_adder` | final adder |

Parameters of the top: `N` (even, ≥ 4, default 8) and `GW` (group width,
`N % GW == 0` with at least two groups, default 4).

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<n>`. For example, the full multiplier at
n = 8 walks all 257 × 257 operand pairs:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl rtl/mdm_pkg.sv \
    tb/tb_mod_mult_da.sv --top-module tb_mod_mult_da -o sim
./obj_dir/sim
```

`tb_mod_mult_da_sizes` (with the helper `tb/mm_harness.sv`) runs n = 4
(GW = 2, every operand pair), n = 16 and n = 32 with corner and random
operands. Both top-level
tests also count the mechanisms: zero multiplicand, B = 2^n, zero and negative
digits, the digit-0/1 fix-up, and held groups in each level. A run fails if any
of these never occurred.

## What was verified

- Exhaustive at n = 8: every A, B in 0..256, with product and latency checked
  (also with idle gaps).
- Exhaustive at n = 4 (all 17 × 17 pairs); random and corner operands at
  n = 16 and 32.
- Exhaustive partial-product generator at n = 8: every row is a valid Booth
  multiple, and rows plus correction give A·B.
- Exhaustive final adder at n = 8.
- Bit-exact comparison of the data-aware stage against a plain IECSA at 8 and
  16 bits, with every hold level exercised, plus the two-input example
  1111_1010 + 1111_0001 (sum 0000_1011, carry 1110_0000).

Timing, area and power are not characterised.

## Departures from the article and points of interpretation

- **Latches become registers.** The article's master and slave latches are
  level-sensitive. Here they are edge-triggered registers, with a per-group
  enable on the slave. The result is a 2-cycle stage and the latency given
  above. The article gives no clocking or latency.
- **Three stages, not four, for n = 8.** The article's n = 8 drawing has four
  IECSA blocks, one of which first combines only C and PP3. Every stage adds
  +1, so a fourth stage would leave the product off by one with the rest of
  the bookkeeping used here. The data flow is kept, but C and PP3 enter a
  three-input stage directly.
- **Control routing.** The article's figures disagree on which control goes to
  which group. One drawing routes control 1 to the top group and control 3 to
  the [7:4] group. Another builds control 3 from the lowest precontrols. The
  restoration drawing, however, clearly uses control 3 for bits [15:12]. This
  design gives each group the AND of its own precontrol and all precontrols
  above it, and uses that same control for its slave latch and its
  restoration multiplexer, which keeps the result exact for every hold
  pattern.
- **Comparator windows.** The windows overlap by one bit, as drawn in the
  article (bits [15:11], [11:7], [7:3] for 16 bits). The article's two-input
  example, 1111_1010 + 1111_0001, gives the sum 0000_1011 and carry 1110_0000
  quoted there, but under these windows its top group is not held, because
  1111_0001 needs five bits as a signed number.
- **Own choices.**
  - The sign convention for zero digits (sign = 1).
  - The exact wiring of `b[n]` into encoder 0.
  - The selector gate structure. The article takes the selector truth table
    from earlier work.
  - The combinational sign select (the article draws a latch per group top
    bit).
  - The `lv_skip` observation port.
- **Data-aware width.** The article draws the data-aware adder at 16 bits
  while calling it an 8-bit design. Here it is as wide as the multiplier, in
  groups of `GW` bits.
- **Not reproduced.** The article's area, delay and power figures come from a
  45 nm standard-cell flow. This RTL does not reproduce them.
