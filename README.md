# Fused add-multiply operator with direct sum-to-Booth recoding

This is a combinational operator that computes

    Z = X * (A + B)

for A, B (N bits) and X (M bits), all two's complement or all unsigned. The
straightforward way to build it is a carry-propagate adder for A + B, then a Modified Booth (MB)
multiplier that encodes the sum. That puts a full-width carry chain in front of
the multiplier. In this design the adder is gone. The bits of A and B are
recoded directly into the radix-4 Booth digits of their sum, and no carry
travels further than one digit pair. The only carry-propagate adder left is
the final adder of the multiplier.

The block structure follows a published fused add-multiply (FAM) design for DSP
MAC/MAD datapaths. The inside of the recoder, the correction row, the tree
shape and the adder organisation are this implementation's own. They are
marked as such below.

## Datapath

```
        A ──┐
        B ──┴─► smb_recoder ──► D MB digits y_j ∈ {-2..+2}
                                      │
        X ──────────────► booth_ppg × D  (row j = y_j·X, weight 4^j)
                                      │            │ neg_j
                                      │      correction_term (CT row)
                                      ▼            ▼
                              csa_tree  (D+1 rows → S, C)
                                      ▼
                              cla_adder (S + C)  ──► Z  (M+N+1 bits)
```

With the defaults N = M = 16 there are D = 9 digits. The tree therefore reduces
10 rows of 33 bits. It does this in 5 levels of 3:2 carry-save adders
(10 → 7 → 5 → 4 → 3 → 2 rows).

## Recoding the sum into Booth digits (`smb_recoder`)

This is the core of the design and the least obvious part.

Both addends are first sign-extended to W bits. W is N + 2, rounded up to an
even number. The W bits split into D = W/2 digit pairs. Within pair j, bit 2j
has weight 1 and bit 2j+1 has weight 2, relative to 4^j. Each pair uses three
small cells:

| position | cell | inputs | outputs |
|---|---|---|---|
| odd (2j+1) | half adder | a₂ⱼ₊₁, b₂ⱼ₊₁ | q_j (weight 2), carry c_{j+1} (weight 4, to the even position of pair j+1) |
| even (2j) | full adder | a₂ⱼ, b₂ⱼ, c_j | se_j (weight 1), k_j (weight 2) |
| odd (2j+1) | HA\* | q_j, k_j | so_j (weight **−2**), e_j (weight 4, straight into digit j+1) |

HA\* (`ha_star`) is a signed-bit half adder. It adds two positive bits into a
positive carry and a *negatively weighted* sum: p + q = 2c − s. This gives
the negative top bit that a Booth digit needs. The digit is then

    y_j = −2·so_j + se_j + e_{j−1}        (e_{−1} = 0)

This has the same shape as a conventional MB digit (−2·b₂ⱼ₊₁ + b₂ⱼ + b₂ⱼ₋₁),
so it always lies in {−2, …, +2}.

**Why it is exact.** Every cell preserves value. The D digits plus the two carries
that leave the top pair (weight 2^W) therefore equal the unsigned sum of the extended
operands. Modulo 2^W, the digit string equals A + B. Also, |A + B| ≤ 2^N ≤ 2^(W−2),
and D digits can express at most (2/3)·2^W in magnitude. The two values thus
differ by less than 2^W, so they are equal. The carries out of the top are
dropped.

**Why it is fast.** c_{j+1} depends only on the odd bits of pair j. e_j depends
only on pair j and c_j. No signal passes through more than two pairs, so the
recoder's depth does not depend on N.

**Encoding.** Digits travel as the struct `fam_pkg::mb_digit_t`,
`{neg, two, one}`:

| y | neg | two | one |
|---|---|---|---|
| +2 | 0 | 1 | 0 |
| +1 | 0 | 0 | 1 |
| 0 | 0 | 0 | 0 |
| −1 | 1 | 0 | 1 |
| −2 | 1 | 1 | 0 |

A negative zero is never produced: when so = se = e = 1 the digit is 0, and
`neg` is cleared.

**Unsigned addends.** With `SIGNED = 0` the addends are zero-extended. The two
top bits of both extended addends are then zero, so no carry leaves the top
pair and the digits are exact. In `fam_top` an unsigned X is given a zero sign
bit (M+1 bits) before Booth selection.

**Odd and even widths.** Any N ≥ 1 works. For even N the digit count equals that
of a conventional Booth encoder for the (N+1)-bit sum. For odd N it is one digit
more, which is the price of the simple extension rule.

## Partial products and the correction term

`booth_ppg` forms row j from X and y_j as follows:
1. It selects X or 2X (M+1 bits).
2. It inverts the row when the digit is negative (one's complement).
3. It inverts the row's sign bit.

The unsigned row value is then

    pp_j = y_j·X − neg_j + 2^M.

Because of the inverted sign bit, no row needs sign extension in the tree. Added
at weights 4^j, the rows exceed the true product by 2^M·Σ4^j − Σneg_j·4^j.
`correction_term` produces the single row that cancels this, modulo 2^P
(P = M + N + 1):

    CT = Σ_j neg_j·4^j − 2^M·Σ_j 4^j.

The constant has no bits below position M. The negation bits below M are
therefore only placed in the row. The few at or above M go through a small
constant addition.

## Reduction and final addition

`csa_tree` reduces its rows in levels. At each level, groups of three rows go
through a word-wide 3:2 carry-save adder (`csa32`), and one or two leftover rows
pass through unchanged. A level of r rows leaves 2·⌊r/3⌋ + r mod 3 rows. This
repeats until two rows (S and C) remain. All arithmetic is modulo 2^P, which is
exact because the product always fits in P bits.

`cla_adder` is a two-level carry-lookahead adder with 4-bit groups:
- Level one forms the generate and propagate signals of each bit and of each
  group.
- The carry into every group is a sum of products of all lower group signals
  and the carry-in. It does not ripple from group to group.
- Inside each group, each bit's carry is a sum of products of that group's bit
  signals.

## Parameters and timing

| module | parameter | default | meaning |
|---|---|---|---|
| `fam_top` | `N` | 16 | width of A and B |
| `fam_top` | `M` | 16 | width of X |
| `fam_top`, `smb_recoder` | `SIGNED` | 1 | 1: two's-complement operands, 0: unsigned |
| `cla_adder` | `GRP` | 4 | lookahead group size |

The source gives no operand widths, so 16 × 16 is a choice made for this
implementation. Z is M + N + 1 bits wide and always exact. The whole operator
is combinational: it has no clock, no registers and no handshake. Register the
inputs and output outside if a pipeline is wanted.

## How this relates to the source design

What follows the source:
- the operator Z = X·(A+B);
- the recoding of the sum directly into MB form, with no adder in front of the
  multiplier;
- the block chain: recoder, partial product generator with a CT block, CSA
  tree, CLA final adder;
- the use of a signed-bit half adder (HA\*) as a recoder building block;
- support for odd and even operand widths, and for signed and unsigned
  operands.

Where this implementation departs from the source or fills gaps:
- The source evaluates three recoder variants (called S-MB1, S-MB2 and S-MB3,
  each for even and odd widths) built from signed-bit adder cells HA\*, HA\*\*,
  FA\* and FA\*\*. It does not describe how these variants are wired.
  `smb_recoder` is a single recoder of this implementation's own design. The
  sign convention of HA\* is chosen to suit it. HA\*\*, FA\* and FA\*\* are not
  built.
- The source describes the operator as the core of a MAC unit and leaves the
  complete MAC (accumulator and feedback) for later. There is no accumulator
  here.
- The signed/unsigned choice is one parameter for all three operands. Mixed
  signedness is not provided.
- The source's results are transistor-level power figures. Nothing in this RTL
  models power, area or delay.

## Files and simulation

| file | content |
|---|---|
| `rtl/fam_pkg.sv` | `mb_digit_t`, width functions `smb_width`, `smb_digits` |
| `rtl/fam_top.sv` | top level |
| `rtl/smb_recoder.sv`, `rtl/ha_star.sv` | sum-to-MB recoder and its signed-bit cell |
| `rtl/booth_ppg.sv`, `rtl/correction_term.sv` | partial product row, CT row |
| `rtl/csa_tree.sv`, `rtl/csa32.sv` | carry-save tree and its 3:2 row |
| `rtl/cla_adder.sv` | final carry-lookahead adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Every testbench compares results with integer arithmetic done in the testbench
itself. Each one ends by printing `TB_RESULT checks=N failures=F`, and each has
a cycle watchdog. Coverage:
- `tb_smb_recoder` checks every pair of addends at N = 6 (signed and
  unsigned) and N = 5, and corner and random addends at N = 16.
- `tb_fam_full` runs only the default 16 × 16 operator, with no parameter
  override, on the same corner and random operands as `tb_fam_top`.
- `tb_fam_top` runs the default 16 × 16 operator on all 343 corner-value
  combinations plus random operands. It also checks a 5-bit-addend,
  4-bit-multiplicand instance on every input combination, in both signed and
  unsigned form. A 16-bit unsigned instance gets the same random operands.
  It counts that every digit value −2…+2, sums wider than N bits, and
  negative and zero products all occurred, as did unsigned operands with
  their top bits set.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fam_pkg.sv tb/tb_fam_top.sv --top-module tb_fam_top
./obj_dir/Vtb_fam_top
```

To change the widths, set `N` and `M` on `fam_top`. Every internal size (digit
count, row count, tree depth, adder width) follows from these two.
