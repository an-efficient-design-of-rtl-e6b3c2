# Parallel radix-10 multiplier with sign-magnitude signed-digit partial products

This is a fully combinational BCD multiplier. `dec_16_multi` computes the
32-digit product of two 16-digit decimal numbers in one pass of logic.
`dec_128` builds a 32 × 32 digit multiplier from four of them.

A decimal multiplier spends most of its area in two places:

- **partial product generation**: making `y_i × X` for every multiplier digit;
- **partial product reduction**: adding all those rows.

This design attacks both:

1. The multiplier digits are recoded into signed digits in [-5, 5]. Only the
   multiples 1X … 5X are then needed. A negative digit selects a positive
   multiple and negates it.
2. The multiples are kept in **sign-magnitude signed-digit (SMSD)** form, with
   digits in [-6, 6]. Each digit is a sign bit plus a 3-bit magnitude.
   Negating a multiple then costs one XOR per digit, on the sign bit. With
   BCD or two's-complement multiples it would cost one XOR per bit: roughly
   four times as many gates.
3. Recoding produces 17 partial products for 16-digit operands, because the
   top recoded digit can be 1. The 17th row is folded into spare positions of
   the first row. The reduction tree therefore starts with exactly 16 rows,
   which halve cleanly: 16 → 8 → 4 → 2.
4. All reduction is carry-free. The first level adds SMSD digits and produces
   **two's-complement signed digits (TCSD)** in [-7, 7]. The later levels add
   TCSD digits. Only the last adder propagates a carry: it adds the final two
   TCSD rows and delivers BCD.

## Digit formats

| format | range | bits | value |
|---|---|---|---|
| BCD | 0..9 | 4 | plain binary |
| SMSD (`smsd_t`) | -6..6 | `{s, m[2:0]}` | `s ? -m : m`; a "negative zero" is legal and equals 0 |
| TCSD (`tcsd_t`) | -7..7 | 4 | two's complement, bit 3 weighs -8 |
| signed carry (`sd_carry_t`) | -1..1 | `{pos, neg}` | `pos + neg - 1` |

The signed carry is a *posibit* plus a *negabit*. A posibit's value equals
its logic level. A negabit with logic level `x` is worth `x - 1`. Zero
therefore has two codes, `{0,1}` and `{1,0}`. All four types and the helper
functions are in `rtl/dec_mult_pkg.sv`.

## Data path of `dec_16_multi`

```
 b (Y, 16 BCD) ──> sd_recoder ──> 16 × (sign, one-hot 1..5) + top digit (Y15>4)
 a (X, 16 BCD) ──> smsd_multiples_gen ──> 1X..5X, 17 SMSD digits each
                  16 × onehot_mux5 (select + sign XOR) ──> 16 rows of 17 digits
                  depth_reduction (X0, X1, X15, Y0', Y15>4) ──> S, S'
                  matrix 16 rows × 32 positions
                  ppr_tree: level I   8 × SMSD+SMSD→TCSD row adders
                            level II  4 × TCSD row adders
                            level III 2 × TCSD row adders  ──> 2 TCSD rows
                  sd_to_bcd_converter ──> p (32 BCD digits)
```

### Multiplier recoding (`sd_recoder`)

Each digit `y_i ≥ 5` passes a transfer `c_i = 1` upward and keeps
`y_i - 10`. Signed digit `i` is `(y_i - 10 c_i) + c_(i-1)`, which lies in
[-5, 5]. Digit 16 is `c_15`, i.e. 1 exactly when `Y15 > 4`.

Digits 0..15 are delivered as a sign and five one-hot magnitude lines. A zero
digit has all five lines low. The top digit is a single line.

### Multiples in SMSD (`smsd_multiples_gen`)

For `k = 1..5`, every product `k·x_i` (0..45) is split into a transfer and a
residue:

```
t_i = floor((k·x_i + 6) / 10)      r_i = k·x_i − 10·t_i ∈ [−6, 3]
digit_i = r_i + t_(i−1)            digit_16 = t_15
```

Each digit depends only on `x_i` and `x_(i-1)`, so no carry ripples. The
digits stay within [-6, 6] for every k:

- For k = 1 and 3, `t ≤ 1` and `t ≤ 3` respectively.
- Even multiples have even residues, at most 2, and `t ≤ 4`.
- For 5X the residue is 0 or -5 and `t ≤ 5`.

The SMSD range [-6, 6] is part of the original design. This particular split
rule is this implementation's own.

### Selection (`onehot_mux5`)

Each output digit is an AND-OR of the five multiples' digits under the one-hot
lines. Its sign bit is then XORed with the multiplier digit's sign. There is
one instance per partial product.

### Folding the 17th partial product (`depth_reduction`)

This part is the least obvious, so here is the matrix first. Row `r` holds
`Y_r' · X` at weights `10^r … 10^(r+16)`. When `Y15 > 4`, a 17th row `X·10^16`
also appears. It would be the only row at position 16 that makes the matrix
17 deep. Its digits at positions 17 and up fall where row 0 is empty.

The block merges the two digits that meet at position 16:

- the top digit `H` of `Y0'·X`, which is the transfer of `|Y0'|·X15`, signed
  by `Y0'`;
- the digit `X0`.

The merge works as follows, with `g = (Y15 > 4)`:

```
v  = H + g·X0                  ∈ [−5, 14]
c  = (v ≥ 7)
S  = v − 10c                   ∈ [−5, 6]    placed at 10^16 in row 0
S' = rec(g·X1) + c             ∈ [−6, 4]    placed at 10^17 in row 0
rec(x) = x − 10·(x ≥ 4)                     (the 1X residue)
```

Row 0 then continues with digits 2..15 of the 1X multiple, each ANDed with
`g`, at `10^18 … 10^31`. The transfer out of `X1` is already part of 1X
digit 2. `S'` is built the way the original block diagram draws it: a recoder,
a "+1", and a 2:1 mux steered by `c`. The rule for `c` and `S` is this
implementation's own.

### Reduction tree (`ppr_tree`, `smsd_adder_4in1`, `tcsd_adder`)

Every reduction step is a row of digit slices. Each slice passes its signed
carry to the next one. The carry-out is chosen from the two operand digits
alone:

```
Cout = +1 if A+B ≥ 7,  −1 if A+B ≤ −7,  else 0
S    = A + B − 10·Cout + Cin
```

So the interim digit lies in [-6, 6], and adding `Cin` keeps `S` within
[-7, 7]. No carry moves further than one position.

`smsd_adder_4in1` works in two stages, following the original design:

- **Stage I** applies the signs. A negative sign inverts the three magnitude
  bits, which then count as negabits. An inverted bit `~m_j` at weight `2^j`
  is worth `-m_j·2^j`. So `P + Q = pb + qb − 7·(sp + sq)`, where `pb` and `qb`
  are the XORed magnitudes. Stage I also picks the transfer.
- **Stage II** is one 4-bit addition of the interim digit and `Cin`. It is the
  same for all four sign combinations.

The gate-level split into full adders is not reproduced. The remaining logic
is written at word level.

Rows are paired in order and kept at the full 32-digit width. The tree is
indexed like a binary heap: node `j` is the sum of nodes `2j` and `2j+1`, and
nodes 2 and 3 are the outputs.

### Final adder (`sd_to_bcd_converter`)

A row of `tcsd_adder` slices adds the two remaining rows carry-free, giving
one signed-digit row in [-7, 7]. A borrow chain then produces BCD:

- a digit that is negative after its incoming borrow generates a borrow;
- a zero digit passes an incoming borrow on.

The chain is written as a ripple. A parallel-prefix borrow network would give
the same function with less delay.

### Modulo arithmetic

The whole tree works modulo `10^32`. Carries out of position 31 and the 1X
digit at `10^32` are dropped. This is exact because the product of two
16-digit numbers is below `10^32`.

## The 32-digit extension (`dec_128`, `bcd_adder`)

Split each operand into 16-digit halves: `A = Ah·10^16 + Al` and likewise B.
Four `dec_16_multi` instances produce `Al·Bl`, `Al·Bh`, `Ah·Bl` and `Ah·Bh`.
Three BCD ripple adders then combine them:

1. `M = Al·Bh + Ah·Bl`, 32 digits plus a carry.
2. `M` is added to the window at `10^16 … 10^47`. That window holds the upper
   half of `Al·Bl` next to the lower half of `Ah·Bh`; the two do not overlap,
   so they are concatenated.
3. The carry of `M` and the carry of step 2 are added into the upper half of
   `Ah·Bh`.

Four multipliers and three adders match the original extended design. Which
halves feed which instance, and how the adders chain, are this
implementation's choices.

## Interfaces and timing

| module | ports | notes |
|---|---|---|
| `dec_16_multi #(N=16)` | `a[4N-1:0]` = X, `b[4N-1:0]` = Y, `p[8N-1:0]` | digit `i` in bits `4i+3:4i` |
| `dec_128` | `a[127:0]`, `b[127:0]`, `c[255:0]` | 32-digit operands, 64-digit product |

Neither module has a clock or registers. The product is valid one
combinational delay after the operands change. Operands must be valid BCD;
other codes give undefined results.

`N` must be a power of two, at least 4. `ppr_tree` checks this at
elaboration.

## Where this implementation departs from the original design

- **Digit placement in the tree.** The original places digits irregularly
  (trimmed rows) and converts the eight lowest product digits to BCD early.
  Only positions 8..22 go through the merged final adder, and 32 product bits
  bypass the converter. Here every level is a full-width row, and all 32
  digits pass through one converter. The function is the same; area and delay
  are not.
- **Rules the original does not give.** The following are this
  implementation's own:
  - the recoding rules of the multiplier and the multiples;
  - the transfer thresholds of the digit slices;
  - the bit-level insides of the 4-in-1 adder, the improved TCSD adder and the
    hybrid final adder.
- **`depth_reduction`.** It computes `S` arithmetically. The original uses a
  decoded selection network.
- **`H`.** Here `H` is the top digit of the multiple that was actually
  selected. In the original it is described as `X15·Y0'/10`.
- **`dec_128` structure.** The extended design is also described as one
  reduction array whose height is cut from 33 to 32 rows. Its printed block
  structure, however, is four 16-digit multipliers and three adders, and that
  structure is what is built. Each sub-multiplier does its own one-row depth
  reduction.
- **`dec_128` adders.** These are decimal adders. The original extended design
  may have used binary adder cells there.
- **Pipelining.** There is none. The original is also a single combinational
  path (pad to pad).

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` at the end. Expected results come from plain
binary integer arithmetic (`tb/tb_bcd_pkg.sv`), not from the design's digit
codes. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb --top-module tb_dec_128 \
    rtl/dec_mult_pkg.sv tb/tb_bcd_pkg.sv tb/tb_dec_128.sv
./obj_dir/Vtb_dec_128
```

| testbench | what it covers |
|---|---|
| `tb_dec_128` | 1004 full-size 32 × 32 digit products, corner cases and random operands. It also counts negative recoded digits, the folded 17th row, depth-reduction transfers, ±1 carries in level I, converter borrows and the carries between the three adders; a mechanism that never occurs counts as a failure. |
| `tb_dec_16_multi` | 2006 products at the default N = 16, with the same coverage counters |
| `tb_smsd_adder_4in1`, `tb_tcsd_adder` | exhaustive over all operand digits and carry-in codes; also checks that the carry-out does not depend on the carry-in |
| `tb_depth_reduction` | exhaustive over X0, X1, X15, Y0' and Y15 > 4 |
| `tb_ppr_tree` | random SMSD matrices, checking the sum modulo 10^32 and the TCSD range |
| `tb_sd_to_bcd_converter`, `tb_bcd_adder`, `tb_sd_recoder`, `tb_smsd_multiples_gen`, `tb_onehot_mux5` | value-level checks of each block |

All testbenches pass, and each runs in well under a second.

Delay, area and power were not measured. The original design's figures come
from an FPGA flow and are not reproduced here.
