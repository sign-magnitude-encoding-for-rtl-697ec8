# Parallel 16 x 16-digit decimal multiplier with sign-magnitude partial products

This is a combinational radix-10 multiplier. It multiplies two 16-digit BCD
numbers and returns the 32-digit BCD product. It follows the architecture
published as *"Sign-Magnitude Encoding for Efficient VLSI Realization of
Decimal Multiplication"*. The RTL here is an independent implementation of
that architecture, not the authors' code.

The main idea concerns how negative partial products are formed. The
multiplier digits are recoded to the range [-5,5], so only the multiples
0X..5X are needed, and negative ones are made on the fly. Here every
multiple is kept as **sign-magnitude signed digits (SMSD)** in [-6,6], so
negating a multiple flips one sign bit per digit. A two's complement digit
would need one XOR per bit, so this saves about 75% of the negation XORs.
The cost moves into the first adder level, which must add two sign-magnitude
digits. That is the **4-in-1 adder**: one carry-free slice that handles all
four sign combinations with a single 4-bit adder.

Three more ideas shape the datapath:

* **16 rows, not 17.** The recoding of the top multiplier digit can carry
  out, which creates a 17th partial product. Its two digits in the deepest
  column are merged off the critical path. The rest of that row fits into
  row 0, so a regular 16 -> 8 -> 4 -> 2 reduction tree results.
* **Carry-free reduction.** Reduction uses two's complement signed digits
  (TCSD) in [-7,7]. Every adder is carry-free: a carry moves one position
  only, whatever the word length.
* **No final redundant level.** The last two rows are added straight into
  BCD by a borrow-prefix network. The low digits are converted early, while
  the tree is still running.

## Digit encodings

| name | range | bits | value |
|---|---|---|---|
| BCD | [0,9] | 4 | plain binary |
| recoded multiplier digit (`yrec_t`) | [-5,5] | sign + one-hot magnitude `oh[5:1]` | (-1)^s * k where `oh[k]` is set; all zero means 0 |
| SMSD (`smsd_t`) | [-6,6] | sign `s` + magnitude `m[2:0]` | (-1)^s * m; s=1, m=0 is a legal "-0" |
| TCSD (`tcsd_t`) | [-7,7] | 4 | two's complement (1000 never occurs) |
| signed carry (`scar_t`) | {-1,0,1} | posibit `pos` + negabit `neg` | pos + (neg - 1); zero is {0,1} |

A *posibit* is an ordinary bit worth its logical state x. A *negabit* with
state x is worth x - 1. Both adder slices work on mixes of the two. An
ordinary full adder stays valid on such mixes. Only the meaning of its
outputs changes with the number of negabits it receives.

## Datapath

```
 Y (BCD) --> y_recoder --> 16 digits in [-5,5] + carry c (Y15 >= 5)
 X (BCD) --> x_multiples --> 1X..5X, 17 SMSD digits each
                 |
   16 x pp_select (5:1 one-hot mux, sign XOR)   depth_reduce (X15, Y0, X0, X1, c)
                 |                                   |
         row r = Y'_r * X * 10^r  + row 0 holds S, S' and c*X*10^16 above them
                 |
        ppr_tree: 16 SMSD rows -> (4-in-1) 8 -> (TCSD) 4 -> (TCSD) 2
                 |
        final_converter -> 32-digit BCD product
```

| module | role |
|---|---|
| `dm_pkg` | digit types, and the shared 4-bit posibit/negabit adder `sd_sum4` |
| `y_recoder` | Y_i -> Y_i + [Y_{i-1} >= 5] - 10[Y_i >= 5], as sign and one-hot magnitude |
| `x_multiples` | carry-free 1X..5X in [-6,6] SMSD, 17 digits each |
| `pp_select` | one partial product row: AND-OR selection and one XOR per digit |
| `depth_reduce` | merges the two digits of the 10^16 column |
| `smsd_add_digit` | 4-in-1 SMSD + SMSD -> TCSD slice |
| `tcsd_add_digit` | TCSD + TCSD -> TCSD slice |
| `smsd_row_adder`, `tcsd_row_adder` | one row of slices; they skip columns where only one operand exists |
| `ppr_tree` | the three reduction levels |
| `tcsd_to_bcd_low` | ripple conversion of product digits 0..7 |
| `tcsd2bcd_digit` | TCSD + TCSD -> (pi, gamma, T, T-1) slice of the final adder |
| `ks_borrow_prefix` | 4-level Kogge-Stone borrow network, positions 8..22 |
| `compound_borrow_prefix` | 3-level prefix giving borrows for both values of b_23 |
| `final_converter` | three-part final adder |
| `dec_mult16` | top level |

### Recoding and multiples

A multiplier digit Y_i >= 5 becomes Y_i - 10 and passes +1 to the next
digit. The top digit's transfer is the carry `c`, the weight of an extra row
c * X * 10^16.

Each multiple is formed digit by digit from two BCD digits. Write
k * X_i = 10 H_i + L_i. When L_i >= 4 the pair is recoded to L_i - 10 and
H_i + 1. Digit i of the multiple is then L'_i + H'_{i-1}, which always lies
in [-6,6]. So 3X is as cheap as 2X and 4X.

In the RTL these per-digit functions are tables built at elaboration
(`LOW_TAB`, `HIGH_TAB`). The published design gives them as two-level logic
equations. A synthesis tool reduces both forms to the same 8-input
functions.

The top digit H'_15 of 5X can be 5, because 5 * 99..9 needs it when the
lower digits are limited to [-6,6]. The selected top digit of row 0 still
lies in [-5,4]: the lowest recoded digit has no transfer from below, so it
can be -5 but never +5.

### Merging the deepest column (`depth_reduce`)

Column 16 holds two digits:

* the top digit H of Y'_0 * X, which depends only on X_15 and Y_0;
* when c = 1, the lowest digit of the extra row c * X * 10^16.

H is produced as ten one-hot lines. The block keeps the extra row's lowest
digit in plain BCD (X_0) and adds it in parallel to each constant -5..4;
the one-hot H picks one sum S = X_0 + H. If that sum is 7 or more, the
block subtracts 10 and sets a local carry, so S lies in [-5,6]. The extra
row's next digit becomes S' = L'(X_1) + carry, where L'(X_1) is X_1, or X_1 - 10 when X_1 >= 4. S'
lies in [-6,4]. The remaining digits of the extra row are the ordinary 1X
digits 2..15 at positions 18..31.

Row 0 is empty above position 16, so the whole extra row fits into row 0
and the tree starts from 16 rows. The threshold 7 is this design's choice.

### The 4-in-1 adder (`smsd_add_digit`) — the part to read carefully

The slice adds P = (sp, p2 p1 p0) and Q = (sq, q2 q1 q0), both in [-6,6],
and a carry C_in in {-1,0,1}. It returns S in [-7,7] and C_out, with
P + Q + C_in = S + 10 C_out. C_out depends on P and Q only.

**Stage 1.** The signs are applied to the magnitude bits: a negative sign
turns the bits into negabits. The bits then split into two collections:

* U = ±(2p2 + p1) ± 2q2 = Z + 5 C_out. C_out is +1 when both signs are +
  and p2|q2 is set, -1 when both are - and p2|q2 is set, and 0 otherwise.
* V = ±p0 ± (2q1 + q0). This is re-encoded as V' with the same value.

Z and V' are each held in three bits. Which of those bits are negabits
depends on the sign case. Written as "value + offset = logical bits", the
encodings are:

| signs | Z range | Z bits | V' range | V' bits | negabit weight of 2Z + V' + C_in |
|---|---|---|---|---|---|
| ++ | [-3,1] | Z+3 | [0,4] | V+1 | 6 + 1 + 1 = 8 |
| +- | [-2,3] | Z+2 | [-3,1] | V+3 | 4 + 3 + 1 = 8 |
| -+ | [-3,2] | Z+3 | [-1,3] | V+1 | 6 + 1 + 1 = 8 |
| -- | [-1,3] | Z+1 | [-4,0] | V+5 | 2 + 5 + 1 = 8 |

The negabit weights add up to 8 in every case, so the plain binary sum of
the logical bits is always S + 8.

**Stage 2** is therefore one adder for all four cases (`dm_pkg::sd_sum4`):
three full adders and an OR in place of the top half adder (S + 8 <= 15).
Its weight-8 output is a negabit, so the two's complement sign bit is its
complement.

Both stage-1 collections are computed by fixed two-level equations of the
five or six input bits, not by case logic. The sign case only changes
which bits are negabits.

The TCSD slice (`tcsd_add_digit`) reuses stage 2. Its stage 1 uses
V' = p0 + q0 + 2q1 (held as V'+1) and U = (-4p3 + 2p2 + p1) + (-4q3 + 2q2)
in [-8,5], split as U = Z + 5 C_out with Z held as Z+3. The carry rules are:

* C_out = +1 when both digits are non-negative and p2|q2 is set;
* C_out = -1 when both are negative and p2 & q2 & p1 is not set;
* C_out = -1 when exactly one is negative and p2, q2 and p1 are all 0;
* C_out = 0 otherwise.

### Reduction tree (`ppr_tree`)

Level I adds rows (2k, 2k+1). Each later level adds adjacent results. A
row adder's columns below the first digit of its second operand have
nothing to add; they pass through and are final. This is why product
digits become available early:

* digit 0 after level I;
* digit 1 after level II;
* digits 2..3 after level III;
* digits 4..7, which are single in the last two rows.

All work is modulo 10^32, and carries out of position 31 are dropped. This
is exact because the product is below 10^32.

### Final addition (`final_converter`)

| positions | method |
|---|---|
| 0..7 | one digit each; the ripple recurrence W = D - b, P = W or W + 10, yields borrow b_8 |
| 8..22 | a `tcsd2bcd_digit` slice per column: 4U = 2Z + 10 C_out with Z in [-4,0], W = 2Z + V' + C_in in [-9,7]; gives gamma = (W < 0), pi = (W = 0), T = W mod 10 and T - 1. A 4-level Kogge-Stone network over b_8 and 15 (pi, gamma) pairs gives each borrow, which picks T or T - 1 |
| 23..31 | the same slices. A 3-level prefix network over positions 23..30 gives the borrows into 24..31 for b_23 = 0 (Gamma) and b_23 = 1 (Gamma or Pi). Two BCD results are formed and b_23 selects one |

## How this RTL relates to the published design

Taken as published:

* the recoding equations for the multiplier digits;
* all stage-1 equations of the 4-in-1 adder (C_out, Z and V');
* the z and V' equations of the TCSD adder. Its carry terms are the
  ones that agree with those z terms;
* the carry and V' terms of the final-adder slice;
* the structure of the deepest-column merge: a one-hot H, ten constant
  adders and a recoded X_1;
* the block structure, digit ranges, level count and part boundaries
  (0-7, 8-22, 23-31).

Written from the arithmetic the design defines, rather than as
two-level equations:

* the multiple tables;
* Z and W of the final-adder slice.

The exhaustive unit tests check these against the intended ranges and
identities.

This design's own choices:

* The row pairing is adjacent. As a consequence, the two final rows
  overlap on positions 8..31, and the top part uses two-operand slices
  throughout. The published layout has one digit per position from 26 up.
* Position 0 is converted from two's complement (it is converted at level
  I), not straight from sign-magnitude.
* The depth-reduction carry threshold is 7.
* The prefix networks are Kogge-Stone trees. The last level of the compound
  network uses a node of this design's own that forms both borrows:
  t = Pi_hi & Gamma_lo, b^0 = Gamma_hi | t and
  b^-1 = (Gamma_hi | Pi_hi & Pi_lo) | t. Pi is one gate ahead of Gamma,
  so b^-1 is ready no later than b^0, as the published node is meant to
  be. Its gates may differ from the published node's.
* The split points of `final_converter` are fixed for N = 16. The other
  modules take any N that is a power of two and at least 4.

The design has no clock. It is one combinational block, as published, with
no registers or pipeline.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* The adder slices and `depth_reduce` are tested exhaustively.
* `tb_dec_mult16` runs the full-size multiplier on directed corners and
  20,000 random operand pairs. Its reference is independent: BCD to
  binary, a 128-bit multiply, and back to BCD.
* It also counts each mechanism and fails if one never fires: the recoding
  carry (17th row), the depth-reduction carry, negative recoded digits,
  every multiple 1X..5X, the b_8 borrow, a borrow passing through a zero
  digit, and both b_23 selections.

To run with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/dm_pkg.sv tb/tb_dec_mult16.sv \
          --top-module tb_dec_mult16 -o sim && obj_dir/sim
```

Replace the testbench name to run any other test. The full-size test takes
under a second.

Not covered: gate-level timing, area and power. The published design is
compared at that level, and it needs a cell library. This RTL is written
for clarity of the digit arithmetic, not tuned for any technology.
