# Parallel BCD multiplier with XS-3 multiples and an ODDS carry-save tree

This RTL multiplies two D-digit BCD numbers in one combinational pass and
returns the 2D-digit BCD product. The main idea is to do nearly all of the
decimal work with **binary** carry-save hardware. The partial products are
put into a 4-bit code in which a binary adder tree is valid inside each digit.
The only decimal effect of binary addition is a carry that crosses a digit
boundary: it takes 16 out of a digit but is worth only 10. Such carries are
counted as they happen and repaid with +6 per carry at the end. The default
size is D = 16 digits, the significand of the Decimal64 format. D = 34 gives
the Decimal128 size.

Next to it, and unrelated to it, is a small 16-bit binary multiply-accumulate
unit: a radix-4 Booth multiplier feeding a 33-bit ripple-carry accumulator.

## Digit codes

Every digit is a 4-bit vector. Three readings of it are used:

| code  | digit value           | range used here | why                                            |
|-------|-----------------------|-----------------|------------------------------------------------|
| BCD   | the 4-bit value       | 0..9            | operands, product, the B word                  |
| XS-3  | the 4-bit value - 3   | 0..11           | multiplicand multiples; inverting the bits gives the nine's complement |
| ODDS  | the 4-bit value       | 0..15           | digits inside the carry-save tree              |

Inverting all four bits of an XS-3 digit z gives 15 - (z + 3) = (9 - z) + 3.
That is the XS-3 code of 9 - z. So a whole XS-3 number is nine's-complemented
by a row of inverters. This is how negative partial products are made.

## Stage 1: partial products (`bcd_ppg`)

**Recoding the multiplier (`sd_recoder`).** Each BCD digit Y_i is rewritten as
a signed digit in [-5, 5]. A digit of 5 or more keeps Y_i - 10 and sends +1 to
the next digit up:

    t_i  = (Y_i >= 5)
    Yb_i = Y_i - 10 * t_i + t_(i-1)
    Yb_D = t_(D-1)            (0 or 1)

A D-digit multiplier therefore gives D+1 partial products. Only the magnitudes
1..5 are ever needed. Each recoded digit is carried as a sign flag plus a
one-hot magnitude (`sd_digit_t` in `bcd_pkg`).

**Multiples (`xs3_multiples`).** 0X..5X are formed once for the whole
multiplier, with no carry propagation. For multiple m, each digit gives
m·X_i = 10·h_i + l_i. Digit i of mX is then l_i + h_(i-1). This sum is at
most 11, reached by 3X (9 + 2) and by 4X (8 + 3). It always fits XS-3, whose
codes reach 15. Each multiple has D+1 digits.

**Selection (`pp_select`).** The one-hot magnitude picks a multiple through
an AND-OR. A zero digit picks 0X, which is all XS-3 threes. A negative digit
inverts every bit of the pick. The result is the nine's complement, so the
ten's complement still lacks +1. The `neg` flag carries that +1 to stage 2.

## Stage 2: reduction with decimal correction (`bcd_ppr`)

This is the core of the design.

**Turning XS-3 into ODDS.** The reduction tree reads each partial product's
4-bit codes at face value, as ODDS digits. That adds 3 to every digit. The
extra amount, and the sign terms below, depend only on D. So they are removed
by adding **one constant row**. The rows of the tree (2D digits wide) are:

| row      | digit positions | content                                              |
|----------|-----------------|------------------------------------------------------|
| i (0..D) | i .. i+D        | the codes of PP[i]                                   |
|          | i-1             | `neg[i-1]`: the +1 of the previous, inverted row. The position is free in row i. |
|          | i+D+1           | 1 - `neg[i]`: the sign digit of row i                |
| D+1      | all             | K = -Σ_i ( 3·(D+1 ones)·10^i + 10^(D+1+i) ) mod 10^(2D) |

The sign digit works because a negative row contributes -10^(D+1+i) and a
positive row 0. This equals (1 - neg)·10^(D+1+i) - 10^(D+1+i), and the
constant part of that goes into K. Positions at or above 2D are dropped,
since the product fits in 2D digits. K is computed at elaboration by a
decimal function inside `bcd_ppr`; no table is stored. For D = 16 there are
18 rows.

**Binary carry-save tree (`odds_csa_tree`).** The rows are added as plain
binary words with 3:2 carry-save adders. Rows are consumed first-in
first-out, which gives a Wallace-like tree: 16 adders and 6 full-adder
levels for 18 rows. Within a digit the binary sum is exact. But a carry out
of bit 3 of digit j lands in digit j+1 with weight 1, which is worth 10 in
digit j, while it removed 16 from digit j. So every such carry loses 6. Each
adder reports these carries as `col_carry[k][j]`.

**Counting the carries (`carry_counter`).** The count is a population count
per column, formed alongside the tree. After the tree:

    X·Y  ≡  Σ_j ( S_j + C_j + 6·cnt_j ) · 10^j      (mod 10^(2D))

**Decimal compressor (`dec_compressor`).** Per column, T_j = S_j + C_j +
6·cnt_j (at most 30 + 96 for 18 rows). It is split into T_j = 10·h_j + l_j.
The tens are moved up one column, U_j = l_j + h_(j-1), and that sum is split
again. What comes out is:

- **A**: digits 0..9, delivered in excess-6 (A_j + 6);
- **B**: digits 0..2, in BCD.

A + B is the product modulo 10^(2D). The second split is needed because the
first one can leave tens up to 12. The result stays correct while
h_j <= 90, i.e. up to about 145 carries per column, far beyond any size
used here.

## Stage 3: final BCD adder (`bcd_qt_adder`)

Because A arrives in excess-6, [A_i] + B_i reaches 16 exactly when
A_i + B_i >= 10. The decimal carry is therefore the binary carry of a 4-bit
add:

- generate = bit 4 of [A_i] + B_i;
- propagate = ([A_i] + B_i == 15), i.e. A_i + B_i = 9.

A Kogge-Stone prefix tree over the 2D digit (generate, propagate) pairs gives
every digit carry in log2(2D) levels. Each digit also forms both [A_i] + B_i
and [A_i] + B_i + 1, and the carry selects one. The selected sum is turned
back into BCD: keep its low 4 bits if it carried out of the digit, otherwise
subtract 6. The cost is close to that of a 4·2D-bit binary prefix adder.

## Binary multiply-accumulate unit (`vmfu`)

- `booth_mult16`: signed 16×16 multiply. Radix-4 Booth recoding of b gives 8
  partial products of {-2a, -a, 0, a, 2a}. They are summed by a balanced
  tree of word adders.
- `rca33`: a 33-bit chain of full adders.
- `vmfu`: `load_x` loads the 16-bit operand register. With `mac_en`, each
  cycle adds operand register × `y_in` (sign-extended) to the accumulator,
  and the new value is visible after the clock edge. `clr` clears it, and
  `clr` wins over `mac_en`. The accumulator is two 16-bit registers plus a
  flip-flop for bit 32. It wraps on overflow. Reset is asynchronous and
  active low.

## Top level and interfaces

`bcd_mult_system #(D = 16)` puts `bcd_multiplier` and `vmfu` side by side.
They share no signals.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`, `y` | in | D × 4 | BCD operands, digit i at `[i]`, must be valid BCD |
| `p` | out | 2D × 4 | BCD product, same cycle (combinational) |
| `clk`, `rst_n` | in | 1 | MAC clock, asynchronous active-low reset |
| `load_x`, `x_in` | in | 1, 16 | load the MAC operand register |
| `mac_en`, `y_in` | in | 1, 16 | accumulate `x_reg * y_in` this cycle |
| `clr` | in | 1 | clear the accumulator |
| `acc` | out | 33 | accumulator (two's complement) |

`bcd_pkg` holds the digit type `digit_t`, the signed-digit struct
`sd_digit_t` and the XS-3 zero code.

## Where this RTL departs from the original architecture

The three-stage structure and the key mechanisms follow the published
architecture:

- signed-digit recoding into [-5, 5] with D+1 partial products;
- carry-free XS-3 multiples 0X..5X;
- negation by bit inversion;
- XS-3 read as ODDS through one added constant;
- a binary CSA tree whose inter-digit carries are counted for a +6
  correction;
- A in excess-6 and B in BCD;
- a prefix/carry-select final adder with conditional sums [A_i]+B_i and
  [A_i]+B_i+1.

These parts are this design's own:

- The multiples come from per-digit arithmetic, not from a hand-built
  gate network with about three XOR delays.
- The CSA tree order is first-in first-out.
- The carry count is a plain adder-based population count.
- The decimal 3:2 compressor is built as two mod-10 splits. The original
  gives only its function.
- The final adder uses a Kogge-Stone prefix tree rather than a quaternary
  tree. The logic function is the same; the delay is different.
- The signed-digit transfer rule, the placement of the +1 and sign digits,
  and the constant row are this design's choices.
- Operands are unsigned BCD, and there are no pipeline registers. The
  original gives no cycle latency.
- MAC unit: the control inputs, the reset, the use of the single 16-bit
  register as the operand register, and the extra flip-flop for accumulator
  bit 32 are choices.

Not built:

- The power-saving (spurious power suppression) adder. Its detection logic
  is not specified.
- An accumulator that keeps the previous cycle's sum and carry in
  carry-save form. The MAC unit uses the ripple-carry accumulator instead.

No area or delay figures were reproduced.

## Simulating

Every file has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/bcd_pkg.sv \
        tb/tb_bcd_mult_system.sv --top-module tb_bcd_mult_system -o sim
    ./obj_dir/sim

To run another bench, replace `tb_bcd_mult_system` with its name.

- `tb_bcd_mult_system` runs the whole design at its default size.
  - It checks 2100 products against a schoolbook decimal product, and a
    500-cycle MAC sequence against a model.
  - It counts how often each mechanism occurred and fails if one never did:
    negative partial products, the extra top partial product, XS-3 digits of
    10-11, column carries in the tree, long propagate runs in the final
    adder, accumulator wrap-around and clear.
- `tb_bcd_multiplier_dec128` checks the multiplier at D = 34.
- Each block bench checks its block's own invariant with values worked out
  independently. Examples: the value of the recoded digits, the decoded
  multiples, and the decimal value of the tree's (S, C, cnt).

## Trust and limits

- All benches pass. Each bench also fails on a deliberately broken copy of
  its block.
- Checking is by simulation with random and corner operands, not formal
  proof.
- Invalid BCD inputs (digit codes 10-15) are outside the specification.
  Their result is not meaningful.
- The 18-row tree is the only size simulated besides the Decimal128
  configuration (36 rows).
- To change the size, set `D` on `bcd_mult_system` or `bcd_multiplier`.
  Every internal width, the row count and the constant row follow from it.
