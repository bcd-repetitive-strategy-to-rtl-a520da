// D x D digit parallel BCD multiplier, P = X * Y with 2D BCD digits.
//
// Three combinational stages:
//   1. bcd_ppg: the multiplier is recoded to D+1 signed digits in [-5,5];
//      the multiples 0X..5X are built carry-free in excess-3 (XS-3), and
//      each partial product is a selected multiple, bit-inverted when the
//      digit is negative (nine's complement in XS-3).
//   2. bcd_ppr: the XS-3 codes are read as ODDS digits (0..15), one constant
//      row undoes the excess and the sign offsets, a binary carry-save tree
//      reduces the D+2 rows while counting the carries between decimal
//      columns, and a per-column correction of +6 per carry yields two words
//      A (excess-6 BCD) and B (BCD).
//   3. bcd_qt_adder: a 2D-digit prefix/carry-select BCD adder forms A + B.
// This three-stage structure, the codes and the correction scheme follow
// the multiplier this RTL implements; unsigned operands and the absence of
// pipeline registers are this design's choices.
//
// Interface: x, y are D BCD digits (digit i at [i]); p is 2D BCD digits.
// Inputs must be valid BCD. Combinational: the product is valid in the same
// cycle as the operands. The final adder's carry out is unused: the product
// of two D-digit numbers always fits in 2D digits.
module bcd_multiplier
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [D-1:0]   x,
  input  digit_t [D-1:0]   y,
  output digit_t [2*D-1:0] p
);

  digit_t [D:0][D:0] pp;
  logic   [D:0]      neg;
  digit_t [2*D-1:0]  a_xs6, b;

  bcd_ppg #(.D(D)) u_ppg (.x(x), .y(y), .pp(pp), .neg(neg));
  bcd_ppr #(.D(D)) u_ppr (.pp(pp), .neg(neg), .a_xs6(a_xs6), .b(b));
  bcd_qt_adder #(.W(2*D)) u_add (.a_xs6(a_xs6), .b(b), .cin(1'b0), .sum(p), .cout());

endmodule
