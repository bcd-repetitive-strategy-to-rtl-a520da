// Partial product selector for one recoded multiplier digit.
//
// The one-hot magnitude of the signed digit picks one of the XS-3 multiples
// 1X..5X with an AND-OR; a zero digit picks 0X (every digit the XS-3 code of
// 0). For a negative digit all bits of the selected multiple are inverted:
// in XS-3 the bit complement of a digit is the XS-3 code of its nine's
// complement, so the result is the nine's complement of the multiple and the
// missing +1 of the ten's complement is signalled on neg and added later in
// the reduction tree. Inversion as the negation method follows the
// multiplier this RTL implements; the AND-OR selector is this design's
// choice.
//
// Interface: mult[m][i] digit i of mX (XS-3); yb the signed digit;
// pp the selected, possibly inverted, D+1 XS-3 digits. Combinational.
module pp_select
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [5:0][D:0] mult,
  input  sd_digit_t         yb,
  output digit_t [D:0]      pp,
  output logic              neg
);

  logic is_zero;
  assign is_zero = (yb.mag == '0);
  assign neg     = yb.neg & ~is_zero;

  always_comb begin
    for (int i = 0; i <= D; i++) begin
      digit_t sel;
      sel = is_zero ? mult[0][i] : '0;
      for (int k = 0; k < 5; k++) sel |= {4{yb.mag[k]}} & mult[k+1][i];
      pp[i] = sel ^ {4{neg}};
    end
  end

endmodule
