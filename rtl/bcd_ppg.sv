// Stage 1 of the BCD multiplier: decimal partial product generation.
//
// The multiplier Y is recoded into D+1 signed digits in [-5,5]
// (sd_recoder); the multiples 0X..5X of the multiplicand are formed once,
// carry-free, in XS-3 (xs3_multiples); one pp_select per recoded digit picks
// and, for a negative digit, inverts the multiple. The result is D+1
// partial products of D+1 XS-3 digits each, PP[i] having weight 10^i, plus
// their sign flags. This arrangement follows the multiplier this RTL
// implements.
//
// Interface: x, y are D BCD digits; pp[i][j] is digit j of PP[i];
// neg[i] says PP[i] is a nine's complement still lacking its +1.
// Combinational.
module bcd_ppg
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [D-1:0]      x,
  input  digit_t [D-1:0]      y,
  output digit_t [D:0][D:0]   pp,
  output logic   [D:0]        neg
);

  sd_digit_t [D:0]     yb;
  digit_t [5:0][D:0]   mult;

  sd_recoder #(.D(D)) u_rec (.y(y), .yb(yb));
  xs3_multiples #(.D(D)) u_mul (.x(x), .mult(mult));

  for (genvar i = 0; i <= D; i++) begin : g_pp
    pp_select #(.D(D)) u_sel (.mult(mult), .yb(yb[i]), .pp(pp[i]), .neg(neg[i]));
  end

endmodule
