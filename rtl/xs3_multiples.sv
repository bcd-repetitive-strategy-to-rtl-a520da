// Multiplicand multiples 0X..5X in excess-3 (XS-3), computed without carry
// propagation.
//
// For a multiple m, each BCD digit X_i gives m*X_i = 10*h_i + l_i with
// l_i in 0..9 and h_i in 0..4. Digit i of mX is l_i + h_(i-1): at most
// 9 + 2 = 11 for 3X (carry 2, interim 9) and 8 + 3 = 11 for 4X, and at most 9
// for 2X and 5X. Digits up to 11 are held in XS-3 (value + 3 <= 14), so no
// second carry step is needed and every multiple is ready after one digit of
// logic. Each multiple has D+1 digits (the top one is h_(D-1)).
// The multiple set, the carry-free 3X with digits up to 11 and the XS-3 code
// follow the multiplier this RTL implements; the per-digit tables are this
// design's own realisation of that function.
//
// Interface: x is D BCD digits; mult[m][i] is digit i of mX in XS-3.
// Combinational.
module xs3_multiples
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [D-1:0]      x,
  output digit_t [5:0][D:0]   mult
);

  // Low (units) and high (tens) part of m*v for one BCD digit v.
  function automatic digit_t lo_part(int unsigned m, digit_t v);
    return digit_t'((m * v) % 10);
  endfunction

  function automatic digit_t hi_part(int unsigned m, digit_t v);
    return digit_t'((m * v) / 10);
  endfunction

  always_comb begin
    for (int unsigned m = 0; m < 6; m++) begin
      for (int unsigned i = 0; i <= D; i++) begin
        digit_t l, h;
        l = (i < D) ? lo_part(m, x[i])   : '0;
        h = (i > 0) ? hi_part(m, x[i-1]) : '0;
        mult[m][i] = l + h + XS3_ZERO;
      end
    end
  end

endmodule
