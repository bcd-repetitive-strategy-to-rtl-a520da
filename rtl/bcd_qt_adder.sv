// Final BCD carry-propagate adder: parallel-prefix carries with carry-select
// digit sums.
//
// Operand A arrives in excess-6 BCD ([A_i] = A_i + 6) and B in BCD. For each
// digit two conditional binary sums are formed,
//   s0 = [A_i] + B_i   and   s1 = [A_i] + B_i + 1   (5 bits),
// and because of the excess-6 the decimal carry out of the digit is just
// bit 4 of the sum: the digit generates (g = s0[4], A_i + B_i >= 10) or
// propagates (p = s0 == 15, A_i + B_i = 9). A Kogge-Stone prefix tree over
// the W digit (g, p) pairs gives the carry into every digit at once; the
// carry picks s1 or s0, and the picked sum is turned back into BCD by
// keeping its low 4 bits when it carried out of the digit and subtracting 6
// otherwise. The conditional sums, the excess-6 carry detection and the
// prefix carry tree follow the multiplier this RTL implements; the
// Kogge-Stone topology is this design's choice.
//
// Interface: a_xs6 (digits 6..15), b (BCD), cin; sum (BCD) and cout.
// Combinational, log2(W) prefix levels.
module bcd_qt_adder
  import bcd_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  digit_t [W-1:0] a_xs6,
  input  digit_t [W-1:0] b,
  input  logic           cin,
  output digit_t [W-1:0] sum,
  output logic           cout
);

  logic [4:0]   s0 [W];
  logic [4:0]   s1 [W];
  logic [W-1:0] g, p;    // digit generate / propagate
  logic [W-1:0] gg, pp;  // prefix group generate / propagate over digits 0..i
  logic [W:0]   cy;      // carry into digit i

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      s0[i] = {1'b0, a_xs6[i]} + {1'b0, b[i]};
      s1[i] = s0[i] + 5'd1;
      g[i]  = s0[i][4];
      p[i]  = (s0[i][3:0] == 4'hF);
    end
  end

  // Kogge-Stone prefix over the digit carries.
  always_comb begin
    logic [W-1:0] gn, pn;
    gg = g;
    pp = p;
    for (int span = 1; span < int'(W); span = span * 2) begin
      gn = gg;
      pn = pp;
      for (int i = span; i < int'(W); i++) begin
        gn[i] = gg[i] | (pp[i] & gg[i-span]);
        pn[i] = pp[i] & pp[i-span];
      end
      gg = gn;
      pp = pn;
    end
    cy[0] = cin;
    for (int i = 0; i < int'(W); i++) cy[i+1] = gg[i] | (pp[i] & cin);
  end

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      logic [4:0] sel;
      sel    = cy[i] ? s1[i] : s0[i];
      sum[i] = sel[4] ? sel[3:0] : sel[3:0] - 4'd6;
    end
  end

  assign cout = cy[W];

endmodule
