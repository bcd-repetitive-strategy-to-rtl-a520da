// Decimal correction and digit compressor: (S, C, carry counts) -> (A, B).
//
// Input is the carry-save result of odds_csa_tree: per digit column j the
// binary values S_j and C_j and the number cnt[j] of carries that left the
// column, each of which must be repaid with +6. Per column the circuit forms
//   T_j = S_j + C_j + 6*cnt[j]
// and splits it as T_j = 10*h_j + l_j. The tens h_j move one column up:
//   U_j = l_j + h_(j-1) = 10*h'_j + l'_j
// which is split once more. The output is A_j = l'_j (0..9) and
// B_j = h'_(j-1) (0..2, never above 9 while h_j <= 90, i.e. cnt <= 145),
// so A + B equals the input's decimal value modulo 10^W and both words have
// BCD digits. A is delivered in excess-6 (A_j + 6), which lets the final
// adder take the decimal carry straight from a 4-bit binary carry.
// Correcting the carry-save sum by the carry count and delivering A in
// excess-6 BCD and B in BCD follows the multiplier this RTL implements; the
// two mod-10 splits are this design's own realisation of the compressor.
//
// Interface: s, c, cnt as produced by odds_csa_tree; a_xs6, b the double
// word. Combinational, two digit-local steps with one column of shift.
module dec_compressor
  import bcd_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = 5
) (
  input  digit_t [W-1:0]         s,
  input  digit_t [W-1:0]         c,
  input  logic   [W-1:0][CW-1:0] cnt,
  output digit_t [W-1:0]         a_xs6,
  output digit_t [W-1:0]         b
);

  localparam int unsigned TW = CW + 5;  // holds 30 + 6*(2^CW - 1)

  logic [TW-1:0] t  [W];
  logic [TW-1:0] h  [W];
  logic [3:0]    l  [W];
  logic [TW-1:0] u  [W];
  logic [TW-1:0] h2 [W];
  logic [3:0]    l2 [W];

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      t[j] = TW'(s[j]) + TW'(c[j]) + TW'(6) * TW'(cnt[j]);
      l[j] = 4'(t[j] % TW'(10));
      h[j] = t[j] / TW'(10);
    end
    for (int j = 0; j < int'(W); j++) begin
      u[j]  = TW'(l[j]) + ((j > 0) ? h[j-1] : '0);
      l2[j] = 4'(u[j] % TW'(10));
      h2[j] = u[j] / TW'(10);
    end
    for (int j = 0; j < int'(W); j++) begin
      a_xs6[j] = l2[j] + 4'd6;
      b[j]     = (j > 0) ? 4'(h2[j-1]) : 4'd0;
    end
  end

endmodule
