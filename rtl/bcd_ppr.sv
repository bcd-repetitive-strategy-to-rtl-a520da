// Stage 2 of the BCD multiplier: decimal partial product reduction.
//
// The D+1 XS-3 partial products are read as ODDS digits simply by taking
// their 4-bit codes at face value; what that adds (3 per digit) is removed,
// together with the sign offsets, by one constant row. Row i (weight 10^i)
// holds:
//   digits i .. i+D   : the code of PP[i]
//   digit  i-1        : neg[i-1], the +1 that completes the ten's complement
//                       of the previous (inverted) partial product
//   digit  i+D+1      : 1 - neg[i], the sign-extension digit
// and one more row holds the constant
//   K = -sum_i ( 3*(11..1, D+1 ones)*10^i + 10^(D+1+i) )  mod 10^(2D),
// computed at elaboration. The D+2 rows of 2D digits go through the binary
// carry-save tree (odds_csa_tree), whose carries between decimal columns are
// counted alongside (carry_counter), and the decimal correction and digit
// compressor (dec_compressor), which leave A (excess-6 BCD) and
// B (BCD) with A + B = X*Y. Reading XS-3 as ODDS by adding a constant and
// the tree/correction split follow the multiplier this RTL implements; the
// placement of the +1 and the sign-extension digits is this design's choice.
//
// Interface: pp[i][j] digit j of PP[i] (XS-3), neg[i] its sign; a_xs6 and b
// the 2D-digit double word. Combinational.
module bcd_ppr
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [D:0][D:0]   pp,
  input  logic   [D:0]        neg,
  output digit_t [2*D-1:0]    a_xs6,
  output digit_t [2*D-1:0]    b
);

  localparam int unsigned W  = 2 * D;
  localparam int unsigned N  = D + 2;
  localparam int unsigned CW = $clog2(N - 1);

  typedef digit_t [W-1:0] row_t;

  // The constant row, worked out digit by digit in decimal.
  function automatic row_t calc_k();
    int   col [W];
    int   carry;
    row_t k;
    for (int p = 0; p < int'(W); p++) begin
      col[p] = 0;
      for (int i = 0; i <= int'(D); i++) begin
        if (p >= i && p <= i + int'(D)) col[p] += 3;
        if (p == i + int'(D) + 1)      col[p] += 1;
      end
    end
    // normalise the sum to decimal digits (mod 10^W)
    carry = 0;
    for (int p = 0; p < int'(W); p++) begin
      col[p] += carry;
      carry  = col[p] / 10;
      col[p] = col[p] % 10;
    end
    // ten's complement: nine's complement plus one
    carry = 1;
    for (int p = 0; p < int'(W); p++) begin
      col[p] = 9 - col[p] + carry;
      carry  = col[p] / 10;
      k[p]   = digit_t'(col[p] % 10);
    end
    return k;
  endfunction

  localparam row_t K = calc_k();

  digit_t [N-1:0][W-1:0] rows;

  always_comb begin
    for (int i = 0; i <= int'(D); i++) begin
      for (int p = 0; p < int'(W); p++) begin
        if (p >= i && p <= i + int'(D))  rows[i][p] = pp[i][p-i];
        else if (i > 0 && p == i - 1)    rows[i][p] = {3'b0, neg[i-1]};
        else if (p == i + int'(D) + 1)   rows[i][p] = {3'b0, ~neg[i]};
        else                             rows[i][p] = '0;
      end
    end
    rows[N-1] = K;
  end

  digit_t [W-1:0]         s, c;
  logic   [N-3:0][W-1:0]  col_carry;
  logic   [W-1:0][CW-1:0] cnt;

  odds_csa_tree #(.N(N), .W(W)) u_tree (.rows(rows), .s(s), .c(c), .col_carry(col_carry));
  carry_counter #(.NS(N-2), .W(W), .CW(CW)) u_cnt (.col_carry(col_carry), .cnt(cnt));
  dec_compressor #(.W(W), .CW(CW)) u_cmp (.s(s), .c(c), .cnt(cnt), .a_xs6(a_xs6), .b(b));

endmodule
