// Binary carry-save tree for rows of ODDS decimal digits, with per-column
// carry counting.
//
// Every row is W digits of 4 bits, each digit worth 0..15 (ODDS). The rows
// are added as plain binary words by 3:2 carry-save adders (one full adder
// per bit); the rows are consumed first-in first-out, which builds a
// Wallace-like tree of about log1.5(N) full-adder levels and leaves two
// words S and C. Inside a digit this binary sum is exact. A carry that
// leaves bit 3 of digit j, however, enters digit j+1 with weight 1, that is
// 10 units of digit j, while it took 16 units out of digit j: each such
// carry loses 6 in decimal. The tree therefore brings out, for each of its
// N-2 carry-save adders k, the carries leaving bit 3 of every digit
// (col_carry[k][j]); carry_counter counts them per column, and the decimal
// value of the inputs is
//   sum_j (S_j + C_j + 6 * sum_k col_carry[k][j]) * 10^j   (mod 10^W).
// Tapping the column carries of the binary tree for a concurrent decimal
// correction follows the multiplier this RTL implements; the FIFO tree
// order is this design's choice. Carries out of the top digit are dropped
// (results are modulo 10^W) but still reported.
//
// Interface: rows[r][j] digit j of row r; s, c the two result words (c is
// already shifted into place); col_carry[k][j] carry out of digit j in
// carry-save adder k. Combinational. Needs N >= 3.
module odds_csa_tree
  import bcd_pkg::*;
#(
  parameter int unsigned N  = 18,
  parameter int unsigned W  = 32
) (
  input  digit_t [N-1:0][W-1:0] rows,
  output digit_t [W-1:0]        s,
  output digit_t [W-1:0]        c,
  output logic   [N-3:0][W-1:0] col_carry
);

  localparam int unsigned NQ = 3 * N - 4;  // inputs plus two words per 3:2 step

  logic [4*W-1:0] q [NQ];

  always_comb begin
    for (int r = 0; r < int'(N); r++) q[r] = rows[r];
    for (int r = int'(N); r < int'(NQ); r++) q[r] = '0;
    for (int k = 0; k < int'(N) - 2; k++) begin
      logic [4*W-1:0] a, b, d, m;
      a = q[3*k];
      b = q[3*k+1];
      d = q[3*k+2];
      m = (a & b) | (a & d) | (b & d);
      q[int'(N) + 2*k]     = a ^ b ^ d;
      q[int'(N) + 2*k + 1] = {m[4*W-2:0], 1'b0};
      for (int j = 0; j < int'(W); j++) col_carry[k][j] = m[4*j+3];
    end
  end

  assign s = q[NQ-2];
  assign c = q[NQ-1];

  initial assert (N >= 3) else $fatal(1, "odds_csa_tree needs at least 3 rows");

endmodule
