// Sum-correction counter: counts, per decimal digit column, the carries that
// the binary carry-save tree sent out of bit 3 of that column.
//
// Each of the NS carry-save adders of odds_csa_tree reports one carry bit
// per column; this block adds up the NS bits of every column with a small
// binary counter (a population count), in parallel with the tree itself.
// Every counted carry costs the column 6 in decimal, so dec_compressor adds
// 6 * cnt[j] to column j. Counting the carries per decimal column with
// binary counters, alongside the carry-save additions, follows the
// multiplier this RTL implements; the plain adder-based count is this
// design's choice.
//
// Interface: col_carry[k][j] carry out of column j in adder k; cnt[j] the
// number of such carries (CW bits). Combinational.
module carry_counter #(
  parameter int unsigned NS = 16,
  parameter int unsigned W  = 32,
  parameter int unsigned CW = $clog2(NS + 1)
) (
  input  logic [NS-1:0][W-1:0] col_carry,
  output logic [W-1:0][CW-1:0] cnt
);

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      cnt[j] = '0;
      for (int k = 0; k < int'(NS); k++) cnt[j] = cnt[j] + CW'(col_carry[k][j]);
    end
  end

endmodule
