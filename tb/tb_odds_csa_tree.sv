// Self-checking testbench for odds_csa_tree.
//
// Random rows of ODDS digits (each 0..15) go into an 18-row, 32-digit
// tree. The check is the decimal invariant of the tree:
//   sum_j (S_j + C_j + 6*cnt_j) * 10^j == sum of the rows as decimal
//   numbers, modulo 10^32,
// where cnt_j is the number of column-j carries the tree reports, counted
// here, and the rest is wide binary arithmetic. It also counts how many
// column carries were seen, to make sure the correction path was exercised.
module tb_odds_csa_tree;
  import bcd_pkg::*;

  localparam int N  = 18;
  localparam int W  = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [N-1:0][W-1:0]  rows;
  digit_t [W-1:0]         s, c;
  logic   [N-3:0][W-1:0]  col_carry;
  int checks = 0, failures = 0;
  longint carries_seen = 0;

  odds_csa_tree #(.N(N), .W(W)) dut (.rows(rows), .s(s), .c(c), .col_carry(col_carry));

  initial begin
    logic [255:0] modv, want, got;
    modv = 1;
    for (int j = 0; j < W; j++) modv = modv * 10;
    for (int n = 0; n < 1500; n++) begin
      for (int r = 0; r < N; r++)
        for (int j = 0; j < W; j++)
          rows[r][j] = (n < 10) ? digit_t'(15 - n) : digit_t'($urandom_range(0, 15));
      @(posedge clk);
      want = 0;
      got  = 0;
      for (int j = W - 1; j >= 0; j--) begin
        logic [255:0] colsum;
        int cnt_j;
        colsum = 0;
        cnt_j = 0;
        for (int k = 0; k < N - 2; k++) cnt_j += int'(col_carry[k][j]);
        for (int r = 0; r < N; r++) colsum += 256'(rows[r][j]);
        want = want * 10 + colsum;
        got  = got * 10 + 256'(s[j]) + 256'(c[j]) + 256'(6) * 256'(cnt_j);
        carries_seen += longint'(cnt_j);
      end
      checks++;
      if ((want % modv) != (got % modv)) begin
        failures++;
        if (failures < 5) $display("mismatch in vector %0d", n);
      end
    end
    checks++;
    if (carries_seen == 0) begin
      failures++;
      $display("no column carry was ever counted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
