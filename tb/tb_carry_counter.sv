// Self-checking testbench for carry_counter: random carry patterns of
// varying density (all zero, all one, sparse, dense) for 16 adders and 32
// columns; every column count is compared with a count taken here bit by
// bit.
module tb_carry_counter;
  localparam int NS = 16;
  localparam int W  = 32;
  localparam int CW = $clog2(NS + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NS-1:0][W-1:0] col_carry;
  logic [W-1:0][CW-1:0] cnt;
  int checks = 0, failures = 0;

  carry_counter #(.NS(NS), .W(W), .CW(CW)) dut (.col_carry(col_carry), .cnt(cnt));

  initial begin
    int want, dens;
    for (int n = 0; n < 2000; n++) begin
      dens = n % 5;  // 0: none, 4: all, else probability dens/4
      for (int k = 0; k < NS; k++)
        for (int j = 0; j < W; j++)
          col_carry[k][j] = (dens == 4) ? 1'b1 : ($urandom_range(0, 3) < dens);
      @(posedge clk);
      for (int j = 0; j < W; j++) begin
        want = 0;
        for (int k = 0; k < NS; k++) want += int'(col_carry[k][j]);
        checks++;
        if (int'(cnt[j]) != want) begin
          failures++;
          if (failures < 5) $display("column %0d: count %0d expected %0d", j, cnt[j], want);
        end
      end
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
