// Self-checking testbench for bcd_ppr (stage 2).
//
// The partial products are built here, independently of stage 1: random
// signed digits Yb_i in [-5,5] (the top one 0 or 1) and a random
// multiplicand X give PP[i] = |Yb_i| * X as plain decimal digits in XS-3,
// bit-inverted with neg set when Yb_i < 0. The check is that A + B (A
// decoded from excess-6) equals sum(Yb_i * X * 10^i) modulo 10^(2D), and
// that A and B hold decimal digits.
module tb_bcd_ppr;
  import bcd_pkg::*;

  localparam int D = 16;
  localparam int W = 2 * D;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [D:0][D:0] pp;
  logic   [D:0]      neg;
  digit_t [W-1:0]    a_xs6, b;
  int checks = 0, failures = 0;

  bcd_ppr #(.D(D)) dut (.pp(pp), .neg(neg), .a_xs6(a_xs6), .b(b));

  initial begin
    logic signed [255:0] modv, want, got, xv, mv;
    int v;
    modv = 1;
    for (int j = 0; j < W; j++) modv = modv * 10;
    for (int n = 0; n < 1500; n++) begin
      xv = 0;
      for (int j = 0; j < D; j++) xv = xv * 10 + 256'($urandom_range(0, 9));
      if (n < 3) begin
        xv = 0;
        for (int j = 0; j < D; j++) xv = xv * 10 + 9;
      end
      want = 0;
      for (int i = D; i >= 0; i--) begin
        if (i == D) v = (n < 3) ? 1 : int'($urandom_range(0, 1));
        else        v = (n < 3) ? -5 : int'($urandom_range(0, 10)) - 5;
        want = want * 10 + xv * v;
        neg[i] = (v < 0);
        mv = xv * (v < 0 ? -v : v);
        for (int j = 0; j <= D; j++) begin
          pp[i][j] = digit_t'(mv % 10 + 3) ^ {4{neg[i]}};
          mv = mv / 10;
        end
      end
      @(posedge clk);
      got = 0;
      for (int j = W - 1; j >= 0; j--) begin
        got = got * 10 + 256'(a_xs6[j]) - 6 + 256'(b[j]);
        checks++;
        if (a_xs6[j] < 4'd6 || b[j] > 4'd9) begin
          failures++;
          $display("digit %0d out of range", j);
        end
      end
      want = ((want % modv) + modv) % modv;
      checks++;
      if (got % modv != want) begin
        failures++;
        if (failures < 5) $display("value mismatch in vector %0d", n);
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
