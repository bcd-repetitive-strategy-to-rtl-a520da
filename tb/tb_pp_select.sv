// Self-checking testbench for pp_select.
//
// Feeds real XS-3 multiples of random multiplicands (built here from the
// decimal digits of m*X) and every signed digit -5..5. The selected partial
// product, decoded as XS-3, must equal |Yb| * X; for a negative digit it
// must be the nine's complement of that over D+1 digits, with neg set, so
// that complement - (10^(D+1) - 1) equals Yb * X.
module tb_pp_select;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [5:0][D:0] mult;
  sd_digit_t         yb;
  digit_t [D:0]      pp;
  logic              neg;
  int checks = 0, failures = 0;

  pp_select #(.D(D)) dut (.mult(mult), .yb(yb), .pp(pp), .neg(neg));

  initial begin
    longint xv, pw, mv, got, full;
    for (int n = 0; n < 400; n++) begin
      xv = 0; pw = 1;
      for (int i = 0; i < D; i++) begin
        xv += longint'($urandom_range(0, 9)) * pw;
        pw *= 10;
      end
      full = pw * 10;  // 10^(D+1)
      for (int m = 0; m < 6; m++) begin
        mv = longint'(m) * xv;
        for (int i = 0; i <= D; i++) begin
          mult[m][i] = digit_t'(mv % 10 + 3);
          mv = mv / 10;
        end
      end
      for (int v = -5; v <= 5; v++) begin
        yb = '0;
        yb.neg = (v < 0);
        if (v != 0) yb.mag[(v < 0 ? -v : v) - 1] = 1'b1;
        @(posedge clk);
        got = 0; pw = 1;
        for (int i = 0; i <= D; i++) begin
          got += longint'(int'(pp[i]) - 3) * pw;
          pw *= 10;
        end
        // a negative selection is the nine's complement of |v|*X
        if (neg) got = got - (full - 1);
        checks++;
        if (neg != (v < 0) || got != longint'(v) * xv) begin
          failures++;
          $display("mismatch v=%0d x=%0d got %0d neg %0b", v, xv, got, neg);
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
