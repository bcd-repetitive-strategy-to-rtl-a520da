// Self-checking testbench for xs3_multiples.
//
// For corner and random 16-digit multiplicands it decodes every XS-3 digit
// of 0X..5X, checks the digit bounds (at most 11, and at most 9 for 0X, 1X,
// 2X and 5X) and checks that the decoded value equals m * X computed here
// in binary.
module tb_xs3_multiples;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [D-1:0]    x;
  digit_t [5:0][D:0] mult;
  int checks = 0, failures = 0;

  xs3_multiples #(.D(D)) dut (.x(x), .mult(mult));

  task automatic check(digit_t [D-1:0] v);
    longint xv, pw, got;
    int dv, lim;
    x = v;
    @(posedge clk);
    xv = 0; pw = 1;
    for (int i = 0; i < D; i++) begin
      xv += longint'(v[i]) * pw;
      pw *= 10;
    end
    for (int m = 0; m < 6; m++) begin
      got = 0; pw = 1;
      lim = (m == 3 || m == 4) ? 11 : 9;
      for (int i = 0; i <= D; i++) begin
        dv = int'(mult[m][i]) - 3;
        checks++;
        if (dv < 0 || dv > lim) begin
          failures++;
          $display("digit out of range: m=%0d i=%0d value %0d", m, i, dv);
        end
        got += longint'(dv) * pw;
        pw *= 10;
      end
      checks++;
      if (got != longint'(m) * xv) begin
        failures++;
        $display("value mismatch m=%0d x=%0d got %0d", m, xv, got);
      end
    end
  endtask

  initial begin
    digit_t [D-1:0] v;
    for (int a = 0; a < 10; a++) begin
      for (int i = 0; i < D; i++) v[i] = digit_t'(a);
      check(v);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < D; i++) v[i] = digit_t'($urandom_range(0, 9));
      check(v);
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
