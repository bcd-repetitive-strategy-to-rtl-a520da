// Self-checking testbench for sd_recoder.
//
// For every single digit value with and without an incoming transfer, and
// for random 16-digit operands, it checks that each recoded digit lies in
// [-5,5] with a one-hot (or empty) magnitude, that the top digit is 0 or 1,
// and that sum(Yb_i * 10^i) equals the BCD operand's value.
module tb_sd_recoder;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t    [D-1:0] y;
  sd_digit_t [D:0]   yb;
  int checks = 0, failures = 0;

  sd_recoder #(.D(D)) dut (.y(y), .yb(yb));

  task automatic check(digit_t [D-1:0] v);
    longint want, got, pw;
    y = v;
    @(posedge clk);
    want = 0; got = 0; pw = 1;
    for (int i = 0; i <= D; i++) begin
      if (i < D) want += longint'(v[i]) * pw;
      got += longint'(sd_value(yb[i])) * pw;
      checks++;
      if (!$onehot0(yb[i].mag) || (yb[i].neg && yb[i].mag == '0) ||
          sd_value(yb[i]) < -5 || sd_value(yb[i]) > 5 ||
          (i == D && (yb[i].neg || sd_value(yb[i]) > 1))) begin
        failures++;
        $display("bad digit %0d: %b", i, yb[i]);
      end
      pw *= 10;
    end
    checks++;
    if (got != want) begin
      failures++;
      $display("value mismatch y=%h got %0d want %0d", v, got, want);
    end
  endtask

  initial begin
    digit_t [D-1:0] v;
    // every digit pair (lower digit decides the transfer into the upper)
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++) begin
        v = '0;
        v[0] = digit_t'(a);
        v[1] = digit_t'(b);
        v[D-1] = digit_t'(b);
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
