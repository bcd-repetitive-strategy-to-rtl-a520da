// Self-checking testbench for bcd_ppg (stage 1).
//
// For corner and random 16-digit operands it decodes the D+1 partial
// products (XS-3, nine's complement plus one when neg is set) and checks
// that sum(PP[i] * 10^i) equals X * Y computed here in 128-bit binary, and
// that the top partial product is never negative.
module tb_bcd_ppg;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [D-1:0]    x, y;
  digit_t [D:0][D:0] pp;
  logic   [D:0]      neg;
  int checks = 0, failures = 0;

  bcd_ppg #(.D(D)) dut (.x(x), .y(y), .pp(pp), .neg(neg));

  function automatic logic signed [127:0] bcd_val(digit_t [D-1:0] v);
    logic signed [127:0] r = 0;
    for (int i = D - 1; i >= 0; i--) r = r * 10 + 128'(v[i]);
    return r;
  endfunction

  task automatic check(digit_t [D-1:0] a, digit_t [D-1:0] b);
    logic signed [127:0] total, row, full;
    x = a;
    y = b;
    @(posedge clk);
    full = 1;
    for (int i = 0; i <= D; i++) full = full * 10;  // 10^(D+1)
    total = 0;
    for (int i = D; i >= 0; i--) begin
      row = 0;
      for (int j = D; j >= 0; j--) row = row * 10 + 128'(int'(pp[i][j]) - 3);
      if (neg[i]) row = row - (full - 1);
      total = total * 10 + row;
    end
    checks++;
    if (total != bcd_val(a) * bcd_val(b) || neg[D]) begin
      failures++;
      $display("mismatch x=%h y=%h", a, b);
    end
  endtask

  initial begin
    digit_t [D-1:0] a, b;
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < D; i++) begin
        a[i] = digit_t'(n % 10);
        b[i] = digit_t'(n / 10);
      end
      check(a, b);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < D; i++) begin
        a[i] = digit_t'($urandom_range(0, 9));
        b[i] = digit_t'($urandom_range(0, 9));
      end
      check(a, b);
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
