// Self-checking testbench for bcd_multiplier.
//
// Drives corner operands (zero, all nines, digits of 5 that make the
// recoder produce -5 and long transfer chains) and random BCD operands, and
// compares the product with a schoolbook decimal product worked out here
// digit by digit. Runs at the default D = 16 (Decimal64 significands).
module tb_bcd_multiplier;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [D-1:0]   x, y;
  digit_t [2*D-1:0] p;
  int checks = 0, failures = 0;

  bcd_multiplier #(.D(D)) dut (.x(x), .y(y), .p(p));

  function automatic digit_t [2*D-1:0] ref_mul(digit_t [D-1:0] a, digit_t [D-1:0] b);
    int acc [2*D];
    digit_t [2*D-1:0] r;
    int carry;
    for (int k = 0; k < 2*D; k++) acc[k] = 0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) acc[i+j] += int'(a[i]) * int'(b[j]);
    carry = 0;
    for (int k = 0; k < 2*D; k++) begin
      acc[k] += carry;
      carry  = acc[k] / 10;
      r[k]   = digit_t'(acc[k] % 10);
    end
    return r;
  endfunction

  function automatic digit_t [D-1:0] rand_bcd();
    digit_t [D-1:0] v;
    for (int i = 0; i < D; i++) v[i] = digit_t'($urandom_range(0, 9));
    return v;
  endfunction

  function automatic digit_t [D-1:0] fill(int dgt);
    digit_t [D-1:0] v;
    for (int i = 0; i < D; i++) v[i] = digit_t'(dgt);
    return v;
  endfunction

  task automatic check(digit_t [D-1:0] a, digit_t [D-1:0] b);
    digit_t [2*D-1:0] e;
    x = a;
    y = b;
    @(posedge clk);
    e = ref_mul(a, b);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH x=%h y=%h got %h exp %h", a, b, p, e);
    end
  endtask

  initial begin
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++) check(fill(a), fill(b));
    for (int n = 0; n < 3000; n++) check(rand_bcd(), rand_bcd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
