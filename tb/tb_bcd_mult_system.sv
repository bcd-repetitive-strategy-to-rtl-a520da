// End-to-end testbench for bcd_mult_system at its default size
// (D = 16 digits, the Decimal64 significand).
//
// Decimal side: corner and random BCD operand pairs; each product is
// compared with a schoolbook decimal product worked out here. Binary side:
// a multiply-accumulate sequence checked against a model every cycle.
// It counts how often each mechanism of the design was exercised and fails
// if one never was:
//   neg_pp     a negative recoded digit (partial product by bit inversion)
//   top_pp     the extra partial product PP[d] selecting 1X
//   big_digit  a 3X/4X digit of 10 or 11 (redundant XS-3 digit) selected
//   col_carry  carries between decimal columns counted in the CSA tree
//   prop_run   a final-adder carry crossing 4 or more propagating digits
//   mac_wrap   the 33-bit accumulator wrapping around
//   mac_clear  the accumulator cleared
module tb_bcd_mult_system;
  import bcd_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [D-1:0]     x, y;
  digit_t [2*D-1:0]   p;
  logic               rst_n, load_x, mac_en, clr;
  logic signed [15:0] x_in, y_in;
  logic signed [32:0] acc;

  int checks = 0, failures = 0;
  int neg_pp = 0, top_pp = 0, big_digit = 0, col_carry = 0, prop_run = 0;
  int mac_wrap = 0, mac_clear = 0;

  bcd_mult_system dut (.*);

  function automatic digit_t [2*D-1:0] ref_mul(digit_t [D-1:0] a, digit_t [D-1:0] b);
    int acc_d [2*D];
    digit_t [2*D-1:0] r;
    int carry;
    for (int k = 0; k < 2*D; k++) acc_d[k] = 0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) acc_d[i+j] += int'(a[i]) * int'(b[j]);
    carry = 0;
    for (int k = 0; k < 2*D; k++) begin
      acc_d[k] += carry;
      carry = acc_d[k] / 10;
      r[k]  = digit_t'(acc_d[k] % 10);
    end
    return r;
  endfunction

  // Observe the internal mechanisms for the coverage counters.
  task automatic observe();
    int run;
    for (int i = 0; i <= D; i++) begin
      if (dut.u_bcd.u_ppg.neg[i]) neg_pp++;
      for (int j = 0; j <= D; j++) begin
        logic [3:0] code;
        code = dut.u_bcd.u_ppg.pp[i][j] ^ {4{dut.u_bcd.u_ppg.neg[i]}};
        if (code >= 4'd13) big_digit++;
      end
    end
    if (dut.u_bcd.u_ppg.pp[D][0] != XS3_ZERO) top_pp++;
    for (int j = 0; j < 2*D; j++) col_carry += int'(dut.u_bcd.u_ppr.cnt[j]);
    run = 0;
    for (int j = 0; j < 2*D; j++) begin
      if (dut.u_bcd.u_add.p[j] && dut.u_bcd.u_add.cy[j]) begin
        run++;
        if (run == 4) prop_run++;
      end else run = 0;
    end
  endtask

  task automatic check_mul(digit_t [D-1:0] a, digit_t [D-1:0] b);
    digit_t [2*D-1:0] e;
    x = a;
    y = b;
    #1;
    observe();
    e = ref_mul(a, b);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 5) $display("BCD mismatch x=%h y=%h got %h exp %h", a, b, p, e);
    end
  endtask

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

  // MAC model and one clocked step
  logic signed [15:0] m_x;
  logic signed [32:0] m_acc;

  task automatic mac_step(logic ld, logic signed [15:0] xv, logic en, logic signed [15:0] yv, logic cl);
    logic signed [33:0] wide;
    load_x = ld; x_in = xv; mac_en = en; y_in = yv; clr = cl;
    @(posedge clk);
    if (cl) begin
      m_acc = '0;
      mac_clear++;
    end else if (en) begin
      wide = 34'(m_acc) + 34'(int'(m_x) * int'(yv));
      if (wide[33] != wide[32]) mac_wrap++;
      m_acc = wide[32:0];
    end
    if (ld) m_x = xv;
    #1;
    checks++;
    if (acc != m_acc) begin
      failures++;
      if (failures < 5) $display("MAC acc %0d expected %0d", acc, m_acc);
    end
  endtask

  task automatic report_cov(string name, int n);
    $display("%-10s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism %s never exercised", name);
    end
  endtask

  initial begin
    rst_n = 1'b0; load_x = 0; mac_en = 0; clr = 0; x_in = 0; y_in = 0;
    m_x = 0; m_acc = 0;
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // decimal multiplier
    for (int a = 0; a < 10; a++)
      for (int b = 0; b < 10; b++) check_mul(fill(a), fill(b));
    for (int n = 0; n < 2000; n++) check_mul(rand_bcd(), rand_bcd());

    // MAC unit
    mac_step(1, -16'sd32768, 0, 0, 0);
    for (int n = 0; n < 6; n++) mac_step(0, 0, 1, -16'sd32768, 0);
    mac_step(0, 0, 0, 0, 1);
    for (int n = 0; n < 500; n++)
      mac_step(1'($urandom_range(0, 3) == 0), 16'($urandom), 1'($urandom_range(0, 3) != 0),
               16'($urandom), 1'($urandom_range(0, 60) == 0));

    report_cov("neg_pp", neg_pp);
    report_cov("top_pp", top_pp);
    report_cov("big_digit", big_digit);
    report_cov("col_carry", col_carry);
    report_cov("prop_run", prop_run);
    report_cov("mac_wrap", mac_wrap);
    report_cov("mac_clear", mac_clear);
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
