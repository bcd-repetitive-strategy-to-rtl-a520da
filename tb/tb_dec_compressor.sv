// Self-checking testbench for dec_compressor.
//
// Random carry-save words (digits 0..15) and carry counts (0..16, the most
// an 18-row tree produces) go in; the check is that every A digit is an
// excess-6 code of 0..9, every B digit is 0..9, and that A + B equals
// sum_j (S_j + C_j + 6*cnt_j) * 10^j modulo 10^32.
module tb_dec_compressor;
  import bcd_pkg::*;

  localparam int W  = 32;
  localparam int CW = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [W-1:0]         s, c, a_xs6, b;
  logic   [W-1:0][CW-1:0] cnt;
  int checks = 0, failures = 0;

  dec_compressor #(.W(W), .CW(CW)) dut (.s(s), .c(c), .cnt(cnt), .a_xs6(a_xs6), .b(b));

  initial begin
    logic [255:0] modv, want, got;
    modv = 1;
    for (int j = 0; j < W; j++) modv = modv * 10;
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < W; j++) begin
        s[j]   = (n == 0) ? 4'd15 : digit_t'($urandom_range(0, 15));
        c[j]   = (n == 0) ? 4'd15 : digit_t'($urandom_range(0, 15));
        cnt[j] = (n == 0) ? CW'(16) : CW'($urandom_range(0, 16));
      end
      @(posedge clk);
      want = 0;
      got  = 0;
      for (int j = W - 1; j >= 0; j--) begin
        want = want * 10 + 256'(s[j]) + 256'(c[j]) + 256'(6) * 256'(cnt[j]);
        got  = got * 10 + 256'(a_xs6[j]) - 256'(6) + 256'(b[j]);
        checks++;
        if (a_xs6[j] < 4'd6 || b[j] > 4'd9) begin
          failures++;
          $display("digit %0d out of range: A code %0d B %0d", j, a_xs6[j], b[j]);
        end
      end
      checks++;
      if ((want % modv) != (got % modv)) begin
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
