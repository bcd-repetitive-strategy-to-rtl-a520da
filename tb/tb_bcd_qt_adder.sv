// Self-checking testbench for bcd_qt_adder.
//
// Random excess-6 A / BCD B operands plus runs of digit pairs that sum to 9
// (long carry propagation through the prefix tree) and to 18, with either
// carry in. The expected sum is worked out here in binary from the decoded
// operands and compared digit for digit, with the carry out.
module tb_bcd_qt_adder;
  import bcd_pkg::*;

  localparam int W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  digit_t [W-1:0] a_xs6, b, sum;
  logic           cin, cout;
  int checks = 0, failures = 0;

  bcd_qt_adder #(.W(W)) dut (.a_xs6(a_xs6), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    logic [255:0] av, bv, want, got;
    int ai, bi;
    for (int n = 0; n < 4000; n++) begin
      av = 0; bv = 0;
      for (int j = W - 1; j >= 0; j--) begin
        ai = int'($urandom_range(0, 9));
        bi = int'($urandom_range(0, 9));
        if (n % 4 == 1) bi = 9 - ai;             // propagate everywhere
        if (n % 4 == 2 && j < W / 2) bi = 9 - ai; // propagate in the low half
        if (n == 3) begin ai = 9; bi = 9; end
        a_xs6[j] = digit_t'(ai + 6);
        b[j]     = digit_t'(bi);
        av = av * 10 + 256'(ai);
        bv = bv * 10 + 256'(bi);
      end
      cin = 1'($urandom_range(0, 1));
      @(posedge clk);
      want = av + bv + 256'(cin);
      got  = 256'(cout);
      for (int j = W - 1; j >= 0; j--) got = got * 10 + 256'(sum[j]);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 5) $display("mismatch in vector %0d", n);
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
