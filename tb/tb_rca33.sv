// Self-checking testbench for rca33: random 33-bit operands and carry in,
// plus the all-ones + 1 full-length carry ripple, against a 34-bit sum.
module tb_rca33;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [32:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  rca33 #(.N(33)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(logic [32:0] x, logic [32:0] y, logic ci);
    a = x; b = y; cin = ci;
    @(posedge clk);
    checks++;
    if ({cout, sum} != 34'(x) + 34'(y) + 34'(ci)) begin
      failures++;
      if (failures < 5) $display("mismatch %h + %h + %b", x, y, ci);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    for (int n = 0; n < 5000; n++)
      check({1'($urandom), 32'($urandom)}, {1'($urandom), 32'($urandom)}, 1'($urandom));
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
