// Self-checking testbench for booth_mult16: corner operands (0, +-1,
// -32768, 32767) in every combination, then random signed operands,
// compared with the product of the two values as 32-bit integers.
module tb_booth_mult16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] a, b;
  logic signed [31:0] prod;
  int checks = 0, failures = 0;

  booth_mult16 #(.N(16)) dut (.a(a), .b(b), .prod(prod));

  task automatic check(logic signed [15:0] x, logic signed [15:0] y);
    a = x;
    b = y;
    @(posedge clk);
    checks++;
    if (prod != 32'(int'(x) * int'(y))) begin
      failures++;
      if (failures < 5) $display("mismatch %0d * %0d = %0d", x, y, prod);
    end
  endtask

  initial begin
    logic signed [15:0] corner [6] = '{16'sd0, 16'sd1, -16'sd1, 16'sh7fff, 16'sh8000, 16'sh5555};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int n = 0; n < 5000; n++) check(16'($urandom), 16'($urandom));
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
