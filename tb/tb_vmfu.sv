// Self-checking testbench for vmfu.
//
// After reset it loads operands, runs multiply-accumulate sequences with
// random and extreme operands (including enough (-32768)^2 products to wrap
// the 33-bit accumulator), idles, clears, and compares the accumulator
// after every clock edge with a model kept here. It also checks the timing:
// a product requested in one cycle is in the accumulator right after that
// cycle's clock edge (one cycle per multiply-accumulate).
module tb_vmfu;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, load_x, mac_en, clr;
  logic signed [15:0] x_in, y_in;
  logic signed [32:0] acc;
  int checks = 0, failures = 0;

  logic signed [15:0] m_x;
  logic signed [32:0] m_acc;

  vmfu dut (.*);

  task automatic step(logic ld, logic signed [15:0] xv, logic en, logic signed [15:0] yv, logic cl);
    load_x = ld; x_in = xv; mac_en = en; y_in = yv; clr = cl;
    @(posedge clk);
    // model: same-cycle multiply and accumulate
    if (cl)      m_acc = '0;
    else if (en) m_acc = m_acc + 33'(int'(m_x) * int'(yv));
    if (ld) m_x = xv;
    #1;
    checks++;
    if (acc != m_acc) begin
      failures++;
      if (failures < 5) $display("acc %0d expected %0d", acc, m_acc);
    end
  endtask

  initial begin
    rst_n = 1'b0; load_x = 0; mac_en = 0; clr = 0; x_in = 0; y_in = 0;
    m_x = 0; m_acc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (acc != 0) failures++;
    step(1, 16'sd1234, 0, 0, 0);
    step(0, 0, 1, -16'sd77, 0);
    step(0, 0, 1, 16'sd5000, 0);
    step(0, 0, 0, 16'sd999, 0);        // idle: no change
    step(1, -16'sd32768, 0, 0, 0);
    for (int n = 0; n < 6; n++) step(0, 0, 1, -16'sd32768, 0);  // wraps past 2^32
    step(0, 0, 0, 0, 1);
    for (int n = 0; n < 3000; n++)
      step(1'($urandom_range(0, 3) == 0), 16'($urandom), 1'($urandom_range(0, 3) != 0),
           16'($urandom), 1'($urandom_range(0, 60) == 0));
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
