// Multiply-accumulate unit: a 16-bit operand register, a 16 x 16 modified
// Booth multiplier and a 33-bit ripple-carry accumulator.
//
// load_x stores x_in in the 16-bit operand register. In every cycle with
// mac_en set, the product of the operand register and y_in (a word coming
// from memory) is sign-extended to 33 bits and added to the accumulator in
// the same cycle; clr clears the accumulator (and wins over mac_en). The
// accumulator is held in two 16-bit registers (high and low half) plus one
// flip-flop for bit 32. All arithmetic is two's complement; the accumulator
// wraps on overflow.
// The parts (one 16-bit register, a 16-bit modified Booth multiplier, a
// 33-bit ripple-carry accumulator, two 16-bit accumulator registers) and
// the single-cycle multiply-and-accumulate follow the description of the
// unit; the control inputs, the reset and the extra flip-flop for bit 32
// are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low); load_x/x_in;
// mac_en/y_in; clr; acc = {bit 32, high register, low register}, updated at
// the clock edge after the request.
module vmfu (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_x,
  input  logic signed [15:0] x_in,
  input  logic               mac_en,
  input  logic               clr,
  input  logic signed [15:0] y_in,
  output logic signed [32:0] acc
);

  logic signed [15:0] x_reg;
  logic [15:0]        acc_lo, acc_hi;
  logic               acc_top;
  logic signed [31:0] prod;
  logic [32:0]        sum;

  booth_mult16 #(.N(16)) u_mul (.a(x_reg), .b(y_in), .prod(prod));

  assign acc = {acc_top, acc_hi, acc_lo};

  rca33 #(.N(33)) u_add (
    .a   (acc),
    .b   ({prod[31], prod}),
    .cin (1'b0),
    .sum (sum),
    .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_reg   <= '0;
      acc_lo  <= '0;
      acc_hi  <= '0;
      acc_top <= 1'b0;
    end else begin
      if (load_x) x_reg <= x_in;
      if (clr) begin
        acc_lo  <= '0;
        acc_hi  <= '0;
        acc_top <= 1'b0;
      end else if (mac_en) begin
        acc_lo  <= sum[15:0];
        acc_hi  <= sum[31:16];
        acc_top <= sum[32];
      end
    end
  end

endmodule
