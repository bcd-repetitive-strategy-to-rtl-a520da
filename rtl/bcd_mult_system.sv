// Top level: the decimal multiplier and the binary multiply-accumulate unit,
// side by side.
//
// The two units share no signal. The BCD multiplier (bcd_multiplier) is
// combinational: p = x * y for D-digit BCD operands, 2D BCD digits out,
// in the same cycle. The MAC unit (vmfu) is clocked: a 16-bit operand
// register times a 16-bit input word, accumulated into 33 bits per cycle.
// The default D = 16 digits is the Decimal64 significand size; D = 34
// gives the Decimal128 size.
//
// Interface: x, y, p for the decimal multiplier; clk, rst_n, load_x, x_in,
// mac_en, clr, y_in, acc for the MAC unit (see vmfu).
module bcd_mult_system
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t [D-1:0]     x,
  input  digit_t [D-1:0]     y,
  output digit_t [2*D-1:0]   p,
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_x,
  input  logic signed [15:0] x_in,
  input  logic               mac_en,
  input  logic               clr,
  input  logic signed [15:0] y_in,
  output logic signed [32:0] acc
);

  bcd_multiplier #(.D(D)) u_bcd (.x(x), .y(y), .p(p));

  vmfu u_mac (
    .clk, .rst_n, .load_x, .x_in, .mac_en, .clr, .y_in, .acc
  );

endmodule
