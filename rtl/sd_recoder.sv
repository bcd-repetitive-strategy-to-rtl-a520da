// Signed-digit radix-10 recoder for the BCD multiplier operand.
//
// Each BCD digit Y_i (0..9) is rewritten into a digit of the set [-5,5]:
// a digit of 5 or more sends a transfer t_i = 1 to the next position and
// keeps Y_i - 10, and every position adds the transfer from below:
//   Yb_i = Y_i - 10*t_i + t_(i-1),   Yb_d = t_(d-1)  (0 or 1).
// The d-digit multiplier thus gives d+1 recoded digits and hence d+1 partial
// products, the last of which selects only 0X or 1X. The digit set [-5,5]
// and the d+1 partial products follow the multiplier this RTL implements;
// the transfer rule above and the sign/one-hot digit format (bcd_pkg) are
// this design's choice.
//
// Interface: y is D BCD digits, digit i at y[i]; yb[0..D] are the recoded
// digits. Purely combinational, one digit of transfer ripple.
module sd_recoder
  import bcd_pkg::*;
#(
  parameter int unsigned D = 16
) (
  input  digit_t    [D-1:0] y,
  output sd_digit_t [D:0]   yb
);

  logic [D:0] t;  // t[i+1] is the transfer out of digit i; t[0] = 0

  always_comb begin
    t[0] = 1'b0;
    for (int i = 0; i < D; i++) t[i+1] = (y[i] >= 4'd5);
  end

  // Magnitude and sign of one recoded digit from Y_i and the incoming transfer.
  function automatic sd_digit_t recode(digit_t yi, logic tin);
    sd_digit_t r;
    logic [4:0] v;  // Y_i + t_in, 0..10
    v = {1'b0, yi} + {4'b0, tin};
    r = '0;
    if (yi >= 4'd5) begin
      // Y_i - 10 + t_in = -(10 - v): magnitude 10-v in 0..5
      if (v != 5'd10) begin
        r.neg = 1'b1;
        r.mag[3'(5'd9 - v)] = 1'b1;
      end
    end else if (v != 5'd0) begin
      r.mag[3'(v - 5'd1)] = 1'b1;  // positive 1..5
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < D; i++) yb[i] = recode(y[i], t[i]);
    // Top digit: the transfer alone (0 or +1).
    yb[D]     = '0;
    yb[D].mag = {4'b0, t[D]};
  end

endmodule
