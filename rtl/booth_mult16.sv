// Signed 16 x 16 multiplier with radix-4 (modified) Booth recoding.
//
// The multiplier b is scanned in overlapping 3-bit groups
// {b[2k+1], b[2k], b[2k-1]} (b[-1] = 0), each recoded to a digit in
// {-2,-1,0,1,2}; partial product k is that digit times a, shifted by 2k
// bits, giving N/2 = 8 partial products instead of 16. The partial products
// are sign-extended to 2N bits and summed by a balanced tree of word adders.
// The multiplier being a 16-bit modified Booth multiplier on two's
// complement numbers follows the description of the MAC unit; the recoding
// table is the standard one and the adder tree is this design's choice.
//
// Interface: a, b signed N-bit; prod the signed 2N-bit product.
// Combinational.
module booth_mult16 #(
  parameter int unsigned N = 16
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] prod
);

  localparam int unsigned NP = N / 2;

  logic signed [2*N-1:0] pp [NP];

  always_comb begin
    logic [N:0] bx;  // b with the implicit 0 below bit 0
    bx = {b, 1'b0};
    for (int k = 0; k < int'(NP); k++) begin
      logic signed [2*N-1:0] ax;
      logic signed [2*N-1:0] m;
      ax = (2*N)'(a);
      unique case (bx[2*k +: 3])
        3'b001, 3'b010: m = ax;
        3'b011:         m = ax <<< 1;
        3'b100:         m = -(ax <<< 1);
        3'b101, 3'b110: m = -ax;
        default:        m = '0;
      endcase
      pp[k] = m <<< (2 * k);
    end
  end

  // Balanced adder tree over the partial products.
  logic signed [2*N-1:0] lvl [2*NP];

  always_comb begin
    for (int k = 0; k < int'(NP); k++) lvl[NP + k] = pp[k];
    for (int k = int'(NP) - 1; k >= 1; k--) lvl[k] = lvl[2*k] + lvl[2*k+1];
    lvl[0] = '0;
  end

  assign prod = lvl[1];

endmodule
