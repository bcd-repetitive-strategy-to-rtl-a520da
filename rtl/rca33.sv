// Ripple-carry adder, N bits (33 by default), built as a chain of full
// adders: bit i adds a[i], b[i] and the carry from bit i-1. It is the adder
// of the MAC unit's 33-bit accumulator; the ripple-carry structure follows
// that description, the full-adder equations are the textbook ones.
//
// Interface: a, b, cin -> sum, cout. Combinational, N full-adder delays.
module rca33 #(
  parameter int unsigned N = 33
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[N];

endmodule
