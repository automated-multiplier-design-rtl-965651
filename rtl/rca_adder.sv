// rca_adder: W-bit ripple-carry adder.
//
// A chain of 9-gate full adders; the carry ripples from bit 0 to bit W-1, so
// the delay is W full-adder carry delays. It suits the low-order bits of a
// Dadda product, whose inputs arrive staggered at about the rate the carry
// ripples. Combinational.
module rca_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    fadder9 u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
