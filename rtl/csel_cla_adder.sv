// csel_cla_adder: carry-select block whose two speculative adders are CLAs.
//
// Two W-bit carry lookahead adders add a and b with carry in 0 and 1 while the
// real carry is still on its way; when cin arrives it only has to drive a 2:1
// selection of sum and carry out. Lookahead adders rather than ripple adders
// compute the speculative sums because in a multiplier the low bits of such a
// block arrive nearly as late as the carry. Combinational.
module csel_cla_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] sum0;
  logic [W-1:0] sum1;
  logic         cout0;
  logic         cout1;

  cla_adder #(.W(W)) u_add0 (.a(a), .b(b), .cin(1'b0), .sum(sum0), .cout(cout0));
  cla_adder #(.W(W)) u_add1 (.a(a), .b(b), .cin(1'b1), .sum(sum1), .cout(cout1));

  assign sum  = cin ? sum1 : sum0;
  assign cout = cin ? cout1 : cout0;
endmodule
