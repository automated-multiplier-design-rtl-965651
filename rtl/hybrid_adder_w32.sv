// hybrid_adder_w32: 56-bit final adder for the 32x32 Wallace multiplier.
//
// The inputs of a Wallace final adder arrive almost together over the low and
// middle bits, with a small late spike at bits 22-25, and much earlier towards
// the top. The adder is cut into sections that match that profile:
//   bits  0-21 : 22-bit carry lookahead adder (three lookahead levels)
//   bits 22-25 : 4-bit carry lookahead adder, so the late bits cross only one
//                lookahead level before their carry moves on
//   bits 26-41 : 16-bit carry-select block over two CLAs
//   bits 42-55 : 14-bit carry-select block over two CLAs
// Splitting the top 30 bits in two keeps each speculative CLA at two levels.
// The section widths are the published ones; the carry in is zero.
// Combinational.
module hybrid_adder_w32 (
  input  logic [55:0] a,
  input  logic [55:0] b,
  output logic [55:0] sum,
  output logic        cout
);
  logic c22;
  logic c26;
  logic c42;

  cla_adder #(.W(22)) u_s0 (.a(a[21:0]), .b(b[21:0]), .cin(1'b0), .sum(sum[21:0]), .cout(c22));
  cla_adder #(.W(4)) u_s1 (.a(a[25:22]), .b(b[25:22]), .cin(c22), .sum(sum[25:22]), .cout(c26));
  csel_cla_adder #(.W(16)) u_s2 (.a(a[41:26]), .b(b[41:26]), .cin(c26), .sum(sum[41:26]), .cout(c42));
  csel_cla_adder #(.W(14)) u_s3 (.a(a[55:42]), .b(b[55:42]), .cin(c42), .sum(sum[55:42]), .cout(cout));
endmodule
