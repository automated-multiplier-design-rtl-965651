// hybrid_adder_w16: 25-bit final adder for the 16x16 Wallace multiplier.
//
// Same idea as the 32-bit Wallace adder, scaled down:
//   bits  0-7  : 8-bit carry lookahead adder
//   bits  8-11 : 4-bit carry lookahead adder for the latest-arriving bits
//   bits 12-15 : 4-bit carry-select block over two CLAs
//   bits 16-24 : 9-bit carry-select block over two CLAs
// Section widths are the published ones; the carry in is zero.
// Combinational.
module hybrid_adder_w16 (
  input  logic [24:0] a,
  input  logic [24:0] b,
  output logic [24:0] sum,
  output logic        cout
);
  logic c8;
  logic c12;
  logic c16;

  cla_adder #(.W(8)) u_s0 (.a(a[7:0]), .b(b[7:0]), .cin(1'b0), .sum(sum[7:0]), .cout(c8));
  cla_adder #(.W(4)) u_s1 (.a(a[11:8]), .b(b[11:8]), .cin(c8), .sum(sum[11:8]), .cout(c12));
  csel_cla_adder #(.W(4)) u_s2 (.a(a[15:12]), .b(b[15:12]), .cin(c12), .sum(sum[15:12]), .cout(c16));
  csel_cla_adder #(.W(9)) u_s3 (.a(a[24:16]), .b(b[24:16]), .cin(c16), .sum(sum[24:16]), .cout(cout));
endmodule
