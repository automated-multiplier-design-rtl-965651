// hybrid_adder_d16: 30-bit final adder for the 16x16 Dadda multiplier.
//
// The Dadda final rows arrive with a steep ramp over the low bits, late in
// the middle and with a steep fall over the top bits:
//   adder bits  0-15 (product columns 1-16)  : 16-bit ripple-carry adder; its
//                carry moves about as fast as the inputs arrive
//   adder bits 16-19 (columns 17-20)         : 4-bit carry lookahead adder for
//                the latest-arriving columns
//   adder bits 20-29 (columns 21-30)         : three carry-select blocks over
//                CLAs, 4, 3 and 3 bits wide
// The published design has three carry-select blocks on top of the 16 + 4
// bits; their widths are not given and 4/3/3 is this design's choice. The
// carry in is zero. Combinational.
module hybrid_adder_d16 (
  input  logic [29:0] a,
  input  logic [29:0] b,
  output logic [29:0] sum,
  output logic        cout
);
  logic c16;
  logic c20;
  logic c24;
  logic c27;

  rca_adder #(.W(16)) u_s0 (.a(a[15:0]), .b(b[15:0]), .cin(1'b0), .sum(sum[15:0]), .cout(c16));
  cla_adder #(.W(4)) u_s1 (.a(a[19:16]), .b(b[19:16]), .cin(c16), .sum(sum[19:16]), .cout(c20));
  csel_cla_adder #(.W(4)) u_s2 (.a(a[23:20]), .b(b[23:20]), .cin(c20), .sum(sum[23:20]), .cout(c24));
  csel_cla_adder #(.W(3)) u_s3 (.a(a[26:24]), .b(b[26:24]), .cin(c24), .sum(sum[26:24]), .cout(c27));
  csel_cla_adder #(.W(3)) u_s4 (.a(a[29:27]), .b(b[29:27]), .cin(c27), .sum(sum[29:27]), .cout(cout));
endmodule
