// fa_std: (3,2) counter as a standard-cell gate network.
//
// Three bits of equal weight are compressed into a sum bit of the same weight
// and a carry bit of twice the weight. The network is a 3-input XOR for the
// sum; the carry is (a XOR b) AND cin, ORed with a AND b, so the XOR of a and
// b is shared between both outputs. The slowest paths run from a and b to
// cout. Purely combinational.
module fa_std (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic ab_x;
  logic prop_c;
  logic gen_c;

  assign ab_x   = a ^ b;
  assign s      = cin ^ a ^ b;
  assign prop_c = cin & ab_x;
  assign gen_c  = a & b;
  assign cout   = prop_c | gen_c;
endmodule
