// fa14trans: 14-transistor full adder, written at switch-function level.
//
// The transistor cell first forms H = XNOR(A,B) and its complement H'. These
// two nodes then steer pass gates: SUM passes Cin when H is high (A==B) and the
// complement of Cin when H is low, and Cout passes A when H is high (A==B, so
// A is the carry) and Cin when H is low. The function of each pass-gate pair is
// written here as a 2:1 selection; threshold drops, sizing and the output
// buffers of the transistor cell have no logic effect and are not modelled.
// The fast cell of the hybrid Dadda tree. Combinational.
module fa14trans (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic h;      // XNOR(A,B)
  logic h_n;    // H'

  assign h    = ~(a ^ b);
  assign h_n  = ~h;
  assign sum  = h ? cin : ~cin;
  assign cout = h_n ? cin : a;
endmodule
