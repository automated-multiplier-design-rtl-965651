// ha_std: (2,2) counter (half adder) for the standard-cell trees.
//
// Two bits of equal weight give a sum bit of the same weight (XOR) and a carry
// of twice the weight (AND). Combinational. Only the function of this counter
// is specified for the standard-cell multipliers; the XOR/AND pair is the
// simplest network that provides it.
module ha_std (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  assign s    = a ^ b;
  assign cout = a & b;
endmodule
