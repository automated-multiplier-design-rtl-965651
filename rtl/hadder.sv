// hadder: 4-gate half adder of NOR2, NAND2 and an inverter.
//
// Cout = NOT(NAND(A,B)) = A&B, SUM = NOR(NOR(A,B), Cout) = A^B. The half
// adder of the gate-level and hybrid-cell trees. Combinational.
module hadder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  logic nor_ab;
  logic nand_ab;

  assign nor_ab  = ~(a | b);
  assign nand_ab = ~(a & b);
  assign cout    = ~nand_ab;
  assign sum     = ~(nor_ab | cout);
endmodule
