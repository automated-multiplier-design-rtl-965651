// fadder9: 9-gate full adder of two-input NOR and NAND gates and inverters.
//
// Stage one forms A XOR B as NOR(NOR(A,B), NOT(NAND(A,B))); stage two repeats
// the same four gates with Cin to form SUM. Cout is NAND(NAND(A,B),
// NAND(A^B,Cin)), i.e. A&B | (A^B)&Cin. Every gate is written out so that the
// netlist matches the cell gate for gate; this is the low-power cell of the
// hybrid tree and the full adder of the gate-level multipliers and of the
// ripple-carry adder. Combinational.
module fadder9 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic nor_ab;
  logic nand_ab;
  logic and_ab;
  logic x_ab;
  logic nor_xc;
  logic nand_xc;
  logic and_xc;

  assign nor_ab  = ~(a | b);
  assign nand_ab = ~(a & b);
  assign and_ab  = ~nand_ab;
  assign x_ab    = ~(nor_ab | and_ab);
  assign nor_xc  = ~(x_ab | cin);
  assign nand_xc = ~(x_ab & cin);
  assign and_xc  = ~nand_xc;
  assign sum     = ~(nor_xc | and_xc);
  assign cout    = ~(nand_ab & nand_xc);
endmodule
