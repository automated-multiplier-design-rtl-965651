// ha_cell: half adder of a selectable cell style, used by the reduction trees.
//
// CELL_STD gives the XOR/AND (2,2) counter; every other style uses the 4-gate
// NOR/NAND/INV half adder. Ports a, b -> sum, cout. Combinational.
module ha_cell
  import mult_pkg::*;
#(
  parameter cell_style_e STYLE = CELL_STD
) (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  if (STYLE == CELL_STD) begin : g_std
    ha_std u_ha (.a(a), .b(b), .s(sum), .cout(cout));
  end else begin : g_gate
    hadder u_ha (.a(a), .b(b), .sum(sum), .cout(cout));
  end
endmodule
