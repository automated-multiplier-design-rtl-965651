// fa_cell: full adder of a selectable cell style, used by the reduction trees.
//
// STYLE picks the standard-cell (3,2) counter, the 9-gate NAND/NOR cell or the
// 14-transistor cell. CELL_HYBRID is resolved per instance by the tree and is
// not a legal value here. Ports a, b, cin -> sum (same weight), cout (double
// weight). Combinational.
module fa_cell
  import mult_pkg::*;
#(
  parameter cell_style_e STYLE = CELL_STD
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  if (STYLE == CELL_STD) begin : g_std
    fa_std u_fa (.a(a), .b(b), .cin(cin), .s(sum), .cout(cout));
  end else if (STYLE == CELL_GATE9) begin : g_gate9
    fadder9 u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (STYLE == CELL_FA14) begin : g_fa14
    fa14trans u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_bad
    $error("fa_cell: STYLE must name a single cell");
  end
endmodule
