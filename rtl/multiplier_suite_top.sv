// multiplier_suite_top: the column compression multipliers side by side.
//
// Four groups of multipliers, each with its own operand and product ports:
//   auto_*  : N_AUTO x N_AUTO Wallace and Dadda multipliers in the
//             automated-design form: operand flip-flops, AND array,
//             standard-cell (3,2)/(2,2) counters, CLA final adder. p shows the
//             product of the operands captured at the previous clock edge.
//   hyb_*   : 16x16 Dadda multiplier whose tree mixes fast 14-transistor and
//             low-power 9-gate full adders (hybrid cell tree), CLA final adder.
//   gate_*  : 8x8 and 16x16 Wallace and Dadda multipliers built only from
//             inverters, NAND2 and NOR2 gates (the gate-level netlists of the
//             dual-supply study), CLA final adder.
//   hfa_*   : 16x16 Wallace, 16x16 Dadda and 32x32 Wallace multipliers whose
//             final adders are the timing-shaped hybrid adders.
// All but the auto_* group are combinational, as in the studies that use them.
// rst_n clears the auto_* operand registers (active low, synchronous).
module multiplier_suite_top
  import mult_pkg::*;
#(
  parameter int N_AUTO = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // automated-design multipliers
  input  logic [N_AUTO-1:0]   auto_w_a,
  input  logic [N_AUTO-1:0]   auto_w_b,
  output logic [2*N_AUTO-1:0] auto_w_p,
  input  logic [N_AUTO-1:0]   auto_d_a,
  input  logic [N_AUTO-1:0]   auto_d_b,
  output logic [2*N_AUTO-1:0] auto_d_p,
  // hybrid-cell 16x16 Dadda
  input  logic [15:0]         hyb_a,
  input  logic [15:0]         hyb_b,
  output logic [31:0]         hyb_p,
  // gate-level multipliers
  input  logic [7:0]          gate_w8_a,
  input  logic [7:0]          gate_w8_b,
  output logic [15:0]         gate_w8_p,
  input  logic [7:0]          gate_d8_a,
  input  logic [7:0]          gate_d8_b,
  output logic [15:0]         gate_d8_p,
  input  logic [15:0]         gate_w16_a,
  input  logic [15:0]         gate_w16_b,
  output logic [31:0]         gate_w16_p,
  input  logic [15:0]         gate_d16_a,
  input  logic [15:0]         gate_d16_b,
  output logic [31:0]         gate_d16_p,
  // hybrid final adder multipliers
  input  logic [15:0]         hfa_w16_a,
  input  logic [15:0]         hfa_w16_b,
  output logic [31:0]         hfa_w16_p,
  input  logic [15:0]         hfa_d16_a,
  input  logic [15:0]         hfa_d16_b,
  output logic [31:0]         hfa_d16_p,
  input  logic [31:0]         hfa_w32_a,
  input  logic [31:0]         hfa_w32_b,
  output logic [63:0]         hfa_w32_p
);
  wallace_multiplier #(.N(N_AUTO)) u_auto_w (
    .clk(clk), .rst_n(rst_n), .a(auto_w_a), .b(auto_w_b), .p(auto_w_p));
  dadda_multiplier #(.N(N_AUTO)) u_auto_d (
    .clk(clk), .rst_n(rst_n), .a(auto_d_a), .b(auto_d_b), .p(auto_d_p));

  dadda_multiplier #(.N(16), .STYLE(CELL_HYBRID), .REG_INPUTS(1'b0)) u_hyb (
    .clk(clk), .rst_n(rst_n), .a(hyb_a), .b(hyb_b), .p(hyb_p));

  wallace_multiplier #(.N(8), .STYLE(CELL_GATE9), .REG_INPUTS(1'b0)) u_gate_w8 (
    .clk(clk), .rst_n(rst_n), .a(gate_w8_a), .b(gate_w8_b), .p(gate_w8_p));
  dadda_multiplier #(.N(8), .STYLE(CELL_GATE9), .REG_INPUTS(1'b0)) u_gate_d8 (
    .clk(clk), .rst_n(rst_n), .a(gate_d8_a), .b(gate_d8_b), .p(gate_d8_p));
  wallace_multiplier #(.N(16), .STYLE(CELL_GATE9), .REG_INPUTS(1'b0)) u_gate_w16 (
    .clk(clk), .rst_n(rst_n), .a(gate_w16_a), .b(gate_w16_b), .p(gate_w16_p));
  dadda_multiplier #(.N(16), .STYLE(CELL_GATE9), .REG_INPUTS(1'b0)) u_gate_d16 (
    .clk(clk), .rst_n(rst_n), .a(gate_d16_a), .b(gate_d16_b), .p(gate_d16_p));

  wallace_multiplier #(.N(16), .ADDER(ADD_HYB_W16), .REG_INPUTS(1'b0)) u_hfa_w16 (
    .clk(clk), .rst_n(rst_n), .a(hfa_w16_a), .b(hfa_w16_b), .p(hfa_w16_p));
  dadda_multiplier #(.N(16), .ADDER(ADD_HYB_D16), .REG_INPUTS(1'b0)) u_hfa_d16 (
    .clk(clk), .rst_n(rst_n), .a(hfa_d16_a), .b(hfa_d16_b), .p(hfa_d16_p));
  wallace_multiplier #(.N(32), .ADDER(ADD_HYB_W32), .REG_INPUTS(1'b0)) u_hfa_w32 (
    .clk(clk), .rst_n(rst_n), .a(hfa_w32_a), .b(hfa_w32_b), .p(hfa_w32_p));
endmodule
