// wallace_multiplier: N x N unsigned Wallace column compression multiplier.
//
// Three steps: the N*N AND gates form the bit product matrix, the
// Wallace reduction (rows compressed three at a time, as many counters as possible) compresses it to two rows, and a carry-propagate adder adds the two
// rows. Delay is one AND gate, one (3,2) counter per reduction stage (about
// log1.5 of N stages) and the final adder, so it grows with log N.
//
// Timing: with REG_INPUTS = 1 the operands are captured by D flip-flops on the
// rising edge of clk and p, computed combinationally behind them, shows the
// product of the operands captured at the last edge (one cycle latency, no
// output register). rst_n (active low, synchronous) clears the operand
// registers. With REG_INPUTS = 0 the multiplier is purely combinational and
// clk/rst_n are unused.
//
// STYLE picks the counter cells, ADDER the final adder (CLA by default, or one
// of the published hybrid adders when N and the reduction match it). The
// registered-input, CLA-terminated structure follows the published block
// diagram; reset and the parameters that select cells and adders are this
// design's additions.
module wallace_multiplier
  import mult_pkg::*;
#(
  parameter int          N          = 16,
  parameter cell_style_e STYLE      = CELL_STD,
  parameter adder_kind_e ADDER      = ADD_CLA,
  parameter bit          REG_INPUTS = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]          a_q;
  logic [N-1:0]          b_q;
  logic [N-1:0][N-1:0]   pp;
  logic [2*N-1:0]        row0;
  logic [2*N-1:0]        row1;

  if (REG_INPUTS) begin : g_reg
    operand_reg #(.N(N)) u_reg (
      .clk(clk), .rst_n(rst_n), .a_in(a), .b_in(b), .a_q(a_q), .b_q(b_q));
  end else begin : g_comb
    assign a_q = a;
    assign b_q = b;
  end

  pp_matrix #(.N(N)) u_pp (.a(a_q), .b(b_q), .pp(pp));

  wallace_tree #(.N(N), .STYLE(STYLE)) u_tree (.pp(pp), .row0(row0), .row1(row1));

  cpa_stage #(
    .N    (N),
    .LO   (wallace_cpa_lo(N)),
    .HI   (wallace_cpa_hi(N)),
    .ADDER(ADDER)
  ) u_cpa (
    .row0(row0), .row1(row1), .p(p));
endmodule
