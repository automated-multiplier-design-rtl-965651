// cpa_stage: final carry-propagate stage of a column compression multiplier.
//
// After reduction, columns below LO hold at most one bit and are already
// product bits. Columns LO..HI are added by the selected adder; if the adder
// is wider than the HI-LO+1 columns it needs, its extra top inputs are zero.
// The carry out lands in column HI+1 when that column is inside the 2N-bit
// product (Dadda: HI = 2N-2); when HI = 2N-1 (Wallace) it is always zero
// because the product fits in 2N bits.
//
// ADDER = ADD_CLA builds a CLA of exactly HI-LO+1 bits; the hybrid kinds
// require that width to fit the published adder width (25, 30 or 56 bits).
// Combinational.
module cpa_stage
  import mult_pkg::*;
#(
  parameter int          N     = 16,
  parameter int          LO    = 1,
  parameter int          HI    = 30,
  parameter adder_kind_e ADDER = ADD_CLA
) (
  input  logic [2*N-1:0] row0,
  input  logic [2*N-1:0] row1,
  output logic [2*N-1:0] p
);
  localparam int W  = HI - LO + 1;
  localparam int AW = (ADDER == ADD_HYB_W16) ? 25 :
                      (ADDER == ADD_HYB_D16) ? 30 :
                      (ADDER == ADD_HYB_W32) ? 56 : W;

  if (AW < W) begin : g_bad_width
    $error("cpa_stage: adder of %0d bits cannot add %0d columns", AW, W);
  end

  logic [AW-1:0] op_a;
  logic [AW-1:0] op_b;
  logic [AW-1:0] sum;
  logic          cout;

  assign op_a = AW'(row0[HI:LO]);
  assign op_b = AW'(row1[HI:LO]);

  if (ADDER == ADD_HYB_W16) begin : g_w16
    hybrid_adder_w16 u_add (.a(op_a), .b(op_b), .sum(sum), .cout(cout));
  end else if (ADDER == ADD_HYB_D16) begin : g_d16
    hybrid_adder_d16 u_add (.a(op_a), .b(op_b), .sum(sum), .cout(cout));
  end else if (ADDER == ADD_HYB_W32) begin : g_w32
    hybrid_adder_w32 u_add (.a(op_a), .b(op_b), .sum(sum), .cout(cout));
  end else begin : g_cla
    cla_adder #(.W(AW)) u_add (.a(op_a), .b(op_b), .cin(1'b0), .sum(sum), .cout(cout));
  end

  if (LO > 0) begin : g_low
    assign p[LO-1:0] = row0[LO-1:0] | row1[LO-1:0];
  end
  assign p[HI:LO] = sum[W-1:0];
  // carry into column HI+1: the adder's next sum bit if it is wider than
  // needed, else its carry out
  if (HI + 1 < 2 * N && AW > W) begin : g_carry_sum
    assign p[HI+1] = sum[W];
  end else if (HI + 1 < 2 * N) begin : g_carry_out
    assign p[HI+1] = cout;
  end
  if (HI + 2 < 2 * N) begin : g_high
    assign p[2*N-1:HI+2] = '0;
  end
endmodule
