// operand_reg: D flip-flops that hold the two primary operands.
//
// Both N-bit operands are captured on every rising clock edge; the multiplier
// array behind them is combinational, so the product of the operands captured
// at an edge is valid one clock period later (the register-to-output delay
// of the array). rst_n is an active-low synchronous reset that clears both
// registers; the reset and the absence of a load enable are choices of this
// design, the flip-flops themselves are part of the multiplier block diagram.
module operand_reg #(
  parameter int N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] a_q,
  output logic [N-1:0] b_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a_in;
      b_q <= b_in;
    end
  end
endmodule
