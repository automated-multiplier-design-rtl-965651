// mult_harness: drives one multiplier and checks its products cycle by cycle.
//
// Operands change just after each falling clock edge. With registered inputs
// (REG = 1) the product must appear after the next rising edge, exactly one
// cycle later, and must not change ahead of that edge; a synchronous reset at
// the start must give p = 0. Combinational multipliers (REG = 0) are checked
// a moment after the operands change. EXHAUSTIVE = 1 walks every operand pair
// (small N only); otherwise TRIALS random pairs follow all-ones and one-hot
// corner cases. Product reference: the testbench's own multiplication.
module mult_harness
  import mult_pkg::*;
#(
  parameter int          N          = 8,
  parameter int          ALG        = 0,
  parameter cell_style_e STYLE      = CELL_STD,
  parameter adder_kind_e ADDER      = ADD_CLA,
  parameter bit          REG        = 1'b1,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int          TRIALS     = 500
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  logic rst_n;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p, expect_p;
  longint total;

  if (ALG == 0) begin : g_w
    wallace_multiplier #(.N(N), .STYLE(STYLE), .ADDER(ADDER), .REG_INPUTS(REG)) dut (
      .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p));
  end else begin : g_d
    dadda_multiplier #(.N(N), .STYLE(STYLE), .ADDER(ADDER), .REG_INPUTS(REG)) dut (
      .clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p));
  end

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv);
    logic [2*N-1:0] p_prev;
    @(negedge clk);
    a = av;
    b = bv;
    expect_p = (2*N)'(av) * (2*N)'(bv);
    if (REG) begin
      p_prev = p;
      #1;
      checks++;
      if (p !== p_prev) begin
        failures++;
        $display("FAIL N=%0d alg=%0d product changed ahead of the clock edge", N, ALG);
      end
      @(posedge clk);
    end
    #1;
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL N=%0d alg=%0d %h * %h = %h, got %h", N, ALG, av, bv, expect_p, p);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    a = '1;
    b = '1;
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    if (REG) begin
      checks++;
      if (p !== '0) begin
        failures++;
        $display("FAIL N=%0d alg=%0d product not zero after reset", N, ALG);
      end
    end
    rst_n = 1'b1;
    apply('1, '1);
    apply('1, N'(1));
    apply(N'(1) << (N - 1), N'(1) << (N - 1));
    if (EXHAUSTIVE) begin
      total = longint'(1) << (2 * N);
      for (longint v = 0; v < total; v++) apply(N'(v), N'(v >> N));
    end else begin
      for (int t = 0; t < TRIALS; t++) apply(rnd(), rnd());
    end
    done = 1'b1;
  end
endmodule
