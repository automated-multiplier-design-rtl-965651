// tree_harness: drives one reduction tree and checks its two output rows.
//
// Forms the bit product matrix of random (and all-ones) operands in the
// testbench itself, applies it to a Wallace (ALG = 0) or Dadda (ALG = 1)
// tree and checks that row0 + row1 equals a*b. It also checks the shape the
// reduction rule promises: row1 holds no bit below column CPA_LO (so the final
// adder starts there) and no bit above column CPA_HI, and column CPA_LO does
// receive two bits for some operands. Reports its counts when done is raised.
module tree_harness
  import mult_pkg::*;
#(
  parameter int          N      = 12,
  parameter int          ALG    = 0,
  parameter cell_style_e STYLE  = CELL_STD,
  parameter int          CPA_LO = 6,
  parameter int          CPA_HI = 23,
  parameter int          TRIALS = 400
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0] row0, row1;
  int lo_hits;

  if (ALG == 0) begin : g_w
    wallace_tree #(.N(N), .STYLE(STYLE)) dut (.pp(pp), .row0(row0), .row1(row1));
  end else begin : g_d
    dadda_tree #(.N(N), .STYLE(STYLE)) dut (.pp(pp), .row0(row0), .row1(row1));
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    lo_hits = 0;
    for (int t = 0; t < TRIALS; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = (t == 0) ? 1'b1 : 1'($urandom);
        b[i] = (t == 0) ? 1'b1 : 1'($urandom);
      end
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) pp[j][i] = a[i] & b[j];
      #1;
      checks++;
      if (row0 + row1 !== (2*N)'(a) * (2*N)'(b)) begin
        failures++;
        $display("FAIL N=%0d alg=%0d %h*%h rows %h %h", N, ALG, a, b, row0, row1);
      end
      if (CPA_LO > 0) begin
        checks++;
        if ((row1 & ((2*N)'(1) << CPA_LO) - 1) !== '0) begin
          failures++;
          $display("FAIL N=%0d alg=%0d row1 has bits below column %0d", N, ALG, CPA_LO);
        end
      end
      if (CPA_HI < 2 * N - 1) begin
        checks++;
        if (((row0 | row1) >> (CPA_HI + 1)) !== '0) begin
          failures++;
          $display("FAIL N=%0d alg=%0d bits above column %0d", N, ALG, CPA_HI);
        end
      end
      if (row0[CPA_LO] && row1[CPA_LO]) lo_hits++;
    end
    checks++;
    if (lo_hits == 0) begin
      failures++;
      $display("FAIL N=%0d alg=%0d column %0d never held two bits", N, ALG, CPA_LO);
    end
    done = 1'b1;
  end
endmodule
