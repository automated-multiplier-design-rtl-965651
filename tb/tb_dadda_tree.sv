// tb_dadda_tree: self-check of the Dadda reduction tree at several sizes.
//
// Each tree_harness instance checks row0 + row1 == a*b and the final adder
// span published for that size: N x N adds columns 1..2N-2 (2N-2 bits); the hybrid-cell 16x16 tree is included.
module tb_dadda_tree;
  import mult_pkg::*;
  localparam int NH = 5;
  int  chk [NH];
  int  fl  [NH];
  bit  dn  [NH];
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  tree_harness #(.N(6),  .ALG(1), .CPA_LO(1), .CPA_HI(10)) h0 (.checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  tree_harness #(.N(12), .ALG(1), .CPA_LO(1), .CPA_HI(22)) h1 (.checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  tree_harness #(.N(16), .ALG(1), .CPA_LO(1), .CPA_HI(30)) h2 (.checks(chk[2]), .failures(fl[2]), .done(dn[2]));
  tree_harness #(.N(16), .ALG(1), .STYLE(CELL_HYBRID), .CPA_LO(1), .CPA_HI(30)) h3 (.checks(chk[3]), .failures(fl[3]), .done(dn[3]));
  tree_harness #(.N(64), .ALG(1), .CPA_LO(1), .CPA_HI(126), .TRIALS(100)) h4 (.checks(chk[4]), .failures(fl[4]), .done(dn[4]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NH; i++) all &= dn[i];
    end while (!all);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
