// tb_wallace_tree: self-check of the Wallace reduction tree at several sizes.
//
// Each tree_harness instance checks row0 + row1 == a*b and the final adder
// span published for that size: 12x12 adds columns 6..23 (18 bits), 16x16 columns 7..31 (25 bits), 32x32 55 bits.
module tb_wallace_tree;
  import mult_pkg::*;
  localparam int NH = 5;
  int  chk [NH];
  int  fl  [NH];
  bit  dn  [NH];
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  tree_harness #(.N(6),  .ALG(0), .CPA_LO(4),  .CPA_HI(11)) h0 (.checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  tree_harness #(.N(12), .ALG(0), .CPA_LO(6),  .CPA_HI(23)) h1 (.checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  tree_harness #(.N(16), .ALG(0), .CPA_LO(7),  .CPA_HI(31)) h2 (.checks(chk[2]), .failures(fl[2]), .done(dn[2]));
  tree_harness #(.N(16), .ALG(0), .STYLE(CELL_GATE9), .CPA_LO(7), .CPA_HI(31)) h3 (.checks(chk[3]), .failures(fl[3]), .done(dn[3]));
  tree_harness #(.N(32), .ALG(0), .CPA_LO(9),  .CPA_HI(63), .TRIALS(200)) h4 (.checks(chk[4]), .failures(fl[4]), .done(dn[4]));

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
