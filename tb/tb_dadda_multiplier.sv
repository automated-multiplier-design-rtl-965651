// tb_dadda_multiplier: self-check of the Dadda multiplier in its published configurations.
//
// Registered standard-cell multipliers at 8 (every operand pair), 12, 16, 32
// and 64 bits with one-cycle latency; the combinational gate-level 8x8 and
// 16x16 multipliers; the hybrid-cell 16x16 multiplier; the 16x16 multiplier
// with the hybrid final adder.
module tb_dadda_multiplier;
  import mult_pkg::*;
  localparam int NH = 8;
  int chk [NH];
  int fl  [NH];
  bit dn  [NH];
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  mult_harness #(.N(8), .ALG(1), .EXHAUSTIVE(1)) h0 (.clk(clk), .checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  mult_harness #(.N(12), .ALG(1)) h1 (.clk(clk), .checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  mult_harness #(.N(16), .ALG(1)) h2 (.clk(clk), .checks(chk[2]), .failures(fl[2]), .done(dn[2]));
  mult_harness #(.N(32), .ALG(1)) h3 (.clk(clk), .checks(chk[3]), .failures(fl[3]), .done(dn[3]));
  mult_harness #(.N(64), .ALG(1), .TRIALS(300)) h4 (.clk(clk), .checks(chk[4]), .failures(fl[4]), .done(dn[4]));
  mult_harness #(.N(8), .ALG(1), .STYLE(CELL_GATE9), .REG(0), .EXHAUSTIVE(1)) h5 (.clk(clk), .checks(chk[5]), .failures(fl[5]), .done(dn[5]));
  mult_harness #(.N(16), .ALG(1), .STYLE(CELL_HYBRID), .REG(0), .TRIALS(2000)) h6 (.clk(clk), .checks(chk[6]), .failures(fl[6]), .done(dn[6]));
  mult_harness #(.N(16), .ALG(1), .ADDER(ADD_HYB_D16), .REG(0), .TRIALS(2000)) h7 (.clk(clk), .checks(chk[7]), .failures(fl[7]), .done(dn[7]));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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
