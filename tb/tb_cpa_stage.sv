// tb_cpa_stage: self-check of the final adder stage with every adder kind.
//
// Spans follow the published adder widths: Dadda 16x16 columns 1..30 with a
// CLA and with the 30-bit hybrid adder, Wallace 12x12 columns 6..23 (18-bit
// CLA), Wallace 16x16 columns 7..31 with the 25-bit hybrid adder and Wallace
// 32x32 columns 9..63 with the 56-bit hybrid adder.
module tb_cpa_stage;
  import mult_pkg::*;
  localparam int NH = 5;
  int chk [NH];
  int fl  [NH];
  bit dn  [NH];
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  cpa_harness #(.N(16), .LO(1), .HI(30), .ADDER(ADD_CLA))     h0 (.checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  cpa_harness #(.N(16), .LO(1), .HI(30), .ADDER(ADD_HYB_D16)) h1 (.checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  cpa_harness #(.N(12), .LO(6), .HI(23), .ADDER(ADD_CLA))     h2 (.checks(chk[2]), .failures(fl[2]), .done(dn[2]));
  cpa_harness #(.N(16), .LO(7), .HI(31), .ADDER(ADD_HYB_W16)) h3 (.checks(chk[3]), .failures(fl[3]), .done(dn[3]));
  cpa_harness #(.N(32), .LO(9), .HI(63), .ADDER(ADD_HYB_W32)) h4 (.checks(chk[4]), .failures(fl[4]), .done(dn[4]));

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
