// tb_hybrid_adder_w16: self-check of the 25-bit hybrid final adder.
//
// Random operands and long carry chains are added and compared with the
// testbench's own sum. For every carry-select block (lowest bits 12, 16) the
// carry arriving at the block is worked out from the operands; both values
// must occur at every block, so each block is seen selecting both of its
// speculative sums.
module tb_hybrid_adder_w16;
  localparam int W = 25;
  localparam int NB = 2;
  localparam int BLK [NB] = '{12, 16};
  int checks = 0;
  int failures = 0;
  int sel [NB][2];
  logic [W-1:0] a, b, s;
  logic co;
  logic [W:0] ref_sum;
  logic [W:0] low;

  hybrid_adder_w16 dut (.a(a), .b(b), .sum(s), .cout(co));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) sel[i] = '{0, 0};
    for (int t = 0; t < 4000; t++) begin
      a = W'({$urandom, $urandom});
      b = W'({$urandom, $urandom});
      if (t % 4 == 1) b = ~a;
      if (t % 4 == 2) b = ~a + W'(1);
      if (t % 11 == 3) b = ~a & ((W'(1) << (t % W)) - 1);
      #1;
      ref_sum = (W+1)'(a) + (W+1)'(b);
      checks++;
      if ({co, s} !== ref_sum) begin
        failures++;
        $display("FAIL %h + %h -> %b %h exp %h", a, b, co, s, ref_sum);
      end
      for (int i = 0; i < NB; i++) begin
        low = ((W+1)'(a) & (((W+1)'(1) << BLK[i]) - 1)) + ((W+1)'(b) & (((W+1)'(1) << BLK[i]) - 1));
        sel[i][low[BLK[i]]]++;
      end
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (sel[i][0] == 0 || sel[i][1] == 0) begin
        failures++;
        $display("FAIL block at bit %0d never saw carry %0d", BLK[i], sel[i][0] == 0 ? 0 : 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
