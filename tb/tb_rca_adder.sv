// tb_rca_adder: self-check of the rca_adder at widths 16 and 3.
//
// Random operands, carry-propagating corner cases and both carry-in values;
// sum and carry out are compared with the testbench's own addition. Both
// values of the carry in are counted and must each occur.
module tb_rca_adder;
  localparam int W = 16;
  int checks = 0;
  int failures = 0;
  int cin_seen [2] = '{0, 0};
  logic [W-1:0] a, b, s;
  logic ci, co;
  logic [2:0] s3;
  logic co3;

  rca_adder #(.W(W)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  rca_adder #(.W(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .cin(ci), .sum(s3), .cout(co3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = W'({$urandom, $urandom});
      b = W'({$urandom, $urandom});
      if (t % 5 == 0) b = ~a;
      if (t % 7 == 0) a = '1;
      ci = 1'(t % 2);
      cin_seen[ci]++;
      #1;
      checks++;
      if ({co, s} !== (W+1)'(a) + (W+1)'(b) + (W+1)'(ci)) begin
        failures++;
        $display("FAIL %h + %h + %b -> %b %h", a, b, ci, co, s);
      end
      checks++;
      if ({co3, s3} !== 4'(a[2:0]) + 4'(b[2:0]) + 4'(ci)) begin
        failures++;
        $display("FAIL W=3 %h + %h + %b", a[2:0], b[2:0], ci);
      end
    end
    checks++;
    if (cin_seen[0] == 0 || cin_seen[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
