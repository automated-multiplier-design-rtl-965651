// tb_pp_matrix: checks every bit product and the weighted sum of the matrix.
//
// For random and corner operands each pp[j][i] must equal a[i]&b[j], and the
// rows, shifted by their index and added, must give the product a*b.
module tb_pp_matrix;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0] acc;
  int checks = 0;
  int failures = 0;

  pp_matrix #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      a = (t == 0) ? '1 : (t == 1) ? '0 : N'($urandom);
      b = (t == 0) ? '1 : (t == 1) ? 16'h8001 : N'($urandom);
      #1;
      acc = '0;
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (pp[j][i] !== (a[i] & b[j])) begin
            failures++;
            $display("FAIL pp[%0d][%0d]", j, i);
          end
        end
        acc = acc + ((2*N)'(pp[j]) << j);
      end
      checks++;
      if (acc !== (2*N)'(a) * (2*N)'(b)) begin
        failures++;
        $display("FAIL sum %h * %h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
