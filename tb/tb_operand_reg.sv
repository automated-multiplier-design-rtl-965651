// tb_operand_reg: checks reset and one-cycle capture of the operand registers.
//
// After a synchronous reset both outputs must be zero; then random operands
// are applied every cycle and each output must equal the input of the
// previous rising edge. A reset in mid-run must clear the registers again.
module tb_operand_reg;
  localparam int N = 16;
  logic clk = 1'b0;
  logic rst_n;
  logic [N-1:0] a_in, b_in, a_q, b_q;
  logic [N-1:0] a_prev, b_prev;
  int checks = 0;
  int failures = 0;

  operand_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .a_q(a_q), .b_q(b_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] ea, logic [N-1:0] eb);
    checks++;
    if (a_q !== ea || b_q !== eb) begin
      failures++;
      $display("FAIL a_q=%h b_q=%h expected %h %h", a_q, b_q, ea, eb);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    a_in = 16'hffff;
    b_in = 16'hffff;
    @(posedge clk);
    #1 check('0, '0);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      a_prev = N'($urandom);
      b_prev = N'($urandom);
      a_in = a_prev;
      b_in = b_prev;
      @(posedge clk);
      #1 check(a_prev, b_prev);
      a_in = ~a_prev;  // changing the input between edges must not show
      #1 check(a_prev, b_prev);
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 check('0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
