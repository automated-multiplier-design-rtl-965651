// tb_cla_lookahead: exhaustive self-check of the lookahead block, K = 1..4.
//
// For every g, p and carry-in pattern the carries must follow the recurrence
// c[i+1] = g[i] | p[i]&c[i] with c[0] = cin, the group generate must be the
// carry the recurrence produces out of the block with cin = 0, and the group
// propagate the AND of all p.
module tb_cla_lookahead;
  int checks = 0;
  int failures = 0;
  logic [3:0] g, p;
  logic cin;
  logic [3:0] c4; logic gg4, gp4;
  logic [2:0] c3; logic gg3, gp3;
  logic [1:0] c2; logic gg2, gp2;
  logic [0:0] c1; logic gg1, gp1;

  cla_lookahead #(.K(4)) d4 (.g(g), .p(p), .cin(cin), .c(c4), .gg(gg4), .gp(gp4));
  cla_lookahead #(.K(3)) d3 (.g(g[2:0]), .p(p[2:0]), .cin(cin), .c(c3), .gg(gg3), .gp(gp3));
  cla_lookahead #(.K(2)) d2 (.g(g[1:0]), .p(p[1:0]), .cin(cin), .c(c2), .gg(gg2), .gp(gp2));
  cla_lookahead #(.K(1)) d1 (.g(g[0:0]), .p(p[0:0]), .cin(cin), .c(c1), .gg(gg1), .gp(gp1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_k(int k, logic [3:0] c, logic ggv, logic gpv);
    logic [4:0] r;
    logic [4:0] r0;
    logic pa;
    r[0] = cin;
    r0[0] = 1'b0;
    pa = 1'b1;
    for (int i = 0; i < k; i++) begin
      r[i+1]  = g[i] | (p[i] & r[i]);
      r0[i+1] = g[i] | (p[i] & r0[i]);
      pa &= p[i];
    end
    for (int i = 0; i < k; i++) begin
      checks++;
      if (c[i] !== r[i]) begin
        failures++;
        $display("FAIL K=%0d c[%0d] g=%b p=%b cin=%b", k, i, g, p, cin);
      end
    end
    checks++;
    if (ggv !== r0[k] || gpv !== pa) begin
      failures++;
      $display("FAIL K=%0d group g=%b p=%b", k, g, p);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, g, p} = 9'(v);
      #1;
      check_k(4, c4, gg4, gp4);
      check_k(3, {1'b0, c3}, gg3, gp3);
      check_k(2, {2'b0, c2}, gg2, gp2);
      check_k(1, {3'b0, c1}, gg1, gp1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
