// tb_cla_adder: self-check of the carry lookahead adder at widths 1, 4, 5, 18, 30 and 64.
//
// Random operands plus carry-chain corner cases (all ones plus one, long
// propagate runs, zero) are applied; sum and carry out are compared with the
// testbench's own addition. 
module tb_cla_adder;
  int checks = 0;
  int failures = 0;
  logic [63:0] a, b, s64; logic ci, co64;
  logic [29:0] s30; logic co30;
  logic [17:0] s18; logic co18;
  logic [4:0]  s5;  logic co5;
  logic [3:0]  s4;  logic co4;
  logic [0:0]  s1;  logic co1;
  cla_adder #(.W(64)) d64 (.a(a), .b(b), .cin(ci), .sum(s64), .cout(co64));
  cla_adder #(.W(30)) d30 (.a(a[29:0]), .b(b[29:0]), .cin(ci), .sum(s30), .cout(co30));
  cla_adder #(.W(18)) d18 (.a(a[17:0]), .b(b[17:0]), .cin(ci), .sum(s18), .cout(co18));
  cla_adder #(.W(5))  d5  (.a(a[4:0]),  .b(b[4:0]),  .cin(ci), .sum(s5),  .cout(co5));
  cla_adder #(.W(4))  d4  (.a(a[3:0]),  .b(b[3:0]),  .cin(ci), .sum(s4),  .cout(co4));
  cla_adder #(.W(1))  d1  (.a(a[0:0]),  .b(b[0:0]),  .cin(ci), .sum(s1),  .cout(co1));
  task automatic chk(int w, logic [64:0] got);
    logic [64:0] m;
    logic [64:0] exp_v;
    m = (65'(1) << (w + 1)) - 1;
    exp_v = (65'(a) & (m >> 1)) + (65'(b) & (m >> 1)) + 65'(ci);
    checks++;
    if ((got & m) !== (exp_v & m)) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h ci=%b got %h exp %h", w, a, b, ci, got & m, exp_v & m);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] pick(int t, int w);
    logic [127:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    case (t % 8)
      0: v = '1;
      1: v = '0;
      2: v = 128'h1;
      3: v = {64{2'b01}};
      default: ;
    endcase
    return v & ((128'(1) << w) - 1);
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = 64'(pick(t, 64));
      b = 64'(pick(t / 8, 64));
      if (t % 8 == 2) b = ~a;
      ci = (t % 3 == 0);
      #1;
      chk(64, {co64, s64});
      chk(30, {35'(co30), s30});
      chk(18, {47'(co18), s18});
      chk(5, {60'(co5), s5});
      chk(4, {61'(co4), s4});
      chk(1, {64'(co1), s1});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
