// tb_multiplier_suite_top: end-to-end check of every multiplier in the suite.
//
// Runs the top at its default parameters (64x64 registered Wallace and Dadda
// multipliers). Each cycle new random or corner-case operands go to all ten
// multipliers; the registered pair is checked one cycle later against the
// previous operands, the combinational ones right away. Counted mechanisms,
// each of which must occur at least once:
//   - synchronous reset clearing the operand registers (p = 0);
//   - one-cycle latency: the registered product holds until the next edge;
//   - the final adder carry of the Dadda multiplier reaching the top product
//     column (the carry out of a 2N-2 bit adder);
//   - every carry-select block of the three hybrid final adders selecting with
//     carry 0 and with carry 1 (observed at the block's carry input).
module tb_multiplier_suite_top;
  localparam int NA = 64;
  logic clk = 1'b0;
  logic rst_n;
  logic [NA-1:0] aw_a, aw_b, ad_a, ad_b;
  logic [2*NA-1:0] aw_p, ad_p;
  logic [15:0] hyb_a, hyb_b, gw16_a, gw16_b, gd16_a, gd16_b, hw16_a, hw16_b, hd16_a, hd16_b;
  logic [31:0] hyb_p, gw16_p, gd16_p, hw16_p, hd16_p;
  logic [7:0]  gw8_a, gw8_b, gd8_a, gd8_b;
  logic [15:0] gw8_p, gd8_p;
  logic [31:0] hw32_a, hw32_b;
  logic [63:0] hw32_p;
  logic [2*NA-1:0] exp_aw, exp_ad;
  int checks = 0;
  int failures = 0;
  int n_reset = 0;
  int n_hold = 0;
  int n_top_carry = 0;
  int csel [7][2];

  multiplier_suite_top dut (
    .clk(clk), .rst_n(rst_n),
    .auto_w_a(aw_a), .auto_w_b(aw_b), .auto_w_p(aw_p),
    .auto_d_a(ad_a), .auto_d_b(ad_b), .auto_d_p(ad_p),
    .hyb_a(hyb_a), .hyb_b(hyb_b), .hyb_p(hyb_p),
    .gate_w8_a(gw8_a), .gate_w8_b(gw8_b), .gate_w8_p(gw8_p),
    .gate_d8_a(gd8_a), .gate_d8_b(gd8_b), .gate_d8_p(gd8_p),
    .gate_w16_a(gw16_a), .gate_w16_b(gw16_b), .gate_w16_p(gw16_p),
    .gate_d16_a(gd16_a), .gate_d16_b(gd16_b), .gate_d16_p(gd16_p),
    .hfa_w16_a(hw16_a), .hfa_w16_b(hw16_b), .hfa_w16_p(hw16_p),
    .hfa_d16_a(hd16_a), .hfa_d16_b(hd16_b), .hfa_d16_p(hd16_p),
    .hfa_w32_a(hw32_a), .hfa_w32_b(hw32_b), .hfa_w32_p(hw32_p)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string name, logic [127:0] got, logic [127:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s got %h expected %h", name, got, expv);
    end
  endtask

  function automatic logic [63:0] r64(int t, int sel);
    logic [63:0] v = {$urandom, $urandom};
    case ((t + sel) % 6)
      0: v = '1;
      1: v = v >> ($urandom % 64);
      default: ;
    endcase
    return v;
  endfunction

  // carry-select block inputs, sampled while the operands are stable
  always @(negedge clk) begin
    if (rst_n) begin
      csel[0][dut.u_hfa_w16.u_cpa.g_w16.u_add.u_s2.cin]++;
      csel[1][dut.u_hfa_w16.u_cpa.g_w16.u_add.u_s3.cin]++;
      csel[2][dut.u_hfa_d16.u_cpa.g_d16.u_add.u_s2.cin]++;
      csel[3][dut.u_hfa_d16.u_cpa.g_d16.u_add.u_s3.cin]++;
      csel[4][dut.u_hfa_d16.u_cpa.g_d16.u_add.u_s4.cin]++;
      csel[5][dut.u_hfa_w32.u_cpa.g_w32.u_add.u_s2.cin]++;
      csel[6][dut.u_hfa_w32.u_cpa.g_w32.u_add.u_s3.cin]++;
    end
  end

  initial begin
    for (int i = 0; i < 7; i++) csel[i] = '{0, 0};
    rst_n = 1'b0;
    {aw_a, aw_b, ad_a, ad_b} = '1;
    @(posedge clk);
    #1;
    chk("reset auto_w", aw_p, '0);
    chk("reset auto_d", ad_p, '0);
    if (aw_p === '0 && ad_p === '0) n_reset++;
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      aw_a = r64(t, 0);  aw_b = r64(t, 1);
      ad_a = r64(t, 2);  ad_b = r64(t, 3);
      hyb_a = 16'(r64(t, 4));  hyb_b = 16'(r64(t, 5));
      gw8_a = 8'(r64(t, 0));   gw8_b = 8'(r64(t, 1));
      gd8_a = 8'(r64(t, 2));   gd8_b = 8'(r64(t, 3));
      gw16_a = 16'(r64(t, 4)); gw16_b = 16'(r64(t, 5));
      gd16_a = 16'(r64(t, 0)); gd16_b = 16'(r64(t, 1));
      hw16_a = 16'(r64(t, 2)); hw16_b = 16'(r64(t, 3));
      hd16_a = 16'(r64(t, 4)); hd16_b = 16'(r64(t, 5));
      hw32_a = 32'(r64(t, 0)); hw32_b = 32'(r64(t, 1));
      #1;
      // combinational multipliers
      chk("hybrid-cell dadda16", 128'(hyb_p), 128'(32'(hyb_a) * 32'(hyb_b)));
      chk("gate wallace8", 128'(gw8_p), 128'(16'(gw8_a) * 16'(gw8_b)));
      chk("gate dadda8", 128'(gd8_p), 128'(16'(gd8_a) * 16'(gd8_b)));
      chk("gate wallace16", 128'(gw16_p), 128'(32'(gw16_a) * 32'(gw16_b)));
      chk("gate dadda16", 128'(gd16_p), 128'(32'(gd16_a) * 32'(gd16_b)));
      chk("hybrid-adder wallace16", 128'(hw16_p), 128'(32'(hw16_a) * 32'(hw16_b)));
      chk("hybrid-adder dadda16", 128'(hd16_p), 128'(32'(hd16_a) * 32'(hd16_b)));
      chk("hybrid-adder wallace32", 128'(hw32_p), 128'(64'(hw32_a) * 64'(hw32_b)));
      // registered multipliers: still the previous product before the edge
      if (t > 0) begin
        chk("hold auto_w", aw_p, exp_aw);
        chk("hold auto_d", ad_p, exp_ad);
        if (aw_p === exp_aw && ad_p === exp_ad) n_hold++;
      end
      exp_aw = 128'(aw_a) * 128'(aw_b);
      exp_ad = 128'(ad_a) * 128'(ad_b);
      @(posedge clk);
      #1;
      chk("auto wallace64", aw_p, exp_aw);
      chk("auto dadda64", ad_p, exp_ad);
      if (ad_p[2*NA-1]) n_top_carry++;
    end
    $display("mechanisms: reset=%0d hold=%0d dadda_top_carry=%0d", n_reset, n_hold, n_top_carry);
    checks++;
    if (n_reset == 0 || n_hold == 0 || n_top_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int i = 0; i < 7; i++) begin
      $display("carry-select block %0d: carry0=%0d carry1=%0d", i, csel[i][0], csel[i][1]);
      checks++;
      if (csel[i][0] == 0 || csel[i][1] == 0) begin
        failures++;
        $display("FAIL carry-select block %0d did not select both sums", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
