// cla_lookahead: carry lookahead logic block of width K (1..4).
//
// From the generate/propagate pairs of K positions (bits or groups) and the
// carry into the block it forms, in two levels of AND-OR logic, the carry into
// every position, c[i] = g[i-1] | p[i-1]&g[i-2] | ... | p[i-1]..p[0]&cin, and
// the group generate/propagate of the block for the next level up. Widths of
// 1, 2 and 3 serve the last, partial group of a level so no unused hardware
// is built. Combinational. c[0] is cin itself.
module cla_lookahead #(
  parameter int K = 4
) (
  input  logic [K-1:0] g,
  input  logic [K-1:0] p,
  input  logic         cin,
  output logic [K-1:0] c,
  output logic         gg,
  output logic         gp
);
  if (K < 1 || K > 4) begin : g_bad_k
    $error("cla_lookahead: K must be 1..4");
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic term;
      logic acc;
      // carry into position i, written as a flat sum of products
      acc = cin;
      for (int j = 0; j < i; j++) acc = acc & p[j];
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int t = j + 1; t < i; t++) term = term & p[t];
        acc = acc | term;
      end
      c[i] = acc;
    end
  end

  always_comb begin
    logic term;
    gg = 1'b0;
    gp = 1'b1;
    for (int j = 0; j < K; j++) begin
      term = g[j];
      for (int t = j + 1; t < K; t++) term = term & p[t];
      gg = gg | term;
      gp = gp & p[j];
    end
  end
endmodule
