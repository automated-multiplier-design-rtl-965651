// cla_adder: W-bit carry lookahead adder built from 4-bit lookahead blocks.
//
// Level 0 holds the bit generate (a&b) and propagate (a^b) signals. Each
// higher level groups up to four nodes of the level below under one
// cla_lookahead block, which returns a group generate/propagate upward and,
// once the carry into the group is known, the carries into its children
// downward. The levels stop when a single node remains; its carry in is the
// adder's cin. A partial last group uses a 1-, 2- or 3-bit block. Sum bit i is
// p[i] ^ carry[i]; cout = G | P&cin of the root. Delay grows with the number
// of levels, ceil(log4 W). Combinational.
module cla_adder #(
  parameter int W = 30
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  function automatic int nodes(int l);
    int n = W;
    for (int i = 0; i < l; i++) n = (n + 3) / 4;
    return n;
  endfunction

  function automatic int levels();
    int n = W;
    int l = 0;
    while (n > 1) begin
      n = (n + 3) / 4;
      l++;
    end
    return l;
  endfunction

  localparam int L = levels();

  logic [W-1:0] gl [0:L];  // generate of node i at level l
  logic [W-1:0] pl [0:L];  // propagate
  logic [W-1:0] cl [0:L];  // carry into node i at level l

  assign gl[0] = a & b;
  assign pl[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int NC = nodes(l);      // children
    localparam int NP = nodes(l + 1);  // parents
    for (genvar i = 0; i < NP; i++) begin : g_node
      localparam int K = (NC - 4 * i < 4) ? NC - 4 * i : 4;
      cla_lookahead #(.K(K)) u_lcu (
        .g  (gl[l][4*i +: K]),
        .p  (pl[l][4*i +: K]),
        .cin(cl[l+1][i]),
        .c  (cl[l][4*i +: K]),
        .gg (gl[l+1][i]),
        .gp (pl[l+1][i])
      );
    end
    if (NP < W) begin : g_unused
      assign gl[l+1][W-1:NP] = '0;
      assign pl[l+1][W-1:NP] = '0;
    end
  end

  for (genvar l = 1; l <= L; l++) begin : g_cfill
    localparam int NL = nodes(l);
    if (l == L) begin : g_root
      assign cl[l][0] = cin;
    end
    if (NL < W) begin : g_unused
      assign cl[l][W-1:NL] = '0;
    end
  end
  if (L == 0) begin : g_single
    assign cl[0][0] = cin;
  end

  assign sum  = pl[0] ^ cl[0];
  assign cout = gl[L][0] | (pl[L][0] & cin);
endmodule
