// dadda_tree: Dadda reduction of an N x N bit product matrix to two rows.
//
// The bits are kept as columns. The height limits of the successive matrices
// are worked back from two rows (2, 3, 4, 6, 9, 13, 19, 28, 42, 63: each the
// largest integer at most 1.5 times the next); every stage does only the
// compression needed to reach the next limit. Going from the least significant
// column up, a column whose bits plus the carries arriving from the right
// exceed the limit gets (3,2) counters while it is two or more over and one
// (2,2) counter when it is one over. A 12x12 tree uses 99 full and 11 half
// adders in five stages; in general N^2-4N+3 and N-1.
//
// Bit bookkeeping inside column c of matrix s (positions 0..h-1): full adder k
// takes positions 3k..3k+2, half adder k the next two pairs, the rest pass.
// In the next matrix a column holds, in this order, the passed bits, the
// full-adder sums, the half-adder sums, and the carries of the column to the
// right (full adders first). The heights and counter counts come from
// mult_pkg::dadda_table. The assignment of bits to counter inputs is
// positional, not timing-driven.
//
// STYLE selects the counter cells. CELL_HYBRID (N = 16 only) builds the mixed
// tree: per column group (0-4, 5-9, 10-14, 15-19, 20-24, 25-30) the first
// 3, 9, 11, 23, 7, 0 full adders, ranked by stage and column, are the fast
// 14-transistor cell and the other 142 the 9-gate low-power cell; half adders
// are the 4-gate cell. Only those per-group numbers are given for the mixed
// tree, the ranking inside a group is this design's choice.
//
// Interface: pp[j][i] = a[i]&b[j]; row0/row1 are the final rows (2N columns).
// Combinational, one counter delay per stage. N may be 3..64.
// Output bits that no counter touches are wires: the low columns and the top
// column pass bit products straight to row0, and row1 is zero in columns 0
// and 2N-1.
module dadda_tree
  import mult_pkg::*;
#(
  parameter int          N     = 16,
  parameter cell_style_e STYLE = CELL_STD
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int      C  = 2 * N;
  localparam int      S  = dadda_stages(N);
  localparam coltab_t HT = dadda_table(N, 0);
  localparam coltab_t FT = dadda_table(N, 1);
  localparam coltab_t AT = dadda_table(N, 2);

  if (N < 3 || N > MAX_N) begin : g_bad_n
    $error("dadda_tree: N must be 3..%0d", MAX_N);
  end
  if (STYLE == CELL_HYBRID && N != 16) begin : g_bad_style
    $error("dadda_tree: the hybrid cell mix is defined for N = 16");
  end

  // g_mat[s].col[c][i]: bit i of column c in matrix s (one variable per
  // matrix, so the stages form an acyclic chain of signals)
  for (genvar s = 0; s <= S; s++) begin : g_mat
    logic [N-1:0] col [0:C];
  end

  // matrix 0: column c holds pp[j][c-j] for every valid row j
  for (genvar c = 0; c < C; c++) begin : g_in_col
    localparam int JLO = (c - N + 1 > 0) ? c - N + 1 : 0;
    for (genvar i = 0; i < N; i++) begin : g_in_pos
      if (i < int'(HT[0][c])) begin : g_bit
        assign g_mat[0].col[c][i] = pp[JLO+i][c-JLO-i];
      end else begin : g_zero
        assign g_mat[0].col[c][i] = 1'b0;
      end
    end
  end
  for (genvar s = 0; s <= S; s++) begin : g_top_col
    assign g_mat[s].col[C] = '0;  // no column above the product
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int H   = int'(HT[s][c]);
      localparam int F   = int'(FT[s][c]);
      localparam int A   = int'(AT[s][c]);
      localparam int PS  = H - 3 * F - 2 * A;              // passed bits
      localparam int HN  = int'(HT[s+1][c]);
      // carry positions in column c+1 of the next matrix
      localparam int H1  = (c + 1 < C) ? int'(HT[s][c+1]) : 0;
      localparam int CB1 = (c + 1 < C) ? H1 - 2 * int'(FT[s][c+1]) - int'(AT[s][c+1]) : 0;  // first carry slot

      for (genvar k = 0; k < F; k++) begin : g_fa
        localparam bit FAST = (STYLE == CELL_HYBRID) ? hybrid_is_fast(FT, s, c, k) : 1'b0;
        localparam cell_style_e CS =
          (STYLE == CELL_HYBRID) ? (FAST ? CELL_FA14 : CELL_GATE9) : STYLE;
        fa_cell #(.STYLE(CS)) u_fa (
          .a(g_mat[s].col[c][3*k]), .b(g_mat[s].col[c][3*k+1]), .cin(g_mat[s].col[c][3*k+2]),
          .sum(g_mat[s+1].col[c][PS+k]), .cout(g_mat[s+1].col[c+1][CB1+k]));
      end
      for (genvar k = 0; k < A; k++) begin : g_ha
        localparam cell_style_e CS = (STYLE == CELL_HYBRID) ? CELL_GATE9 : STYLE;
        ha_cell #(.STYLE(CS)) u_ha (
          .a(g_mat[s].col[c][3*F+2*k]), .b(g_mat[s].col[c][3*F+2*k+1]),
          .sum(g_mat[s+1].col[c][PS+F+k]), .cout(g_mat[s+1].col[c+1][CB1+F+k]));
      end
      for (genvar i = 0; i < PS; i++) begin : g_pass
        assign g_mat[s+1].col[c][i] = g_mat[s].col[c][3*F+2*A+i];
      end
      for (genvar i = HN; i < N; i++) begin : g_zero
        assign g_mat[s+1].col[c][i] = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < C; c++) begin : g_out
    assign row0[c] = g_mat[S].col[c][0];
    assign row1[c] = g_mat[S].col[c][1];
  end
endmodule
