// wallace_tree: Wallace reduction of an N x N bit product matrix to two rows.
//
// Matrix 0 holds row j of the bit products in columns j..j+N-1. Each stage
// takes the rows three at a time. In every column of a group, three bits go
// to a (3,2) counter, two bits to a (2,2) counter and a single bit passes
// down; the group becomes a sum row and a carry row (one column to the left).
// One or two rows left over below the last full group pass down unchanged.
// Stages repeat until two rows remain, so the tree applies as many counters as
// it can (12x12: 102 full adders, 34 half adders, five stages).
//
// Interface: pp[j][i] = a[i]&b[j]; row0/row1 are the two final rows, 2N
// columns each. Combinational; depth is one counter per stage. The occupancy
// of every matrix comes from mult_pkg::wallace_mask, so unused positions are
// tied to zero and no logic is built for them. STYLE selects the counter cells
// (CELL_HYBRID is defined for the Dadda tree only). N may be 3..64.
// Some output bits are constant by construction: row1 is zero in the columns
// below the final adder's first column and in the top column, and row0 is
// zero in the top column; the lowest product bit is pp[0][0] itself.
module wallace_tree
  import mult_pkg::*;
#(
  parameter int          N     = 16,
  parameter cell_style_e STYLE = CELL_STD
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int C = 2 * N;
  localparam int S = wallace_stages(N);

  if (N < 3 || N > MAX_N) begin : g_bad_n
    $error("wallace_tree: N must be 3..%0d", MAX_N);
  end
  if (STYLE == CELL_HYBRID) begin : g_bad_style
    $error("wallace_tree: the hybrid cell mix is defined for the Dadda tree");
  end

  // g_mat[s].m[r][c]: bit of row r, column c, in matrix s (one variable per
  // matrix, so the stages form an acyclic chain of signals)
  for (genvar s = 0; s <= S; s++) begin : g_mat
    logic [C-1:0] m [0:N-1];
  end

  for (genvar j = 0; j < N; j++) begin : g_in_row
    for (genvar c = 0; c < C; c++) begin : g_in_col
      if (c >= j && c < j + N) begin : g_bit
        assign g_mat[0].m[j][c] = pp[j][c-j];
      end else begin : g_zero
        assign g_mat[0].m[j][c] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam rowmask_t M  = wallace_mask(N, s);
    localparam rowmask_t MN = wallace_mask(N, s + 1);
    localparam int       R  = wallace_rows(N, s);
    localparam int       G  = R / 3;

    for (genvar k = 0; k < G; k++) begin : g_grp
      for (genvar c = 0; c < C; c++) begin : g_col
        localparam bit P0  = M[3*k][c];
        localparam bit P1  = M[3*k+1][c];
        localparam bit P2  = M[3*k+2][c];
        localparam int CNT = int'(P0) + int'(P1) + int'(P2);
        // lower-indexed present bits of the group
        localparam int X0 = P0 ? 3*k : (P1 ? 3*k+1 : 3*k+2);
        localparam int X1 = (P0 && P1) ? 3*k+1 : 3*k+2;
        // a carry out of the top column cannot occur (the product fits in
        // 2N bits); such a counter output is left unconnected
        if (CNT == 3 && c + 1 < C) begin : g_fa
          fa_cell #(.STYLE(STYLE)) u_fa (
            .a(g_mat[s].m[3*k][c]), .b(g_mat[s].m[3*k+1][c]), .cin(g_mat[s].m[3*k+2][c]),
            .sum(g_mat[s+1].m[2*k][c]), .cout(g_mat[s+1].m[2*k+1][c+1]));
        end else if (CNT == 3) begin : g_fa_top
          fa_cell #(.STYLE(STYLE)) u_fa (
            .a(g_mat[s].m[3*k][c]), .b(g_mat[s].m[3*k+1][c]), .cin(g_mat[s].m[3*k+2][c]),
            .sum(g_mat[s+1].m[2*k][c]), .cout());
        end else if (CNT == 2 && c + 1 < C) begin : g_ha
          ha_cell #(.STYLE(STYLE)) u_ha (
            .a(g_mat[s].m[X0][c]), .b(g_mat[s].m[X1][c]),
            .sum(g_mat[s+1].m[2*k][c]), .cout(g_mat[s+1].m[2*k+1][c+1]));
        end else if (CNT == 2) begin : g_ha_top
          ha_cell #(.STYLE(STYLE)) u_ha (
            .a(g_mat[s].m[X0][c]), .b(g_mat[s].m[X1][c]),
            .sum(g_mat[s+1].m[2*k][c]), .cout());
        end else if (CNT == 1) begin : g_pass
          assign g_mat[s+1].m[2*k][c] = g_mat[s].m[X0][c];
        end
      end
    end

    // left-over rows pass down
    for (genvar r = 3 * G; r < R; r++) begin : g_left
      for (genvar c = 0; c < C; c++) begin : g_col
        if (M[r][c]) begin : g_bit
          assign g_mat[s+1].m[2*G+r-3*G][c] = g_mat[s].m[r][c];
        end
      end
    end

    // positions that hold no bit in the next matrix
    for (genvar r = 0; r < N; r++) begin : g_fill_row
      for (genvar c = 0; c < C; c++) begin : g_fill_col
        if (!MN[r][c]) begin : g_zero
          assign g_mat[s+1].m[r][c] = 1'b0;
        end
      end
    end
  end

  assign row0 = g_mat[S].m[0];
  assign row1 = g_mat[S].m[1];
endmodule
