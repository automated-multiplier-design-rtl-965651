// mult_pkg: types and elaboration-time functions shared by the column
// compression multipliers.
//
// The reduction trees are generated at elaboration time. The functions here
// replay the reduction rules on bit masks and column heights so that the tree
// modules can decide, for every position of every intermediate matrix, whether
// a bit exists there and which counter (full or half adder) consumes it. They
// also give the column range that the final carry-propagate adder must cover.
//
//  * Wallace (row grouping): the rows of the matrix are taken three at a time;
//    in each column of a group, three bits feed a (3,2) counter, two bits a
//    (2,2) counter and a single bit passes. A group yields a sum row and a
//    carry row one column to the left; one or two left-over rows pass down.
//  * Dadda (column heights): the matrix heights 2,3,4,6,9,13,19,28,42,63 are
//    worked back from the final two rows; each column, together with the
//    carries arriving from its right neighbour, is cut down to the next height
//    with as few counters as possible.
//
// Both rules reproduce the counter counts published for these multipliers
// (12x12 Wallace: 102 full, 34 half adders and an 18-bit adder; N x N Dadda:
// N^2-4N+3 full, N-1 half adders and a 2N-2 bit adder). MAX_N bounds the
// operand width the functions handle (64, the largest size studied).
package mult_pkg;

  localparam int MAX_N = 64;
  localparam int MAX_C = 2 * MAX_N;  // product columns
  localparam int MAX_S = 12;         // reduction stages (10 are needed at 64)

  // Counter cells a tree may be built from.
  //   CELL_STD    : (3,2)/(2,2) counters as XOR/AND/OR standard cells
  //   CELL_GATE9  : 9-gate NAND2/NOR2/INV full adder, 4-gate half adder
  //   CELL_FA14   : 14-transistor XNOR-steered full adder, 4-gate half adder
  //   CELL_HYBRID : 16x16 Dadda tree mixing CELL_FA14 and CELL_GATE9 cells
  typedef enum int {
    CELL_STD,
    CELL_GATE9,
    CELL_FA14,
    CELL_HYBRID
  } cell_style_e;

  // Final carry-propagate adder of a multiplier.
  typedef enum int {
    ADD_CLA,      // carry lookahead, 4-bit lookahead blocks
    ADD_HYB_W16,  // 25-bit hybrid adder of the 16x16 Wallace multiplier
    ADD_HYB_D16,  // 30-bit hybrid adder of the 16x16 Dadda multiplier
    ADD_HYB_W32   // 56-bit hybrid adder of the 32x32 Wallace multiplier
  } adder_kind_e;

  typedef logic [MAX_N-1:0][MAX_C-1:0] rowmask_t;        // [row][column]
  typedef logic [MAX_S:0][MAX_C-1:0][7:0] coltab_t;      // [stage][column]

  // ---------------------------------------------------------------- Wallace
  function automatic int wallace_next_rows(int r);
    return 2 * (r / 3) + r % 3;
  endfunction

  function automatic int wallace_stages(int n);
    int r = n;
    int s = 0;
    while (r > 2) begin
      r = wallace_next_rows(r);
      s++;
    end
    return s;
  endfunction

  // Number of rows of matrix s (matrix 0 is the bit product matrix).
  function automatic int wallace_rows(int n, int s);
    int r = n;
    for (int i = 0; i < s; i++) r = wallace_next_rows(r);
    return r;
  endfunction

  // Occupancy of matrix s: bit [r][c] is set when row r has a bit in column c.
  function automatic rowmask_t wallace_mask(int n, int s);
    rowmask_t m;
    rowmask_t nm;
    int r;
    int g;
    m = '0;
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++) m[j][i+j] = 1'b1;
    r = n;
    for (int st = 0; st < s; st++) begin
      g  = r / 3;
      nm = '0;
      for (int k = 0; k < g; k++) begin
        nm[2*k]   = m[3*k] | m[3*k+1] | m[3*k+2];
        nm[2*k+1] = ((m[3*k] & m[3*k+1]) | (m[3*k] & m[3*k+2]) |
                     (m[3*k+1] & m[3*k+2])) << 1;
      end
      for (int k = 3 * g; k < r; k++) nm[2*g+k-3*g] = m[k];
      m = nm;
      r = wallace_next_rows(r);
    end
    return m;
  endfunction

  // Lowest column where the final two rows both hold a bit.
  function automatic int wallace_cpa_lo(int n);
    rowmask_t m = wallace_mask(n, wallace_stages(n));
    for (int c = 0; c < 2 * n; c++) if (m[0][c] && m[1][c]) return c;
    return 0;
  endfunction

  // Highest column where the final two rows hold any bit.
  function automatic int wallace_cpa_hi(int n);
    rowmask_t m = wallace_mask(n, wallace_stages(n));
    for (int c = 2 * n - 1; c >= 0; c--) if (m[0][c] || m[1][c]) return c;
    return 0;
  endfunction

  // ------------------------------------------------------------------ Dadda
  function automatic int dadda_stages(int n);
    int d = 2;
    int s = 0;
    while (d < n) begin
      d = d * 3 / 2;
      s++;
    end
    return s;
  endfunction

  // Height limit of the matrix produced by stage s (stage 0 reduces the bit
  // product matrix).
  function automatic int dadda_target(int n, int s);
    int d = 2;
    for (int i = 0; i < dadda_stages(n) - 1 - s; i++) d = d * 3 / 2;
    return d;
  endfunction

  // kind 0: height of column c of matrix s; kind 1: full adders applied to
  // column c by stage s; kind 2: half adders applied to column c by stage s.
  function automatic coltab_t dadda_table(int n, int kind);
    coltab_t t;
    int h  [MAX_C];
    int nh [MAX_C];
    int ns;
    int tgt;
    int cin;
    int f;
    int a;
    int tt;
    t  = '0;
    ns = dadda_stages(n);
    for (int c = 0; c < MAX_C; c++)
      h[c] = (c < n) ? c + 1 : (c < 2 * n - 1) ? 2 * n - 1 - c : 0;
    for (int s = 0; s <= ns; s++) begin
      tgt = (s < ns) ? dadda_target(n, s) : 0;
      cin = 0;
      for (int c = 0; c < MAX_C; c++) begin
        f = 0;
        a = 0;
        if (s < ns) begin
          tt = h[c] + cin;
          while (tt > tgt) begin
            if (tt - tgt >= 2) begin
              f++;
              tt -= 2;
            end else begin
              a++;
              tt -= 1;
            end
          end
        end
        t[s][c] = (kind == 0) ? 8'(h[c]) : (kind == 1) ? 8'(f) : 8'(a);
        nh[c] = h[c] - 2 * f - a + cin;
        cin   = f + a;
      end
      for (int c = 0; c < MAX_C; c++) h[c] = nh[c];
    end
    return t;
  endfunction

  function automatic int dadda_cpa_lo(int n);
    coltab_t ht = dadda_table(n, 0);
    int ns = dadda_stages(n);
    for (int c = 0; c < 2 * n; c++) if (ht[ns][c] == 8'd2) return c;
    return 0;
  endfunction

  function automatic int dadda_cpa_hi(int n);
    coltab_t ht = dadda_table(n, 0);
    int ns = dadda_stages(n);
    for (int c = 2 * n - 1; c >= 0; c--) if (ht[ns][c] != 8'd0) return c;
    return 0;
  endfunction

  // ----------------------------------------------------- hybrid 16x16 tree
  // Column groups 0-4, 5-9, 10-14, 15-19, 20-24, 25-30 of the 16x16 Dadda
  // tree keep 3, 9, 11, 23, 7 and 0 fast (14-transistor) full adders; the
  // others are 9-gate low-power cells.
  function automatic int hybrid_group(int c);
    return (c / 5 > 5) ? 5 : c / 5;
  endfunction

  function automatic int hybrid_fast_quota(int grp);
    case (grp)
      0:       return 3;
      1:       return 9;
      2:       return 11;
      3:       return 23;
      4:       return 7;
      default: return 0;
    endcase
  endfunction

  // True when full adder k of column c in stage s stays a fast cell. Within a
  // column group the adders are ranked by stage, then column, then index; the
  // first ones (farthest from the final rows) keep the fast cell.
  function automatic bit hybrid_is_fast(coltab_t ft, int s, int c, int k);
    int grp  = hybrid_group(c);
    int rank = k;
    for (int s2 = 0; s2 <= s; s2++)
      for (int c2 = 0; c2 < MAX_C; c2++)
        if (hybrid_group(c2) == grp && (s2 < s || c2 < c)) rank += int'(ft[s2][c2]);
    return rank < hybrid_fast_quota(grp);
  endfunction

endpackage
