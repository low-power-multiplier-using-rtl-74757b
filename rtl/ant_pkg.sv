// ant_pkg: constants and elaboration-time functions shared by the ANT multiplier.
//
// The multipliers in this design reduce their partial-product matrix with a
// reduced-complexity ("modified") Wallace tree. The shape of that tree depends only
// on the operand width N, the number T of deleted low columns and whether the
// column-(T-1) correction terms are injected. The functions below replay the
// reduction column by column so that the generate loops in rcw_reduce can look up,
// for every stage and column, how many bits arrive, how many full adders and half
// adders are placed and how many bits pass straight through.
//
// Reduction rule per stage: with r rows (the tallest column) the target for the next
// stage is r' = 2*floor(r/3) + (r mod 3). Each column groups its bits in threes
// (inverted-pyramid order) and feeds every complete group to a full adder; groups of
// one or two bits pass on. A half adder is added to a column only when its next-stage
// height would otherwise exceed r'. Reduction stops at two rows, which a
// carry-propagate adder then sums. The rule is that of the reduced-complexity Wallace
// method; replaying it per column is this design's way of applying it.
package ant_pkg;

  // Widest product the tables below can describe (2*N <= MAX_COLS).
  localparam int MAX_COLS = 64;
  // Safety bound on the number of reduction stages.
  localparam int MAX_STAGES = 32;

  // Selectors for tree_info().
  typedef enum int {
    TI_HEIGHT  = 0,  // bits in column `col` entering stage `stage`
    TI_FA      = 1,  // full adders in that column and stage
    TI_HA      = 2,  // half adders in that column and stage
    TI_ROWS    = 3,  // rows (tallest column) entering stage `stage`
    TI_STAGES  = 4,  // number of adder stages until two rows remain
    TI_MAXH    = 5   // tallest column over all stages
  } tree_item_e;

  // Partial-product bits a[i]&b[k] with i+k == j in a full n x n matrix.
  function automatic int pp_count(int n, int j);
    if (j < 0 || j > 2*n - 2) return 0;
    return (j < n) ? j + 1 : 2*n - 1 - j;
  endfunction

  // Bits formed in column j once the t lowest columns are deleted. With corr set,
  // the terms of column t-1 are formed too and injected into column t.
  function automatic int init_height(int n, int t, bit corr, int j);
    if (j < t) return 0;
    if (corr && t > 0 && j == t) return pp_count(n, j) + pp_count(n, t - 1);
    return pp_count(n, j);
  endfunction

  // Replays the reduced-complexity Wallace reduction and returns one item of it.
  function automatic int tree_info(int n, int t, bit corr, int stage, int col,
                                   tree_item_e what);
    int h  [MAX_COLS];
    int nh [MAX_COLS];
    int fa [MAX_COLS];
    int ha [MAX_COLS];
    int w;
    int r;
    int rt;
    int cin;
    int outh;
    int maxh;
    w    = 2*n;
    maxh = 0;
    for (int j = 0; j < MAX_COLS; j++) begin
      h[j]  = (j < w) ? init_height(n, t, corr, j) : 0;
      nh[j] = 0;
      fa[j] = 0;
      ha[j] = 0;
    end
    for (int s = 0; s < MAX_STAGES; s++) begin
      r = 0;
      for (int j = 0; j < w; j++) begin
        if (h[j] > r) r = h[j];
      end
      if (r > maxh) maxh = r;
      rt = 2*(r/3) + (r % 3);
      for (int j = 0; j < w; j++) begin
        fa[j] = (r > 2) ? h[j] / 3 : 0;
        ha[j] = 0;
        cin   = (j > 0) ? fa[j-1] + ha[j-1] : 0;
        outh  = h[j] - 2*fa[j] + cin;
        while (r > 2 && outh > rt && (h[j] - 3*fa[j] - 2*ha[j]) >= 2) begin
          ha[j] = ha[j] + 1;
          outh  = outh - 1;
        end
        nh[j] = outh;
      end
      if (s == stage) begin
        case (what)
          TI_HEIGHT: return (col >= 0 && col < w) ? h[col] : 0;
          TI_FA:     return (col >= 0 && col < w) ? fa[col] : 0;
          TI_HA:     return (col >= 0 && col < w) ? ha[col] : 0;
          TI_ROWS:   return r;
          default:   ;
        endcase
      end
      if (r <= 2) begin
        if (what == TI_STAGES) return s;
        if (what == TI_MAXH) return maxh;
        return 0;
      end
      for (int j = 0; j < w; j++) h[j] = nh[j];
    end
    return -1;
  endfunction

  // Row count the reduction rule predicts after a stage that starts with r rows.
  function automatic int next_rows(int r);
    return 2*(r/3) + (r % 3);
  endfunction

endpackage
