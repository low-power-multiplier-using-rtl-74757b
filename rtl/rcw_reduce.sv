// rcw_reduce: partial-product generation and reduced-complexity Wallace reduction.
//
// Forms the AND partial products a[i] & b[k] of two N-bit unsigned operands, sorted
// by column (weight i+k) and packed to the low indices of each column, which is the
// inverted-pyramid arrangement. Columns below T are not formed (T = 0 gives the full
// matrix). With CORR set, the terms of column T-1 are also formed and injected into
// column T as a data-dependent correction of the deleted columns.
//
// The matrix is then reduced stage by stage: every complete group of three bits in a
// column goes to a full adder, groups of one or two bits pass on, and a half adder is
// used only where the column would otherwise exceed the next stage's row count
// 2*floor(r/3) + r mod 3. The tree shape is computed at elaboration by
// ant_pkg::tree_info(). The outputs are the two rows that remain; their sum is the
// (possibly truncated) product.
//
// The three-phase scheme, the inverted pyramid, the grouping in threes and the
// half-adder rule follow the reduced-complexity Wallace method; applying the grouping
// column by column and the order in which bits enter the adders are this design's
// choices.
//
// Combinational. Bits in columns below T of row0/row1 are always 0. Carries out of
// the top column are not connected: the product of two N-bit numbers, and the
// corrected truncated product, both fit in 2N bits, so those carries are always 0.
module rcw_reduce
  import ant_pkg::*;
#(
  parameter int N    = 12,
  parameter int T    = 0,
  parameter bit CORR = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] row0,
  output logic [2*N-1:0] row1
);
  localparam int W = 2*N;
  localparam int S = tree_info(N, T, CORR, 0, 0, TI_STAGES);
  localparam int H = tree_info(N, T, CORR, 0, 0, TI_MAXH);

  // g_lvl[s].bits[j][k]: bit k of column j entering stage s. Level S holds the two
  // rows that remain. Every level is its own signal, so no net feeds itself.
  for (genvar s = 0; s <= S; s++) begin : g_lvl
    logic [H-1:0] bits [W];

    if (s == 0) begin : g_pp
      // ---- phase 1: partial products in inverted-pyramid order --------------------
      for (genvar j = 0; j < W; j++) begin : g_col
        localparam int HJ  = init_height(N, T, CORR, j);
        localparam int NPJ = (j >= T) ? pp_count(N, j) : 0;   // own-column terms
        localparam int LO  = (j - N + 1 > 0) ? j - N + 1 : 0;  // lowest a index, col j
        localparam int LOC = (T - N > 0) ? T - N : 0;          // lowest a index, col T-1
        for (genvar k = 0; k < H; k++) begin : g_bit
          if (k < NPJ) begin : g_own
            assign bits[j][k] = a[LO + k] & b[j - LO - k];
          end else if (k < HJ) begin : g_inj
            // correction term of column T-1, injected with the weight of column T
            assign bits[j][k] = a[LOC + k - NPJ] & b[T - 1 - LOC - (k - NPJ)];
          end else begin : g_zero
            assign bits[j][k] = 1'b0;
          end
        end
      end
    end else begin : g_red
      // ---- phase 2: reduction stage s-1, from level s-1 to level s ----------------
      localparam int SP = s - 1;
      for (genvar j = 0; j < W; j++) begin : g_col
        localparam int HH  = tree_info(N, T, CORR, SP, j, TI_HEIGHT);
        localparam int NF  = tree_info(N, T, CORR, SP, j, TI_FA);
        localparam int NH  = tree_info(N, T, CORR, SP, j, TI_HA);
        localparam int NP  = HH - 3*NF - 2*NH;                 // bits passed on
        localparam int CI  = (j > 0) ? tree_info(N, T, CORR, SP, j-1, TI_FA)
                                     + tree_info(N, T, CORR, SP, j-1, TI_HA) : 0;
        localparam int HN  = NF + NH + NP + CI;                 // height at level s

        // Carries produced in this column, consumed by column j+1 (one spare bit).
        // In the top column they are left open: they are always 0.
        logic [NF+NH:0] co;
        assign co[NF+NH] = 1'b0;

        for (genvar f = 0; f < NF; f++) begin : g_fa
          full_adder u_fa (
            .a (g_lvl[SP].bits[j][3*f]),
            .b (g_lvl[SP].bits[j][3*f+1]),
            .c (g_lvl[SP].bits[j][3*f+2]),
            .s (bits[j][f]),
            .co(co[f])
          );
        end
        for (genvar h = 0; h < NH; h++) begin : g_ha
          half_adder u_ha (
            .a (g_lvl[SP].bits[j][3*NF+2*h]),
            .b (g_lvl[SP].bits[j][3*NF+2*h+1]),
            .s (bits[j][NF+h]),
            .co(co[NF+h])
          );
        end
        for (genvar p = 0; p < NP; p++) begin : g_pass
          assign bits[j][NF+NH+p] = g_lvl[SP].bits[j][3*NF+2*NH+p];
        end
        for (genvar m = 0; m < CI; m++) begin : g_cin
          assign bits[j][NF+NH+NP+m] = g_col[j-1].co[m];
        end
        for (genvar k = HN; k < H; k++) begin : g_zero
          assign bits[j][k] = 1'b0;
        end
      end
    end
  end

  // ---- two rows left: hand them to the carry-propagate adder ------------------------
  for (genvar j = 0; j < W; j++) begin : g_out
    assign row0[j] = g_lvl[S].bits[j][0];
    assign row1[j] = g_lvl[S].bits[j][1];
  end
endmodule
