// wallace_mult: full-width N x N unsigned multiplier, the main block of the ANT
// multiplier.
//
// It follows the three phases of the reduced-complexity ("modified") Wallace
// multiplier: the N x N AND partial-product matrix is formed and arranged as an
// inverted pyramid, it is reduced with full adders (and half adders only where the
// row-count rule r' = 2*floor(r/3) + r mod 3 would otherwise be missed) until two
// rows remain, and a carry-propagate adder sums them. Phases 1 and 2 are in
// rcw_reduce; the carry-propagate adder is a ripple-carry adder (cpa), which is this
// design's choice. For N = 12 the tree has five stages: 12, 8, 6, 4, 3, 2 rows.
//
// Combinational: p = a * b for all inputs.
module wallace_mult #(
  parameter int N = 12
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] row0;
  logic [2*N-1:0] row1;
  logic           cout;   // always 0: a product of two N-bit numbers fits in 2N bits

  rcw_reduce #(.N(N), .T(0), .CORR(1'b0)) u_tree (
    .a   (a),
    .b   (b),
    .row0(row0),
    .row1(row1)
  );

  cpa #(.W(2*N)) u_cpa (
    .x   (row0),
    .y   (row1),
    .sum (p),
    .cout(cout)
  );
endmodule
