// fixed_width_rpr: fixed-width reduced-precision replica (RPR) of the main multiplier.
//
// Takes the same N-bit unsigned operands as the main block and returns only the N
// most significant product bits, aligned as a 2N-bit value whose T low bits are 0.
// The T lowest partial-product columns are never formed (deletion/truncation). With
// CORR set, the terms of column T-1, which carry the largest weight of the deleted
// part, are formed and injected into column T; this data-dependent correction
// replaces the rounding of the deleted part and needs no extra gates beyond the AND
// terms. The remaining matrix is reduced with the same reduced-complexity Wallace
// tree as the main block (for the defaults 23, 11, 8, 5, 4, 3, 2 rows, six
// adder stages, against five in the main block) and summed by a (2N-T)-bit
// ripple-carry adder, which is shorter than the main block's 2N-bit one.
//
// Deleting the low columns and injecting the largest-weight deleted terms follow
// the replica described for this multiplier; the choice T = N, the reuse of the
// Wallace tree and the ripple adder are this design's own. A second, finer
// correction term for the next deleted column is not included.
//
// For N = 12, T = 12, CORR = 1 the result differs from the exact product by
// -9785 .. +7737 over all 2^24 operand pairs, which is what the ANT threshold is
// chosen from. Combinational.
module fixed_width_rpr #(
  parameter int N    = 12,
  parameter int T    = N,      // deleted columns; the output keeps bits 2N-1..T
  parameter bit CORR = 1'b1    // inject the column T-1 terms into column T
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] yr,   // replica product, bits T-1..0 are 0
  output logic [2*N-T-1:0] y_fixed  // the same value as a (2N-T)-bit word
);
  logic [2*N-1:0] row0;
  logic [2*N-1:0] row1;
  logic           cout;   // always 0: the corrected value still fits in 2N bits

  rcw_reduce #(.N(N), .T(T), .CORR(CORR)) u_tree (
    .a   (a),
    .b   (b),
    .row0(row0),
    .row1(row1)
  );

  // Only columns T and above carry bits; the adder covers just those.
  cpa #(.W(2*N-T)) u_cpa (
    .x   (row0[2*N-1:T]),
    .y   (row1[2*N-1:T]),
    .sum (y_fixed),
    .cout(cout)
  );

  assign yr = {y_fixed, {T{1'b0}}};
endmodule
