// ant_error_correction: error-correction block of the algorithmic-noise-tolerant
// (ANT) multiplier.
//
// Compares the main-block product ya with the replica product yr. When
// |ya - yr| <= TH the main result is trusted and passed on; when the difference is
// larger, ya is taken to hold a soft error and yr is passed on instead:
//
//     y_hat = (|ya - yr| > TH) ? yr : ya
//
// The block is a subtractor, an absolute value, a magnitude comparator and a 2:1
// multiplexer, all combinational. The selection rule and this structure follow the
// ANT scheme. The default TH is this design's own choice: it is the largest error of
// the default 12-bit fixed-width replica (9785), so an error-free ya is never
// replaced.
// Ports: ya, yr (W bits, unsigned); y_hat (W bits); diff = |ya - yr| (W bits);
// err = 1 when yr was selected.
module ant_error_correction #(
  parameter int          W  = 24,
  parameter logic [31:0] TH = 32'd9785
) (
  input  logic [W-1:0] ya,
  input  logic [W-1:0] yr,
  output logic [W-1:0] y_hat,
  output logic [W-1:0] diff,
  output logic         err
);
  logic [W:0] d;         // ya - yr with a borrow bit

  always_comb begin
    d     = {1'b0, ya} - {1'b0, yr};
    diff  = d[W] ? (yr - ya) : d[W-1:0];
    err   = ((W+32)'(diff) > (W+32)'(TH));
    y_hat = err ? yr : ya;
  end
endmodule
