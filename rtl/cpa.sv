// cpa: W-bit ripple-carry adder built from full adders. It is the carry-propagate
// adder of the last phase of the Wallace reduction, summing the two remaining rows.
// Combinational; the carry ripples from bit 0 to bit W-1. The carry out is returned
// so that callers can decide whether they need it. A carry-propagate adder closes
// the Wallace scheme; choosing a ripple-carry adder for it is this design's choice.
module cpa #(
  parameter int W = 24
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[W];
endmodule
