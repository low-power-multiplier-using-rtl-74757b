// ant_multiplier: 12 x 12 unsigned multiplier with algorithmic noise tolerance (ANT).
//
// The main block (wallace_mult, a reduced-complexity Wallace multiplier) is meant to
// run at an over-scaled, too-low supply voltage to save power, so some of its
// results come out wrong when its critical path exceeds the clock period. A
// fixed-width reduced-precision replica (fixed_width_rpr) computes the upper half of
// the same product on a shorter path and stays correct. Both results are registered;
// the error-correction block then keeps the main result unless it differs from the
// replica by more than TH, in which case the replica result is used.
//
// The timing errors themselves cannot be produced by logic. Input ya_err_mask models
// them: it is XORed into the main-block result before its register. Tie it to 0 in
// a real implementation; a testbench sets bits in it to emulate soft errors.
//
// Timing: i1/i2 (and ya_err_mask) are sampled by the rising clk edge; y_hat, ya, yr,
// diff and err show the result for those operands right after that edge (one clock
// of latency, one new product per clock). rst_n is an active-low synchronous reset
// that clears both registers. The registered ya/yr with the combinational
// comparator and multiplexer after them follow the ANT block diagram; the clock,
// reset, the error-mask input and the outputs other than y_hat are this design's
// choices. An assertion checks that an error-free main result is never replaced,
// i.e. that TH is at least the replica's worst-case error.
module ant_multiplier #(
  parameter int          N    = 12,
  parameter bit          CORR = 1'b1,        // column-(N-1) correction in the replica
  parameter logic [31:0] TH   = 32'd9785     // ANT threshold on |ya - yr|
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   i1,           // multiplicand
  input  logic [N-1:0]   i2,           // multiplier
  input  logic [2*N-1:0] ya_err_mask,  // emulated soft errors of the main block
  output logic [2*N-1:0] y_hat,        // error-corrected product
  output logic [2*N-1:0] ya,           // registered main-block product
  output logic [2*N-1:0] yr,           // registered replica product (N low bits 0)
  output logic [2*N-1:0] diff,         // |ya - yr|
  output logic           err           // 1 when the replica result was selected
);
  logic [2*N-1:0] p_main;
  logic [2*N-1:0] p_rpr;
  logic [N-1:0]   y_fixed;   // same bits as p_rpr[2N-1:N]

  wallace_mult #(.N(N)) u_main (
    .a(i1),
    .b(i2),
    .p(p_main)
  );

  fixed_width_rpr #(.N(N), .T(N), .CORR(CORR)) u_rpr (
    .a      (i1),
    .b      (i2),
    .yr     (p_rpr),
    .y_fixed(y_fixed)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ya <= '0;
      yr <= '0;
    end else begin
      ya <= p_main ^ ya_err_mask;
      yr <= p_rpr;
    end
  end

  ant_error_correction #(.W(2*N), .TH(TH)) u_ec (
    .ya   (ya),
    .yr   (yr),
    .y_hat(y_hat),
    .diff (diff),
    .err  (err)
  );

  // TH must cover the replica's own error: a main result without injected errors is
  // never replaced. Fires if TH is set below the replica's worst-case error.
  a_clean_result_kept: assert property (
    @(posedge clk) disable iff (!rst_n)
      ($past(rst_n) && $past(ya_err_mask) == '0) |-> !err
  ) else $error("error-free main result replaced: TH is below the replica error");
endmodule
