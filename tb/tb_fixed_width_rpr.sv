// tb_fixed_width_rpr: exhaustive self-check of the fixed-width reduced-precision
// replica at its default configuration (N = 12, T = 12 deleted columns, column-11
// correction injected into column 12), over all 2^24 operand pairs.
//
// The reference value is worked out arithmetically: the exact product, minus the
// weight of every partial product in the deleted columns 0..T-1, plus 2^T for every
// nonzero partial product of column T-1. The testbench checks that yr matches it,
// that its T low bits are 0, that y_fixed equals yr >> T, and that the error against
// the exact product spans exactly -9785 .. +7737, the range the ANT threshold of the
// top level is based on.
module tb_fixed_width_rpr;
  localparam int N = 12;
  localparam int T = N;
  localparam int ERR_MAX = 7737;     // largest exact - replica
  localparam int ERR_MIN = -9785;    // smallest exact - replica

  logic [N-1:0]     a;
  logic [N-1:0]     b;
  logic [2*N-1:0]   yr;
  logic [2*N-T-1:0] y_fixed;

  int checks   = 0;
  int e;          // exact product - replica value
  int emax = 0;   // largest e seen
  int emin = 0;   // smallest e seen
  bit range_ok;
  int failures = 0;

  fixed_width_rpr #(.N(N), .T(T), .CORR(1'b1)) dut (
    .a(a), .b(b), .yr(yr), .y_fixed(y_fixed)
  );

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Replica value from arithmetic on the operands.
  function automatic longint ref_rpr(int x, int y);
    longint prod;
    longint low;
    int     ncorr;
    prod  = longint'(x) * longint'(y);
    low   = 0;
    ncorr = 0;
    for (int i = 0; i < N; i++) begin
      if (((x >> i) & 1) != 0) begin
        if (T - i > 0) low += (longint'(y) & ((longint'(1) << (T - i)) - 1)) << i;
        if (T - 1 - i >= 0 && T - 1 - i < N && ((y >> (T - 1 - i)) & 1) != 0) ncorr++;
      end
    end
    return prod - low + (longint'(ncorr) << T);
  endfunction

  initial begin : stimulus
    longint expected;
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1;
        expected = ref_rpr(ia, ib);
        checks++;
        if (longint'(yr) != expected || yr[T-1:0] != '0 || y_fixed != yr[2*N-1:T]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %0d * %0d: yr=%0d expected %0d y_fixed=%0d", ia, ib, yr, expected, y_fixed);
        end
        e = int'(longint'(ia) * longint'(ib) - longint'(yr));
        if (e > emax) emax = e;
        if (e < emin) emin = e;
      end
    end
    checks++;
    range_ok = (emax == ERR_MAX) && (emin == ERR_MIN);
    if (!range_ok) begin
      failures++;
      $display("FAIL: error range %0d .. %0d, expected %0d .. %0d", emin, emax, ERR_MIN, ERR_MAX);
    end
    $display("replica error range %0d .. %0d", emin, emax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
