// tb_mult_widths: checks that the elaboration-time tree planning builds correct
// multipliers at widths other than the default. Exhaustively compares
// wallace_mult at N = 3, 5 and 8 with a*b, and fixed_width_rpr at N = 5 and 8
// (T = N, correction on) with the replica formula
//   R = a*b - (weight of columns 0..N-1) + 2^N * (number of nonzero terms of column N-1),
// and checks the replica error range at N = 8 (-441 .. +313).
module tb_mult_widths;
  int checks   = 0;
  int failures = 0;
  int emin8    = 0;
  int emax8    = 0;

  logic [7:0]  a8,  b8;
  logic [15:0] p8,  r8;
  logic [7:0]  f8;
  logic [4:0]  a5,  b5;
  logic [9:0]  p5,  r5;
  logic [4:0]  f5;
  logic [2:0]  a3,  b3;
  logic [5:0]  p3;

  wallace_mult    #(.N(8)) u_m8 (.a(a8), .b(b8), .p(p8));
  wallace_mult    #(.N(5)) u_m5 (.a(a5), .b(b5), .p(p5));
  wallace_mult    #(.N(3)) u_m3 (.a(a3), .b(b3), .p(p3));
  fixed_width_rpr #(.N(8), .T(8), .CORR(1'b1)) u_r8 (.a(a8), .b(b8), .yr(r8), .y_fixed(f8));
  fixed_width_rpr #(.N(5), .T(5), .CORR(1'b1)) u_r5 (.a(a5), .b(b5), .yr(r5), .y_fixed(f5));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_rpr(int n, int x, int y);
    int low;
    int ncorr;
    low   = 0;
    ncorr = 0;
    for (int i = 0; i < n; i++) begin
      if (((x >> i) & 1) != 0) begin
        low += (y & ((1 << (n - i)) - 1)) << i;
        if (((y >> (n - 1 - i)) & 1) != 0) ncorr++;
      end
    end
    return x * y - low + (ncorr << n);
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp, input int x, input int y);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s %0d,%0d: got %0d expected %0d", what, x, y, got, exp);
    end
  endtask

  initial begin : stimulus
    int e;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        a5 = 5'(x);
        b5 = 5'(y);
        a3 = 3'(x);
        b3 = 3'(y);
        #1;
        expect_eq("mult8", int'(p8), x * y, x, y);
        expect_eq("rpr8", int'(r8), ref_rpr(8, x, y), x, y);
        expect_eq("rpr8 fixed", int'(f8), int'(r8) >> 8, x, y);
        e = x * y - int'(r8);
        if (e < emin8) emin8 = e;
        if (e > emax8) emax8 = e;
        if (x < 32 && y < 32) begin
          expect_eq("mult5", int'(p5), x * y, x, y);
          expect_eq("rpr5", int'(r5), ref_rpr(5, x, y), x, y);
        end
        if (x < 8 && y < 8) expect_eq("mult3", int'(p3), x * y, x, y);
      end
    end
    expect_eq("rpr8 min error", emin8, -441, 0, 0);
    expect_eq("rpr8 max error", emax8, 313, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
