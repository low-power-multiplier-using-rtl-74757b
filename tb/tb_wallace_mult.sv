// tb_wallace_mult: exhaustive self-check of the reduced-complexity Wallace
// multiplier at its default width (12 x 12 bits, all 2^24 operand pairs).
//
// Each product is compared with the arithmetic product computed by the testbench.
// The testbench also checks the shape of the reduction tree: the row counts of the
// stages must follow r' = 2*floor(r/3) + r mod 3 from N rows down to 2, which for
// N = 12 is 12, 8, 6, 4, 3, 2 (five adder stages). A watchdog ends the run if it
// stalls.
module tb_wallace_mult;
  import ant_pkg::*;

  localparam int N = 12;

  logic [N-1:0]   a;
  logic [N-1:0]   b;
  logic [2*N-1:0] p;

  int checks   = 0;
  int failures = 0;

  wallace_mult #(.N(N)) dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int r;
    int stages;
    logic [2*N-1:0] expected;

    // tree shape
    stages = tree_info(N, 0, 1'b0, 0, 0, TI_STAGES);
    checks++;
    if (stages != 5) begin
      failures++;
      $display("FAIL: %0d reduction stages, expected 5", stages);
    end
    r = N;
    for (int s = 0; s <= stages; s++) begin
      checks++;
      if (tree_info(N, 0, 1'b0, s, 0, TI_ROWS) != r) begin
        failures++;
        $display("FAIL: stage %0d has %0d rows, expected %0d", s,
                 tree_info(N, 0, 1'b0, s, 0, TI_ROWS), r);
      end
      r = next_rows(r);
    end

    // all operand pairs
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1;
        expected = (2*N)'(ia) * (2*N)'(ib);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d, got %0d", ia, ib, expected, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
