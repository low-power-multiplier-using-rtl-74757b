// tb_ant_multiplier: end-to-end self-check of the ANT multiplier at its default
// parameters (12-bit operands, corrected fixed-width replica, threshold 9785).
//
// Every clock a new random operand pair is applied, together with an emulated
// soft-error mask for the main block: no error, a single flipped high bit (15..23,
// always far outside the threshold), a single flipped low bit (0..8) or a random
// multi-bit mask. One clock later the testbench checks ya, yr, diff, err and y_hat
// against its own arithmetic model: exact product XOR mask, replica value from the
// partial-product weights, |ya - yr|, the threshold test and the selection. This also
// checks the one-cycle latency and one-result-per-clock rate. A synchronous reset in
// the middle of the run must clear both registers.
//
// Mechanisms counted, each of which must occur at least once: error-free results
// passed through, soft errors detected and replaced by the replica, small soft errors
// tolerated (within the threshold, main result kept), and reset.
module tb_ant_multiplier;
  localparam int N  = 12;
  localparam int W  = 2*N;
  localparam int TH = 9785;
  localparam int CYCLES = 1000000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] i1;
  logic [N-1:0] i2;
  logic [W-1:0] ya_err_mask;
  logic [W-1:0] y_hat;
  logic [W-1:0] ya;
  logic [W-1:0] yr;
  logic [W-1:0] diff;
  logic         err;

  int checks   = 0;
  int failures = 0;
  int n_clean     = 0;   // no soft error, main result passed on
  int n_corrected = 0;   // soft error detected, replica result passed on
  int n_tolerated = 0;   // soft error within the threshold, main result kept
  int n_reset     = 0;   // reset cleared the registers
  int cycle       = 0;

  ant_multiplier dut (
    .clk(clk), .rst_n(rst_n), .i1(i1), .i2(i2), .ya_err_mask(ya_err_mask),
    .y_hat(y_hat), .ya(ya), .yr(yr), .diff(diff), .err(err)
  );

  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    wait (cycle == CYCLES + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Replica value: exact product without the deleted columns 0..N-1, plus 2^N for
  // every nonzero partial product of column N-1.
  function automatic int ref_rpr(int x, int y);
    int low;
    int ncorr;
    low   = 0;
    ncorr = 0;
    for (int i = 0; i < N; i++) begin
      if (((x >> i) & 1) != 0) begin
        low += (y & ((1 << (N - i)) - 1)) << i;
        if (((y >> (N - 1 - i)) & 1) != 0) ncorr++;
      end
    end
    return x * y - low + (ncorr << N);
  endfunction

  task automatic apply(input int x, input int y, input int mask);
    i1          = N'(x);
    i2          = N'(y);
    ya_err_mask = W'(mask);
  endtask

  initial begin : stimulus
    int x;
    int y;
    int mask;
    int kind;
    int exp_ya;
    int exp_yr;
    int exp_d;
    bit exp_err;

    rst_n = 1'b0;
    apply(0, 0, 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < CYCLES; k++) begin
      // mid-run reset
      if (k == CYCLES / 2) begin
        apply(4095, 4095, 0);
        rst_n = 1'b0;
        @(negedge clk);
        checks++;
        if (ya != '0 || yr != '0 || y_hat != '0 || err != 1'b0) begin
          failures++;
          $display("FAIL: reset left ya=%0d yr=%0d", ya, yr);
        end else begin
          n_reset++;
        end
        rst_n = 1'b1;
      end

      x    = int'($urandom_range(4095, 0));
      y    = int'($urandom_range(4095, 0));
      kind = int'($urandom_range(3, 0));
      case (kind)
        0:       mask = 0;
        1:       mask = 1 << $urandom_range(23, 15);
        2:       mask = 1 << $urandom_range(8, 0);
        default: mask = int'($urandom) & ((1 << W) - 1);
      endcase
      apply(x, y, mask);
      @(negedge clk);   // one rising edge later

      exp_ya  = (x * y) ^ mask;
      exp_yr  = ref_rpr(x, y);
      exp_d   = (exp_ya > exp_yr) ? exp_ya - exp_yr : exp_yr - exp_ya;
      exp_err = (exp_d > TH);
      checks++;
      if (int'(ya) != exp_ya || int'(yr) != exp_yr || int'(diff) != exp_d ||
          err != exp_err || int'(y_hat) != (exp_err ? exp_yr : exp_ya)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: %0d*%0d mask=%h: ya=%0d/%0d yr=%0d/%0d diff=%0d/%0d err=%0b/%0b y_hat=%0d",
                   x, y, mask, ya, exp_ya, yr, exp_yr, diff, exp_d, err, exp_err, y_hat);
      end
      if (mask == 0) begin
        checks++;
        if (err || int'(y_hat) != x * y) begin
          failures++;
          $display("FAIL: error-free product %0d*%0d not passed on", x, y);
        end else begin
          n_clean++;
        end
      end else if (exp_err) begin
        n_corrected++;
      end else begin
        n_tolerated++;
      end
    end

    $display("clean=%0d corrected=%0d tolerated=%0d reset=%0d",
             n_clean, n_corrected, n_tolerated, n_reset);
    checks++;
    if (n_clean == 0 || n_corrected == 0 || n_tolerated == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
