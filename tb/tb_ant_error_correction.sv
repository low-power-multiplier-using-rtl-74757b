// tb_ant_error_correction: self-check of the ANT error-correction block (24-bit,
// threshold 9785).
//
// Drives pairs (ya, yr) whose difference is exactly TH-1, TH, TH+1 in both
// directions, zero, extreme values and random pairs. For each it checks diff =
// |ya - yr|, err = (diff > TH) and that y_hat is ya when err is 0 and yr when err is
// 1, all computed in the testbench with wide signed arithmetic.
module tb_ant_error_correction;
  localparam int W  = 24;
  localparam longint TH = 9785;

  logic [W-1:0] ya;
  logic [W-1:0] yr;
  logic [W-1:0] y_hat;
  logic [W-1:0] diff;
  logic         err;

  int checks   = 0;
  int failures = 0;
  int n_sel_ya = 0;
  int n_sel_yr = 0;

  ant_error_correction #(.W(W), .TH(32'(TH))) dut (
    .ya(ya), .yr(yr), .y_hat(y_hat), .diff(diff), .err(err)
  );

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint va, input longint vr);
    longint d;
    logic   e_exp;
    ya = W'(va);
    yr = W'(vr);
    #1;
    d     = longint'(ya) - longint'(yr);
    if (d < 0) d = -d;
    e_exp = (d > TH);
    checks++;
    if (longint'(diff) != d || err != e_exp || y_hat != (e_exp ? yr : ya)) begin
      failures++;
      $display("FAIL: ya=%0d yr=%0d diff=%0d (exp %0d) err=%0b (exp %0b) y_hat=%0d",
               ya, yr, diff, d, err, e_exp, y_hat);
    end
    if (e_exp) n_sel_yr++; else n_sel_ya++;
  endtask

  initial begin : stimulus
    longint base;
    for (int k = 0; k < 200; k++) begin
      base = longint'($urandom_range(16000000, 20000));
      check(base, base);
      check(base + TH - 1, base);
      check(base + TH, base);
      check(base + TH + 1, base);
      check(base, base + TH - 1);
      check(base, base + TH);
      check(base, base + TH + 1);
    end
    check(0, 0);
    check((1 << W) - 1, 0);
    check(0, (1 << W) - 1);
    check((1 << W) - 1, (1 << W) - 1);
    for (int k = 0; k < 20000; k++) begin
      check(longint'($urandom) & ((1 << W) - 1), longint'($urandom) & ((1 << W) - 1));
    end
    checks++;
    if (n_sel_ya == 0 || n_sel_yr == 0) begin
      failures++;
      $display("FAIL: one of the multiplexer inputs was never selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
