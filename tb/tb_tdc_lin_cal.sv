// tb_tdc_lin_cal: closed-loop test of the two LMS loops. The testbench holds
// its own model of the 2-D Vernier TDC (4 lines x 13 arbiters, stage delays
// 38.5 + 0.5*slow and 36.5 + 0.5*fast ps, ideal at common 50 / diff 3).
// Each cycle a random interval in +/-208 ps is quantised by that model with
// the present delay words, compared with the ideal ramp (interval / 5 ps),
// and the error and line flags are fed to the calibration. Starting from
// common 32 / diff 10, the words must converge to 50 / 3, and each chain
// word must equal common +/- diff. A first step is also checked exactly,
// and every cycle the update must move only the loop the line flag selects
// (differential on single-line, common on multi-line results) by the
// polarity-signed error scaled by 2^-mu.
module tb_tdc_lin_cal;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [ERR_W-1:0] err;
  logic polarity, single_line, multi_line;
  logic [3:0] mu_d_sh = 6, mu_c_sh = 6;
  logic signed [DLY_W+DLY_F:0] common_w, diff_w;
  logic [DLY_W+DLY_F-1:0] slow_w, fast_w;
  int checks = 0, failures = 0;
  real t, ds, df, m, c_r, d_r;
  int n, hi;
  longint d0, step, exp_d, exp_c;

  tdc_lin_cal #(.COMMON_INIT(32), .DIFF_INIT(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err = 0; polarity = 1; single_line = 0; multi_line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // exact single step: err = +2.0 LSB, single line, positive
    en = 1; err = 512; single_line = 1; polarity = 1;
    d0 = longint'(diff_w);
    @(negedge clk);
    checks++;
    if (longint'(diff_w) - d0 != (longint'(512) <<< (DLY_F - ERR_F)) >>> 6) begin
      failures++;
      $display("diff step %0d", longint'(diff_w) - d0);
    end
    en = 0; single_line = 0;
    @(negedge clk);
    checks++;
    if (longint'(slow_w) != longint'(common_w) + longint'(diff_w) ||
        longint'(fast_w) != longint'(common_w) - longint'(diff_w)) begin
      failures++;
      $display("chain words do not follow common +/- diff");
    end
    en = 1;
    for (int k = 0; k < 60000; k++) begin
      ds = 38.5 + 0.5 * real'(slow_w) / 4096.0;
      df = 36.5 + 0.5 * real'(fast_w) / 4096.0;
      t  = (real'($urandom_range(0, 41600)) - 20800.0) / 100.0;
      m  = (t < 0) ? -t : t;
      n = 0; hi = 0;
      for (int kk = 0; kk < 4; kk++)
        for (int i = 1; i <= 13; i++)
          if (m >= (i + kk) * ds - i * df) begin
            n++;
            if (kk > 0) hi = 1;
          end
      polarity    = (t >= 0);
      single_line = (n < 52) && !hi;
      multi_line  = (n < 52) && hi;
      err = ERR_W'($rtoi(((polarity ? n : -n) - t / 5.0) * 256.0));
      // expected update: only the loop selected by the line flag moves
      step  = ((polarity ? longint'(err) : -longint'(err)) <<< (DLY_F - ERR_F)) >>> 6;
      exp_d = longint'(diff_w)   + (single_line ? step : 0);
      exp_c = longint'(common_w) + (multi_line  ? step : 0);
      @(negedge clk);
      checks++;
      if (longint'(diff_w) != exp_d || longint'(common_w) != exp_c) begin
        failures++;
        if (failures < 10)
          $display("update: single %b multi %b diff %0d exp %0d common %0d exp %0d", single_line,
                   multi_line, diff_w, exp_d, common_w, exp_c);
      end
    end
    c_r = real'(common_w) / 4096.0;
    d_r = real'(diff_w) / 4096.0;
    $display("converged: common %f diff %f", c_r, d_r);
    checks++;
    if (c_r < 48.5 || c_r > 51.5) begin failures++; $display("common did not converge"); end
    checks++;
    if (d_r < 2.5 || d_r > 3.5) begin failures++; $display("diff did not converge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
