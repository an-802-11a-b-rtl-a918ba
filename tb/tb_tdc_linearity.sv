// tb_tdc_linearity: static transfer curve of the fine TDC (front-end model
// plus encoder) for several settings of the slow/fast delay trims, swept
// from 0 to 400 ps in 0.1 ps steps. From the measured code transitions T_k
// (smallest input giving code >= k, k = 1..52) it computes end-point INL
// and DNL in LSBs of the fitted step, the way a TDC transfer curve is
// characterised before and after calibration:
//   ideal      slow 53 / fast 47 (65 / 60 ps):  INL and DNL ~ 0;
//   start      slow 42 / fast 22 (common 32, differential 10, the reset
//              words of the calibration): large INL, printed;
//   common     slow 48 / fast 42 (common error only): steps inside arbiter
//              line 1 exact, gaps or overlaps at the joints between lines;
//   diff       slow 56 / fast 44 (differential error only): the slope is
//              wrong already inside line 1.
// These are the two error shapes the two calibration loops separate.
module tb_tdc_linearity;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_in = 0, div_in = 0, clk = 0, rst_n = 0;
  logic [5:0] slow_code, fast_code;
  logic bb_lag;
  logic [COARSE_N-1:0] coarse_th;
  logic [FINE_N-1:0] fine_th;
  real dt_ps;
  logic signed [TDC_W-1:0] code;
  logic single_line, multi_line;
  tdc_range_e range;
  int checks = 0, failures = 0;

  tdc_analog u_fe (.ref_in, .div_in, .slow_code, .fast_code, .bb_lag, .coarse_th, .fine_th, .dt_ps);
  tdc_encoder u_enc (.clk, .rst_n, .bb_lag, .coarse_th, .fine_th, .code, .single_line,
                     .multi_line, .range);

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one measurement: REF rises 2 ns into a 12.5 ns slot, DIV dt later
  task automatic measure(input real dt, output int c);
    fork
      begin #2000; ref_in = 1; #6250; ref_in = 0; end
      begin #(2000.0 + dt); div_in = 1; #3000; div_in = 0; end
    join
    #100; clk = 1; #100; clk = 0;
    c = int'(code);
    #(12500.0 - 8450.0);
  endtask

  task automatic curve(input int sc, input int fc, input string tag,
                       output real inl_max, output real dnl_max,
                       output real line1_err, output real joint_dnl);
    real t [0:FINE_N];
    real lsb, v;
    int c, k;
    slow_code = 6'(sc); fast_code = 6'(fc);
    for (int j = 0; j <= FINE_N; j++) t[j] = -1.0;
    k = 1;
    for (int s = 0; s <= 4000; s++) begin
      measure(real'(s) * 0.1, c);
      while (k <= FINE_N && c >= k) begin t[k] = real'(s) * 0.1; k++; end
    end
    checks++;
    if (k <= FINE_N) begin
      failures++; $display("%s: code %0d never reached", tag, k);
      inl_max = 99; dnl_max = 99; line1_err = 99; joint_dnl = 99;
      return;
    end
    lsb = (t[FINE_N] - t[1]) / real'(FINE_N - 1);
    inl_max = 0; dnl_max = 0; line1_err = 0; joint_dnl = 0;
    for (int j = 1; j <= FINE_N; j++) begin
      v = (t[j] - t[1]) / lsb - real'(j - 1);
      if (v < 0) v = -v;
      if (v > inl_max) inl_max = v;
    end
    for (int j = 1; j < FINE_N; j++) begin
      v = (t[j+1] - t[j]) / lsb - 1.0;
      if (v < 0) v = -v;
      if (v > dnl_max) dnl_max = v;
      if (j % FINE_PER_LINE == 0 && v > joint_dnl) joint_dnl = v;
    end
    // absolute error of the transitions inside arbiter line 1 (5 ps grid)
    for (int j = 1; j < FINE_PER_LINE; j++) begin
      v = t[j] - 5.0 * real'(j);
      if (v < 0) v = -v;
      if (v > line1_err) line1_err = v;
    end
    $display("%-7s slow %0d fast %0d: fitted LSB %6.3f ps  INL %5.2f LSB  DNL %5.2f LSB  line-1 error %5.2f ps  worst joint DNL %5.2f",
             tag, sc, fc, lsb, inl_max, dnl_max, line1_err, joint_dnl);
  endtask

  initial begin
    real inl, dnl, l1, jd, inl_start;
    slow_code = 53; fast_code = 47;
    #1000 rst_n = 1;
    curve(53, 47, "ideal", inl, dnl, l1, jd);
    checks++; if (inl > 0.05 || dnl > 0.05) begin failures++; $display("ideal curve not linear"); end
    checks++; if (l1 > 0.15) begin failures++; $display("ideal line-1 transitions off the 5 ps grid"); end
    curve(42, 22, "start", inl, dnl, l1, jd);
    inl_start = inl;
    checks++; if (inl < 1.0) begin failures++; $display("mistuned curve unexpectedly linear"); end
    curve(48, 42, "common", inl, dnl, l1, jd);
    checks++; if (l1 > 0.15) begin failures++; $display("common error moved line-1 steps"); end
    checks++; if (jd < 0.4) begin failures++; $display("common error left no gap at a line joint"); end
    curve(56, 44, "diff", inl, dnl, l1, jd);
    checks++; if (l1 < 5.0) begin failures++; $display("differential error not visible in line 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
