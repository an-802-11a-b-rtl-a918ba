// tb_dpll_top: end-to-end run of the fractional-N DPLL at its default
// parameters (full tuning windows and calibration step lengths).
//
// The loop is calibrated at 29 + 4/256 times 80 MHz (2321.25 MHz, a 1/64
// fractionality whose closest spur lies at 1.25 MHz) and then relocked at
// 29 + 12/256 (3/64, 2323.75 MHz). The TDC starts mistuned (common 32,
// differential 10, i.e. 59.5 ps / 47.5 ps stages instead of 65 / 60 ps).
// Checked:
//  - both bank tunings end and the loop reaches the locked state;
//  - the linearity calibration moves the delay words to common ~50,
//    differential ~3 (ideal 65/60 ps stages in the TDC model);
//  - gain tracking ends near T_DCO / 5 ps;
//  - in lock the carrier averages the programmed frequency, the TDC input
//    stays inside the fine range and the canceller residue is small;
//  - every mechanism happened: N/N+1 toggling, fine/coarse/bang-bang TDC
//    results, single- and multi-line results, LMS updates, gain tracking,
//    relock at the operating word.
module tb_dpll_top;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_clk = 0, rst_n = 0, start = 0, skip_lincal = 0;
  logic [P_W-1:0] cal_n_int = 29, op_n_int = 29;
  logic [FRAC_W-1:0] cal_frac = 4, op_frac = 12;
  logic [GAIN_W-1:0] gain_preset;
  logic [7:0] alpha = 32;
  logic [3:0] beta_sh = 6, iir1_sh = 1, iir2_sh = 1, mu_d_sh = 6, mu_c_sh = 6, mu_g_sh = 8;
  logic dco_clk, pre_clk, div_clk, locked;
  cal_state_e cal_state;
  tune_state_e tune_state;
  logic signed [TDC_W-1:0] tdc_code;
  tdc_range_e tdc_range;
  logic single_line, multi_line;
  logic signed [ERR_W-1:0] err;
  logic [GAIN_W-1:0] gain;
  logic signed [DLY_W+DLY_F:0] common_w, diff_w;
  logic [PVT_W-1:0] pvt;
  logic [ACQ_W-1:0] acq;
  logic [TRK_W-1:0] trk;
  logic [FIN_W-1:0] fin;
  logic [P_W-1:0] ratio;
  logic [FRAC_W-1:0] acc;
  real freq_hz, tdc_dt_ps;

  int checks = 0, failures = 0;
  int n_fine, n_coarse, n_bb, n_single, n_multi, n_ratio_hi, n_ratio_lo, n_tune, n_gain_moves;
  int n_lms;
  cal_state_e prev_state;
  logic [GAIN_W-1:0] prev_gain;
  longint refcyc;

  dpll_top dut (.*);

  always #6250 ref_clk = ~ref_clk;     // 80 MHz

  initial begin
    #4000000000;
    failures++;
    $display("watchdog: state %s", cal_state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  always @(posedge ref_clk) if (rst_n) begin
    refcyc++;
    if (cal_state != CAL_IDLE) begin
      case (tdc_range)
        TDC_FINE:   n_fine++;
        TDC_COARSE: n_coarse++;
        default:    n_bb++;
      endcase
      if (single_line) n_single++;
      if (multi_line)  n_multi++;
      if (ratio == 30) n_ratio_hi++;
      if (ratio == 29) n_ratio_lo++;
      if (gain != prev_gain && cal_state >= CAL_GAINTRK) n_gain_moves++;
      if (cal_state == CAL_LINCAL && (single_line || multi_line)) n_lms++;
    end
    prev_gain <= gain;
    if (cal_state != prev_state) begin
      $display("%0d: state %s -> %s  pvt %0d acq %0d trk %0d fin %0d  common %0.2f diff %0.2f gain %0.2f",
               refcyc, prev_state.name(), cal_state.name(), pvt, acq, trk, fin,
               real'(common_w) / 4096.0, real'(diff_w) / 4096.0, real'(gain) / 256.0);
      if (cal_state == CAL_LOCK || cal_state == CAL_TRACK) n_tune++;
    end
    prev_state <= cal_state;
  end

  task automatic check_lock(input real f_target, input string tag);
    real t0, t1, maxdt, sq;
    int maxe;
    // average carrier frequency over 512 reference periods
    @(posedge div_clk); t0 = $realtime;
    repeat (512) @(posedge div_clk);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 512.0 > 12500.0 * 1.00002 || (t1 - t0) / 512.0 < 12500.0 * 0.99998) begin
      failures++;
      $display("%s: divided period %f ps, expected 12500", tag, (t1 - t0) / 512.0);
    end
    maxdt = 0; maxe = 0; sq = 0;
    repeat (1024) begin
      @(posedge ref_clk);
      if (tdc_dt_ps > maxdt) maxdt = tdc_dt_ps;
      if (-tdc_dt_ps > maxdt) maxdt = -tdc_dt_ps;
      sq += (real'(err) / 256.0) ** 2;
    end
    $display("%s: carrier %f MHz (target %f), max |TDC input| %f ps, rms residue %f LSB",
             tag, freq_hz / 1e6, f_target / 1e6,
             maxdt, $sqrt(sq / 1024.0));
    checks++;
    if (maxdt > 260.0) begin failures++; $display("%s: TDC input left the fine range", tag); end
    checks++;
    if ($sqrt(sq / 1024.0) > 4.0) begin failures++; $display("%s: residue too large", tag); end
  endtask

  initial begin
    gain_preset = 16'($rtoi(1.0e12 / (80.0e6 * (29.0 + 4.0 / 256.0)) / 5.0 * 256.0));
    prev_state = CAL_IDLE; prev_gain = 0; refcyc = 0;
    n_fine = 0; n_coarse = 0; n_bb = 0; n_single = 0; n_multi = 0; n_ratio_hi = 0;
    n_ratio_lo = 0; n_tune = 0; n_gain_moves = 0; n_lms = 0;
    repeat (4) @(posedge ref_clk);
    rst_n = 1;
    repeat (4) @(posedge ref_clk);
    @(negedge ref_clk) start = 1;
    @(negedge ref_clk) start = 0;
    wait (cal_state == CAL_LINCAL);
    check_lock(80.0e6 * (29.0 + 4.0 / 256.0), "cal lock (uncalibrated TDC)");
    wait (cal_state == CAL_GAINTRK);
    checks++;
    if (real'(common_w) / 4096.0 < 48.0 || real'(common_w) / 4096.0 > 52.0) begin
      failures++; $display("common word %f not near 50", real'(common_w) / 4096.0);
    end
    checks++;
    if (real'(diff_w) / 4096.0 < 2.0 || real'(diff_w) / 4096.0 > 4.0) begin
      failures++; $display("differential word %f not near 3", real'(diff_w) / 4096.0);
    end
    wait (locked);
    repeat (3000) @(posedge ref_clk);
    check_lock(80.0e6 * (29.0 + 12.0 / 256.0), "operating lock");
    checks++;
    if (real'(gain) / 256.0 < 83.0 || real'(gain) / 256.0 > 89.0) begin
      failures++; $display("gain estimate %f, expected about %f", real'(gain) / 256.0,
                           1.0e12 / (80.0e6 * (29.0 + 12.0 / 256.0)) / 5.0);
    end
    $display("events: fine %0d coarse %0d bb %0d single %0d multi %0d ratio29 %0d ratio30 %0d tunings %0d gain moves %0d lms %0d",
             n_fine, n_coarse, n_bb, n_single, n_multi, n_ratio_lo, n_ratio_hi, n_tune, n_gain_moves, n_lms);
    checks++; if (n_fine == 0)       begin failures++; $display("no fine TDC result"); end
    checks++; if (n_coarse == 0)     begin failures++; $display("no coarse TDC result"); end
    checks++; if (n_bb == 0)         begin failures++; $display("no bang-bang TDC result"); end
    checks++; if (n_single == 0)     begin failures++; $display("no single-line result"); end
    checks++; if (n_multi == 0)      begin failures++; $display("no multi-line result"); end
    checks++; if (n_ratio_hi == 0 || n_ratio_lo == 0) begin failures++; $display("no N/N+1 toggling"); end
    checks++; if (n_tune != 2)       begin failures++; $display("%0d tunings", n_tune); end
    checks++; if (n_gain_moves == 0) begin failures++; $display("gain tracking never moved"); end
    checks++; if (n_lms == 0)        begin failures++; $display("no LMS update"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
