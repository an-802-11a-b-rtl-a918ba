// tb_dpll_spur: fractional-spur workload. Eight copies of the whole DPLL run
// side by side at the default parameters, four with a loop bandwidth of
// about 230 kHz (alpha 2, beta 2^-6) and four with about 1 MHz (alpha 8,
// beta 2^-5). In each group:
//   0: 29 + 4/256  (1/64 fractionality, closest spur 1.25 MHz), no TDC calibration
//   1: same channel, linearity calibration run first
//   2: 29 + 12/256 (3/64 fractionality, closest spur 3.75 MHz), no calibration
//   3: same channel, calibration run first
// All copies calibrate (or skip calibration) at 29 + 4/256 and then relock
// at their channel, with the digi-phase canceller and gain tracking on in
// every case, as in the spur measurements the design was built for.
//
// Once all four are locked, the testbench takes a 8192-point single-bin
// DFT at the closest fractional offset f_m of
//   - the canceller residue (the A1 term of the residue model: peak
//     amplitude of its fundamental, in TDC LSBs), and
//   - the carrier frequency, sampled once per reference cycle; a frequency
//     tone of peak deviation df at f_m is a phase tone of df / f_m radians,
//     i.e. a spur of 20*log10(df / (2*f_m)) dBc.
// Checked: in every case calibration lowers the residue fundamental and the
// spur by at least 10 dB, and at the narrower bandwidth the calibrated spur
// is below -55 dBc. (At 1 MHz the model's 1.25 MHz spur sees almost no loop
// filtering, so its absolute level is higher.) The spur levels are printed; the DCO is a noiseless model with
// an 8.4 kHz fine step, so absolute levels are not comparable with a
// measured chip.
module tb_dpll_spur;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NS = 8192;
  localparam real PI = 3.14159265358979;

  logic ref_clk = 0, rst_n = 0, start = 0;
  logic [3:0] iir1_sh = 1, iir2_sh = 1, mu_d_sh = 6, mu_c_sh = 6, mu_g_sh = 8;
  logic [GAIN_W-1:0] gain_preset;
  logic [7:0] locked;
  int checks = 0, failures = 0;
  real fm [8], a1 [8], spur [8];
  real rc [8], rs [8], fc [8], fs [8];
  logic measuring = 0;
  int k = 0;

  always #6250 ref_clk = ~ref_clk;     // 80 MHz

  for (genvar i = 0; i < 8; i++) begin : g_pll
    logic dco_clk, pre_clk, div_clk;
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
    logic skip_lincal;
    logic [7:0] alpha;
    logic [3:0] beta_sh;
    assign alpha   = (i < 4) ? 8'd32 : 8'd128;
    assign beta_sh = (i < 4) ? 4'd6 : 4'd5;
    logic [P_W-1:0] cal_n_int, op_n_int;
    logic [FRAC_W-1:0] cal_frac, op_frac;
    assign skip_lincal = (i % 2 == 0);
    assign cal_n_int = 29;
    assign cal_frac = 4;
    assign op_n_int = 29;
    assign op_frac = (i % 4 < 2) ? 8'd4 : 8'd12;

    dpll_top dut (.ref_clk, .rst_n, .start, .skip_lincal, .cal_n_int, .cal_frac,
                  .op_n_int, .op_frac, .gain_preset, .alpha, .beta_sh, .iir1_sh, .iir2_sh,
                  .mu_d_sh, .mu_c_sh, .mu_g_sh, .dco_clk, .pre_clk, .div_clk,
                  .locked(locked[i]), .cal_state, .tune_state, .tdc_code, .tdc_range,
                  .single_line, .multi_line, .err, .gain, .common_w, .diff_w, .pvt, .acq,
                  .trk, .fin, .ratio, .acc, .freq_hz, .tdc_dt_ps);

    // single-bin DFT of residue and carrier frequency
    always @(posedge ref_clk) if (measuring) begin
      real ph;
      ph = 2.0 * PI * fm[i] * real'(k) / 80.0e6;
      rc[i] += real'(err) / 256.0 * $cos(ph);
      rs[i] += real'(err) / 256.0 * $sin(ph);
      fc[i] += freq_hz * $cos(ph);
      fs[i] += freq_hz * $sin(ph);
    end
  end

  always @(posedge ref_clk) if (measuring) k <= k + 1;

  initial begin
    #3000000000;
    failures++;
    $display("watchdog: locked %b", locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gain_preset = 16'($rtoi(1.0e12 / (80.0e6 * (29.0 + 4.0 / 256.0)) / 5.0 * 256.0));
    for (int i = 0; i < 8; i++) begin
      fm[i] = (i % 4 < 2) ? 80.0e6 / 64.0 : 3.0 * 80.0e6 / 64.0;
      rc[i] = 0; rs[i] = 0; fc[i] = 0; fs[i] = 0;
    end
    repeat (4) @(posedge ref_clk);
    rst_n = 1;
    repeat (4) @(posedge ref_clk);
    @(negedge ref_clk) start = 1;
    @(negedge ref_clk) start = 0;
    wait (&locked);
    repeat (4000) @(posedge ref_clk);
    @(negedge ref_clk) measuring = 1;
    wait (k == NS);
    @(negedge ref_clk) measuring = 0;
    for (int i = 0; i < 8; i++) begin
      a1[i] = 2.0 * $sqrt(rc[i] ** 2 + rs[i] ** 2) / real'(NS);
      spur[i] = 20.0 * $log10(2.0 * $sqrt(fc[i] ** 2 + fs[i] ** 2) / real'(NS) / (2.0 * fm[i]) + 1e-12);
      $display("%s channel %s, %s: residue fundamental A1 %f LSB, spur at %0.2f MHz %0.1f dBc",
               i < 4 ? "230 kHz loop," : "1 MHz loop,  ", i % 4 < 2 ? "1/64" : "3/64", i % 2 ? "calibrated  " : "uncalibrated",
               a1[i], fm[i] / 1e6, spur[i]);
    end
    $display("delay words calibrated: common %0.2f diff %0.2f",
             real'(g_pll[1].common_w) / 4096.0, real'(g_pll[1].diff_w) / 4096.0);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (a1[2*c+1] >= a1[2*c]) begin
        failures++; $display("case %0d: calibration did not lower the residue tone", c);
      end
      checks++;
      if (spur[2*c+1] > spur[2*c] - 10.0) begin
        failures++; $display("case %0d: calibration lowered the spur by less than 10 dB", c);
      end
      checks++;
      if (c < 2 && spur[2*c+1] > -55.0) begin
        failures++; $display("case %0d: calibrated spur above -55 dBc", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
