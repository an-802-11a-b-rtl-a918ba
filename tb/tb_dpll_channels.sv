// tb_dpll_channels: channel-coverage workload. Four copies of the whole DPLL
// at the default parameters calibrate at 29 + 4/256 and then relock at
//   26 + 0/256    2080.000 MHz (integer-N)
//   25 + 128/256  2040.000 MHz (fractionality 1/2)
//   30 + 38/256   2411.875 MHz (2.4 GHz WiFi channel 1, nearest 1/256 step)
//   33 + 0/256    2640.000 MHz (near the top of the DCO range)
// For each: locked must rise, the averaged divided period must equal the
// 12.5 ns reference period within 20 ppm, the carrier must average the
// programmed frequency within 20 ppm, and the TDC input must stay inside the
// fine range (+/-260 ps) once locked.
module tb_dpll_channels;
  import dpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NCH = 4;
  localparam logic [P_W-1:0]    CH_N [NCH] = '{7'd26, 7'd25, 7'd30, 7'd33};
  localparam logic [FRAC_W-1:0] CH_F [NCH] = '{8'd0, 8'd128, 8'd38, 8'd0};

  logic ref_clk = 0, rst_n = 0, start = 0;
  logic [7:0] alpha = 32;
  logic [3:0] beta_sh = 6, iir1_sh = 1, iir2_sh = 1, mu_d_sh = 6, mu_c_sh = 6, mu_g_sh = 8;
  logic [GAIN_W-1:0] gain_preset;
  logic [NCH-1:0] locked;
  int checks = 0, failures = 0;
  real maxdt [NCH];
  real fsum [NCH];
  real tfirst [NCH], tlast [NCH];
  int ndiv [NCH];
  logic measuring = 0;
  int nmeas = 0;

  always #6250 ref_clk = ~ref_clk;     // 80 MHz

  for (genvar i = 0; i < NCH; i++) begin : g_pll
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
    logic [P_W-1:0] cal_n_int, op_n_int;
    logic [FRAC_W-1:0] cal_frac, op_frac;
    assign skip_lincal = 1'b0;
    assign cal_n_int = 29;
    assign cal_frac = 4;
    assign op_n_int = CH_N[i];
    assign op_frac = CH_F[i];

    dpll_top dut (.ref_clk, .rst_n, .start, .skip_lincal, .cal_n_int, .cal_frac,
                  .op_n_int, .op_frac, .gain_preset, .alpha, .beta_sh, .iir1_sh, .iir2_sh,
                  .mu_d_sh, .mu_c_sh, .mu_g_sh, .dco_clk, .pre_clk, .div_clk,
                  .locked(locked[i]), .cal_state, .tune_state, .tdc_code, .tdc_range,
                  .single_line, .multi_line, .err, .gain, .common_w, .diff_w, .pvt, .acq,
                  .trk, .fin, .ratio, .acc, .freq_hz, .tdc_dt_ps);

    always @(posedge ref_clk) if (measuring) begin
      fsum[i] += freq_hz;
      if (tdc_dt_ps > maxdt[i]) maxdt[i] = tdc_dt_ps;
      if (-tdc_dt_ps > maxdt[i]) maxdt[i] = -tdc_dt_ps;
    end
    always @(posedge div_clk) if (measuring) begin
      if (ndiv[i] == 0) tfirst[i] = $realtime;
      tlast[i] = $realtime;
      ndiv[i]++;
    end
  end

  always @(posedge ref_clk) if (measuring) nmeas <= nmeas + 1;

  initial begin
    #3000000000;
    failures++;
    $display("watchdog: locked %b", locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f_target, per, favg;
    gain_preset = 16'($rtoi(1.0e12 / (80.0e6 * (29.0 + 4.0 / 256.0)) / 5.0 * 256.0));
    for (int i = 0; i < NCH; i++) begin maxdt[i] = 0; fsum[i] = 0; ndiv[i] = 0; end
    repeat (4) @(posedge ref_clk);
    rst_n = 1;
    repeat (4) @(posedge ref_clk);
    @(negedge ref_clk) start = 1;
    @(negedge ref_clk) start = 0;
    wait (&locked);
    repeat (3000) @(posedge ref_clk);
    @(negedge ref_clk) measuring = 1;
    wait (nmeas == 2048);
    @(negedge ref_clk) measuring = 0;
    for (int i = 0; i < NCH; i++) begin
      f_target = 80.0e6 * (real'(CH_N[i]) + real'(CH_F[i]) / 256.0);
      per = (tlast[i] - tfirst[i]) / real'(ndiv[i] - 1);
      favg = fsum[i] / 2048.0;
      $display("channel %0d + %0d/256: target %f MHz, carrier %f MHz, divided period %f ps, max |TDC input| %f ps",
               CH_N[i], CH_F[i], f_target / 1e6, favg / 1e6, per, maxdt[i]);
      checks++;
      if (per > 12500.0 * 1.00002 || per < 12500.0 * 0.99998) begin
        failures++; $display("  divided period off");
      end
      checks++;
      if (favg > f_target * 1.00002 || favg < f_target * 0.99998) begin
        failures++; $display("  carrier off");
      end
      checks++;
      if (maxdt[i] > 260.0) begin failures++; $display("  TDC input left the fine range"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
