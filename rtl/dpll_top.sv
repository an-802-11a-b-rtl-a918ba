// dpll_top: fractional-N digital PLL for 802.11a/b/g/n carriers, with a
// three-step TDC, automatic TDC linearity calibration, digi-phase spur
// cancellation with TDC gain tracking, a glitch-free multimodulus divider
// and a wide-tuning DCO.
//
// Loop: REF (80 MHz) and the divided carrier DIV enter the TDC front end
// (tdc_analog, behavioural); its thermometer outputs are encoded and
// processed in dpll_core at the reference rate; the FIN bank code from the
// loop filter tunes the DCO (dco, behavioural); the carrier (DCO/2) is
// divided by the ratio word in mmd to close the loop. freq_counter counts
// carrier cycles for the bank tuning. The analog models are behavioural;
// everything else is synthesizable.
//
// Interface: ref_clk is the reference; start (one ref cycle) begins bank
// tuning and calibration at cal_n_int + cal_frac/256, after which the loop
// relocks at op_n_int + op_frac/256 and locked rises. The remaining inputs
// are the register settings of the serial configuration port, brought out
// as pins: loop filter gains, LMS step sizes, the TDC gain preset (fine LSBs
// per carrier period, Q8.8) and skip_lincal (bypass step 2). The other
// outputs are for observation: TDC result and line flags, canceller error,
// gain estimate, delay words, bank codes, ratio, accumulator, and as reals
// the carrier frequency and the interval the TDC model measured.
module dpll_top
  import dpll_pkg::*;
#(
  parameter int unsigned WIN         = 1024,
  parameter int unsigned T_LOCK      = 4096,
  parameter int unsigned T_LINCAL    = 16384,
  parameter int unsigned T_GAIN      = 4096,
  parameter int          COMMON_INIT = 32,
  parameter int          DIFF_INIT   = 10
) (
  input  logic                    ref_clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    skip_lincal,
  input  logic [P_W-1:0]          cal_n_int,
  input  logic [FRAC_W-1:0]       cal_frac,
  input  logic [P_W-1:0]          op_n_int,
  input  logic [FRAC_W-1:0]       op_frac,
  input  logic [GAIN_W-1:0]       gain_preset,
  input  logic [7:0]              alpha,
  input  logic [3:0]              beta_sh,
  input  logic [3:0]              iir1_sh,
  input  logic [3:0]              iir2_sh,
  input  logic [3:0]              mu_d_sh,
  input  logic [3:0]              mu_c_sh,
  input  logic [3:0]              mu_g_sh,
  output logic                    dco_clk,
  output logic                    pre_clk,
  output logic                    div_clk,
  output logic                    locked,
  output cal_state_e              cal_state,
  output tune_state_e             tune_state,
  output logic signed [TDC_W-1:0] tdc_code,
  output tdc_range_e              tdc_range,
  output logic                    single_line,
  output logic                    multi_line,
  output logic signed [ERR_W-1:0] err,
  output logic [GAIN_W-1:0]       gain,
  output logic signed [DLY_W+DLY_F:0] common_w,
  output logic signed [DLY_W+DLY_F:0] diff_w,
  output logic [PVT_W-1:0]        pvt,
  output logic [ACQ_W-1:0]        acq,
  output logic [TRK_W-1:0]        trk,
  output logic [FIN_W-1:0]        fin,
  output logic [P_W-1:0]          ratio,
  output logic [FRAC_W-1:0]       acc,
  output real                     freq_hz,
  output real                     tdc_dt_ps
);
  logic                bb_lag;
  logic [COARSE_N-1:0] coarse_th;
  logic [FINE_N-1:0]   fine_th;
  logic [DLY_W-1:0]    slow_code, fast_code;
  logic [FCNT_W-1:0]   cnt_gray;
  logic [ACQ_U-1:0]    acq_th;
  logic [TRK_U-1:0]    trk_th;
  logic [FIN_U-1:0]    fin_th;

  dpll_core #(
    .WIN(WIN), .T_LOCK(T_LOCK), .T_LINCAL(T_LINCAL), .T_GAIN(T_GAIN),
    .COMMON_INIT(COMMON_INIT), .DIFF_INIT(DIFF_INIT)
  ) u_core (
    .clk(ref_clk), .rst_n, .start, .skip_lincal, .cal_n_int, .cal_frac, .op_n_int, .op_frac,
    .gain_preset, .alpha, .beta_sh, .iir1_sh, .iir2_sh, .mu_d_sh, .mu_c_sh, .mu_g_sh,
    .bb_lag, .coarse_th, .fine_th, .slow_code, .fast_code,
    .ratio_rt(ratio), .cnt_gray, .pvt, .acq_th, .trk_th, .fin_th,
    .tdc_code, .tdc_range, .single_line, .multi_line, .err, .gain, .common_w, .diff_w,
    .acq, .trk, .fin, .acc, .cal_state, .tune_state, .locked
  );

  dco u_dco (
    .en(rst_n), .pvt, .acq_th, .trk_th, .fin_th, .dco_clk, .pre_clk, .freq_hz
  );

  mmd #(.P_W(P_W)) u_mmd (
    .fin(pre_clk), .rst_n, .p(ratio), .div_out(div_clk)
  );

  freq_counter #(.W(FCNT_W)) u_fcnt (
    .clk(pre_clk), .rst_n, .gray(cnt_gray)
  );

  tdc_analog u_tdc (
    .ref_in(ref_clk), .div_in(div_clk), .slow_code, .fast_code,
    .bb_lag, .coarse_th, .fine_th, .dt_ps(tdc_dt_ps)
  );
endmodule
