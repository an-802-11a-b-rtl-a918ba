// dpll_core: the synthesizable reference-clock part of the fractional-N DPLL.
//
// Data flow per reference cycle:
//   TDC thermometers -> tdc_encoder -> signed phase code (5 ps LSB)
//   -> digiphase_canceller (removes the fractional ramp predicted from the
//      accumulator, tracks the TDC gain) -> loop_filter -> FIN bank code.
// Around this loop:
//   frac_accum      produces the N/N+1 ratio and the ramp (residue);
//   tdc_lin_cal     trims the TDC delay chains from the canceller error;
//   delay_sdm (x2)  dithers the slow/fast delay words to 6 bits;
//   dco_tune_ctrl   sets the PVT/ACQ/TRK banks and hands FIN to the loop;
//   cal_sequencer   runs lock -> linearity cal -> gain tracking -> relock.
// The ratio is retimed to the falling reference edge, so it is stable while
// the divided edge arrives around the rising edge, where the divider takes
// it. The frequency word is the calibration word until the sequencer moves
// to the operating word.
//
// Interface/timing: everything is clocked by the rising reference edge
// except the ratio retiming register (falling edge). TDC inputs are sampled
// at the rising edge and must have settled after the preceding falling edge.
module dpll_core
  import dpll_pkg::*;
#(
  parameter int unsigned WIN         = 1024,
  parameter int unsigned SETTLE      = 16,
  parameter int unsigned FIN_START   = 32,
  parameter int unsigned T_LOCK      = 4096,
  parameter int unsigned T_LINCAL    = 16384,
  parameter int unsigned T_GAIN      = 4096,
  parameter int unsigned RES_DELAY   = 3,
  parameter int          COMMON_INIT = 32,
  parameter int          DIFF_INIT   = 10
) (
  input  logic                    clk,
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
  // TDC front end
  input  logic                    bb_lag,
  input  logic [COARSE_N-1:0]     coarse_th,
  input  logic [FINE_N-1:0]       fine_th,
  output logic [DLY_W-1:0]        slow_code,
  output logic [DLY_W-1:0]        fast_code,
  // divider and DCO
  output logic [P_W-1:0]          ratio_rt,
  input  logic [FCNT_W-1:0]       cnt_gray,
  output logic [PVT_W-1:0]        pvt,
  output logic [ACQ_U-1:0]        acq_th,
  output logic [TRK_U-1:0]        trk_th,
  output logic [FIN_U-1:0]        fin_th,
  // status
  output logic signed [TDC_W-1:0] tdc_code,
  output tdc_range_e              tdc_range,
  output logic                    single_line,
  output logic                    multi_line,
  output logic signed [ERR_W-1:0] err,
  output logic [GAIN_W-1:0]       gain,
  output logic signed [DLY_W+DLY_F:0] common_w,
  output logic signed [DLY_W+DLY_F:0] diff_w,
  output logic [ACQ_W-1:0]        acq,
  output logic [TRK_W-1:0]        trk,
  output logic [FIN_W-1:0]        fin,
  output logic [FRAC_W-1:0]       acc,
  output cal_state_e              cal_state,
  output tune_state_e             tune_state,
  output logic                    locked
);
  logic                   retune, use_op, cancel_en, lincal_en, track_en, gain_load;
  logic                   tune_done, lf_en;
  logic [P_W-1:0]         n_sel, ratio;
  logic [FRAC_W-1:0]      f_sel;
  logic [DLY_W+DLY_F-1:0] slow_w, fast_w;
  logic signed [LF_W-1:0] lf_out;

  assign n_sel = use_op ? op_n_int : cal_n_int;
  assign f_sel = use_op ? op_frac  : cal_frac;

  cal_sequencer #(.T_LOCK(T_LOCK), .T_LINCAL(T_LINCAL), .T_GAIN(T_GAIN)) u_seq (
    .clk, .rst_n, .start, .skip_lincal, .tune_done,
    .state(cal_state), .retune, .use_op, .cancel_en, .lincal_en, .track_en, .gain_load
  );

  frac_accum #(.FRAC_W(FRAC_W), .P_W(P_W)) u_acc (
    .clk, .rst_n, .en(1'b1), .n_int(n_sel), .frac(f_sel), .ratio, .acc
  );

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) ratio_rt <= cal_n_int;
    else        ratio_rt <= ratio;

  tdc_encoder u_enc (
    .clk, .rst_n, .bb_lag, .coarse_th, .fine_th,
    .code(tdc_code), .single_line, .multi_line, .range(tdc_range)
  );

  digiphase_canceller #(.RES_DELAY(RES_DELAY)) u_dp (
    .clk, .rst_n, .cancel_en, .track_en, .load(gain_load), .tdc(tdc_code), .acc,
    .gain_preset, .mu_sh(mu_g_sh), .err, .gain
  );

  tdc_lin_cal #(.COMMON_INIT(COMMON_INIT), .DIFF_INIT(DIFF_INIT)) u_cal (
    .clk, .rst_n, .en(lincal_en), .err, .polarity(tdc_code >= 0),
    .single_line, .multi_line, .mu_d_sh, .mu_c_sh,
    .common_w, .diff_w, .slow_w, .fast_w
  );

  delay_sdm #(.INT_W(DLY_W), .FRAC_W(DLY_F)) u_sdm_s (
    .clk, .rst_n, .en(1'b1), .word_in(slow_w), .code_out(slow_code)
  );
  delay_sdm #(.INT_W(DLY_W), .FRAC_W(DLY_F)) u_sdm_f (
    .clk, .rst_n, .en(1'b1), .word_in(fast_w), .code_out(fast_code)
  );

  loop_filter #(.OUT_MIN(-int'(FIN_START)), .OUT_MAX(int'(FIN_U) - int'(FIN_START))) u_lf (
    .clk, .rst_n, .en(lf_en), .clr(!lf_en), .e(err),
    .alpha, .beta_sh, .iir1_sh, .iir2_sh, .out(lf_out)
  );

  dco_tune_ctrl #(.WIN(WIN), .SETTLE(SETTLE), .FIN_START(FIN_START)) u_tune (
    .clk, .rst_n, .start(retune), .n_int(n_sel), .frac(f_sel), .cnt_gray, .lf_out,
    .pvt, .acq, .trk, .fin, .acq_th, .trk_th, .fin_th, .lf_en, .done(tune_done),
    .state(tune_state)
  );

  assign locked = tune_done && (cal_state == CAL_TRACK);
endmodule
