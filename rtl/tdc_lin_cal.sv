// tdc_lin_cal: automatic linearity calibration of the 2-D Vernier TDC, two
// least-mean-square (LMS) loops that trim the slow and fast delay chains.
//
// While the loop is locked to a fractional channel, the fractional
// accumulator sweeps the TDC input over one carrier period. The digi-phase
// canceller output, with the TDC gain estimate held at its preset, is then
// TDC output minus ideal ramp: the error caused by TDC nonlinearity (err).
// The error is multiplied by the sign of the measurement (polarity), so that
// a too-large magnitude always reads as positive, scaled by a power-of-two
// step and accumulated:
//  - differential loop, active for results that used only the first arbiter
//    line: there the error depends only on d_s - d_f;
//  - common loop, active for results that used several arbiter lines: there
//    the error is dominated by the turning points, set by the delays' average.
// A positive error means too many codes, i.e. delays too short, so both
// accumulators increase. The chain words are
//   slow = common + diff ,  fast = common - diff ,
// each with DLY_F fraction bits, saturated to the DLY_W-bit range, for the
// two sigma-delta modulators.
//
// Interface/timing: one update per reference cycle when en is high;
// outputs are registered. mu_d_sh/mu_c_sh set the step sizes (larger shift,
// slower and smoother convergence). Initial words are parameters; their
// defaults (common 32, differential 10) are the start values of the
// measured convergence plot.
// The two loops, the flag gating and the +/- combination follow the design.
// Gating by flags follows the design's text: single-line results drive the
// differential loop and multi-line results the common loop. The sign-of-
// polarity correlation and the fixed-point format are this design's choices.
module tdc_lin_cal
  import dpll_pkg::*;
#(
  parameter int COMMON_INIT = 32,
  parameter int DIFF_INIT   = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic signed [ERR_W-1:0]    err,
  input  logic                       polarity,     // 1: positive measurement
  input  logic                       single_line,
  input  logic                       multi_line,
  input  logic [3:0]                 mu_d_sh,
  input  logic [3:0]                 mu_c_sh,
  output logic signed [DLY_W+DLY_F:0] common_w,   // Q(DLY_W).(DLY_F), signed
  output logic signed [DLY_W+DLY_F:0] diff_w,
  output logic [DLY_W+DLY_F-1:0]      slow_w,
  output logic [DLY_W+DLY_F-1:0]      fast_w
);
  localparam int AW = DLY_W + DLY_F + 1;     // signed accumulator width
  localparam int XW = AW + 2;                // headroom for sums

  logic signed [ERR_W-1:0] e_s;
  logic signed [XW-1:0]    d_step, c_step;
  logic signed [XW-1:0]    d_nxt, c_nxt;
  logic signed [XW-1:0]    s_sum, f_sum;

  function automatic logic signed [AW-1:0] clamp_acc(input logic signed [XW-1:0] v);
    logic signed [XW-1:0] hi;
    logic signed [XW-1:0] lo;
    hi = XW'((1 <<< (DLY_W + DLY_F)) - 1);
    lo = -hi;
    if (v > hi) return AW'(hi);
    if (v < lo) return AW'(lo);
    return AW'(v);
  endfunction

  function automatic logic [DLY_W+DLY_F-1:0] clamp_word(input logic signed [XW-1:0] v);
    if (v < 0) return '0;
    if (v > XW'((1 <<< (DLY_W + DLY_F)) - 1)) return '1;
    return v[DLY_W+DLY_F-1:0];
  endfunction

  always_comb begin
    e_s    = polarity ? err : -err;
    // err carries ERR_F fraction bits; the accumulators carry DLY_F
    d_step = XW'(e_s) <<< (DLY_F - ERR_F);
    c_step = d_step;
    d_step = d_step >>> mu_d_sh;
    c_step = c_step >>> mu_c_sh;
    d_nxt  = XW'(diff_w)   + ((en && single_line) ? d_step : XW'(0));
    c_nxt  = XW'(common_w) + ((en && multi_line)  ? c_step : XW'(0));
    s_sum  = XW'(common_w) + XW'(diff_w);
    f_sum  = XW'(common_w) - XW'(diff_w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      common_w <= AW'(COMMON_INIT) <<< DLY_F;
      diff_w   <= AW'(DIFF_INIT)   <<< DLY_F;
      slow_w   <= '0;
      fast_w   <= '0;
    end else begin
      diff_w   <= clamp_acc(d_nxt);
      common_w <= clamp_acc(c_nxt);
      slow_w   <= clamp_word(s_sum);
      fast_w   <= clamp_word(f_sum);
    end
  end
endmodule
