// tdc_analog: behavioural model (not synthesizable) of the analog front end
// of the three-step TDC: the steering bang-bang stage, the fast (60 ps) and
// slow (65 ps) delay chains, the 16 coarse taps of the slow chain and the
// 4 x 13 arbiter array of the 2-D Vernier fine stage.
//
// How it works: the model time-stamps the rising edges of REF and DIV. At
// each falling edge of REF (the trigger of the bang-bang stage) it takes the
// last DIV edge seen since the previous REF falling edge: a DIV edge after the
// REF rising edge is a lagging event (positive), one before it a leading
// event (negative), and the two inputs are swapped so that the later stages
// always measure the magnitude. Arbiter i (1..13) of line k (0..3) compares
// i fast stages against i+k slow stages, so it fires when
//   |dt| >= (i+k)*d_s - i*d_f ,
// and coarse tap j (1..16) fires when |dt| >= j*d_s. With d_s = 65 ps and
// d_f = 60 ps these thresholds are the uniform 5 ps staircase of eq. (3).
// The stage delays follow the 6-bit control words with a 0.5 ps step:
//   d_s = DS0_PS + 0.5*slow_code ,  d_f = DF0_PS + 0.5*fast_code .
// If no DIV edge arrived in a window, all taps fire with the last polarity.
//
// Interface: ref_in/div_in are the reference and divided clocks; slow_code
// and fast_code are the sigma-delta-dithered control words; the outputs
// change shortly after each REF falling edge and are stable at the next REF
// rising edge, where the digital core samples them.
//
// The structure, the 5/60/65 ps delays, the 16/52-tap sizes and the 0.5 ps
// control step follow the design. DS0_PS/DF0_PS are chosen so that control
// words of 50 (common) and 3 (differential) give ideal delays; the window
// rule for a missing DIV edge is this model's own choice.
module tdc_analog #(
  parameter real DS0_PS  = 38.5,   // slow stage delay at control word 0
  parameter real DF0_PS  = 36.5,   // fast stage delay at control word 0
  parameter real STEP_PS = 0.5     // delay change per control LSB
) (
  input  logic        ref_in,
  input  logic        div_in,
  input  logic [5:0]  slow_code,
  input  logic [5:0]  fast_code,
  output logic        bb_lag,      // 1: DIV lags REF (positive phase error)
  output logic [15:0] coarse_th,   // coarse thermometer, tap j at bit j-1
  output logic [51:0] fine_th,     // arbiter k*13+(i-1): line k, arbiter i
  output real         dt_ps        // measured interval, for observation only
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime t_rise;
  realtime t_div;
  bit      div_seen;

  initial begin
    t_rise    = 0;
    t_div     = 0;
    div_seen  = 1'b0;
    bb_lag    = 1'b0;
    coarse_th = '0;
    fine_th   = '0;
    dt_ps     = 0.0;
  end

  always @(posedge ref_in) t_rise = $realtime;

  always @(posedge div_in) begin
    t_div    = $realtime;
    div_seen = 1'b1;
  end

  always @(negedge ref_in) begin
    real ds, df, mag, thr;
    ds = DS0_PS + STEP_PS * real'(slow_code);
    df = DF0_PS + STEP_PS * real'(fast_code);
    if (div_seen) begin
      dt_ps  = real'(t_div - t_rise);
      bb_lag = (dt_ps >= 0.0);
      mag    = bb_lag ? dt_ps : -dt_ps;
    end else begin
      mag    = 1.0e6;
    end
    div_seen = 1'b0;
    for (int j = 1; j <= 16; j++)
      coarse_th[j-1] = (mag >= real'(j) * ds);
    for (int k = 0; k < 4; k++)
      for (int i = 1; i <= 13; i++) begin
        thr = real'(i + k) * ds - real'(i) * df;
        fine_th[k*13 + i - 1] = (mag >= thr);
      end
  end
endmodule
