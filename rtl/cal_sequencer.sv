// cal_sequencer: the start-up procedure of the DPLL.
//
//  CAL_TUNE    bank tuning at the calibration (fractional) frequency;
//  CAL_LOCK    step 1: phase lock with the digi-phase canceller enabled and
//              the TDC gain held at its preset, for T_LOCK cycles;
//  CAL_LINCAL  step 2: the TDC linearity LMS loops run on the accumulator
//              ramp, for T_LINCAL cycles;
//  CAL_GAINTRK step 3: linearity calibration off (delays frozen), TDC gain
//              tracking on, for T_GAIN cycles;
//  CAL_RELOCK  switch to the operating frequency word and retune the banks
//              (gain tracking held while the loop is open);
//  CAL_TRACK   locked at the operating frequency, gain tracking stays on.
// With skip_lincal high, step 2 is left out (the TDC keeps its initial
// delays), which gives the uncalibrated reference behaviour.
//
// Interface/timing: clk is the reference clock; start (a pulse) begins the
// procedure; retune is a one-cycle pulse to the bank controller at the start
// of CAL_TUNE and CAL_RELOCK; tune_done comes back from it. use_op selects
// the operating frequency word. Outputs are registered.
// The three steps and the relock follow the design; the durations as
// parameters and the gain re-load at each retune are this implementation's
// choices.
module cal_sequencer
  import dpll_pkg::*;
#(
  parameter int unsigned T_LOCK   = 4096,
  parameter int unsigned T_LINCAL = 16384,
  parameter int unsigned T_GAIN   = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       skip_lincal,
  input  logic       tune_done,
  output cal_state_e state,
  output logic       retune,
  output logic       use_op,
  output logic       cancel_en,
  output logic       lincal_en,
  output logic       track_en,
  output logic       gain_load
);
  logic [31:0] tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CAL_IDLE;
      tmr       <= '0;
      retune    <= 1'b0;
      use_op    <= 1'b0;
      gain_load <= 1'b1;
    end else begin
      retune    <= 1'b0;
      gain_load <= 1'b0;
      if (start) begin
        state     <= CAL_TUNE;
        tmr       <= '0;
        retune    <= 1'b1;
        use_op    <= 1'b0;
        gain_load <= 1'b1;
      end else begin
        case (state)
          CAL_IDLE: ;
          CAL_TUNE: if (tune_done && !retune) begin
            state <= CAL_LOCK;
            tmr   <= '0;
          end
          CAL_LOCK: begin
            tmr <= tmr + 1;
            if (tmr == T_LOCK - 1) begin
              tmr   <= '0;
              state <= skip_lincal ? CAL_GAINTRK : CAL_LINCAL;
            end
          end
          CAL_LINCAL: begin
            tmr <= tmr + 1;
            if (tmr == T_LINCAL - 1) begin
              tmr   <= '0;
              state <= CAL_GAINTRK;
            end
          end
          CAL_GAINTRK: begin
            tmr <= tmr + 1;
            if (tmr == T_GAIN - 1) begin
              tmr    <= '0;
              state  <= CAL_RELOCK;
              use_op <= 1'b1;
              retune <= 1'b1;
            end
          end
          CAL_RELOCK: if (tune_done && !retune) state <= CAL_TRACK;
          CAL_TRACK: ;
          default: state <= CAL_IDLE;
        endcase
      end
    end
  end

  assign cancel_en = (state != CAL_IDLE);
  assign lincal_en = (state == CAL_LINCAL);
  // gain tracking is held while the banks retune: the loop is open then
  assign track_en  = (state == CAL_GAINTRK) || (state == CAL_TRACK);

  // linearity calibration and gain tracking are never active together
  assert property (@(posedge clk) disable iff (!rst_n) !(lincal_en && track_en));
endmodule
