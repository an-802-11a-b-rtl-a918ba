// tdc_encoder: digital back end of the three-step TDC.
//
// It turns the three thermometer outputs of the TDC front end into one signed
// code in fine LSBs (5 ps) and raises the arbiter-line flags used by the
// linearity calibration:
//  - fine: the number of fired arbiters (a ones count, so bubbles caused by
//    mistuned delays do not break the code), 0..51, when the array is not
//    saturated;
//  - coarse: when all 52 arbiters fired, 13 LSBs per fired coarse tap;
//  - bang-bang: when all 16 coarse taps fired too, the code saturates at
//    17*13 LSBs with the polarity of the steering stage.
// The sign is the bang-bang polarity (positive = DIV lags REF).
// single_line is high for a fine result that used only the first arbiter
// line, multi_line for a fine result that used later lines too; both are low
// for coarse and bang-bang results.
//
// Interface/timing: inputs sampled on the rising edge of clk (the reference
// clock), outputs registered, one result per cycle, one cycle of latency.
// The three stages, their ranges and the two line flags follow the design;
// the way the stages are merged into one code is this implementation's own
// choice (the design does not describe it).
module tdc_encoder
  import dpll_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bb_lag,
  input  logic [COARSE_N-1:0]     coarse_th,
  input  logic [FINE_N-1:0]       fine_th,
  output logic signed [TDC_W-1:0] code,
  output logic                    single_line,
  output logic                    multi_line,
  output tdc_range_e              range
);
  logic [6:0]       fine_cnt;
  logic [4:0]       coarse_cnt;
  logic [TDC_W-1:0] mag;
  logic             later_lines;
  tdc_range_e       rng;

  always_comb begin
    fine_cnt = '0;
    for (int i = 0; i < FINE_N; i++) fine_cnt += 7'(fine_th[i]);
    coarse_cnt = '0;
    for (int j = 0; j < COARSE_N; j++) coarse_cnt += 5'(coarse_th[j]);
    later_lines = |fine_th[FINE_N-1:FINE_PER_LINE];
    if (fine_cnt < 7'(FINE_N)) begin
      rng = TDC_FINE;
      mag = TDC_W'(fine_cnt);
    end else if (coarse_cnt < 5'(COARSE_N)) begin
      rng = TDC_COARSE;
      mag = TDC_W'(coarse_cnt) * TDC_W'(COARSE_LSB);
    end else begin
      rng = TDC_BB;
      mag = TDC_W'(TDC_SAT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code        <= '0;
      single_line <= 1'b0;
      multi_line  <= 1'b0;
      range       <= TDC_FINE;
    end else begin
      code        <= bb_lag ? signed'(mag) : -signed'(mag);
      single_line <= (rng == TDC_FINE) && !later_lines;
      multi_line  <= (rng == TDC_FINE) && later_lines;
      range       <= rng;
    end
  end
endmodule
