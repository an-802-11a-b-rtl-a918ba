// frac_accum: fractional-N accumulator.
//
// Every reference cycle (when en is high) the FRAC_W-bit fraction word is
// added to a phase accumulator. A carry selects division ratio N+1 for that
// cycle, otherwise N, so the average ratio is N + frac/2^FRAC_W. The
// accumulator content is the quantisation error of the divider: the divided
// edge leads the ideal position by acc/2^FRAC_W carrier periods, which is the
// staircase ramp used by the digi-phase canceller and by the TDC linearity
// calibration.
//
// Interface: n_int and frac are sampled every enabled cycle; ratio and acc
// are registered and change one cycle after the input that caused them.
// Timing: one result per reference clock.
// The N/N+1 toggling and the ramp follow the design; no sigma-delta modulator
// is used, as in the design. Reset values are this implementation's choice.
module frac_accum #(
  parameter int unsigned FRAC_W = 8,
  parameter int unsigned P_W    = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [P_W-1:0]    n_int,
  input  logic [FRAC_W-1:0] frac,
  output logic [P_W-1:0]    ratio,
  output logic [FRAC_W-1:0] acc
);
  logic [FRAC_W:0] sum;
  assign sum = {1'b0, acc} + {1'b0, frac};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      ratio <= n_int;
    end else if (en) begin
      acc   <= sum[FRAC_W-1:0];
      ratio <= n_int + P_W'(sum[FRAC_W]);
    end else begin
      ratio <= n_int;
    end
  end
endmodule
