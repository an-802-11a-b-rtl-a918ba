// loop_filter: second-order digital loop filter of the DPLL.
//
// A proportional-integral filter whose proportional path is smoothed by two
// cascaded first-order IIR sections:
//   p[n]  = alpha * e[n]                  (alpha unsigned Q4.4)
//   y1[n] = y1[n-1] + (p[n]  - y1[n-1]) / 2^iir1_sh
//   y2[n] = y2[n-1] + (y1[n] - y2[n-1]) / 2^iir2_sh
//   i[n]  = i[n-1] + e[n] / 2^beta_sh     (beta = 2^-beta_sh)
//   out   = round(y2[n] + i[n])           (FIN bank codes, saturated)
// A shift of 0 bypasses an IIR section. e is the canceller output in fine
// TDC LSBs with ERR_F fraction bits; out is a signed offset of the FIN bank
// code. Natural frequency and damping follow eq. (4): wn = sqrt(K*beta/Tref),
// zeta = alpha/2*sqrt(K*Tref/beta). The gains are inputs, so the bandwidth can
// be set wide for acquisition and narrowed afterwards.
//
// Interface/timing: one update per reference cycle when en is high; clr
// empties all state; out registered. The proportional/integral structure
// with two IIR sections on the proportional path and the programmable gains
// follow the design; the shift-based coefficients, the formats and the
// saturation are this implementation's choices. The integrator and the output
// saturate at OUT_MIN..OUT_MAX, which the core sets to the codes the FIN bank
// can still take, so the integrator does not wind up while the bank is at
// either end.
module loop_filter
  import dpll_pkg::*;
#(
  parameter int OUT_MIN = -((1 << (LF_W - 1)) - 1),
  parameter int OUT_MAX = (1 << (LF_W - 1)) - 1
)
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [ERR_W-1:0] e,
  input  logic [7:0]              alpha,
  input  logic [3:0]              beta_sh,
  input  logic [3:0]              iir1_sh,
  input  logic [3:0]              iir2_sh,
  output logic signed [LF_W-1:0]  out
);
  // internal words: FIN codes with ERR_F fraction bits
  localparam int SW = LF_W + ERR_F + 8;

  logic signed [SW-1:0] p, y1, y2, integ;
  logic signed [SW-1:0] y1_n, y2_n, i_n, sum;
  localparam logic signed [SW-1:0] LIM_HI = SW'(OUT_MAX) <<< ERR_F;
  localparam logic signed [SW-1:0] LIM_LO = SW'(OUT_MIN) <<< ERR_F;

  function automatic logic signed [SW-1:0] sat(input logic signed [SW-1:0] v);
    if (v > LIM_HI) return LIM_HI;
    if (v < LIM_LO) return LIM_LO;
    return v;
  endfunction

  always_comb begin
    p    = (SW'(e) * signed'(SW'({1'b0, alpha}))) >>> 4;
    y1_n = (iir1_sh == 0) ? p    : y1 + ((p    - y1) >>> iir1_sh);
    y2_n = (iir2_sh == 0) ? y1_n : y2 + ((y1_n - y2) >>> iir2_sh);
    i_n  = sat(integ + (SW'(e) >>> beta_sh));
    sum  = sat(y2_n + i_n + (SW'(1) <<< (ERR_F - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0; y2 <= '0; integ <= '0; out <= '0;
    end else if (clr) begin
      y1 <= '0; y2 <= '0; integ <= '0; out <= '0;
    end else if (en) begin
      y1    <= y1_n;
      y2    <= y2_n;
      integ <= i_n;
      out   <= LF_W'(sum >>> ERR_F);
    end
  end
endmodule
