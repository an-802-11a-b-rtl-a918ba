// digiphase_canceller: digi-phase fractional spur canceller with automatic
// TDC gain tracking.
//
// Without a sigma-delta modulator the divider toggles between N and N+1 and
// the TDC sees a periodic ramp: the divided edge leads by acc/2^FRAC_W
// carrier periods. The canceller predicts this ramp from the fractional
// accumulator and removes it:
//   r   = acc - 2^(FRAC_W-1)                 (centred residue, signed)
//   err = tdc + r * gain / 2^FRAC_W          (fine LSBs, ERR_F fraction bits)
// gain is the TDC gain, fine LSBs per carrier period (unsigned Q8.8), i.e.
// T_DCO / t_res. If gain differs from the true TDC gain, err keeps a ramp
// r*(gain - true)/2^FRAC_W; the gain tracking loop (track_en) removes it by
// sign-data LMS: gain -= (err * sign(r)) >> mu_sh. With track_en low gain
// stays at gain_preset (loaded at reset and whenever load is high).
// The residue is delayed by RES_DELAY cycles so that it lines up with the
// TDC result it belongs to (divider, TDC and encoder latency).
//
// Interface/timing: all inputs sampled on the rising clk edge; err and gain
// registered, one cycle after tdc. With cancel_en low err is tdc alone.
// The cancellation and the gain tracking follow the design; the centring,
// the LMS form, the formats and RES_DELAY are this implementation's choices.
module digiphase_canceller
  import dpll_pkg::*;
#(
  parameter int unsigned RES_DELAY = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cancel_en,
  input  logic                    track_en,
  input  logic                    load,
  input  logic signed [TDC_W-1:0] tdc,
  input  logic [FRAC_W-1:0]       acc,
  input  logic [GAIN_W-1:0]       gain_preset,
  input  logic [3:0]              mu_sh,
  output logic signed [ERR_W-1:0] err,
  output logic [GAIN_W-1:0]       gain
);
  localparam int PW = FRAC_W + 1 + GAIN_W + 1;   // product width

  logic [FRAC_W-1:0]        acc_d [RES_DELAY+1];
  logic signed [FRAC_W:0]   r;
  logic signed [PW-1:0]     prod;
  logic signed [ERR_W-1:0]  pred;
  logic signed [ERR_W-1:0]  err_n;
  logic signed [GAIN_W+1:0] g_step;
  logic signed [GAIN_W+1:0] g_nxt;

  assign acc_d[0] = acc;
  for (genvar i = 0; i < RES_DELAY; i++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) acc_d[i+1] <= '0;
      else        acc_d[i+1] <= acc_d[i];
  end

  always_comb begin
    r     = signed'({1'b0, acc_d[RES_DELAY]}) - signed'((FRAC_W+1)'(1 << (FRAC_W - 1)));
    prod  = PW'(r) * signed'(PW'({1'b0, gain}));
    // r*gain carries FRAC_W + 8 fraction bits; keep ERR_F
    pred  = ERR_W'(prod >>> (FRAC_W + 8 - ERR_F));
    err_n = (ERR_W'(tdc) <<< ERR_F) + (cancel_en ? pred : '0);
    g_step = (GAIN_W+2)'(err_n >>> mu_sh);
    if (r < 0) g_step = -g_step;
    g_nxt  = signed'({2'b00, gain}) - g_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err  <= '0;
      gain <= gain_preset;
    end else begin
      err <= err_n;
      if (load)
        gain <= gain_preset;
      else if (track_en && r != 0)
        gain <= (g_nxt < 0) ? '0 : (g_nxt > signed'((GAIN_W+2)'({GAIN_W{1'b1}}))) ? '1
              : g_nxt[GAIN_W-1:0];
    end
  end
endmodule
