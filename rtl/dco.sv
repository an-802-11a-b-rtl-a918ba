// dco: behavioural model (not synthesizable) of the wide-tuning LC DCO with
// its four capacitor banks and the divide-by-2 high-speed prescaler.
//
// The carrier frequency (after the prescaler) is
//   f = F_MIN + pvt*PVT_STEP + n_acq*ACQ_STEP + n_trk*TRK_STEP + n_fin*FIN_STEP
// where pvt is the binary PVT code and n_x the number of enabled unit cells
// of each thermometer bank. Defaults follow the bank plan of the design:
// PVT 1.96-2.65 GHz in 64 steps, ACQ 180 MHz in 32 steps, TRK 36 MHz in 64
// steps, FIN 1.08 MHz in 128 steps (about 8.4 kHz per unit). The model is
// linear; the real banks have slightly uneven steps. The core oscillates at
// twice the carrier (dco_clk); the prescaler output pre_clk is the carrier
// that feeds the multimodulus divider. A frequency change takes effect at
// the next half period.
//
// Interface: en starts the oscillator; outputs are ideal clocks. freq_hz is
// the present carrier frequency, for observation.
module dco
  import dpll_pkg::*;
#(
  parameter real F_MIN    = 1.96e9,
  parameter real PVT_STEP = 686.0e6 / 63.0,
  parameter real ACQ_STEP = 180.0e6 / 32.0,
  parameter real TRK_STEP = 36.0e6 / 64.0,
  parameter real FIN_STEP = 1.08e6 / 128.0
) (
  input  logic             en,
  input  logic [PVT_W-1:0] pvt,
  input  logic [ACQ_U-1:0] acq_th,
  input  logic [TRK_U-1:0] trk_th,
  input  logic [FIN_U-1:0] fin_th,
  output logic             dco_clk,
  output logic             pre_clk,
  output real              freq_hz
);
  timeunit 1ps;
  timeprecision 1fs;

  function automatic int ones(input logic [FIN_U-1:0] v);
    int n = 0;
    for (int i = 0; i < FIN_U; i++) n += int'(v[i]);
    return n;
  endfunction

  always_comb
    freq_hz = F_MIN + PVT_STEP * real'(pvt)
            + ACQ_STEP * real'(ones(FIN_U'(acq_th)))
            + TRK_STEP * real'(ones(FIN_U'(trk_th)))
            + FIN_STEP * real'(ones(fin_th));

  initial begin
    dco_clk = 1'b0;
    pre_clk = 1'b0;
    wait (en);
    forever begin
      // dco_clk runs at 2*freq_hz: half period 1/(4*freq_hz), in ps
      #(0.25e12 / freq_hz);
      dco_clk = ~dco_clk;
      if (dco_clk) pre_clk = ~pre_clk;
    end
  end
endmodule
