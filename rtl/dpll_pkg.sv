// dpll_pkg: widths, constants and state encodings shared by the digital core
// of the fractional-N DPLL.
//
// The three-step TDC numbers follow the design: a 2-D Vernier fine stage of
// 4 arbiter lines x 13 arbiters with a 5 ps step (range +/-260 ps), a coarse
// stage of 16 slow-chain taps at 65 ps (13 fine LSBs per tap, +/-1.04 ns) and
// a bang-bang polarity bit. The DCO bank widths (PVT 6 b binary, ACQ 5 b,
// TRK 6 b, FIN 7 b thermometer) and the 6 b delay control words follow the
// design too. The TDC code width, the fixed-point formats and the state
// encodings are this implementation's own choices.
package dpll_pkg;

  // ---------------- TDC ----------------
  localparam int FINE_LINES    = 4;            // arbiter lines in the 2-D array
  localparam int FINE_PER_LINE = 13;           // arbiters per line (n in eq. (3))
  localparam int FINE_N        = FINE_LINES * FINE_PER_LINE;  // 52 arbiters
  localparam int COARSE_N      = 16;           // coarse delay-chain taps
  localparam int COARSE_LSB    = 13;           // one 65 ps tap in 5 ps fine LSBs
  localparam int TDC_W         = 10;           // signed TDC code, fine LSB units
  localparam int TDC_SAT       = (COARSE_N + 1) * COARSE_LSB; // bang-bang only: 221

  typedef enum logic [1:0] {
    TDC_FINE   = 2'd0,   // result from the 2-D Vernier array
    TDC_COARSE = 2'd1,   // fine array saturated, coarse chain used
    TDC_BB     = 2'd2    // coarse chain saturated too, polarity only
  } tdc_range_e;

  // ---------------- TDC delay control ----------------
  localparam int DLY_W   = 6;                  // delay control word per chain
  localparam int DLY_F   = 12;                 // fraction bits fed to the SDM

  // ---------------- frequency plan ----------------
  localparam int P_W     = 7;                  // MMD ratio word P<6:0>, 8..127
  localparam int FRAC_W  = 8;                  // fractional accumulator width

  // canceller / loop error format: signed, ERR_F fraction bits of a fine LSB
  localparam int ERR_F   = 8;
  localparam int ERR_W   = TDC_W + ERR_F + 2;

  // TDC gain estimate: fine LSBs per DCO (carrier) period, unsigned Q8.8
  localparam int GAIN_W  = 16;

  // ---------------- DCO banks ----------------
  localparam int PVT_W   = 6;                  // binary weighted
  localparam int ACQ_W   = 5;                  // thermometer, 2^5-1 units
  localparam int TRK_W   = 6;                  // thermometer, 2^6-1 units
  localparam int FIN_W   = 7;                  // thermometer, 2^7-1 units
  localparam int ACQ_U   = (1 << ACQ_W) - 1;
  localparam int TRK_U   = (1 << TRK_W) - 1;
  localparam int FIN_U   = (1 << FIN_W) - 1;
  localparam int LF_W    = 9;                  // signed loop filter output (FIN codes)
  localparam int FCNT_W  = 20;                 // frequency counter width

  typedef enum logic [2:0] {
    TUNE_IDLE = 3'd0,
    TUNE_PVT  = 3'd1,    // successive approximation on the PVT bank
    TUNE_ACQ  = 3'd2,
    TUNE_TRK  = 3'd3,
    TUNE_FIN  = 3'd4     // phase lock: loop filter drives the FIN bank
  } tune_state_e;

  typedef enum logic [2:0] {
    CAL_IDLE    = 3'd0,
    CAL_TUNE    = 3'd1,  // bank tuning at the calibration frequency
    CAL_LOCK    = 3'd2,  // step 1: lock, canceller on, gain fixed at preset
    CAL_LINCAL  = 3'd3,  // step 2: LMS linearity calibration
    CAL_GAINTRK = 3'd4,  // step 3: linearity cal off, gain tracking on
    CAL_RELOCK  = 3'd5,  // retune to the operating frequency
    CAL_TRACK   = 3'd6   // locked at the operating frequency
  } cal_state_e;

endpackage
