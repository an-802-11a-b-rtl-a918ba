// dco_tune_ctrl: capacitor-bank control of the wide-tuning DCO.
//
// After start, the banks are set coarse to fine:
//  1. PVT bank (6 b, binary weighted) by successive approximation;
//  2. ACQ bank (5 b) and 3. TRK bank (6 b), also by successive
//     approximation on their binary code;
//  4. FIN bank (7 b): handed to the loop filter, code = FIN_START + lf_out,
//     saturated to 0..127; done is raised and the phase loop runs.
// One SAR decision: set the trial bit, wait SETTLE cycles, then count carrier
// cycles over WIN reference cycles (Gray count from freq_counter, two-flop
// synchroniser) and compare with the target WIN*(N + frac/2^FRAC_W). The bit
// is kept when the DCO is not faster than the target. During the SAR the
// lower banks are at 0 and FIN at FIN_START, so the residual error after the
// TRK bank lies within the range of FIN above FIN_START.
// ACQ, TRK and FIN are delivered both as binary codes and as thermometer
// vectors (2^b-1 unit cells each), the form the banks use.
//
// Interface/timing: clk is the reference clock; start restarts the whole
// sequence (it is also the retune request); n_int/frac must be stable
// during tuning. One SAR bit takes SETTLE+WIN cycles, 17 bits in all.
// Following the design: bank widths, binary PVT and thermometer ACQ/TRK/FIN,
// successive approximation for PVT, then the other banks. Using successive
// approximation also for ACQ and TRK, the counter-based frequency compare
// and the FIN hand-over are this implementation's choices.
module dco_tune_ctrl
  import dpll_pkg::*;
#(
  parameter int unsigned WIN       = 1024,   // measurement window, ref cycles
  parameter int unsigned SETTLE    = 16,
  parameter int unsigned FIN_START = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [P_W-1:0]         n_int,
  input  logic [FRAC_W-1:0]      frac,
  input  logic [FCNT_W-1:0]      cnt_gray,
  input  logic signed [LF_W-1:0] lf_out,
  output logic [PVT_W-1:0]       pvt,
  output logic [ACQ_W-1:0]       acq,
  output logic [TRK_W-1:0]       trk,
  output logic [FIN_W-1:0]       fin,
  output logic [ACQ_U-1:0]       acq_th,
  output logic [TRK_U-1:0]       trk_th,
  output logic [FIN_U-1:0]       fin_th,
  output logic                   lf_en,
  output logic                   done,
  output tune_state_e            state
);
  typedef enum logic [1:0] {PH_SETTLE, PH_MEAS, PH_DECIDE} phase_e;

  logic [FCNT_W-1:0] g_s1, g_s2, cnt_bin, c0, meas, target;
  phase_e            ph;
  logic [15:0]       tmr;
  logic [2:0]        bitn;
  logic signed [LF_W+1:0] fin_sum;

  // two-flop synchroniser, then Gray to binary
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_s1 <= '0;
      g_s2 <= '0;
    end else begin
      g_s1 <= cnt_gray;
      g_s2 <= g_s1;
    end
  end
  always_comb begin
    cnt_bin[FCNT_W-1] = g_s2[FCNT_W-1];
    for (int i = FCNT_W - 2; i >= 0; i--) cnt_bin[i] = cnt_bin[i+1] ^ g_s2[i];
  end

  assign target  = FCNT_W'(WIN) * FCNT_W'(n_int) + FCNT_W'((WIN * frac) >> FRAC_W);
  assign meas    = cnt_bin - c0;
  assign fin_sum = (LF_W+2)'(FIN_START) + (LF_W+2)'(lf_out);

  function automatic logic [7:0] top_bit(input tune_state_e s);
    case (s)
      TUNE_PVT: return 8'(PVT_W - 1);
      TUNE_ACQ: return 8'(ACQ_W - 1);
      default:  return 8'(TRK_W - 1);
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TUNE_IDLE;
      ph    <= PH_SETTLE;
      tmr   <= '0;
      bitn  <= '0;
      c0    <= '0;
      pvt   <= '0;
      acq   <= '0;
      trk   <= '0;
      fin   <= FIN_W'(FIN_START);
      lf_en <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      state <= TUNE_PVT;
      ph    <= PH_SETTLE;
      tmr   <= '0;
      bitn  <= 3'(PVT_W - 1);
      pvt   <= PVT_W'(1) << (PVT_W - 1);
      acq   <= '0;
      trk   <= '0;
      fin   <= FIN_W'(FIN_START);
      lf_en <= 1'b0;
      done  <= 1'b0;
    end else begin
      case (state)
        TUNE_IDLE: ;
        TUNE_PVT, TUNE_ACQ, TUNE_TRK: begin
          case (ph)
            PH_SETTLE: begin
              tmr <= tmr + 1'b1;
              if (tmr == 16'(SETTLE - 1)) begin
                tmr <= '0;
                c0  <= cnt_bin;
                ph  <= PH_MEAS;
              end
            end
            PH_MEAS: begin
              tmr <= tmr + 1'b1;
              if (tmr == 16'(WIN - 2)) begin
                tmr <= '0;
                ph  <= PH_DECIDE;
              end
            end
            default: begin  // PH_DECIDE: meas spans exactly WIN cycles here
              ph <= PH_SETTLE;
              if (meas > target) begin
                case (state)
                  TUNE_PVT: pvt[bitn] <= 1'b0;
                  TUNE_ACQ: acq[bitn] <= 1'b0;
                  default:  trk[bitn] <= 1'b0;
                endcase
              end
              if (bitn != 0) begin
                bitn <= bitn - 1'b1;
                case (state)
                  TUNE_PVT: pvt[bitn-1] <= 1'b1;
                  TUNE_ACQ: acq[bitn-1] <= 1'b1;
                  default:  trk[bitn-1] <= 1'b1;
                endcase
              end else begin
                case (state)
                  TUNE_PVT: begin
                    state <= TUNE_ACQ;
                    bitn  <= 3'(ACQ_W - 1);
                    acq   <= ACQ_W'(1) << (ACQ_W - 1);
                  end
                  TUNE_ACQ: begin
                    state <= TUNE_TRK;
                    bitn  <= 3'(TRK_W - 1);
                    trk   <= TRK_W'(1) << (TRK_W - 1);
                  end
                  default: begin
                    state <= TUNE_FIN;
                    lf_en <= 1'b1;
                    done  <= 1'b1;
                  end
                endcase
              end
            end
          endcase
        end
        TUNE_FIN: begin
          if (fin_sum < 0)                      fin <= '0;
          else if (fin_sum > (LF_W+2)'(FIN_U))  fin <= FIN_W'(FIN_U);
          else                                  fin <= fin_sum[FIN_W-1:0];
        end
        default: state <= TUNE_IDLE;
      endcase
    end
  end

  // binary to thermometer for the unit-cell banks
  always_comb begin
    for (int i = 0; i < ACQ_U; i++) acq_th[i] = (i < int'(acq));
    for (int i = 0; i < TRK_U; i++) trk_th[i] = (i < int'(trk));
    for (int i = 0; i < FIN_U; i++) fin_th[i] = (i < int'(fin));
  end

  // a SAR bank code never moves during the phase loop
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == TUNE_FIN && !start) |=> $stable(pvt) && $stable(acq) && $stable(trk));
endmodule
