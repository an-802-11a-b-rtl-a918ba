// tb_dco_tune_ctrl: the testbench models the DCO frequency as a linear
// function of the bank codes (same plan as the DCO: 1.96 GHz + PVT 10.9 MHz,
// ACQ 5.625 MHz, TRK 0.5625 MHz, FIN 8.4375 kHz per step) and a carrier
// cycle counter advanced by f/f_ref every reference cycle, presented in Gray
// code. For several targets the bank controller must end in the FIN state
// with the frequency just below the target, within the FIN range above
// FIN_START, after exactly 17 SAR decisions of SETTLE+WIN cycles each. Then the FIN code must follow
// FIN_START + lf_out with saturation.
module tb_dco_tune_ctrl;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [P_W-1:0] n_int;
  logic [FRAC_W-1:0] frac;
  logic [FCNT_W-1:0] cnt_gray;
  logic signed [LF_W-1:0] lf_out;
  logic [PVT_W-1:0] pvt;
  logic [ACQ_W-1:0] acq;
  logic [TRK_W-1:0] trk;
  logic [FIN_W-1:0] fin;
  logic [ACQ_U-1:0] acq_th;
  logic [TRK_U-1:0] trk_th;
  logic [FIN_U-1:0] fin_th;
  logic lf_en, done;
  tune_state_e state;
  int checks = 0, failures = 0;
  real phase, f, ft;
  longint unsigned cnt;
  int cycles;

  localparam int WIN = 256, SETTLE = 8;
  dco_tune_ctrl #(.WIN(WIN), .SETTLE(SETTLE), .FIN_START(32)) dut (.*);

  always #6.25 clk = ~clk;

  always_comb f = 1.96e9 + real'(pvt) * 686.0e6 / 63.0 + real'($countones(acq_th)) * 180.0e6 / 32.0
               + real'($countones(trk_th)) * 36.0e6 / 64.0 + real'($countones(fin_th)) * 1.08e6 / 128.0;

  always @(posedge clk) begin
    phase += f / 80.0e6;
    cnt = longint'($floor(phase));
    cnt_gray <= FCNT_W'(cnt ^ (cnt >> 1));
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = 0; cnt_gray = 0; lf_out = 0; n_int = 29; frac = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      n_int = 7'($urandom_range(25, 32));
      frac  = 8'($urandom_range(0, 255));
      ft = 80.0e6 * (real'(n_int) + real'(frac) / 256.0);
      if (ft < 1.97e9 || ft > 2.6e9) continue;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 0;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 17 * (SETTLE + WIN)) begin
        failures++;
        $display("tuning took %0d cycles", cycles);
      end
      checks++;
      if (state != TUNE_FIN || !lf_en) begin failures++; $display("not in FIN state"); end
      checks++;
      if (ft - f < -0.15e6 || ft - f > 0.8e6) begin
        failures++;
        $display("target %f MHz, tuned %f MHz (pvt %0d acq %0d trk %0d)", ft / 1e6, f / 1e6, pvt, acq, trk);
      end
      $display("target %f MHz tuned %f MHz (pvt %0d acq %0d trk %0d)", ft / 1e6, f / 1e6, pvt, acq, trk);
      checks++;
      if ($countones(acq_th) != acq || $countones(trk_th) != trk) begin
        failures++; $display("thermometer code mismatch");
      end
    end
    // FIN follows the loop filter
    for (int k = 0; k < 50; k++) begin
      @(negedge clk); lf_out = LF_W'($urandom_range(0, 300)) - LF_W'(150);
      @(negedge clk); @(negedge clk);
      checks++;
      if (int'(fin) != ((32 + int'(lf_out) < 0) ? 0 : (32 + int'(lf_out) > 127) ? 127 : 32 + int'(lf_out))
          || $countones(fin_th) != fin) begin
        failures++;
        $display("fin %0d for lf_out %0d", fin, lf_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
