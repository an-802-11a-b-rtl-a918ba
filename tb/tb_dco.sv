// tb_dco: sets bank codes and measures the carrier (prescaler) period over
// 1000 cycles; the frequency must match the bank plan
// 1.96 GHz + 10.89 MHz*PVT + 5.625 MHz*ACQ + 0.5625 MHz*TRK + 8.4375 kHz*FIN
// within 0.01 %, and the core clock must run at twice the carrier.
module tb_dco;
  timeunit 1ps;
  timeprecision 1fs;
  import dpll_pkg::*;
  logic en = 0;
  logic [PVT_W-1:0] pvt;
  logic [ACQ_U-1:0] acq_th;
  logic [TRK_U-1:0] trk_th;
  logic [FIN_U-1:0] fin_th;
  logic dco_clk, pre_clk;
  real freq_hz, fexp, t0, t1;
  int checks = 0, failures = 0;
  int a, b, c, nd;

  dco dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dco_clk) nd++;

  initial begin
    nd = 0;
    pvt = 0; acq_th = 0; trk_th = 0; fin_th = 0;
    #10 en = 1;
    for (int t = 0; t < 8; t++) begin
      pvt = 6'($urandom_range(0, 63));
      a = $urandom_range(0, 31); b = $urandom_range(0, 63); c = $urandom_range(0, 127);
      acq_th = ACQ_U'((64'(1) << a) - 1);
      trk_th = TRK_U'((64'(1) << b) - 1);
      fin_th = (c == 127) ? '1 : FIN_U'((128'(1) << c) - 1);
      fexp = 1.96e9 + real'(pvt) * 686.0e6 / 63.0 + a * 180.0e6 / 32.0 + b * 36.0e6 / 64.0
           + c * 1.08e6 / 128.0;
      repeat (3) @(posedge pre_clk);
      t0 = $realtime; nd = 0;
      repeat (1000) @(posedge pre_clk);
      t1 = $realtime;
      checks++;
      if ((1000.0 / ((t1 - t0) * 1e-12)) / fexp > 1.0001 || (1000.0 / ((t1 - t0) * 1e-12)) / fexp < 0.9999) begin
        failures++;
        $display("measured %f MHz expected %f MHz", 1000.0 / ((t1 - t0) * 1e-6), fexp / 1e6);
      end
      checks++;
      if (nd < 1999 || nd > 2001) begin failures++; $display("core edges %0d", nd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
