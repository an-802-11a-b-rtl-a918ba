// tb_tdc_analog: checks the behavioural TDC front end. With the ideal delay
// words (slow 53, fast 47: 65 ps and 60 ps) a DIV edge placed dt after (or
// before) the REF rising edge must fire floor(|dt|/5 ps) arbiters (up to 52),
// floor(|dt|/65 ps) coarse taps and the right polarity. With mistuned words
// the fired arbiters must follow the 2-D Vernier thresholds
// (i+k)*d_s - i*d_f computed here independently.
module tb_tdc_analog;
  timeunit 1ps;
  timeprecision 1fs;
  logic ref_in = 0, div_in = 0;
  logic [5:0] slow_code, fast_code;
  logic bb_lag;
  logic [15:0] coarse_th;
  logic [51:0] fine_th;
  real dt_ps;
  int checks = 0, failures = 0;

  tdc_analog dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real dt, input int sc, input int fc);
    real ds, df, m;
    int nf, nc;
    logic [51:0] exp_f;
    slow_code = 6'(sc); fast_code = 6'(fc);
    ds = 38.5 + 0.5 * sc; df = 36.5 + 0.5 * fc;
    // REF period 12500 ps, rising at 2000 ps into the slot
    fork
      begin #2000; ref_in = 1; #6250; ref_in = 0; end
      begin #(2000.0 + dt); div_in = 1; #3000; div_in = 0; end
    join
    #10;
    m = (dt < 0) ? -dt : dt;
    exp_f = '0;
    for (int k = 0; k < 4; k++)
      for (int i = 1; i <= 13; i++)
        exp_f[k*13+i-1] = (m >= (i + k) * ds - i * df);
    nc = 0;
    for (int j = 1; j <= 16; j++) nc += int'(m >= j * ds);
    checks++;
    if (fine_th != exp_f || $countones(coarse_th) != nc || bb_lag != (dt >= 0)) begin
      failures++;
      $display("dt=%f fine=%h exp=%h coarse=%0d exp=%0d bb=%b", dt, fine_th, exp_f,
               $countones(coarse_th), nc, bb_lag);
    end
    if (sc == 53 && fc == 47) begin
      nf = int'($floor(m / 5.0 + 1e-6));
      if (nf > 52) nf = 52;
      checks++;
      if ($countones(fine_th) != nf) begin
        failures++;
        $display("ideal delays: dt=%f ones=%0d expected %0d", dt, $countones(fine_th), nf);
      end
    end
    #(12500.0 - 2000.0 - 6260.0);
  endtask

  initial begin
    slow_code = 53; fast_code = 47;
    #100;
    for (int t = 0; t < 200; t++)
      measure(real'($urandom_range(0, 5000)) * 0.1 - 250.0 + 0.013, 53, 47);
    for (int t = 0; t < 100; t++)
      measure(real'($urandom_range(0, 20000)) * 0.1 - 1000.0 + 0.013, 53, 47);
    for (int t = 0; t < 200; t++)
      measure(real'($urandom_range(0, 5000)) * 0.1 - 250.0 + 0.013,
              $urandom_range(30, 63), $urandom_range(10, 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
