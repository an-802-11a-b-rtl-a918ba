// tb_digiphase_canceller: the testbench generates the TDC output that a
// fractional ramp produces, tdc = round(-(acc-128)*K/256), with acc from a
// running accumulator delayed by the canceller's alignment (3 cycles).
//  1. cancel off: err must equal tdc exactly;
//  2. cancel on, gain preset = K: |err| within half an LSB plus rounding;
//  3. gain tracking on, preset 25 % low: gain must converge to K and the
//     residual error must shrink.
module tb_digiphase_canceller;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cancel_en = 0, track_en = 0, load = 0;
  logic signed [TDC_W-1:0] tdc;
  logic [FRAC_W-1:0] acc;
  logic [GAIN_W-1:0] gain_preset, gain;
  logic [3:0] mu_sh = 6;
  logic signed [ERR_W-1:0] err;
  int checks = 0, failures = 0;
  real K;
  int hist[$];
  int a, maxe;

  digiphase_canceller #(.RES_DELAY(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one cycle: new acc, tdc from the acc of 3 cycles ago
  task automatic step(input int frac);
    a = (a + frac) % 256;
    acc = 8'(a);
    hist.push_back(a);
    if (hist.size() > 4) void'(hist.pop_front());
    tdc = TDC_W'($rtoi($floor(-(real'(hist[0]) - 128.0) * K / 256.0 + 0.5)));
  endtask

  initial begin
    K = 83.3; a = 0; acc = 0; tdc = 0;
    for (int i = 0; i < 4; i++) hist.push_back(0);
    gain_preset = 16'($rtoi(K * 256.0));
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: cancel off
    for (int k = 0; k < 300; k++) begin
      @(negedge clk); step(3);
      @(posedge clk); #1;
      checks++;
      if (err != (ERR_W'(tdc) <<< ERR_F)) begin failures++; $display("bypass err %0d", err); end
    end
    // 2: cancel on, exact gain
    cancel_en = 1;
    @(negedge clk); step(3);
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk); step(3);
      @(posedge clk); #1;
      if (k > 4) begin
        checks++;
        if (err > 160 || err < -160) begin failures++; $display("residual %0d", err); end
      end
    end
    // 3: preset 25 % low, tracking on
    gain_preset = 16'($rtoi(K * 0.75 * 256.0));
    @(negedge clk); load = 1; step(5);
    @(negedge clk); load = 0; step(5);
    checks++;
    if (gain != gain_preset) begin failures++; $display("load failed"); end
    track_en = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk); step(5);
    end
    checks++;
    if (real'(gain) / 256.0 < K * 0.98 || real'(gain) / 256.0 > K * 1.02) begin
      failures++;
      $display("gain %f, expected %f", real'(gain) / 256.0, K);
    end
    maxe = 0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk); step(5);
      @(posedge clk); #1;
      if (err > maxe) maxe = err;
      if (-err > maxe) maxe = -err;
    end
    checks++;
    if (maxe > 512) begin failures++; $display("residual after tracking %0d", maxe); end
    $display("gain %f max residual %f LSB", real'(gain) / 256.0, real'(maxe) / 256.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
