// tb_loop_filter: the filter output is compared every cycle with a
// reference model of the P + I + two-IIR equations written here in 64-bit
// arithmetic, for random error sequences and random coefficient settings.
// A constant error with the proportional path off must make the output ramp
// by e/2^beta_sh codes per cycle (integral path), and clr must empty it.
// The output limits are set asymmetric (-32..95, as for a FIN bank started
// at code 32); after the output has been held at the upper limit for a long
// time, a negative error must move it down at once (no integrator windup).
module tb_loop_filter;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [ERR_W-1:0] e;
  logic [7:0] alpha;
  logic [3:0] beta_sh, iir1_sh, iir2_sh;
  logic signed [LF_W-1:0] out;
  int checks = 0, failures = 0;
  longint p, y1, y2, ig, s, exp_out;

  loop_filter #(.OUT_MIN(-32), .OUT_MAX(95)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    if (v > (longint'(95) <<< 8)) return longint'(95) <<< 8;
    if (v < (longint'(-32) <<< 8)) return longint'(-32) <<< 8;
    return v;
  endfunction

  initial begin
    e = 0; alpha = 16; beta_sh = 2; iir1_sh = 0; iir2_sh = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk);
      clr = 1; en = 0;
      alpha   = 8'($urandom_range(0, 160));
      beta_sh = 4'($urandom_range(0, 8));
      iir1_sh = 4'($urandom_range(0, 3));
      iir2_sh = 4'($urandom_range(0, 3));
      @(negedge clk);
      clr = 0; en = 1;
      y1 = 0; y2 = 0; ig = 0;
      for (int k = 0; k < 200; k++) begin
        e = ERR_W'($urandom_range(0, 4000)) - ERR_W'(2000);
        if ((k / 50) % 2 == 1) e = e / 16;
        p  = (longint'(e) * longint'(alpha)) >>> 4;
        y1 = (iir1_sh == 0) ? p  : y1 + ((p  - y1) >>> iir1_sh);
        y2 = (iir2_sh == 0) ? y1 : y2 + ((y1 - y2) >>> iir2_sh);
        ig = sat(ig + (longint'(e) >>> beta_sh));
        s  = sat(y2 + ig + 128);
        exp_out = s >>> 8;
        @(negedge clk);
        checks++;
        if (longint'(out) != exp_out) begin
          failures++;
          $display("out %0d expected %0d", out, exp_out);
        end
      end
    end
    // integral ramp
    @(negedge clk); clr = 1; alpha = 0; beta_sh = 3; e = 256 * 4;
    @(negedge clk); clr = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (out != 20) begin failures++; $display("ramp out %0d, expected 20", out); end
    en = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (out != 20) begin failures++; $display("hold failed"); end
    clr = 1; @(negedge clk);
    checks++;
    if (out != 0) begin failures++; $display("clear failed"); end
    // windup: hold at the upper limit for 500 cycles, then reverse the error
    clr = 0; en = 1; alpha = 16; beta_sh = 2; e = 256 * 100;
    repeat (500) @(negedge clk);
    checks++;
    if (out != 95) begin failures++; $display("upper limit %0d, expected 95", out); end
    alpha = 0; e = -256 * 8;
    @(negedge clk);
    checks++;
    if (out != 93) begin failures++; $display("after reversal %0d, expected 93 (wound up?)", out); end
    e = -256 * 1000;
    repeat (300) @(negedge clk);
    checks++;
    if (out != -32) begin failures++; $display("lower limit %0d, expected -32", out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
