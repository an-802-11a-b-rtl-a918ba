// tb_cal_sequencer: walks the calibration procedure with short durations.
// A stand-in bank tuner answers each retune pulse with done after 20 cycles.
// The testbench checks the order of states, the number of cycles spent in
// LOCK, LINCAL and GAINTRK, the enables in each state (linearity cal only in
// LINCAL, gain tracking from GAINTRK on, never both), the switch to the
// operating word with a second retune, and the path with skip_lincal.
module tb_cal_sequencer;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, skip_lincal = 0, tune_done = 0;
  cal_state_e state;
  logic retune, use_op, cancel_en, lincal_en, track_en, gain_load;
  int checks = 0, failures = 0;
  int cnt[8];
  int retunes, tdly;

  cal_sequencer #(.T_LOCK(30), .T_LINCAL(50), .T_GAIN(40)) dut (.*);

  always #5 clk = ~clk;

  // stand-in tuner
  always @(posedge clk) begin
    if (retune) begin tune_done <= 0; tdly <= 20; retunes <= retunes + 1; end
    else if (tdly > 0) begin tdly <= tdly - 1; if (tdly == 1) tune_done <= 1; end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic skip);
    foreach (cnt[i]) cnt[i] = 0;
    retunes = 0;
    skip_lincal = skip;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (state != CAL_TRACK) begin
      cnt[state]++;
      checks++;
      if (lincal_en && track_en) failures++;
      if (lincal_en != (state == CAL_LINCAL)) begin failures++; $display("lincal_en wrong"); end
      if (use_op != (state == CAL_RELOCK)) begin
        if (state != CAL_RELOCK) begin failures++; $display("use_op wrong in %s", state.name()); end
      end
      @(negedge clk);
    end
    checks++;
    if (cnt[CAL_LOCK] != 30) begin failures++; $display("LOCK %0d cycles", cnt[CAL_LOCK]); end
    checks++;
    if (cnt[CAL_LINCAL] != (skip ? 0 : 50)) begin failures++; $display("LINCAL %0d", cnt[CAL_LINCAL]); end
    checks++;
    if (cnt[CAL_GAINTRK] != 40) begin failures++; $display("GAINTRK %0d", cnt[CAL_GAINTRK]); end
    checks++;
    if (retunes != 2) begin failures++; $display("%0d retunes", retunes); end
    checks++;
    if (!use_op || !track_en || !cancel_en || lincal_en) begin failures++; $display("TRACK outputs wrong"); end
  endtask

  initial begin
    tdly = 0; retunes = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (state != CAL_IDLE || cancel_en) begin failures++; $display("not idle"); end
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
