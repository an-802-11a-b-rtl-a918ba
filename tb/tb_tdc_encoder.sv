// tb_tdc_encoder: random thermometer patterns (clean and with bubbles) into
// the TDC encoder; the signed code, the range and the two line flags are
// compared with a reference computed here from the stage rules.
module tb_tdc_encoder;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bb_lag;
  logic [15:0] coarse_th;
  logic [51:0] fine_th;
  logic signed [TDC_W-1:0] code;
  logic single_line, multi_line;
  tdc_range_e range;
  int checks = 0, failures = 0;
  int n_fine, n_coarse, exp_mag, exp_code;
  logic exp_s, exp_m;
  tdc_range_e exp_r;

  tdc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bb_lag = 0; coarse_th = 0; fine_th = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      n_fine   = $urandom_range(0, 52);
      n_coarse = $urandom_range(0, 16);
      if (t % 3 == 0) n_fine = 52;
      fine_th   = (n_fine == 52) ? '1 : ((52'(1) << n_fine) - 1);
      coarse_th = (n_coarse == 16) ? '1 : 16'((17'(1) << n_coarse) - 1);
      if (t % 5 == 1 && n_fine > 2 && n_fine < 50) fine_th ^= 52'(3) << (n_fine - 1); // bubble
      bb_lag = 1'($urandom_range(0, 1));
      n_fine = $countones(fine_th);
      if (n_fine < 52) begin
        exp_r = TDC_FINE; exp_mag = n_fine;
        exp_m = |fine_th[51:13]; exp_s = !exp_m;
      end else if (n_coarse < 16) begin
        exp_r = TDC_COARSE; exp_mag = 13 * n_coarse; exp_s = 0; exp_m = 0;
      end else begin
        exp_r = TDC_BB; exp_mag = 221; exp_s = 0; exp_m = 0;
      end
      exp_code = bb_lag ? exp_mag : -exp_mag;
      @(posedge clk); #1;
      checks++;
      if (int'(code) != exp_code || range != exp_r || single_line != exp_s || multi_line != exp_m) begin
        failures++;
        $display("code=%0d exp=%0d range=%0d/%0d flags=%b%b/%b%b", code, exp_code, range, exp_r,
                 single_line, multi_line, exp_s, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
