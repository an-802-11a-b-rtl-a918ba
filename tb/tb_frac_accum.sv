// tb_frac_accum: self-checking test of the fractional accumulator.
// A reference accumulator in the testbench is compared with acc and ratio
// every cycle for random integer and fraction words; the average ratio over
// 256 cycles must be exactly N + frac/256 (that many carries).
module tb_frac_accum;
  logic clk = 0, rst_n = 0, en = 0;
  logic [6:0] n_int;
  logic [7:0] frac;
  logic [6:0] ratio;
  logic [7:0] acc;
  int checks = 0, failures = 0;
  int unsigned ref_acc, carries;

  frac_accum #(.FRAC_W(8), .P_W(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_int = 29; frac = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      n_int = 7'(8 + $urandom_range(0, 110));
      frac  = 8'($urandom_range(0, 255));
      @(negedge clk);
      en = 1; ref_acc = acc; carries = 0;
      for (int k = 0; k < 256; k++) begin
        @(posedge clk); #1;
        ref_acc += frac;
        checks++;
        if (acc != 8'(ref_acc) || ratio != n_int + 7'(ref_acc >> 8)) begin
          failures++;
          $display("mismatch acc=%0d exp=%0d ratio=%0d", acc, 8'(ref_acc), ratio);
        end
        carries += (ref_acc >> 8);
        ref_acc &= 255;
      end
      checks++;
      if (carries != frac) begin
        failures++;
        $display("carries %0d != frac %0d", carries, frac);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
