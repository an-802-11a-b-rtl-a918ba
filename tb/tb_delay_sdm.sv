// tb_delay_sdm: the first-order modulator must reproduce the fine delay word
// on average: over 4096 cycles (one full period of a 12-bit fraction) the
// sum of the 6-bit outputs equals 4096*int + frac, within one LSB, and each
// output is int or int+1.
module tb_delay_sdm;
  logic clk = 0, rst_n = 0, en = 1;
  logic [17:0] word_in;
  logic [5:0] code_out;
  int checks = 0, failures = 0;
  longint sum;
  int ip, fp;

  delay_sdm #(.INT_W(6), .FRAC_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      ip = $urandom_range(0, 62);
      fp = $urandom_range(0, 4095);
      @(negedge clk);
      word_in = {6'(ip), 12'(fp)};
      @(negedge clk);   // one cycle latency
      sum = 0;
      for (int k = 0; k < 4096; k++) begin
        @(negedge clk);
        sum += code_out;
        if (code_out != 6'(ip) && code_out != 6'(ip + 1)) begin
          failures++;
          checks++;
        end
      end
      checks++;
      if (sum - (longint'(ip) * 4096 + fp) > 1 || (longint'(ip) * 4096 + fp) - sum > 1) begin
        failures++;
        $display("ip=%0d fp=%0d sum=%0d", ip, fp, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
