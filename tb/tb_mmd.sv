// tb_mmd: glitch-free ratio switching of the multimodulus divider. The ratio
// word changes every output period, at random over 8..127 and in runs that
// toggle across 15/16, 31/32 and 63/64; each output period, measured in
// input cycles, must equal the ratio that was applied before it began.
module tb_mmd;
  logic fin = 0, rst_n = 0;
  logic [6:0] p;
  logic div_out, div_q;
  int checks = 0, failures = 0;
  int cyc = 0, last_edge = -1;
  int q[$];

  mmd #(.P_W(7)) dut (.*);

  always #1 fin = ~fin;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fin) begin
    div_q <= div_out;
    cyc   <= cyc + 1;
  end

  function automatic logic [6:0] pick(int k);
    case ((k / 40) % 4)
      0: return 7'($urandom_range(8, 127));
      1: return (k % 2) ? 7'd15 : 7'd16;
      2: return (k % 2) ? 7'd31 : 7'd32;
      default: return (k % 2) ? 7'd63 : 7'd64;
    endcase
  endfunction

  initial begin
    p = 8; div_q = 0;
    repeat (3) @(posedge fin);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(posedge div_out);
      if (last_edge >= 0 && q.size() > 1) begin
        checks++;
        if (cyc - last_edge != q[0]) begin
          failures++;
          $display("period %0d, expected %0d", cyc - last_edge, q[0]);
        end
        void'(q.pop_front());
      end
      last_edge = cyc;
      // the new word governs the period that starts at the next edge
      p = pick(k);
      q.push_back(int'(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
