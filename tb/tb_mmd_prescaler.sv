// tb_mmd_prescaler: checks that the 2/3-cell chain divides by 8, or by
// 8 + P<2:0> in a period for which mod_in was high at the end of the
// previous period, by measuring fo rising-edge spacing in input cycles.
module tb_mmd_prescaler;
  logic fin = 0, rst_n = 0;
  logic [2:0] p_lo;
  logic mod_in;
  logic fo, fo_q;
  int checks = 0, failures = 0;
  int cyc = 0, last_edge = -1, exp_len = 8, nxt_len = 8;

  mmd_prescaler dut (.*);

  always #1 fin = ~fin;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // at the start of each period, choose new controls; they apply to the next
  always @(posedge fin) begin
    fo_q <= fo;
    cyc  <= cyc + 1;
  end

  initial begin
    p_lo = 0; mod_in = 0; fo_q = 1;
    repeat (3) @(posedge fin);
    rst_n = 1;
    repeat (200) begin
      @(negedge fin iff (fo && !fo_q));
      if (last_edge >= 0) begin
        checks++;
        if (cyc - last_edge != exp_len) begin
          failures++;
          $display("period %0d expected %0d", cyc - last_edge, exp_len);
        end
      end
      last_edge = cyc;
      // controls set now are sampled at the end of this period and
      // govern the following one
      exp_len = nxt_len;
      p_lo    = 3'($urandom_range(0, 7));
      mod_in  = 1'($urandom_range(0, 1));
      nxt_len = 8 + (mod_in ? int'(p_lo) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
