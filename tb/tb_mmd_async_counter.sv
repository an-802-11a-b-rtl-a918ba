// tb_mmd_async_counter: drives the counter with a divided clock and checks
// the flowchart: with limit K > 1 the divider output rises once every K fo
// periods, with K = 0 or 1 (extension disabled) once every fo period, and
// mod_out is high in exactly one fo period per divider cycle. The limit
// changes at random right after each output edge and must govern the
// divider cycle after the next edge.
module tb_mmd_async_counter;
  logic fo = 0, rst_n = 0;
  logic [3:0] p_hi;
  logic mod_out, div_out;
  int checks = 0, failures = 0;
  int cyc = 0, last_edge = -1, modcnt = 0;
  int q[$];

  mmd_async_counter dut (.*);

  always #4 fo = ~fo;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fo) begin
    cyc <= cyc + 1;
    if (rst_n && mod_out) modcnt <= modcnt + 1;
  end

  initial begin
    p_hi = 1;
    repeat (3) @(posedge fo);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(posedge div_out);
      if (last_edge >= 0 && q.size() > 1) begin
        checks++;
        if (cyc - last_edge != q[0]) begin
          failures++;
          $display("divider period %0d fo, expected %0d", cyc - last_edge, q[0]);
        end
        checks++;
        if (modcnt != 1) begin
          failures++;
          $display("mod_out high in %0d fo periods of one divider cycle", modcnt);
        end
        void'(q.pop_front());
      end
      last_edge = cyc;
      modcnt = 0;
      p_hi = 4'($urandom_range(0, 15));
      q.push_back((p_hi > 1) ? int'(p_hi) : 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
