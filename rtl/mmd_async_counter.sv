// mmd_async_counter: the division-ratio extension of the multimodulus
// divider, a small state machine clocked by the divided clock fo of the last
// 2/3 cell.
//
// It counts fo periods up to the limit P<6:3>. When the count reaches the
// limit the counter returns to zero and the divider output period ends; while
// the extension is disabled (limit 0 or 1) the count is held at zero and
// every fo period ends a divider period. mod_out is high during the fo period
// that ends a divider period; the 2/3 cells sample it at the end of that
// period and stretch the first period of the next divider cycle by P<2:0>,
// so one divider period lasts 8*P<6:3> + P<2:0> input cycles.
//
// The limit is loaded only when the counter wraps, and the count restarts
// from zero, so a ratio change never produces a short or long first period.
// div_out is high during the low half of the first fo period of each divider
// cycle (a registered first-period flag gated with fo), so its rising edge,
// the divider output edge, comes at the falling fo edge of that period. This
// also gives one edge per fo period when the extension is disabled. The flag
// changes only after fo has risen, so the gate cannot glitch.
//
// The flowchart (enabled check, count+1, compare with P, mod out 1 and count
// cleared on a match) follows the design. Loading the limit at the wrap and
// the form of div_out are this implementation's choices.
module mmd_async_counter (
  input  logic       fo,
  input  logic       rst_n,
  input  logic [3:0] p_hi,
  output logic       mod_out,
  output logic       div_out
);
  logic [3:0] count;
  logic [3:0] limit;
  logic       enabled;
  logic       first_q;

  assign enabled = (limit > 4'd1);
  // this fo period is the last one of the divider cycle
  assign mod_out = !enabled || (count + 4'd1 == limit);

  always_ff @(posedge fo or negedge rst_n) begin
    if (!rst_n) begin
      count   <= 4'd0;
      limit   <= 4'd1;
      first_q <= 1'b0;
    end else begin
      first_q <= mod_out;
      if (mod_out) begin
        count <= 4'd0;
        limit <= p_hi;
      end else begin
        count <= count + 4'd1;
      end
    end
  end

  assign div_out = first_q & ~fo;
endmodule
