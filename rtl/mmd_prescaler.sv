// mmd_prescaler: the high-speed front of the multimodulus divider, the three
// 2/3 cells controlled by the three LSBs of the ratio word P.
//
// The chain of three 2/3 cells divides its input by 8 in a normal output
// period, and by 8 + P<2:0> in a period where the modulus-control input from
// the asynchronous counter (mod_in) asks for it. Here that behaviour is
// written as one synchronous counter clocked by the prescaled DCO clock: at
// the last input cycle of every output period mod_in and p_lo are sampled and
// set the length of the next period. fo is high for the first four input
// cycles of each period, so its rising edge marks the period start.
//
// Interface: fin is the carrier clock, fo the divided clock for the
// asynchronous counter. Timing: mod_in must be stable during the last input
// cycle of a period; the counter changes it right after an fo rising edge.
// The division law (8 or 8 + P<2:0>) follows the design; writing the three
// CML cells as a synchronous counter is this implementation's choice.
module mmd_prescaler (
  input  logic       fin,
  input  logic       rst_n,
  input  logic [2:0] p_lo,
  input  logic       mod_in,
  output logic       fo
);
  logic [3:0] cnt;
  logic [3:0] len;
  logic       last;
  logic [3:0] cnt_next;

  assign last     = (cnt == len - 4'd1);
  assign cnt_next = last ? 4'd0 : cnt + 4'd1;

  always_ff @(posedge fin or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 4'd0;
      len <= 4'd8;
      fo  <= 1'b1;
    end else begin
      cnt <= cnt_next;
      if (last) len <= 4'd8 + (mod_in ? {1'b0, p_lo} : 4'd0);
      fo  <= (cnt_next < 4'd4);
    end
  end
endmodule
