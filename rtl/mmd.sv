// mmd: glitch-free multimodulus divider, ratio 8 to 127.
//
// The 7-bit ratio word P is split as in the design: P<2:0> controls the three
// high-speed 2/3 cells (mmd_prescaler) and P<6:3> sets the limit of the
// asynchronous counter (mmd_async_counter). One output period is
// 8*P<6:3> + P<2:0> = P input cycles. Because the counter restarts from zero
// and takes a new limit only when it wraps, the ratio may change every
// output period, including across powers of two (15/16, 31/32, 63/64), with
// no skipped or extra edge.
//
// Interface: fin is the prescaled DCO clock, p the ratio, div_out the divided
// output (rising edge = feedback edge, four input cycles after the first
// fo edge of a divider cycle). Timing: the output period that starts at an
// edge uses P<2:0> sampled five input cycles and P<6:3> sampled four input
// cycles before that edge; P must be stable in that window.
module mmd #(
  parameter int unsigned P_W = 7
) (
  input  logic           fin,
  input  logic           rst_n,
  input  logic [P_W-1:0] p,
  output logic           div_out
);
  logic fo;
  logic mod2;

  mmd_prescaler u_pre (
    .fin   (fin),
    .rst_n (rst_n),
    .p_lo  (p[2:0]),
    .mod_in(mod2),
    .fo    (fo)
  );

  mmd_async_counter u_cnt (
    .fo     (fo),
    .rst_n  (rst_n),
    .p_hi   (p[6:3]),
    .mod_out(mod2),
    .div_out(div_out)
  );
endmodule
