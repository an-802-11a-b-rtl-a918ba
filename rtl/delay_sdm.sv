// delay_sdm: first-order sigma-delta modulator in front of a TDC delay
// control input.
//
// The delay control of each chain is DLY_W bits (0.5 ps per step). The
// calibration produces a finer word with FRAC_W extra fraction bits; this
// modulator adds the fraction into an accumulator every cycle and adds its
// carry to the integer part, so the average of the DLY_W-bit output equals
// the fine input. The output saturates at the top code.
//
// Interface/timing: word_in sampled on each rising clk edge when en is high;
// code_out registered. With en low the integer part is passed without
// dithering. Following the design: a first-order SDM on the delay control.
// The accumulator width and saturation are this implementation's choices.
module delay_sdm #(
  parameter int unsigned INT_W  = 6,
  parameter int unsigned FRAC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [INT_W+FRAC_W-1:0] word_in,
  output logic [INT_W-1:0]        code_out
);
  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   sum;
  logic [INT_W:0]    nxt;

  assign sum = {1'b0, acc} + {1'b0, word_in[FRAC_W-1:0]};
  assign nxt = {1'b0, word_in[INT_W+FRAC_W-1:FRAC_W]} + (INT_W+1)'(en & sum[FRAC_W]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      code_out <= '0;
    end else begin
      if (en) acc <= sum[FRAC_W-1:0];
      code_out <= nxt[INT_W] ? {INT_W{1'b1}} : nxt[INT_W-1:0];
    end
  end
endmodule
