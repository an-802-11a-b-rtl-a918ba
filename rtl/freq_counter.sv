// freq_counter: free-running cycle counter in the carrier clock domain, used
// by the bank tuning (successive approximation) to measure the DCO frequency.
//
// It counts rising edges of the prescaled DCO clock and presents the count
// in Gray code from a register, so that the reference-clock domain can
// synchronise it with two flip-flops and never sees more than one bit change
// at a time. The reader takes two samples a known number of reference cycles
// apart; their difference is the number of carrier cycles in that window.
//
// Interface/timing: clk is the carrier clock; gray is registered.
// The design does not say how its successive approximation measures
// frequency; this counter is this implementation's choice.
module freq_counter #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] gray
);
  logic [W-1:0] bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin + 1'b1;
      gray <= bin ^ (bin >> 1);
    end
  end
endmodule
