// pll_model: behavioural stand-in for a die's PLL, for simulation only.
// It reproduces its reference clock after a fixed delay, i.e. the same
// frequency with a phase shift, which is all the digital design relies
// on. Lock time, jitter and frequency synthesis are not modelled.
module pll_model #(
  parameter realtime DELAY = 0.3ns
) (
  input  logic ref_i,
  output logic clk_o
);
  initial clk_o = 1'b0;
  always @(ref_i) clk_o <= #(DELAY) ref_i;
endmodule
