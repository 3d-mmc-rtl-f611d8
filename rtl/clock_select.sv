// clock_select: choice of the PLL reference clock of a die.
//
// The top die (LayerID 0) takes its clock from the clock pad; every other
// die takes the clock arriving on the TSVs from the die above. The chosen
// clock goes to the die's PLL, whose output clocks the die and is sent
// down to the next die. The select is static after the LayerID has
// settled, so a plain multiplexer suffices. Following the original.
module clock_select
  import mmc_pkg::*;
(
  input  logic            pad_clk_i,
  input  logic            tsv_clk_i,
  input  logic [ID_W-1:0] layer_id_i,
  output logic            pll_ref_o
);
  assign pll_ref_o = (layer_id_i != '0) ? tsv_clk_i : pad_clk_i;
endmodule
