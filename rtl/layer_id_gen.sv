// layer_id_gen: automatic LayerID of a stacked die.
//
// Every die is identical; its position in the stack is found at power-up.
// On the top die the select pad is driven high and the LayerID pads carry
// the top's ID ("00"); on every other die the pads are pulled down, so
// the multiplexer takes the ID arriving on the TSVs from the die above.
// The chosen ID is used by the die's logic and, incremented by one, is
// sent down the TSVs to the next die. Purely combinational. The
// multiplexer and the incrementer follow the original; the separate
// select pad is this design's reading of it.
module layer_id_gen
  import mmc_pkg::*;
(
  input  logic [ID_W-1:0] pad_id_i,
  input  logic            pad_sel_i,
  input  logic [ID_W-1:0] tsv_id_i,
  output logic [ID_W-1:0] layer_id_o,
  output logic [ID_W-1:0] tsv_id_o
);
  assign layer_id_o = pad_sel_i ? pad_id_i : tsv_id_i;
  assign tsv_id_o   = layer_id_o + 1'b1;
endmodule
