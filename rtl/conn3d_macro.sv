// conn3d_macro: the 3D connection macro of a layer, its only path to the
// other layers.
//
// Two identical links, one towards the layer above (up_*) and one towards
// the layer below (dn_*). Each link has a transmit path (tsv_serializer in
// this layer's clock, which is sent along as *_tx_clk_o) and a receive
// path (tsv_rx: deserializer in the neighbour's forwarded clock, then a
// dual-clock FIFO into this layer's clock). Per direction a link uses
// LANES data TSVs plus valid, start-of-flit, clock and stop, i.e. 12 TSVs
// for 8 lanes. On the top and bottom layers one link has no neighbour;
// its inputs are then tied idle by the stack. The split into
// serializer, deserializer and dual-clock FIFO follows the original; the
// lane count, framing and stop wire are this design's choices.
module conn3d_macro
  import mmc_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // switch Up port
  input  logic             up_sw_valid_i,
  input  flit_t            up_sw_flit_i,
  output logic             up_sw_ready_o,
  output logic             up_sw_valid_o,
  output flit_t            up_sw_flit_o,
  input  logic             up_sw_ready_i,
  // switch Down port
  input  logic             dn_sw_valid_i,
  input  flit_t            dn_sw_flit_i,
  output logic             dn_sw_ready_o,
  output logic             dn_sw_valid_o,
  output flit_t            dn_sw_flit_o,
  input  logic             dn_sw_ready_i,
  // TSVs to the layer above
  output logic             up_tx_clk_o,
  output logic             up_tx_valid_o,
  output logic             up_tx_sof_o,
  output logic [LANES-1:0] up_tx_data_o,
  input  logic             up_tx_stop_i,
  input  logic             up_rx_clk_i,
  input  logic             up_rx_valid_i,
  input  logic             up_rx_sof_i,
  input  logic [LANES-1:0] up_rx_data_i,
  output logic             up_rx_stop_o,
  // TSVs to the layer below
  output logic             dn_tx_clk_o,
  output logic             dn_tx_valid_o,
  output logic             dn_tx_sof_o,
  output logic [LANES-1:0] dn_tx_data_o,
  input  logic             dn_tx_stop_i,
  input  logic             dn_rx_clk_i,
  input  logic             dn_rx_valid_i,
  input  logic             dn_rx_sof_i,
  input  logic [LANES-1:0] dn_rx_data_i,
  output logic             dn_rx_stop_o,
  // events
  output logic [1:0]       tx_stopped_o,  // {down, up} flit held by stop
  output logic [1:0]       rx_overflow_o  // {down, up}, in the forwarded clocks
);
  assign up_tx_clk_o = clk_i;
  assign dn_tx_clk_o = clk_i;

  tsv_serializer #(.LANES(LANES)) u_up_ser (
    .clk_i, .rst_ni,
    .flit_valid_i(up_sw_valid_i), .flit_i(up_sw_flit_i), .flit_ready_o(up_sw_ready_o),
    .tsv_valid_o(up_tx_valid_o), .tsv_sof_o(up_tx_sof_o), .tsv_data_o(up_tx_data_o),
    .tsv_stop_i(up_tx_stop_i), .stopped_o(tx_stopped_o[0])
  );

  tsv_serializer #(.LANES(LANES)) u_dn_ser (
    .clk_i, .rst_ni,
    .flit_valid_i(dn_sw_valid_i), .flit_i(dn_sw_flit_i), .flit_ready_o(dn_sw_ready_o),
    .tsv_valid_o(dn_tx_valid_o), .tsv_sof_o(dn_tx_sof_o), .tsv_data_o(dn_tx_data_o),
    .tsv_stop_i(dn_tx_stop_i), .stopped_o(tx_stopped_o[1])
  );

  tsv_rx #(.LANES(LANES), .FIFO_DEPTH(FIFO_DEPTH)) u_up_rx (
    .clk_i, .rst_ni,
    .tsv_clk_i(up_rx_clk_i), .tsv_valid_i(up_rx_valid_i), .tsv_sof_i(up_rx_sof_i),
    .tsv_data_i(up_rx_data_i), .tsv_stop_o(up_rx_stop_o),
    .flit_valid_o(up_sw_valid_o), .flit_o(up_sw_flit_o), .flit_ready_i(up_sw_ready_i),
    .overflow_o(rx_overflow_o[0])
  );

  tsv_rx #(.LANES(LANES), .FIFO_DEPTH(FIFO_DEPTH)) u_dn_rx (
    .clk_i, .rst_ni,
    .tsv_clk_i(dn_rx_clk_i), .tsv_valid_i(dn_rx_valid_i), .tsv_sof_i(dn_rx_sof_i),
    .tsv_data_i(dn_rx_data_i), .tsv_stop_o(dn_rx_stop_o),
    .flit_valid_o(dn_sw_valid_o), .flit_o(dn_sw_flit_o), .flit_ready_i(dn_sw_ready_i),
    .overflow_o(rx_overflow_o[1])
  );
endmodule
