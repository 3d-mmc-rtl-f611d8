// mmc_layer: one die of the stack. All dies are the same; a die learns
// its place in the stack from the LayerID logic.
//
// Four processing elements (PE0-PE3 on the switch's N, E, S and W ports)
// and the peripheral subsystem (Local port) exchange packets through one
// source-routed switch, whose Up and Down ports lead to the 3D connection
// macro and over TSVs to the neighbouring dies. The die's clock is chosen
// by clock_select (pad on the top die, TSV otherwise), sent out to the
// PLL on pll_ref_o, and taken back regenerated on pll_clk_i; that clock
// runs the die and is passed down on tsv_clk_o. The stack reset is
// synchronised to the die clock. Unconnected TSV inputs of the top and
// bottom dies must be tied idle, with a running clock on their clock
// input so that the idle receiver is reset. The debug masters of the four
// PEs and of the PS (outside this design) reach their buses through
// dbg_req_i/dbg_rsp_o, index 4 being the PS. The structure follows the original; the
// port assignment of the switch is this design's reading of it.
module mmc_layer
  import mmc_pkg::*;
#(
  parameter int unsigned LANES        = 8,
  parameter int unsigned PRIV_WORDS   = 16384,
  parameter int unsigned ROM_WORDS    = 1024,
  parameter string       ROM_FILE     = "",
  parameter int unsigned SHARED_WORDS = 16384,
  parameter int unsigned NUM_SEM      = 32
) (
  input  logic             clk_pad_i,
  input  logic             rst_ni,
  input  logic             tsv_clk_i,
  output logic             tsv_clk_o,
  output logic             pll_ref_o,
  input  logic             pll_clk_i,
  input  logic [ID_W-1:0]  id_pad_i,
  input  logic             id_pad_sel_i,
  input  logic [ID_W-1:0]  tsv_id_i,
  output logic [ID_W-1:0]  tsv_id_o,
  output logic [ID_W-1:0]  layer_id_o,
  // data TSVs to the die above
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
  // data TSVs to the die below
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
  // processor cores
  input  bus_req_t         core_req_i [NUM_PE],
  output bus_rsp_t         core_rsp_o [NUM_PE],
  input  bus_req_t         dbg_req_i  [NUM_PE+1],   // debug masters: PE0-3, then PS
  output bus_rsp_t         dbg_rsp_o  [NUM_PE+1],
  output stat_t            stat_o
);
  logic clk, rst_n;
  logic [ID_W-1:0] layer_id;

  layer_id_gen u_id (
    .pad_id_i(id_pad_i), .pad_sel_i(id_pad_sel_i), .tsv_id_i,
    .layer_id_o(layer_id), .tsv_id_o);
  assign layer_id_o = layer_id;

  clock_select u_clksel (
    .pad_clk_i(clk_pad_i), .tsv_clk_i, .layer_id_i(layer_id), .pll_ref_o);
  assign clk       = pll_clk_i;
  assign tsv_clk_o = clk;

  rst_sync u_rst (.clk_i(clk), .rst_ni, .rst_no(rst_n));

  // Switch channels.
  logic [NPORTS-1:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  flit_t             sw_in_flit [NPORTS];
  flit_t             sw_out_flit[NPORTS];

  noc_switch #(.NP(NPORTS), .FIFO_DEPTH(2)) u_switch (
    .clk_i(clk), .rst_ni(rst_n),
    .in_valid_i(sw_in_valid), .in_flit_i(sw_in_flit), .in_ready_o(sw_in_ready),
    .out_valid_o(sw_out_valid), .out_flit_o(sw_out_flit), .out_ready_i(sw_out_ready),
    .stall_o(stat_o.sw_stall));

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    mmc_pe #(.PRIV_WORDS(PRIV_WORDS), .ROM_WORDS(ROM_WORDS), .ROM_FILE(ROM_FILE)) u_pe (
      .clk_i(clk), .rst_ni(rst_n), .layer_id_i(layer_id), .pe_id_i(2'(p)),
      .core_req_i(core_req_i[p]), .core_rsp_o(core_rsp_o[p]),
      .dbg_req_i(dbg_req_i[p]), .dbg_rsp_o(dbg_rsp_o[p]),
      .out_valid_o(sw_in_valid[p]), .out_flit_o(sw_in_flit[p]), .out_ready_i(sw_in_ready[p]),
      .in_valid_i(sw_out_valid[p]), .in_flit_i(sw_out_flit[p]), .in_ready_o(sw_out_ready[p]),
      .remote_o(stat_o.remote[p]));
  end

  mmc_ps #(.SHARED_WORDS(SHARED_WORDS), .NUM_SEM(NUM_SEM)) u_ps (
    .clk_i(clk), .rst_ni(rst_n), .layer_id_i(layer_id),
    .in_valid_i(sw_out_valid[PORT_L]), .in_flit_i(sw_out_flit[PORT_L]), .in_ready_o(sw_out_ready[PORT_L]),
    .out_valid_o(sw_in_valid[PORT_L]), .out_flit_o(sw_in_flit[PORT_L]), .out_ready_i(sw_in_ready[PORT_L]),
    .dbg_req_i(dbg_req_i[NUM_PE]), .dbg_rsp_o(dbg_rsp_o[NUM_PE]),
    .sem_busy_o(stat_o.sem_busy));

  conn3d_macro #(.LANES(LANES), .FIFO_DEPTH(8)) u_3d (
    .clk_i(clk), .rst_ni(rst_n),
    .up_sw_valid_i(sw_out_valid[PORT_U]), .up_sw_flit_i(sw_out_flit[PORT_U]), .up_sw_ready_o(sw_out_ready[PORT_U]),
    .up_sw_valid_o(sw_in_valid[PORT_U]),  .up_sw_flit_o(sw_in_flit[PORT_U]),  .up_sw_ready_i(sw_in_ready[PORT_U]),
    .dn_sw_valid_i(sw_out_valid[PORT_D]), .dn_sw_flit_i(sw_out_flit[PORT_D]), .dn_sw_ready_o(sw_out_ready[PORT_D]),
    .dn_sw_valid_o(sw_in_valid[PORT_D]),  .dn_sw_flit_o(sw_in_flit[PORT_D]),  .dn_sw_ready_i(sw_in_ready[PORT_D]),
    .up_tx_clk_o, .up_tx_valid_o, .up_tx_sof_o, .up_tx_data_o, .up_tx_stop_i,
    .up_rx_clk_i, .up_rx_valid_i, .up_rx_sof_i, .up_rx_data_i, .up_rx_stop_o,
    .dn_tx_clk_o, .dn_tx_valid_o, .dn_tx_sof_o, .dn_tx_data_o, .dn_tx_stop_i,
    .dn_rx_clk_i, .dn_rx_valid_i, .dn_rx_sof_i, .dn_rx_data_i, .dn_rx_stop_o,
    .tx_stopped_o(stat_o.tx_stopped), .rx_overflow_o(stat_o.rx_overflow));
endmodule
