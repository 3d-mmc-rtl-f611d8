// mmc3d_top: a stack of NUM_LAYERS identical dies (layer 0 on top).
//
// Each die holds four PEs and a shared memory; any PE can reach the
// shared memory of any die, which is what lets software spread its
// shared-memory traffic over the dies (resource pooling). Between
// neighbouring dies run the TSVs: the clock (die above to die below), the
// 2-bit LayerID (incremented on each die), and one serialized data link
// each way with its own forwarded clock and a stop wire. Only the top die
// gets the external clock and LayerID pads; on the dies below those pads
// are pulled down, modelled here by tying them to zero. Each die's PLL is
// outside this module: pll_ref_o[l] is its reference and pll_clk_i[l] its
// regenerated clock. The processor cores are outside as well; their buses
// are core_req_i/core_rsp_o, and so are the JTAG debug masters of every PE
// and PS, whose buses are dbg_req_i/dbg_rsp_o (index 4 = the PS).
// layer_id_o and stat_o expose the LayerIDs
// the dies configured and per-die event strobes. The stack follows the
// original, which presents the two-die stack as its main configuration.
module mmc3d_top
  import mmc_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 2
) (
  input  logic            clk_pad_i,
  input  logic            rst_ni,
  input  logic [ID_W-1:0] id_pad_i,
  input  logic            id_pad_sel_i,
  output logic            pll_ref_o  [NUM_LAYERS],
  input  logic            pll_clk_i  [NUM_LAYERS],
  input  bus_req_t        core_req_i [NUM_LAYERS][NUM_PE],
  output bus_rsp_t        core_rsp_o [NUM_LAYERS][NUM_PE],
  input  bus_req_t        dbg_req_i  [NUM_LAYERS][NUM_PE+1],
  output bus_rsp_t        dbg_rsp_o  [NUM_LAYERS][NUM_PE+1],
  output logic [ID_W-1:0] layer_id_o [NUM_LAYERS],
  output stat_t           stat_o     [NUM_LAYERS]
);
  localparam int unsigned LANES = 8;

  // Vertical wiring; index l is the boundary below die l.
  logic             clk_v   [NUM_LAYERS+1];
  logic [ID_W-1:0]  id_v    [NUM_LAYERS+1];
  // downward data link (die l -> die l+1)
  logic             dl_clk  [NUM_LAYERS+1];
  logic             dl_val  [NUM_LAYERS+1];
  logic             dl_sof  [NUM_LAYERS+1];
  logic [LANES-1:0] dl_dat  [NUM_LAYERS+1];
  logic             dl_stop [NUM_LAYERS+1];
  // upward data link (die l+1 -> die l)
  logic             ul_clk  [NUM_LAYERS+1];
  logic             ul_val  [NUM_LAYERS+1];
  logic             ul_sof  [NUM_LAYERS+1];
  logic [LANES-1:0] ul_dat  [NUM_LAYERS+1];
  logic             ul_stop [NUM_LAYERS+1];

  // Above the top die and below the bottom die there is nothing. The
  // receivers of those missing links get their own die's clock and idle
  // data, so that their flops are reset and stay empty.
  assign clk_v[0]   = 1'b0;
  assign id_v[0]    = '0;
  assign dl_clk[0]  = ul_clk[0];
  assign dl_val[0]  = 1'b0;
  assign dl_sof[0]  = 1'b0;
  assign dl_dat[0]  = '0;
  assign ul_stop[0] = 1'b0;
  assign ul_clk[NUM_LAYERS]  = dl_clk[NUM_LAYERS];
  assign ul_val[NUM_LAYERS]  = 1'b0;
  assign ul_sof[NUM_LAYERS]  = 1'b0;
  assign ul_dat[NUM_LAYERS]  = '0;
  assign dl_stop[NUM_LAYERS] = 1'b0;

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    // Pads are driven on the top die only; below they are pulled down.
    logic [ID_W-1:0] pad_id;
    logic            pad_sel;
    logic            pad_clk;
    assign pad_id  = (l == 0) ? id_pad_i     : '0;
    assign pad_sel = (l == 0) ? id_pad_sel_i : 1'b0;
    assign pad_clk = (l == 0) ? clk_pad_i    : 1'b0;

    mmc_layer #(.LANES(LANES)) u_layer (
      .clk_pad_i(pad_clk), .rst_ni,
      .tsv_clk_i(clk_v[l]), .tsv_clk_o(clk_v[l+1]),
      .pll_ref_o(pll_ref_o[l]), .pll_clk_i(pll_clk_i[l]),
      .id_pad_i(pad_id), .id_pad_sel_i(pad_sel),
      .tsv_id_i(id_v[l]), .tsv_id_o(id_v[l+1]), .layer_id_o(layer_id_o[l]),
      // towards the die above: boundary l
      .up_tx_clk_o(ul_clk[l]), .up_tx_valid_o(ul_val[l]), .up_tx_sof_o(ul_sof[l]),
      .up_tx_data_o(ul_dat[l]), .up_tx_stop_i(ul_stop[l]),
      .up_rx_clk_i(dl_clk[l]), .up_rx_valid_i(dl_val[l]), .up_rx_sof_i(dl_sof[l]),
      .up_rx_data_i(dl_dat[l]), .up_rx_stop_o(dl_stop[l]),
      // towards the die below: boundary l+1
      .dn_tx_clk_o(dl_clk[l+1]), .dn_tx_valid_o(dl_val[l+1]), .dn_tx_sof_o(dl_sof[l+1]),
      .dn_tx_data_o(dl_dat[l+1]), .dn_tx_stop_i(dl_stop[l+1]),
      .dn_rx_clk_i(ul_clk[l+1]), .dn_rx_valid_i(ul_val[l+1]), .dn_rx_sof_i(ul_sof[l+1]),
      .dn_rx_data_i(ul_dat[l+1]), .dn_rx_stop_o(ul_stop[l+1]),
      .core_req_i(core_req_i[l]), .core_rsp_o(core_rsp_o[l]),
      .dbg_req_i(dbg_req_i[l]), .dbg_rsp_o(dbg_rsp_o[l]),
      .stat_o(stat_o[l]));
  end
endmodule
