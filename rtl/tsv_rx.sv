// tsv_rx: receive side of one vertical TSV link: the deserializer in the
// clock that came with the data, then the dual-clock FIFO into the local
// layer clock. The FIFO's almost-full level goes back to the sender as the
// stop wire, in the sender's clock domain. The stack reset is
// synchronised separately into both clocks.
module tsv_rx
  import mmc_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic             clk_i,        // receiving layer clock
  input  logic             rst_ni,       // stack reset (asynchronous)
  input  logic             tsv_clk_i,    // clock sent with the data
  input  logic             tsv_valid_i,
  input  logic             tsv_sof_i,
  input  logic [LANES-1:0] tsv_data_i,
  output logic             tsv_stop_o,
  output logic             flit_valid_o,
  output flit_t            flit_o,
  input  logic             flit_ready_i,
  output logic             overflow_o    // in tsv_clk_i domain
);
  logic  wrst_n, rrst_n;
  logic  d_valid;
  flit_t d_flit;

  rst_sync u_wrst (.clk_i(tsv_clk_i), .rst_ni, .rst_no(wrst_n));
  rst_sync u_rrst (.clk_i(clk_i),     .rst_ni, .rst_no(rrst_n));

  tsv_deserializer #(.LANES(LANES)) u_deser (
    .clk_i(tsv_clk_i), .rst_ni(wrst_n),
    .tsv_valid_i, .tsv_sof_i, .tsv_data_i,
    .flit_valid_o(d_valid), .flit_o(d_flit)
  );

  dc_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH), .MARGIN(3)) u_fifo (
    .wclk_i(tsv_clk_i), .wrst_ni(wrst_n), .wvalid_i(d_valid), .wdata_i(d_flit),
    .walmost_full_o(tsv_stop_o), .woverflow_o(overflow_o),
    .rclk_i(clk_i), .rrst_ni(rrst_n), .rvalid_o(flit_valid_o), .rdata_o(flit_o),
    .rready_i(flit_ready_i)
  );
endmodule
