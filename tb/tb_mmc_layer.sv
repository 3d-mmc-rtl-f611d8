// Testbench of mmc_layer: one die configured as the top of the stack
// (select pad high, LayerID pads 00) with its PLL modelled. Its downward
// TSV link is looped back into itself, so accesses addressed to "layer 1"
// leave through the serializer, come back through the deserializer and
// dual-clock FIFO, and reach this die's shared memory by the Down port.
// Four core models run at once: private RAM, local shared RAM and
// looped-back shared RAM traffic, checked against reference models.
// Also checked: LayerID 0 and 1 passed down, the PLL reference follows the
// pad clock, switch stalls occur.
module tb_mmc_layer;
  import mmc_pkg::*;
  logic clk_pad = 1'b0, rst_n = 1'b1, pll_ref, clk;
  logic [1:0] tsv_id, lid;
  logic tclk, tv, tsof, tstop, uclk, uv, usof;
  logic [7:0] td, ud;
  bus_req_t core_req [4];
  bus_rsp_t core_rsp [4];
  stat_t st;
  int checks = 0, failures = 0, stalls = 0, remotes = 0;
  logic [31:0] shr [512];
  logic [31:0] priv [4][64];

  mmc_layer #(.PRIV_WORDS(64), .ROM_WORDS(16), .SHARED_WORDS(512), .NUM_SEM(32)) dut (
    .clk_pad_i(clk_pad), .rst_ni(rst_n), .tsv_clk_i(1'b0), .tsv_clk_o(),
    .pll_ref_o(pll_ref), .pll_clk_i(clk),
    .id_pad_i(2'b00), .id_pad_sel_i(1'b1), .tsv_id_i(2'b00), .tsv_id_o(tsv_id), .layer_id_o(lid),
    .up_tx_clk_o(uclk), .up_tx_valid_o(uv), .up_tx_sof_o(usof), .up_tx_data_o(ud), .up_tx_stop_i(1'b0),
    .up_rx_clk_i(uclk), .up_rx_valid_i(1'b0), .up_rx_sof_i(1'b0), .up_rx_data_i('0), .up_rx_stop_o(),
    .dn_tx_clk_o(tclk), .dn_tx_valid_o(tv), .dn_tx_sof_o(tsof), .dn_tx_data_o(td), .dn_tx_stop_i(tstop),
    .dn_rx_clk_i(tclk), .dn_rx_valid_i(tv), .dn_rx_sof_i(tsof), .dn_rx_data_i(td), .dn_rx_stop_o(tstop),
    .core_req_i(core_req), .core_rsp_o(core_rsp),
    .dbg_req_i('{default: '0}), .dbg_rsp_o(), .stat_o(st));

  pll_model #(.DELAY(0.7ns)) u_pll (.ref_i(pll_ref), .clk_o(clk));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk_pad = ~clk_pad;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 7; i++) if (st.sw_stall[i]) stalls++;
      for (int i = 0; i < 4; i++) if (st.remote[i]) remotes++;
    end
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cx(input int p, input bit we, input logic [31:0] addr, input logic [31:0] wd, output logic [31:0] rd);
    int n;
    @(negedge clk);
    core_req[p] = '{req: 1'b1, we: we, addr: addr, wdata: wd, wstrb: 4'hF};
    n = 0;
    do begin @(negedge clk); n++; end while (!core_rsp[p].ready && n < 5000);
    rd = core_rsp[p].rdata;
    core_req[p].req = 1'b0;
  endtask

  // Each core owns 64 shared words. Odd words are reached through the
  // loop (the same RAM, addressed as layer 1), even words directly; one
  // word always takes the same path, as it would in a real stack.
  task automatic core_run(input int p);
    logic [31:0] rd, wd, base; int w, a;
    for (int n = 0; n < 120; n++) begin
      w = $urandom_range(63, 0);
      case ($urandom_range(5, 0))
        0: begin wd = $urandom; priv[p][w] = wd; cx(p, 1, 32'h4000_0000 | 32'(w*4), wd, rd); end
        1: begin cx(p, 0, 32'h4000_0000 | 32'(w*4), 0, rd);
                 checks++; if (rd != priv[p][w]) begin failures++; $display("core %0d priv", p); end end
        2, 3: begin
                 a = p*64 + w; base = a[0] ? 32'h8100_0000 : 32'h8000_0000;
                 wd = $urandom; shr[a] = wd; cx(p, 1, base | 32'(a*4), wd, rd); end
        default: begin
                 a = p*64 + w; base = a[0] ? 32'h8100_0000 : 32'h8000_0000;
                 cx(p, 0, base | 32'(a*4), 0, rd);
                 checks++; if (rd != shr[a]) begin failures++; $display("core %0d shared %0d: %h vs %h", p, a, rd, shr[a]); end end
      endcase
    end
  endtask

  initial begin
    logic [31:0] rd;
    for (int p = 0; p < 4; p++) core_req[p] = '0;
    repeat (5) @(negedge clk_pad); rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++; if (lid != 2'd0 || tsv_id != 2'd1) begin failures++; $display("layer id %0d/%0d", lid, tsv_id); end
    // initialise the shared words used
    for (int a = 0; a < 256; a++) begin shr[a] = $urandom; cx(0, 1, 32'h8000_0000 | 32'(a*4), shr[a], rd); end
    for (int p = 0; p < 4; p++) for (int w = 0; w < 64; w++) begin
      priv[p][w] = $urandom; cx(p, 1, 32'h4000_0000 | 32'(w*4), priv[p][w], rd);
    end
    fork
      core_run(0); core_run(1); core_run(2); core_run(3);
    join
    // The PLL reference must be the pad clock on the top die.
    for (int k = 0; k < 8; k++) begin #1.3; checks++; if (pll_ref !== clk_pad) failures++; end
    checks++; if (stalls == 0 || remotes == 0) begin failures++; $display("stalls %0d remote %0d", stalls, remotes); end
    $display("stall cycles %0d, looped-back requests %0d", stalls, remotes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
