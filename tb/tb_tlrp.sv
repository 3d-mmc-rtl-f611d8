// Task-level resource pooling on mmc3d_top at its default size (two dies,
// four PEs each). The four cores of die 0 each perform NACC stores to
// shared memory. R of them go to the remote shared memory (die 1), the
// rest to the local one (die 0). A schedule decides when each core makes
// its remote stores:
//   k = 4  all four cores store remotely at the same time, first thing;
//   k = 2  cores 0,1 store remotely first, cores 2,3 after R local stores;
//   k = 1  core i makes i*R local stores, then its R remote stores, so only
//          one core uses the vertical link at a time.
// When a core's remote slot would run past its last store, it is moved to
// the end. For k = 2 and R > NACC/2 this gives the mixed 2+4 schedule: the
// two pairs' slots overlap, and in the overlap all four cores are remote.
// The core model spends LOOP_GAP cycles between stores, as in tb_mmc3d_top.
//
// Checked:
//  - every store landed (sampled read-back);
//  - spreading the remote stores (k = 1) beats doing them together (k = 4)
//    and beats keeping all stores local (R = 0);
//  - with k = 4 the run time follows the linear model
//      T(R) = R * C_R4 + (NACC - R) * C_L4,
//    where C_L4 and C_R4 are the cycles per store of four cores on the
//    local and on the remote memory, measured here at R = 0 and R = NACC;
//    measured and modelled times must agree within 5%;
//  - the mixed 2+4 run (k = 2, R = 750) follows the per-phase model
//      T = 500 * C_2R2L + 500 * C_R4,
//    with C_2R2L, the cycles per store while two cores are remote and two
//    local, taken from the k = 2, R = 250 run: T = 500 * C_2R2L + 500 * C_L4;
//    again within 5%;
//  - switch stalls and remote requests happen, receive FIFOs never overflow.
module tb_tlrp;
  import mmc_pkg::*;
  localparam int unsigned NL = 2, NACC = 1000, LOOP_GAP = 12;
  localparam realtime PHASE [NL] = '{0.3ns, 0.5ns};

  logic clk_pad = 1'b0, rst_n = 1'b1;
  logic pll_ref [NL];
  logic pll_clk [NL];
  bus_req_t core_req [NL][NUM_PE];
  bus_rsp_t core_rsp [NL][NUM_PE];
  bus_req_t dbg_req [NL][NUM_PE+1];
  bus_rsp_t dbg_rsp [NL][NUM_PE+1];
  logic [ID_W-1:0] lid [NL];
  stat_t st [NL];
  int checks = 0, failures = 0;
  int n_stall = 0, n_remote = 0, n_ovf = 0;

  mmc3d_top dut (
    .clk_pad_i(clk_pad), .rst_ni(rst_n), .id_pad_i(2'b00), .id_pad_sel_i(1'b1),
    .pll_ref_o(pll_ref), .pll_clk_i(pll_clk), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .dbg_req_i(dbg_req), .dbg_rsp_o(dbg_rsp),
    .layer_id_o(lid), .stat_o(st));

  for (genvar l = 0; l < NL; l++) begin : g_pll
    pll_model #(.DELAY(PHASE[l])) u_pll (.ref_i(pll_ref[l]), .clk_o(pll_clk[l]));
    always @(posedge pll_clk[l]) begin
      if (rst_n) begin
        if (st[l].sw_stall != '0) n_stall++;
        if (st[l].remote != '0) n_remote++;
        if (st[l].rx_overflow != '0) n_ovf++;
      end
    end
  end

  always #1.25 clk_pad = ~clk_pad;   // 400 MHz
  initial #1 rst_n = 1'b0;           // a falling edge resets even the unclocked domains

  initial begin
    #3ms; failures++;   // a full run ends near 1.3 ms
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc0 = 0;
  always @(posedge pll_clk[0]) cyc0 <= cyc0 + 1;

  task automatic tick();
    @(negedge pll_clk[0]);
  endtask

  // One bus access of core p of die 0.
  task automatic cx(input int p, input bit we, input logic [31:0] addr,
                    input logic [31:0] wd, output logic [31:0] rd);
    int n;
    tick();
    core_req[0][p] = '{req: 1'b1, we: we, addr: addr, wdata: wd, wstrb: 4'hF};
    n = 0;
    do begin tick(); n++; end while (!core_rsp[0][p].ready && n < 100000);
    if (n >= 100000) begin failures++; $display("core %0d hung at %h", p, addr); end
    rd = core_rsp[0][p].rdata;
    core_req[0][p].req = 1'b0;
  endtask

  function automatic logic [31:0] shaddr(int layer, int word);
    return 32'h8000_0000 | (32'(layer) << 24) | 32'(word * 4);
  endfunction

  function automatic logic [31:0] pattern(int run, int p, int i);
    return {8'(run), 8'(p), 16'(i)} ^ 32'h3c3c_0000;
  endfunction

  // Store i of core p goes remote when it falls in the core's remote slot.
  function automatic bit is_remote(int k, int r, int p, int i);
    int first;
    first = (p / k) * r;
    if (first + r > NACC) first = NACC - r;
    return i >= first && i < first + r;
  endfunction

  task automatic worker(input int run, input int k, input int r, input int p);
    logic [31:0] rd;
    for (int i = 0; i < NACC; i++) begin
      cx(p, 1'b1, shaddr(is_remote(k, r, p, i) ? 1 : 0, p*NACC + i), pattern(run, p, i), rd);
      repeat (LOOP_GAP) tick();
    end
  endtask

  int run_no = 0;
  task automatic tlrp_run(input int k, input int r, output longint t);
    longint t0;
    logic [31:0] rd;
    run_no++;
    tick();
    t0 = cyc0;
    for (int p = 0; p < NUM_PE; p++) begin
      automatic int pp = p;
      fork worker(run_no, k, r, pp); join_none
    end
    wait fork;
    t = cyc0 - t0;
    for (int p = 0; p < NUM_PE; p++)
      for (int i = p; i < NACC; i += 11) begin
        cx(p, 1'b0, shaddr(is_remote(k, r, p, i) ? 1 : 0, p*NACC + i), 0, rd);
        checks++;
        if (rd != pattern(run_no, p, i)) begin
          failures++; $display("k=%0d R=%0d core %0d store %0d: %h", k, r, p, i, rd);
        end
      end
    $display("  k=%0d  R=%4d (%3d%% remote)  %6d cycles", k, r, r * 100 / NACC, t);
  endtask

  longint t_local, t_k1 [2], t_k2 [3], t_k4 [4], t_mix;
  real c_l4, c_r4, c_2r2l, model;
  int rlist [4] = '{125, 250, 500, 1000};

  initial begin
    foreach (core_req[l, p]) core_req[l][p] = '0;
    foreach (dbg_req[l, m]) dbg_req[l][m] = '0;
    #20 rst_n = 1'b1;
    repeat (20) tick();
    checks++;
    if (lid[0] != 0 || lid[1] != 1) begin failures++; $display("LayerIDs %0d %0d", lid[0], lid[1]); end

    $display("TLRP, %0d stores per core, four cores on die 0:", NACC);
    tlrp_run(4, 0, t_local);
    for (int j = 0; j < 2; j++) tlrp_run(1, rlist[j], t_k1[j]);
    for (int j = 0; j < 3; j++) tlrp_run(2, rlist[j], t_k2[j]);
    for (int j = 0; j < 4; j++) tlrp_run(4, rlist[j], t_k4[j]);
    tlrp_run(2, 750, t_mix);

    // Spreading the remote stores pays.
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (!(t_k1[j] < t_k4[j])) begin failures++; $display("k=1 not faster than k=4 at R=%0d", rlist[j]); end
      checks++;
      if (!(t_k1[j] < t_local)) begin failures++; $display("k=1 at R=%0d does not beat all-local", rlist[j]); end
    end
    checks++;
    if (!(t_k2[1] < t_k4[1])) begin failures++; $display("k=2 not faster than k=4 at R=%0d", rlist[1]); end
    $display("best gain over all-local: %0d%%", (t_local - t_k1[1]) * 100 / t_local);

    // Linear model for k = 4 from the two end points.
    c_l4 = real'(t_local) / NACC;
    c_r4 = real'(t_k4[3]) / NACC;
    for (int j = 0; j < 3; j++) begin
      model = rlist[j] * c_r4 + (NACC - rlist[j]) * c_l4;
      checks++;
      if (t_k4[j] > model * 1.05 || t_k4[j] < model * 0.95) begin
        failures++; $display("k=4 R=%0d: %0d cycles, model %0.0f", rlist[j], t_k4[j], model);
      end
    end
    $display("C_L4 %0.2f, C_R4 %0.2f cycles per store", c_l4, c_r4);

    // Mixed 2+4 from per-phase costs.
    c_2r2l = (real'(t_k2[1]) - 500 * c_l4) / 500;
    model = 500 * c_2r2l + 500 * c_r4;
    checks++;
    if (t_mix > model * 1.05 || t_mix < model * 0.95) begin
      failures++; $display("2+4 at R=750: %0d cycles, model %0.0f", t_mix, model);
    end
    checks++;
    if (!(t_mix < t_k4[3])) begin failures++; $display("2+4 at R=750 not faster than all-remote"); end
    $display("C_2R2L %0.2f; 2+4 at R=750: %0d cycles, model %0.0f", c_2r2l, t_mix, model);

    $display("events: stall cycles %0d, remote request cycles %0d, overflow %0d", n_stall, n_remote, n_ovf);
    checks++; if (n_stall == 0) begin failures++; $display("no switch stall"); end
    checks++; if (n_remote == 0) begin failures++; $display("no remote request"); end
    checks++; if (n_ovf != 0) begin failures++; $display("receive FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
