// End-to-end testbench of mmc3d_top at its default size (two dies, four
// PEs each, full memory sizes), with a PLL model per die (phase shifts of
// 0.3 ns and 0.5 ns) and a core model per PE driving its bus at 400 MHz.
//
//  1. LayerID auto-configuration: the dies must find IDs 0 and 1.
//  2. Memory Stress: 1, 2, 3 and 4 cores of die 0 each write 1000 words
//     to shared memory, once all to the local shared memory, once all to
//     the remote one (die 1), and once with resource pooling (core 0
//     remote, the rest local). Four local cores must block each other,
//     pooling must gain at least 5% there, and two or more cores on the
//     remote memory must be slower than on the local one. Between stores the core model spends
//     LOOP_GAP cycles, standing in for the loop code. Cycle counts are printed; every word is read
//     back and checked. Pooling must beat all-local for 3 and 4 cores.
//  3. Private RAM and boot ROM of every PE.
//  4. All eight cores increment a shared counter on die 0 inside a
//     critical section guarded by semaphore 0 of die 0; the result must be
//     exact, and semaphore contention must be seen.
//  5. Meanwhile the debug master of die 0's PS and that of PE 2 on die 1
//     read back shared words of the pooled run; they share their buses
//     with the PS network interface and the core, so some of their
//     accesses must wait.
// Every mechanism must happen at least once: switch stalls, requests to
// the other die in both directions, TSV stop (back-pressure) and
// semaphore contention; a receive FIFO overflow must never happen.
module tb_mmc3d_top;
  import mmc_pkg::*;
  localparam int unsigned NL = 2, NSTRESS = 1000, NCRIT = 10;
  // Cycles the modelled core spends in its loop between two stores.
  localparam int unsigned LOOP_GAP = 12;
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
  int n_stall = 0, n_remote_dn = 0, n_remote_up = 0, n_stop = 0, n_ovf = 0, n_sem = 0;

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
        if (st[l].remote != '0) begin if (l == 0) n_remote_dn++; else n_remote_up++; end
        if (st[l].tx_stopped != '0) n_stop++;
        if (st[l].rx_overflow != '0) n_ovf++;
        if (st[l].sem_busy) n_sem++;
      end
    end
  end

  always #1.25 clk_pad = ~clk_pad;   // 400 MHz
  initial #1 rst_n = 1'b0;           // a falling edge resets even the unclocked domains

  initial begin
    #2ms; failures++;   // a full run ends near 0.95 ms
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_neg(input int l);
    case (l)
      0: @(negedge pll_clk[0]);
      default: @(negedge pll_clk[1]);
    endcase
  endtask

  // One bus access of core (l, p).
  task automatic cx(input int l, input int p, input bit we, input logic [31:0] addr,
                    input logic [31:0] wd, output logic [31:0] rd);
    int n;
    wait_neg(l);
    core_req[l][p] = '{req: 1'b1, we: we, addr: addr, wdata: wd, wstrb: 4'hF};
    n = 0;
    do begin wait_neg(l); n++; end while (!core_rsp[l][p].ready && n < 100000);
    if (n >= 100000) begin failures++; $display("core %0d.%0d hung at %h", l, p, addr); end
    rd = core_rsp[l][p].rdata;
    core_req[l][p].req = 1'b0;
  endtask

  // One bus access of debug master m of die l (m = NUM_PE: the PS).
  task automatic dx(input int l, input int m, input bit we, input logic [31:0] addr,
                    input logic [31:0] wd, output logic [31:0] rd, output int lat);
    wait_neg(l);
    dbg_req[l][m] = '{req: 1'b1, we: we, addr: addr, wdata: wd, wstrb: 4'hF};
    lat = 0;
    do begin wait_neg(l); lat++; end while (!dbg_rsp[l][m].ready && lat < 100000);
    if (lat >= 100000) begin failures++; $display("debug master %0d.%0d hung at %h", l, m, addr); end
    rd = dbg_rsp[l][m].rdata;
    dbg_req[l][m].req = 1'b0;
  endtask

  // Debug masters read back what the pooled 4-core Memory Stress run left:
  // the PS debug master of die 0 reads die 0's shared RAM directly, the
  // debug master of PE 2 of die 1 reads it through that PE's network
  // interface. Both run while the cores are busy, so they must sometimes
  // wait for their bus.
  int n_dbg_wait = 0;
  task automatic debug_reads(input int l, input int m);
    logic [31:0] rd; int lat;
    for (int p = 1; p < 4; p++)
      for (int i = l * 5; i < NSTRESS; i += 97) begin
        dx(l, m, 1'b0, shaddr(0, p*NSTRESS + i), 0, rd, lat);
        checks++;
        if (rd != pattern(2*8 + 4, p, i)) begin failures++; $display("debug %0d.%0d word %0d: %h", l, m, p*NSTRESS + i, rd); end
        if (m == NUM_PE && lat > 1) n_dbg_wait++;
        if (m < NUM_PE && lat > 40) n_dbg_wait++;
      end
  endtask

  function automatic logic [31:0] shaddr(int layer, int word);
    return 32'h8000_0000 | (32'(layer) << 24) | 32'(word * 4);
  endfunction

  function automatic logic [31:0] pattern(int run, int p, int i);
    return {8'(run), 8'(p), 16'(i)} ^ 32'h5a5a_0000;
  endfunction

  // Memory Stress on core (0, p): NSTRESS writes to the shared memory of
  // die `tgt`, words p*NSTRESS .. p*NSTRESS+NSTRESS-1.
  task automatic stress(input int run, input int p, input int tgt);
    logic [31:0] rd;
    for (int i = 0; i < NSTRESS; i++) begin
      cx(0, p, 1'b1, shaddr(tgt, p*NSTRESS + i), pattern(run, p, i), rd);
      repeat (LOOP_GAP) wait_neg(0);
    end
  endtask

  task automatic verify(input int run, input int p, input int tgt);
    logic [31:0] rd;
    for (int i = 0; i < NSTRESS; i += 7) begin
      cx(0, p, 1'b0, shaddr(tgt, p*NSTRESS + i), 0, rd);
      checks++;
      if (rd != pattern(run, p, i)) begin failures++; $display("stress run %0d core %0d word %0d: %h", run, p, i, rd); end
    end
  endtask

  longint t_cyc [3][5];   // [mode local/remote/pooled][cores]
  longint cyc0 = 0;
  always @(posedge pll_clk[0]) cyc0 <= cyc0 + 1;

  // mode 0: all local, 1: all remote, 2: pooled (core 0 remote)
  task automatic stress_run(input int mode, input int ncores);
    longint t0;
    int run;
    run = mode * 8 + ncores;
    wait_neg(0);
    t0 = cyc0;
    for (int p = 0; p < ncores; p++) begin
      automatic int pp = p;
      automatic int tgt = (mode == 1 || (mode == 2 && pp == 0)) ? 1 : 0;
      fork stress(run, pp, tgt); join_none
    end
    wait fork;
    t_cyc[mode][ncores] = cyc0 - t0;
    for (int p = 0; p < ncores; p++) verify(run, p, (mode == 1 || (mode == 2 && p == 0)) ? 1 : 0);
  endtask

  task automatic crit(input int l, input int p);
    logic [31:0] rd, cnt;
    for (int k = 0; k < NCRIT; k++) begin
      do cx(l, p, 1'b0, 32'h8080_0000, 0, rd); while (rd[0]);       // acquire die 0 semaphore 0
      cx(l, p, 1'b0, shaddr(0, 12000), 0, cnt);
      cx(l, p, 1'b1, shaddr(0, 12000), cnt + 1, rd);
      cx(l, p, 1'b1, 32'h8080_0000, 0, rd);                           // release
    end
  endtask

  initial begin
    logic [31:0] rd;
    for (int l = 0; l < NL; l++) for (int p = 0; p < NUM_PE; p++) core_req[l][p] = '0;
    foreach (dbg_req[l, m]) dbg_req[l][m] = '0;
    repeat (10) @(negedge clk_pad);
    rst_n = 1'b1;
    repeat (10) wait_neg(1);

    // 1. LayerID
    for (int l = 0; l < NL; l++) begin
      checks++; if (lid[l] != 2'(l)) begin failures++; $display("die %0d has LayerID %0d", l, lid[l]); end
    end

    // 2. Memory Stress
    for (int n = 1; n <= 4; n++) begin
      stress_run(0, n);
      stress_run(1, n);
      if (n > 1) stress_run(2, n);
    end
    $display("Memory Stress, %0d writes per core, cycles at 400 MHz:", NSTRESS);
    $display("  cores   local   remote   pooled");
    for (int n = 1; n <= 4; n++)
      $display("  %0d     %6d   %6d   %6d", n, t_cyc[0][n], t_cyc[1][n], (n > 1) ? t_cyc[2][n] : 0);
    checks++;
    if (t_cyc[0][4] <= t_cyc[0][1]) begin failures++; $display("four local cores were never blocked"); end
    checks++;
    if (t_cyc[2][4] * 20 > t_cyc[0][4] * 19) begin failures++; $display("pooling gained less than 5%% with 4 cores"); end
    for (int n = 2; n <= 4; n++) begin
      checks++;
      if (t_cyc[1][n] <= t_cyc[0][n]) begin failures++; $display("remote not slower than local with %0d cores", n); end
    end

    // 3. Private RAM and ROM
    for (int l = 0; l < NL; l++) for (int p = 0; p < NUM_PE; p++) begin
      cx(l, p, 1'b1, 32'h4000_0100, {16'(l), 16'(p)}, rd);
    end
    for (int l = 0; l < NL; l++) for (int p = 0; p < NUM_PE; p++) begin
      cx(l, p, 1'b0, 32'h4000_0100, 0, rd);
      checks++; if (rd != {16'(l), 16'(p)}) begin failures++; $display("private RAM %0d.%0d", l, p); end
      cx(l, p, 1'b0, 32'h0000_0000, 0, rd);
      checks++; if (rd != 0) begin failures++; $display("empty ROM %0d.%0d", l, p); end
    end

    // 4. Critical section across both dies
    cx(0, 0, 1'b1, shaddr(0, 12000), 0, rd);
    cx(0, 0, 1'b0, shaddr(0, 12000), 0, rd);   // the posted write has landed
    for (int l = 0; l < NL; l++) for (int p = 0; p < NUM_PE; p++) begin
      automatic int ll = l, pp = p;
      fork crit(ll, pp); join_none
    end
    // 5. Debug masters, alongside the critical sections
    fork debug_reads(0, NUM_PE); debug_reads(1, 2); join_none
    wait fork;
    cx(1, 3, 1'b0, shaddr(0, 12000), 0, rd);
    checks++; if (rd != NL * NUM_PE * NCRIT) begin failures++; $display("counter %0d", rd); end

    $display("events: stall cycles %0d, requests down %0d up %0d, TSV stop cycles %0d, semaphore busy %0d, overflow %0d",
             n_stall, n_remote_dn, n_remote_up, n_stop, n_sem, n_ovf);
    checks++; if (n_stall == 0)     begin failures++; $display("no switch stall"); end
    checks++; if (n_remote_dn == 0) begin failures++; $display("no request from die 0 to die 1"); end
    checks++; if (n_remote_up == 0) begin failures++; $display("no request from die 1 to die 0"); end
    checks++; if (n_stop == 0)      begin failures++; $display("TSV stop never used"); end
    checks++; if (n_sem == 0)       begin failures++; $display("no semaphore contention"); end
    checks++; if (n_ovf != 0)       begin failures++; $display("receive FIFO overflow"); end
    $display("debug accesses that waited for their bus: %0d", n_dbg_wait);
    checks++; if (n_dbg_wait == 0)  begin failures++; $display("debug master never waited for its bus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
