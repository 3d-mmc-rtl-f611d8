// Four-die stack: mmc3d_top with NUM_LAYERS = 4, the largest stack the
// 2-bit LayerID can number. Each die has its own PLL model with its own
// phase.
//  1. The dies must number themselves 0..3 from the top.
//  2. Every core of every die writes a block of words into the shared
//     memory of every die (up to three vertical hops, through the switches
//     of the dies in between), then reads all of it back. All 16 cores run
//     at once, so packets pass through middle dies in both directions while
//     those dies' own traffic competes for the same switch ports.
//  3. All 16 cores increment one counter on the bottom die inside a
//     critical section guarded by a semaphore of that die; the count must
//     be exact.
// Requests must be seen crossing the vertical links in both directions;
// receive FIFOs must never overflow.
module tb_stack4;
  import mmc_pkg::*;
  localparam int unsigned NL = 4, NW = 16, NCRIT = 4;
  localparam realtime PHASE [NL] = '{0.3ns, 0.9ns, 0.1ns, 0.6ns};

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
  int n_remote [NL];
  int n_ovf = 0;

  mmc3d_top #(.NUM_LAYERS(NL)) dut (
    .clk_pad_i(clk_pad), .rst_ni(rst_n), .id_pad_i(2'b00), .id_pad_sel_i(1'b1),
    .pll_ref_o(pll_ref), .pll_clk_i(pll_clk), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .dbg_req_i(dbg_req), .dbg_rsp_o(dbg_rsp),
    .layer_id_o(lid), .stat_o(st));

  for (genvar l = 0; l < NL; l++) begin : g_pll
    pll_model #(.DELAY(PHASE[l])) u_pll (.ref_i(pll_ref[l]), .clk_o(pll_clk[l]));
    initial n_remote[l] = 0;
    always @(posedge pll_clk[l]) begin
      if (rst_n) begin
        if (st[l].remote != '0) n_remote[l]++;
        if (st[l].rx_overflow != '0) n_ovf++;
      end
    end
  end

  always #1.25 clk_pad = ~clk_pad;   // 400 MHz
  initial #1 rst_n = 1'b0;           // a falling edge resets even the unclocked domains

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_neg(input int l);
    case (l)
      0: @(negedge pll_clk[0]);
      1: @(negedge pll_clk[1]);
      2: @(negedge pll_clk[2]);
      default: @(negedge pll_clk[3]);
    endcase
  endtask

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

  function automatic logic [31:0] shaddr(int layer, int word);
    return 32'h8000_0000 | (32'(layer) << 24) | 32'(word * 4);
  endfunction

  function automatic logic [31:0] pattern(int l, int p, int t, int i);
    return {4'(l), 4'(p), 4'(t), 4'h9, 16'(i * 2654435761)};
  endfunction

  // Core (l, p) owns words (l*NUM_PE + p)*NW .. +NW-1 of every die.
  task automatic all_to_all(input int l, input int p);
    logic [31:0] rd;
    int base;
    base = (l * NUM_PE + p) * NW;
    for (int t = 0; t < NL; t++) begin
      automatic int tt = (l + 1 + t) % NL;   // start with a neighbour, end local
      for (int i = 0; i < NW; i++) cx(l, p, 1'b1, shaddr(tt, base + i), pattern(l, p, tt, i), rd);
    end
    for (int t = 0; t < NL; t++)
      for (int i = 0; i < NW; i++) begin
        cx(l, p, 1'b0, shaddr(t, base + i), 0, rd);
        checks++;
        if (rd != pattern(l, p, t, i)) begin
          failures++; $display("core %0d.%0d die %0d word %0d: %h", l, p, t, i, rd);
        end
      end
  endtask

  task automatic crit(input int l, input int p);
    logic [31:0] rd, cnt;
    for (int k = 0; k < NCRIT; k++) begin
      do cx(l, p, 1'b0, 32'h8380_0004, 0, rd); while (rd[0]);  // semaphore 1 of die 3
      cx(l, p, 1'b0, shaddr(3, 10000), 0, cnt);
      cx(l, p, 1'b1, shaddr(3, 10000), cnt + 1, rd);
      cx(l, p, 1'b1, 32'h8380_0004, 0, rd);
    end
  endtask

  initial begin
    logic [31:0] rd;
    foreach (core_req[l, p]) core_req[l][p] = '0;
    foreach (dbg_req[l, m]) dbg_req[l][m] = '0;
    #20 rst_n = 1'b1;
    repeat (20) wait_neg(0);
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (lid[l] != ID_W'(l)) begin failures++; $display("die %0d LayerID %0d", l, lid[l]); end
    end

    for (int l = 0; l < NL; l++)
      for (int p = 0; p < NUM_PE; p++) begin
        automatic int ll = l, pp = p;
        fork all_to_all(ll, pp); join_none
      end
    wait fork;

    cx(0, 0, 1'b1, shaddr(3, 10000), 0, rd);
    cx(0, 0, 1'b0, shaddr(3, 10000), 0, rd);   // the posted write has landed
    for (int l = 0; l < NL; l++)
      for (int p = 0; p < NUM_PE; p++) begin
        automatic int ll = l, pp = p;
        fork crit(ll, pp); join_none
      end
    wait fork;
    cx(0, 0, 1'b0, shaddr(3, 10000), 0, rd);
    checks++;
    if (rd != NL * NUM_PE * NCRIT) begin failures++; $display("counter %0d, expected %0d", rd, NL * NUM_PE * NCRIT); end

    $display("remote request cycles per die: %0d %0d %0d %0d; overflow %0d",
             n_remote[0], n_remote[1], n_remote[2], n_remote[3], n_ovf);
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (n_remote[l] == 0) begin failures++; $display("die %0d sent no remote request", l); end
    end
    checks++; if (n_ovf != 0) begin failures++; $display("receive FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
