// Testbench of conn3d_macro: two macros, an upper and a lower die, joined
// by their TSV wires, each die on its own clock (same period, shifted
// phase). Random flits go down and up at the same time while the
// receiving switch ports accept one flit in eight cycles on average, slower
// than the link delivers, so the stop wire must act.
// Checked: order and data both ways, no FIFO overflow, stop seen, and
// with an always-ready receiver a stream of N flits arrives in about
// 5*N cycles (8 bits per cycle).
module tb_conn3d_macro;
  import mmc_pkg::*;
  localparam int unsigned N = 400;
  localparam int unsigned SKIP = 20;  // flits the FIFO backlog delivers faster
  logic clka = 1'b0, clkb = 1'b0, rst_n = 1'b1;
  // A = upper die, B = lower die
  logic a_dn_v, a_dn_r, a_up_v, a_up_r, b_up_v, b_up_r, b_dn_v, b_dn_r;
  flit_t a_dn_f, a_up_f, b_up_f, b_dn_f;
  logic a_rx_v, b_rx_v; flit_t a_rx_f, b_rx_f; logic a_rx_r = 1'b0, b_rx_r = 1'b0;
  logic ab_clk, ab_v, ab_sof, ab_stop, ba_clk, ba_v, ba_sof, ba_stop;
  logic [7:0] ab_d, ba_d;
  logic [1:0] a_stp, b_stp, a_ovf, b_ovf;
  logic a_src_v = 1'b0, b_src_v = 1'b0; flit_t a_src_f = '0, b_src_f = '0;
  logic a_src_r, b_src_r;
  int checks = 0, failures = 0, stops_dn = 0, stops_up = 0, ovfs = 0;
  int na = 0, nb = 0, ra = 0, rb = 0;
  bit fast = 0;
  flit_t qab[$], qba[$];

  conn3d_macro u_a (
    .clk_i(clka), .rst_ni(rst_n),
    .up_sw_valid_i(1'b0), .up_sw_flit_i('0), .up_sw_ready_o(),
    .up_sw_valid_o(), .up_sw_flit_o(), .up_sw_ready_i(1'b0),
    .dn_sw_valid_i(a_src_v), .dn_sw_flit_i(a_src_f), .dn_sw_ready_o(a_src_r),
    .dn_sw_valid_o(a_rx_v), .dn_sw_flit_o(a_rx_f), .dn_sw_ready_i(a_rx_r),
    .up_tx_clk_o(), .up_tx_valid_o(), .up_tx_sof_o(), .up_tx_data_o(), .up_tx_stop_i(1'b0),
    .up_rx_clk_i(clka), .up_rx_valid_i(1'b0), .up_rx_sof_i(1'b0), .up_rx_data_i('0), .up_rx_stop_o(),
    .dn_tx_clk_o(ab_clk), .dn_tx_valid_o(ab_v), .dn_tx_sof_o(ab_sof), .dn_tx_data_o(ab_d), .dn_tx_stop_i(ab_stop),
    .dn_rx_clk_i(ba_clk), .dn_rx_valid_i(ba_v), .dn_rx_sof_i(ba_sof), .dn_rx_data_i(ba_d), .dn_rx_stop_o(ba_stop),
    .tx_stopped_o(a_stp), .rx_overflow_o(a_ovf));
  conn3d_macro u_b (
    .clk_i(clkb), .rst_ni(rst_n),
    .up_sw_valid_i(b_src_v), .up_sw_flit_i(b_src_f), .up_sw_ready_o(b_src_r),
    .up_sw_valid_o(b_rx_v), .up_sw_flit_o(b_rx_f), .up_sw_ready_i(b_rx_r),
    .dn_sw_valid_i(1'b0), .dn_sw_flit_i('0), .dn_sw_ready_o(),
    .dn_sw_valid_o(), .dn_sw_flit_o(), .dn_sw_ready_i(1'b0),
    .up_tx_clk_o(ba_clk), .up_tx_valid_o(ba_v), .up_tx_sof_o(ba_sof), .up_tx_data_o(ba_d), .up_tx_stop_i(ba_stop),
    .up_rx_clk_i(ab_clk), .up_rx_valid_i(ab_v), .up_rx_sof_i(ab_sof), .up_rx_data_i(ab_d), .up_rx_stop_o(ab_stop),
    .dn_tx_clk_o(), .dn_tx_valid_o(), .dn_tx_sof_o(), .dn_tx_data_o(), .dn_tx_stop_i(1'b0),
    .dn_rx_clk_i(clkb), .dn_rx_valid_i(1'b0), .dn_rx_sof_i(1'b0), .dn_rx_data_i('0), .dn_rx_stop_o(),
    .tx_stopped_o(b_stp), .rx_overflow_o(b_ovf));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clka = ~clka;
  initial begin #3; forever #5 clkb = ~clkb; end

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Sources.
  always @(posedge clka) if (rst_n) begin
    if (a_src_v && a_src_r) begin qab.push_back(a_src_f); na++; end
    if (!a_src_v || a_src_r) begin a_src_v <= (na + (a_src_v && a_src_r) < 2*N); a_src_f <= '{last: 1'($urandom), data: $urandom}; end
    if (a_stp[1]) stops_dn++;
    if (a_ovf != 0) ovfs++;
  end
  always @(posedge clkb) if (rst_n) begin
    if (b_src_v && b_src_r) begin qba.push_back(b_src_f); nb++; end
    if (!b_src_v || b_src_r) begin b_src_v <= (nb + (b_src_v && b_src_r) < N); b_src_f <= '{last: 1'($urandom), data: $urandom}; end
    if (b_stp[0]) stops_up++;
    if (b_ovf != 0) ovfs++;
  end
  // Sinks.
  int t_first = -1, t_last = 0, cyc = 0;
  always @(posedge clkb) if (rst_n) begin
    cyc <= cyc + 1;
    if (b_rx_v && b_rx_r) begin
      checks++; rb++;
      if (qab.size() == 0 || b_rx_f !== qab[0]) begin failures++; $display("down flit %0d bad", rb); end
      if (qab.size() != 0) void'(qab.pop_front());
      if (rb == N + SKIP) t_first = cyc;
      if (rb > N + SKIP) t_last = cyc;
    end
    b_rx_r <= (rb >= N) ? 1'b1 : ($urandom_range(7, 0) == 0);
  end
  always @(posedge clka) if (rst_n) begin
    if (a_rx_v && a_rx_r) begin
      checks++; ra++;
      if (qba.size() == 0 || a_rx_f !== qba[0]) begin failures++; $display("up flit %0d bad", ra); end
      if (qba.size() != 0) void'(qba.pop_front());
    end
    a_rx_r <= ($urandom_range(7, 0) == 0);
  end

  initial begin
    #21 rst_n = 1'b1;
    wait (rb == 2*N && ra == N);
    checks++; if (stops_dn == 0) begin failures++; $display("downward stop never used"); end
    checks++; if (stops_up == 0) begin failures++; $display("upward stop never used"); end
    checks++; if (ovfs != 0) begin failures++; $display("fifo overflow"); end
    // second half of the downward stream had an always-ready receiver
    checks++;
    if (t_last - t_first > 5*(N-SKIP) + 4 || t_last - t_first < 5*(N-SKIP) - 4) begin
      failures++; $display("%0d flits took %0d cycles", N - SKIP, t_last - t_first);
    end
    $display("stop cycles down %0d up %0d; %0d flits in %0d cycles", stops_dn, stops_up, N - SKIP, t_last - t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
