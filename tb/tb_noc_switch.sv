// Testbench of noc_switch: every port sends random packets (1-3 flits)
// to random outputs while every output accepts at random. Checked: each
// packet arrives whole, at the output its route named, with the route
// shifted by one hop, its flits contiguous, and packets from one input to
// one output in order. Head-of-line stalls must occur and are counted.
module tb_noc_switch;
  import mmc_pkg::*;
  localparam int unsigned NP = 7, NPKT = 150;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [NP-1:0] iv = '0, ir, ov, ordy = '0, stall;
  flit_t ifl [NP];
  flit_t ofl [NP];
  int checks = 0, failures = 0, stalls = 0;

  noc_switch #(.NP(NP), .FIFO_DEPTH(2)) dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_flit_i(ifl), .in_ready_o(ir),
    .out_valid_o(ov), .out_flit_o(ofl), .out_ready_i(ordy), .stall_o(stall));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Head: [31:14] route (the hop here is repeated as the next hop, so the
  // output can be checked after the shift), [13:11] source, [10:0] sequence.
  // Body: [31:29] source, [28:18] sequence, [17:16] index.
  int sent [NP], rcvd = 0, total_len = 0;
  int len_q [NP], idx_q [NP];
  logic [17:0] route_q [NP];
  int last_seq [NP][NP];
  int cur_src [NP], cur_seq [NP], cur_idx [NP];
  bit in_pkt [NP];

  function automatic flit_t mk(int s, int seq, int idx, int len, logic [17:0] rt);
    flit_t f;
    f.last = (idx == len - 1);
    if (idx == 0) f.data = {rt, 3'(s), 11'(seq)};
    else          f.data = {3'(s), 11'(seq), 2'(idx), 16'h0};
    return f;
  endfunction

  for (genvar i = 0; i < NP; i++) begin : g_src
    always @(posedge clk) begin
      if (!rst_n) begin
        sent[i] = 0; idx_q[i] = 0; iv[i] <= 1'b0;
      end else begin
        if (iv[i] && ir[i]) begin
          idx_q[i]++;
          if (idx_q[i] == len_q[i]) begin sent[i]++; idx_q[i] = 0; end
        end
        if (idx_q[i] == 0 && (!iv[i] || ir[i])) begin
          if (sent[i] < NPKT) begin
            len_q[i]   = $urandom_range(3, 1);
            begin
              logic [2:0] d;
              d = 3'($urandom_range(NP-1, 0));
              route_q[i] = {12'($urandom), d, d};
            end
            total_len += len_q[i];
          end
        end
        iv[i]  <= (sent[i] < NPKT);
        ifl[i] <= mk(i, sent[i], idx_q[i], len_q[i], route_q[i]);
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_sink
    always @(posedge clk) begin
      if (!rst_n) begin
        in_pkt[o] = 0; ordy[o] <= 1'b0;
      end else begin
        if (ov[o] && ordy[o]) begin
          rcvd++;
          checks++;
          if (!in_pkt[o]) begin
            cur_src[o] = int'(ofl[o].data[13:11]);
            cur_seq[o] = int'(ofl[o].data[10:0]);
            cur_idx[o] = 0;
            if (ofl[o].data[31:29] != 3'b000 || ofl[o].data[16:14] != 3'(o)) begin
              failures++; $display("out %0d: head %h misrouted or not shifted", o, ofl[o].data);
            end
            if (cur_seq[o] <= last_seq[cur_src[o]][o]) begin failures++; $display("order %0d->%0d", cur_src[o], o); end
            last_seq[cur_src[o]][o] = cur_seq[o];
          end else begin
            cur_idx[o]++;
            if (ofl[o].data[31:16] != {3'(cur_src[o]), 11'(cur_seq[o]), 2'(cur_idx[o])}) begin
              failures++; $display("out %0d: foreign flit %h", o, ofl[o].data);
            end
          end
          in_pkt[o] = !ofl[o].last;
        end
        ordy[o] <= ($urandom_range(3, 0) != 0);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NP; i++) if (stall[i]) stalls++;
    end
  end

  initial begin
    for (int a = 0; a < NP; a++) for (int b = 0; b < NP; b++) last_seq[a][b] = -1;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    wait (sent[0] == NPKT && sent[1] == NPKT && sent[2] == NPKT && sent[3] == NPKT &&
          sent[4] == NPKT && sent[5] == NPKT && sent[6] == NPKT);
    repeat (200) @(negedge clk);
    checks++; if (rcvd != total_len) begin failures++; $display("rcvd %0d of %0d flits", rcvd, total_len); end
    checks++; if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
