// Testbench of ni_pe (PE network interface). The testbench plays the
// network and the remote memory: it collects each request packet with
// random back-pressure, checks its head (route, source, write flag,
// strobes), address and data, and answers after a random delay with a
// response packet. Read data returned to the core and the number of
// remote requests are checked. The NI sits on layer 1, port 2.
module tb_ni_pe;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic ov, ordy = 1'b0, iv = 1'b0, irdy, remote;
  flit_t of, inf = '0;
  int checks = 0, failures = 0, remotes = 0, exp_remotes = 0;
  localparam logic [1:0] MY_LAYER = 2'd1, MY_PE = 2'd2;

  ni_pe dut (.clk_i(clk), .rst_ni(rst_n), .layer_id_i(MY_LAYER), .pe_id_i(MY_PE),
             .req_i(req), .rsp_o(rsp), .out_valid_o(ov), .out_flit_o(of), .out_ready_i(ordy),
             .in_valid_i(iv), .in_flit_i(inf), .in_ready_o(irdy), .remote_o(remote));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  always @(posedge clk) if (remote) remotes++;
  `include "bus_tasks.svh"

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [17:0] exp_route(int from, int to);
    logic [17:0] r; int k;
    r = '0; k = 0;
    while (from < to) begin r[k*3 +: 3] = 3'd5; k++; from++; end
    while (from > to) begin r[k*3 +: 3] = 3'd4; k++; from--; end
    r[k*3 +: 3] = 3'd6;
    return r;
  endfunction

  // Network side: receive one request packet, then reply.
  flit_t pkt[$];
  always @(posedge clk) begin
    if (ov && ordy) pkt.push_back(of);
    ordy <= ($urandom_range(2, 0) != 0);
  end

  task automatic reply(input logic [31:0] rdata);
    repeat ($urandom_range(5, 0)) @(negedge clk);
    iv = 1'b1; inf = '{last: 1'b0, data: 32'h0000_0100};
    do @(posedge clk); while (!irdy);
    @(negedge clk);
    inf = '{last: 1'b1, data: rdata};
    do @(posedge clk); while (!irdy);
    @(negedge clk);
    iv = 1'b0;
  endtask

  initial begin
    logic [31:0] rd, addr, wd, exp_rd; int lat, tl; bit we; logic [3:0] st;
    head_t h;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      tl = $urandom_range(3, 0);
      we = 1'($urandom);
      addr = {6'b100000, 2'(tl), 16'b0, 8'($urandom) & 8'hFC};
      wd = $urandom; st = we ? 4'($urandom) : 4'h0;
      exp_rd = $urandom;
      if (tl != int'(MY_LAYER)) exp_remotes++;
      fork
        bus_xfer(we, addr, wd, st, rd, lat);
        begin
          wait (pkt.size() == (we ? 3 : 2));
          h = head_t'(pkt[0].data);
          checks++;
          if (h.route != exp_route(int'(MY_LAYER), tl) || h.src_layer != MY_LAYER || h.src_pe != MY_PE ||
              h.we != we || h.resp || h.wstrb != st || pkt[0].last) begin
            failures++; $display("bad head %h for layer %0d", pkt[0].data, tl);
          end
          checks++;
          if (pkt[1].data != addr || pkt[1].last != !we) begin failures++; $display("bad addr flit"); end
          if (we) begin
            checks++; if (pkt[2].data != wd || !pkt[2].last) begin failures++; $display("bad data flit"); end
          end
          pkt.delete();
          if (!we) reply(exp_rd);
        end
      join
      if (!we) begin
        checks++; if (rd != exp_rd) begin failures++; $display("read %h exp %h", rd, exp_rd); end
      end
    end
    checks++; if (remotes != exp_remotes) begin failures++; $display("remote %0d exp %0d", remotes, exp_remotes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
