// Testbench of mmc_pe. The PE's network port is looped straight into a
// PS network interface with a shared RAM behind it, so shared-memory
// accesses make a full request/response round trip. Checked against
// reference models: boot ROM contents, private RAM, shared RAM, and the
// default answer for unmapped addresses; private RAM latency is one cycle.
// During the random phase the debug master reads the boot ROM at the same
// time; its data must be right and it must sometimes wait for the bus.
module tb_mmc_pe;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  bus_req_t dreq = '0;
  bus_rsp_t drsp;
  bit rnd_done = 1'b0;
  int dbg_wait = 0;
  logic ov, ordy, iv, irdy, remote;
  flit_t of, inf;
  bus_req_t sreq;
  bus_rsp_t srsp;
  int checks = 0, failures = 0;
  logic [31:0] priv [256];
  logic [31:0] shr  [256];
  logic [31:0] rom_img [5] = '{32'h0badc0de, 32'h12345678, 32'hdeadbeef, 32'h00000001, 32'ha5a5a5a5};

  mmc_pe #(.PRIV_WORDS(256), .ROM_WORDS(16), .ROM_FILE("tb/rom_test.hex")) dut (
    .clk_i(clk), .rst_ni(rst_n), .layer_id_i(2'd0), .pe_id_i(2'd1),
    .core_req_i(req), .core_rsp_o(rsp), .dbg_req_i(dreq), .dbg_rsp_o(drsp),
    .out_valid_o(ov), .out_flit_o(of), .out_ready_i(ordy),
    .in_valid_i(iv), .in_flit_i(inf), .in_ready_o(irdy), .remote_o(remote));

  ni_ps u_ps (.clk_i(clk), .rst_ni(rst_n), .layer_id_i(2'd0),
    .in_valid_i(ov), .in_flit_i(of), .in_ready_o(ordy),
    .out_valid_o(iv), .out_flit_o(inf), .out_ready_i(irdy), .req_o(sreq), .rsp_i(srsp));
  bus_ram #(.WORDS(256)) u_shr (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq), .rsp_o(srsp));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  `include "bus_tasks.svh"

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Debug master: ROM reads while the core runs its random phase.
  initial begin
    int i, lat;
    wait (rst_n);
    wait (checks > 261);
    while (!rnd_done) begin
      i = $urandom_range(4, 0);
      @(negedge clk);
      dreq = '{req: 1'b1, we: 1'b0, addr: 32'(i*4), wdata: '0, wstrb: '0};
      lat = 0;
      do begin @(negedge clk); lat++; end while (!drsp.ready);
      dreq.req = 1'b0;
      checks++; if (drsp.rdata != rom_img[i]) begin failures++; $display("debug rom %0d %h", i, drsp.rdata); end
      if (lat > 1) dbg_wait++;
    end
  end

  initial begin
    logic [31:0] rd, wd; int lat, a;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      bus_xfer(1'b0, 32'(i*4), '0, '0, rd, lat);
      checks++; if (rd != rom_img[i]) begin failures++; $display("rom %0d %h", i, rd); end
    end
    for (int i = 0; i < 256; i++) begin
      priv[i] = $urandom; shr[i] = $urandom;
      bus_xfer(1'b1, 32'h4000_0000 | 32'(i*4), priv[i], 4'hF, rd, lat);
      checks++; if (lat != 1) begin failures++; $display("private latency %0d", lat); end
      bus_xfer(1'b1, 32'h8000_0000 | 32'(i*4), shr[i], 4'hF, rd, lat);
    end
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(255, 0);
      case ($urandom_range(3, 0))
        0: begin bus_xfer(1'b0, 32'h4000_0000 | 32'(a*4), '0, '0, rd, lat);
                 checks++; if (rd != priv[a]) begin failures++; $display("priv %0d %h", a, rd); end end
        1: begin bus_xfer(1'b0, 32'h8000_0000 | 32'(a*4), '0, '0, rd, lat);
                 checks++; if (rd != shr[a]) begin failures++; $display("shr %0d %h", a, rd); end end
        2: begin wd = $urandom; shr[a] = wd; bus_xfer(1'b1, 32'h8000_0000 | 32'(a*4), wd, 4'hF, rd, lat); end
        default: begin bus_xfer(1'b0, 32'hC000_0000 | 32'(a*4), '0, '0, rd, lat);
                 checks++; if (rd != 0 || lat < 1) begin failures++; $display("unmapped"); end end
      endcase
    end
    rnd_done = 1'b1;
    repeat (5) @(negedge clk);
    checks++; if (dbg_wait == 0) begin failures++; $display("debug master never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
