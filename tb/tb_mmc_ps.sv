// Testbench of mmc_ps: request packets write and read the shared RAM and
// test-and-set the semaphores; responses are checked against reference
// models, and a taken semaphore must raise sem_busy_o. Meanwhile the
// debug master reads the upper half of the RAM, which the packets leave
// alone after the first pass; its data must be right and it must sometimes
// wait for the bus.
module tb_mmc_ps;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic iv = 1'b0, irdy, ov, ordy = 1'b0, semb;
  flit_t inf = '0, of;
  int checks = 0, failures = 0, busy_seen = 0, exp_busy = 0;
  logic [31:0] model [128];
  logic sem [32];
  flit_t rsp_q[$];
  bus_req_t dreq = '0;
  bus_rsp_t drsp;
  bit rnd_on = 1'b0;
  int dbg_wait = 0, dbg_reads = 0;

  mmc_ps #(.SHARED_WORDS(128), .NUM_SEM(32)) dut (
    .clk_i(clk), .rst_ni(rst_n), .layer_id_i(2'd0),
    .in_valid_i(iv), .in_flit_i(inf), .in_ready_o(irdy),
    .out_valid_o(ov), .out_flit_o(of), .out_ready_i(ordy),
    .dbg_req_i(dreq), .dbg_rsp_o(drsp), .sem_busy_o(semb));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (ov && ordy) rsp_q.push_back(of);
    if (semb) busy_seen++;
    ordy <= ($urandom_range(2, 0) != 0);
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input flit_t f);
    @(negedge clk); iv = 1'b1; inf = f;
    do @(posedge clk); while (!irdy);
    @(negedge clk); iv = 1'b0;
  endtask

  task automatic access(input bit we, input logic [31:0] addr, input logic [31:0] wd, output logic [31:0] rd);
    head_t h;
    h = '0; h.we = we; h.wstrb = 4'hF; h.route = 18'h6;
    send('{last: 1'b0, data: h});
    send('{last: !we, data: addr});
    if (we) send('{last: 1'b1, data: wd});
    if (!we) wait (rsp_q.size() == 2);
    rd = we ? '0 : rsp_q[1].data;
    rsp_q.delete();
  endtask

  initial begin
    int w, lat;
    wait (rnd_on);
    while (rnd_on) begin
      w = $urandom_range(127, 64);
      @(negedge clk);
      dreq = '{req: 1'b1, we: 1'b0, addr: 32'h8000_0000 | 32'(w*4), wdata: '0, wstrb: '0};
      lat = 0;
      do begin @(negedge clk); lat++; end while (!drsp.ready);
      dreq.req = 1'b0;
      dbg_reads++;
      checks++; if (drsp.rdata != model[w]) begin failures++; $display("debug ram %0d %h", w, drsp.rdata); end
      if (lat > 1) dbg_wait++;
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
  end

  initial begin
    logic [31:0] rd, wd; int a;
    for (int i = 0; i < 32; i++) sem[i] = 1'b0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 128; i++) begin model[i] = $urandom; access(1'b1, 32'h8000_0000 | 32'(i*4), model[i], rd); end
    rnd_on = 1'b1;
    for (int n = 0; n < 400; n++) begin
      a = $urandom_range(63, 0);
      case ($urandom_range(3, 0))
        0: begin access(1'b0, 32'h8000_0000 | 32'(a*4), '0, rd);
                 checks++; if (rd != model[a]) begin failures++; $display("ram %0d %h", a, rd); end end
        1: begin wd = $urandom; model[a] = wd; access(1'b1, 32'h8000_0000 | 32'(a*4), wd, rd); end
        2: begin a = a % 32; access(1'b0, 32'h8080_0000 | 32'(a*4), '0, rd);
                 checks++; if (rd != {31'b0, sem[a]}) begin failures++; $display("sem %0d %h", a, rd); end
                 if (sem[a]) exp_busy++;
                 sem[a] = 1'b1; end
        default: begin a = a % 32; sem[a] = 1'b0; access(1'b1, 32'h8080_0000 | 32'(a*4), '0, rd); end
      endcase
    end
    rnd_on = 1'b0;
    repeat (5) @(negedge clk);
    $display("debug reads %0d, of which waited %0d", dbg_reads, dbg_wait);
    checks++; if (dbg_wait == 0) begin failures++; $display("debug master never waited"); end
    checks++; if (busy_seen != exp_busy) begin failures++; $display("busy %0d exp %0d", busy_seen, exp_busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
