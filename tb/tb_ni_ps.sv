// Testbench of ni_ps (PS network interface) with a real bus_ram behind
// it. Request packets from random sources (layer, PE) write and read the
// RAM; writes are posted and must get no response; every read response
// head must carry the return route to its source,
// and read data must match a reference model. The NI sits on layer 2.
// Then, with the response output held back, 16 reads (one per PE of a
// four-die stack) and 16 writes must all still be accepted within a bounded
// time, and the queued responses must come out in order once released.
module tb_ni_ps;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic iv = 1'b0, irdy, ov, ordy = 1'b0;
  flit_t inf = '0, of;
  bus_req_t breq;
  bus_rsp_t brsp;
  int checks = 0, failures = 0;
  localparam logic [1:0] MY_LAYER = 2'd2;
  logic [31:0] model [64];
  flit_t rsp_q[$];
  bit hold = 1'b0;

  ni_ps dut (.clk_i(clk), .rst_ni(rst_n), .layer_id_i(MY_LAYER),
             .in_valid_i(iv), .in_flit_i(inf), .in_ready_o(irdy),
             .out_valid_o(ov), .out_flit_o(of), .out_ready_i(ordy), .req_o(breq), .rsp_i(brsp));
  bus_ram #(.WORDS(64)) u_ram (.clk_i(clk), .rst_ni(rst_n), .req_i(breq), .rsp_o(brsp));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (ov && ordy) rsp_q.push_back(of);
    ordy <= !hold && ($urandom_range(2, 0) != 0);
  end

  function automatic logic [17:0] exp_route(int from, int to, int pe);
    logic [17:0] r; int k;
    r = '0; k = 0;
    while (from < to) begin r[k*3 +: 3] = 3'd5; k++; from++; end
    while (from > to) begin r[k*3 +: 3] = 3'd4; k++; from--; end
    r[k*3 +: 3] = 3'(pe);
    return r;
  endfunction

  task automatic send(input flit_t f);
    @(negedge clk); iv = 1'b1; inf = f;
    do @(posedge clk); while (!irdy);
    @(negedge clk); iv = 1'b0;
  endtask

  initial begin
    head_t h, rh; int a, sl, sp; bit we; logic [31:0] wd;
    for (int i = 0; i < 64; i++) model[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      h = '0; h.we = 1'b1; h.wstrb = 4'hF; h.route = 18'h6;
      send('{last: 1'b0, data: h}); send('{last: 1'b0, data: 32'(i*4)}); send('{last: 1'b1, data: '0});
    end
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(63, 0); sl = $urandom_range(3, 0); sp = $urandom_range(3, 0);
      we = 1'($urandom); wd = $urandom;
      h = '0; h.we = we; h.wstrb = 4'hF; h.src_layer = 2'(sl); h.src_pe = 2'(sp); h.route = 18'h6;
      send('{last: 1'b0, data: h});
      send('{last: !we, data: 32'h8000_0000 | 32'(a*4)});
      if (we) send('{last: 1'b1, data: wd});
      if (we) model[a] = wd;
      else begin
        wait (rsp_q.size() == 2);
        rh = head_t'(rsp_q[0].data);
        checks++;
        if (rh.route != exp_route(int'(MY_LAYER), sl, sp) || !rh.resp || rh.we || rsp_q[0].last) begin
          failures++; $display("bad response head %h", rsp_q[0].data);
        end
        checks++;
        if (rsp_q[1].data != model[a] || !rsp_q[1].last) begin failures++; $display("read %0d got %h", a, rsp_q[1].data); end
      end
      rsp_q.delete();
    end
    repeat (10) @(negedge clk);
    checks++; if (rsp_q.size() != 0) begin failures++; $display("response to a posted write"); end

    // Requests keep flowing while responses cannot leave.
    hold = 1'b1;
    repeat (3) @(negedge clk);
    begin
      longint t0;
      t0 = $time;
      for (int n = 0; n < 16; n++) begin
        h = '0; h.we = 1'b0; h.src_layer = 2'(n / 4); h.src_pe = 2'(n % 4); h.route = 18'h6;
        send('{last: 1'b0, data: h}); send('{last: 1'b1, data: 32'h8000_0000 | 32'(n*4)});
        h = '0; h.we = 1'b1; h.wstrb = 4'hF; h.route = 18'h6;
        send('{last: 1'b0, data: h}); send('{last: 1'b0, data: 32'h8000_0000 | 32'((32+n)*4)});
        send('{last: 1'b1, data: 32'(n)});
        model[32+n] = 32'(n);
      end
      checks++;
      if ($time - t0 > 16 * 12 * 10) begin failures++; $display("requests stalled behind held responses"); end
      checks++; if (rsp_q.size() != 0) begin failures++; $display("response sent while held"); end
    end
    hold = 1'b0;
    wait (rsp_q.size() == 32);
    for (int n = 0; n < 16; n++) begin
      rh = head_t'(rsp_q[2*n].data);
      checks++;
      if (rh.route != exp_route(int'(MY_LAYER), n / 4, n % 4) || !rh.resp || rsp_q[2*n].last) begin
        failures++; $display("queued response %0d: bad head %h", n, rsp_q[2*n].data);
      end
      checks++;
      if (rsp_q[2*n+1].data != model[n] || !rsp_q[2*n+1].last) begin
        failures++; $display("queued response %0d: data %h", n, rsp_q[2*n+1].data);
      end
    end
    rsp_q.delete();
    // the posted writes sent meanwhile have landed
    for (int n = 0; n < 16; n += 5) begin
      h = '0; h.we = 1'b0; h.route = 18'h6;
      send('{last: 1'b0, data: h}); send('{last: 1'b1, data: 32'h8000_0000 | 32'((32+n)*4)});
      wait (rsp_q.size() == 2);
      checks++;
      if (rsp_q[1].data != 32'(n)) begin failures++; $display("write %0d during hold lost", n); end
      rsp_q.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
