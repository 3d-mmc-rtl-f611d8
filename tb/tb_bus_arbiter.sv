// Testbench of bus_arbiter: two masters share a bus_ram. Each master makes
// random reads and writes to its own half of the RAM, holding req until it
// sees ready, and checks every read against its own reference model.
// Checked besides data: a lone master gets ready one cycle after req (the
// arbiter adds no cycle); with both masters always requesting, grants
// alternate, so both complete the same number of accesses to within one;
// a ready never goes to both masters.
module tb_bus_arbiter;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t mreq [2];
  bus_rsp_t mrsp [2];
  bus_req_t sreq;
  bus_rsp_t srsp;
  int checks = 0, failures = 0;
  logic [31:0] model [2][32];
  int done [2];

  bus_arbiter #(.NM(2)) dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(mreq), .m_rsp_o(mrsp),
                             .s_req_o(sreq), .s_rsp_i(srsp));
  bus_ram #(.WORDS(64)) u_ram (.clk_i(clk), .rst_ni(rst_n), .req_i(sreq), .rsp_o(srsp));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // A response goes to one master only.
  always @(posedge clk) if (rst_n && mrsp[0].ready && mrsp[1].ready) begin
    failures++; $display("ready to both masters");
  end

  task automatic xfer(input int m, input bit we, input int w, input logic [31:0] wd,
                      output logic [31:0] rd, output int lat);
    @(negedge clk);
    mreq[m] = '{req: 1'b1, we: we, addr: 32'h4000_0000 | 32'((m*32 + w) * 4), wdata: wd, wstrb: 4'hF};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!mrsp[m].ready);
    rd = mrsp[m].rdata;
    mreq[m].req = 1'b0;
    done[m]++;
  endtask

  task automatic master(input int m, input int n, input bit dense);
    logic [31:0] rd, wd; int w, lat; bit we;
    for (int i = 0; i < n; i++) begin
      w = $urandom_range(31, 0); we = 1'($urandom); wd = $urandom;
      xfer(m, we, w, wd, rd, lat);
      if (we) model[m][w] = wd;
      else begin
        checks++;
        if (rd != model[m][w]) begin failures++; $display("master %0d word %0d: %h", m, w, rd); end
      end
      if (!dense) repeat ($urandom_range(3, 0)) @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] rd; int lat;
    mreq[0] = '0; mreq[1] = '0; done = '{0, 0};
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 32; w++) begin xfer(m, 1'b1, w, 32'(m * 1000 + w), rd, lat); model[m][w] = 32'(m * 1000 + w); end

    // A lone master: one cycle.
    for (int m = 0; m < 2; m++) begin
      repeat (2) @(negedge clk);
      xfer(m, 1'b0, 5, 0, rd, lat);
      checks++;
      if (lat != 1 || rd != model[m][5]) begin failures++; $display("lone master %0d: latency %0d data %h", m, lat, rd); end
    end

    // Both masters, random spacing.
    fork master(0, 300, 1'b0); master(1, 300, 1'b0); join

    // Both masters back to back: fair sharing.
    done = '{0, 0};
    fork master(0, 200, 1'b1); master(1, 10000, 1'b1); join_any
    disable fork;
    checks++;
    if (done[1] < 199 || done[1] > 201) begin failures++; $display("unfair: %0d against 200", done[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
