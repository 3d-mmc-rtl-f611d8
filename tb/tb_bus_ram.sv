// Testbench of bus_ram: random byte-strobed writes and reads against a
// reference array, and the one-cycle response latency.
module tb_bus_ram;
  import mmc_pkg::*;
  localparam int unsigned WORDS = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];

  bus_ram #(.WORDS(WORDS)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  `include "bus_tasks.svh"

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] rd, wd; int lat; logic [3:0] st; int a;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      wd = $urandom; model[i] = wd;
      bus_xfer(1'b1, 32'h4000_0000 + 32'(i*4), wd, 4'hF, rd, lat);
      checks++; if (lat != 1) begin failures++; $display("write latency %0d", lat); end
    end
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(WORDS-1, 0);
      if ($urandom_range(1, 0) == 1) begin
        wd = $urandom; st = 4'($urandom);
        for (int b = 0; b < 4; b++) if (st[b]) model[a][b*8 +: 8] = wd[b*8 +: 8];
        bus_xfer(1'b1, 32'(a*4), wd, st, rd, lat);
      end else begin
        bus_xfer(1'b0, 32'(a*4), 32'h0, 4'h0, rd, lat);
        checks++;
        if (rd !== model[a] || lat != 1) begin
          failures++; $display("read %0d got %h exp %h lat %0d", a, rd, model[a], lat);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
