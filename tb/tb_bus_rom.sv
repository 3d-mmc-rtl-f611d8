// Testbench of bus_rom: reads a small image back, checks that writes do
// not change it, that unloaded words read zero and the latency.
module tb_bus_rom;
  import mmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] exp_img [5] = '{32'h0badc0de, 32'h12345678, 32'hdeadbeef, 32'h00000001, 32'ha5a5a5a5};

  bus_rom #(.WORDS(16), .INIT_FILE("tb/rom_test.hex")) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  `include "bus_tasks.svh"

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] rd; int lat;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    bus_xfer(1'b1, 32'h8, 32'h0, 4'hF, rd, lat);   // must be ignored
    for (int i = 0; i < 5; i++) begin
      bus_xfer(1'b0, 32'(i*4), 32'h0, 4'h0, rd, lat);
      checks++;
      if (rd !== exp_img[i] || lat != 1) begin failures++; $display("rom[%0d]=%h lat %0d", i, rd, lat); end
    end
    for (int i = 5; i < 16; i++) begin
      bus_xfer(1'b0, 32'(i*4), 32'h0, 4'h0, rd, lat);
      checks++; if (rd !== 32'h0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
