// Testbench of semaphore_bank: test-and-set returns the old value and
// takes the semaphore, a write of 0 releases it, semaphores are
// independent, and a contended read raises busy_read_o.
module tb_semaphore_bank;
  import mmc_pkg::*;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b1;
  bus_req_t req = '0;
  bus_rsp_t rsp;
  logic busy;
  int checks = 0, failures = 0, busy_seen = 0;
  logic model [N];

  semaphore_bank #(.NUM_SEM(N)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .busy_read_o(busy));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_seen++;
  `include "bus_tasks.svh"

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] rd; int lat, s, exp_busy;
    exp_busy = 0;
    for (int i = 0; i < N; i++) model[i] = 1'b0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      s = $urandom_range(N-1, 0);
      if ($urandom_range(2, 0) != 0) begin
        bus_xfer(1'b0, 32'h8080_0000 + 32'(s*4), 32'h0, 4'h0, rd, lat);
        checks++;
        if (rd !== {31'b0, model[s]} || lat != 1) begin
          failures++; $display("sem %0d got %0d exp %0d", s, rd, model[s]);
        end
        if (model[s]) exp_busy++;
        model[s] = 1'b1;
      end else begin
        bus_xfer(1'b1, 32'h8080_0000 + 32'(s*4), 32'h0, 4'hF, rd, lat);
        model[s] = 1'b0;
      end
    end
    checks++; if (busy_seen != exp_busy) begin failures++; $display("busy %0d exp %0d", busy_seen, exp_busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
