// Testbench of dc_fifo: random writes (throttled by almost-full) and
// random reads in two unrelated clocks; order and data are checked
// against a queue. Finally the reader stops and the writer ignores
// almost-full, which must raise the overflow flag only once the FIFO is
// full, after exactly DEPTH writes.
module tb_dc_fifo;
  localparam int unsigned W = 33, D = 8;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b1;
  logic wvalid = 1'b0, afull, ovf, rvalid, rready = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, nw = 0, nr = 0, afull_seen = 0;
  bit flood = 0;

  dc_fifo #(.WIDTH(W), .DEPTH(D), .MARGIN(3)) dut (
    .wclk_i(wclk), .wrst_ni(rst_n), .wvalid_i(wvalid), .wdata_i(wdata),
    .walmost_full_o(afull), .woverflow_o(ovf),
    .rclk_i(rclk), .rrst_ni(rst_n), .rvalid_o(rvalid), .rdata_o(rdata), .rready_i(rready));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Writer.
  always @(posedge wclk) begin
    if (rst_n && !flood) begin
      if (wvalid) begin q.push_back(wdata); nw++; end
      if (afull) afull_seen++;
      wvalid <= (nw < 2000) && !afull && ($urandom_range(3, 0) != 0);
      wdata  <= {1'($urandom), 32'($urandom)};
    end
  end

  // Reader.
  always @(posedge rclk) begin
    if (rst_n && !flood) begin
      if (rvalid && rready) begin
        checks++; nr++;
        if (q.size() == 0 || rdata !== q[0]) begin
          failures++; $display("read %0d: got %h", nr, rdata);
        end
        if (q.size() != 0) void'(q.pop_front());
      end
      rready <= ($urandom_range(2, 0) != 0);
    end
  end

  initial begin
    int n;
    #33 rst_n = 1'b1;
    wait (nw >= 2000);
    // Drain.
    repeat (80) @(posedge rclk);
    flood = 1;
    @(posedge rclk); rready <= 1'b0;
    checks++; if (nr != nw) begin failures++; $display("wrote %0d read %0d", nw, nr); end
    @(negedge wclk); wvalid = 1'b1;
    n = 0;
    while (!ovf && n < 50) begin @(negedge wclk); n++; end
    wvalid = 1'b0;
    checks++; if (n != D) begin failures++; $display("overflow after %0d writes", n); end
    checks++; if (afull_seen == 0) begin failures++; $display("almost full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
