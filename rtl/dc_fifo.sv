// dc_fifo: dual-clock FIFO that moves received flits from the forwarded
// clock of the sending layer into the clock of the receiving layer.
//
// Classic asynchronous FIFO: binary pointers one bit wider than the
// address, exchanged between the domains in Gray code through two-flop
// synchronisers. The write side has no ready: the sender is throttled
// instead by walmost_full_o, raised while the (conservative) fill level
// seen from the write side is at least DEPTH - MARGIN, and carried back
// to the sender on a TSV. woverflow_o flags a write into a full FIFO
// (the flit is dropped); with a correct MARGIN it never happens. The read
// side is valid/ready with data read combinationally from the array.
// DEPTH must be a power of two. Depth, margin and the pointer scheme are
// this design's choices.
module dc_fifo #(
  parameter int unsigned WIDTH  = 33,
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned MARGIN = 3
) (
  input  logic             wclk_i,
  input  logic             wrst_ni,
  input  logic             wvalid_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic             walmost_full_o,
  output logic             woverflow_o,
  input  logic             rclk_i,
  input  logic             rrst_ni,
  output logic             rvalid_o,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             rready_i
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_s1_q, rgray_s2_q, wgray_s1_q, wgray_s2_q;
  logic [AW:0] rbin_w, wlevel;
  logic        full, push;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write domain.
  assign rbin_w         = g2b(rgray_s2_q);
  assign wlevel         = wbin_q - rbin_w;
  assign full           = (wlevel == (AW+1)'(DEPTH));
  assign push           = wvalid_i && !full;
  assign walmost_full_o = (wlevel >= (AW+1)'(DEPTH - MARGIN));
  assign woverflow_o    = wvalid_i && full;

  always_ff @(posedge wclk_i) begin
    if (push) mem[wbin_q[AW-1:0]] <= wdata_i;
  end

  always_ff @(posedge wclk_i or negedge wrst_ni) begin
    if (!wrst_ni) begin
      wbin_q     <= '0;
      wgray_q    <= '0;
      rgray_s1_q <= '0;
      rgray_s2_q <= '0;
    end else begin
      rgray_s1_q <= rgray_q;
      rgray_s2_q <= rgray_s1_q;
      if (push) begin
        wbin_q  <= wbin_q + 1'b1;
        wgray_q <= (wbin_q + 1'b1) ^ ((wbin_q + 1'b1) >> 1);
      end
    end
  end

  // Read domain.
  assign rvalid_o = (rgray_q != wgray_s2_q);
  assign rdata_o  = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rclk_i or negedge rrst_ni) begin
    if (!rrst_ni) begin
      rbin_q     <= '0;
      rgray_q    <= '0;
      wgray_s1_q <= '0;
      wgray_s2_q <= '0;
    end else begin
      wgray_s1_q <= wgray_q;
      wgray_s2_q <= wgray_s1_q;
      if (rvalid_o && rready_i) begin
        rbin_q  <= rbin_q + 1'b1;
        rgray_q <= (rbin_q + 1'b1) ^ ((rbin_q + 1'b1) >> 1);
      end
    end
  end
endmodule
