// noc_switch: source-routed wormhole switch of one layer.
//
// NPORTS ports, coded as in mmc_pkg::port_e: four horizontal directions
// (N, E, S, W) serving the four PEs, Up and Down serving the 3D macro,
// and Local serving the PS. Every input has a FIFO_DEPTH-entry buffer.
// A packet's head flit carries its route: the low 3 bits of the route
// field (head bits [16:14]) name the output to take here, and the switch
// shifts the route down by one hop as it forwards the head, so the next
// switch finds its own hop in the same place. Each output is granted
// round-robin among the heads that want it and stays locked to that input
// until the packet's last flit has passed (wormhole switching). Output
// valid/flit are combinational from the input buffers; input ready is the
// buffer's "not full". stall_o[i] is high while input i holds a head that
// cannot advance. Buffering, arbitration and wormhole locking are this
// design's choices; source routing and the six directions follow the
// original description.
module noc_switch
  import mmc_pkg::*;
#(
  parameter int unsigned NP         = NPORTS,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [NP-1:0] in_valid_i,
  input  flit_t         in_flit_i  [NP],
  output logic [NP-1:0] in_ready_o,
  output logic [NP-1:0] out_valid_o,
  output flit_t         out_flit_o [NP],
  input  logic [NP-1:0] out_ready_i,
  output logic [NP-1:0] stall_o
);
  localparam int unsigned IW = $clog2(NP);
  localparam int unsigned RT_LSB = DATA_W - MAX_HOPS*HOP_W;  // route field LSB in the head

  logic [NP-1:0] bv;                 // buffer has a flit
  flit_t         bf      [NP];       // flit at buffer head
  logic [NP-1:0] bpop;
  logic [NP-1:0] is_head_q;          // next flit of input i starts a packet
  logic [IW-1:0] dest_q  [NP];       // output held by input i's packet
  logic [IW-1:0] want    [NP];       // output input i asks for
  logic [NP-1:0] lock_q;             // output o is inside a packet
  logic [IW-1:0] owner_q [NP];
  logic [IW-1:0] rr_q    [NP];
  logic [NP-1:0] gvalid;             // output o has a granted input
  logic [IW-1:0] gsel    [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_buf (
      .clk_i, .rst_ni,
      .in_valid_i (in_valid_i[i]), .in_data_i (in_flit_i[i]), .in_ready_o (in_ready_o[i]),
      .out_valid_o(bv[i]),         .out_data_o(bf[i]),        .out_ready_i(bpop[i])
    );
    assign want[i] = is_head_q[i] ? IW'(bf[i].data[RT_LSB +: HOP_W]) : dest_q[i];
  end

  // Per-output arbitration.
  always_comb begin
    logic [IW-1:0] c;
    c = '0;
    for (int o = 0; o < NP; o++) begin
      gvalid[o] = 1'b0;
      gsel[o]   = '0;
      if (lock_q[o]) begin
        gsel[o]   = owner_q[o];
        gvalid[o] = bv[owner_q[o]] && !is_head_q[owner_q[o]];
      end else begin
        for (int k = 1; k <= NP; k++) begin
          c = IW'((int'(rr_q[o]) + k) % NP);
          if (!gvalid[o] && bv[c] && is_head_q[c] && want[c] == IW'(o)) begin
            gvalid[o] = 1'b1;
            gsel[o]   = c;
          end
        end
      end
    end
  end

  always_comb begin
    bpop = '0;
    for (int o = 0; o < NP; o++) begin
      out_valid_o[o] = gvalid[o];
      out_flit_o[o]  = bf[gsel[o]];
      if (is_head_q[gsel[o]])
        out_flit_o[o].data[RT_LSB +: MAX_HOPS*HOP_W] =
          bf[gsel[o]].data[RT_LSB +: MAX_HOPS*HOP_W] >> HOP_W;
      if (gvalid[o] && out_ready_i[o]) bpop[gsel[o]] = 1'b1;
    end
    for (int i = 0; i < NP; i++) stall_o[i] = bv[i] && is_head_q[i] && !bpop[i];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lock_q    <= '0;
      is_head_q <= '1;
      for (int i = 0; i < NP; i++) begin
        owner_q[i] <= '0;
        rr_q[i]    <= '0;
        dest_q[i]  <= '0;
      end
    end else begin
      for (int o = 0; o < NP; o++) begin
        if (gvalid[o] && out_ready_i[o]) begin
          lock_q[o]  <= !bf[gsel[o]].last;
          owner_q[o] <= gsel[o];
          if (!lock_q[o]) rr_q[o] <= gsel[o];
        end
      end
      for (int i = 0; i < NP; i++) begin
        if (bpop[i]) begin
          is_head_q[i] <= bf[i].last;
          if (is_head_q[i]) dest_q[i] <= want[i];
        end
      end
    end
  end

  // A route must name an existing port.
  for (genvar i = 0; i < NP; i++) begin : g_chk
    a_route: assert property (@(posedge clk_i) disable iff (!rst_ni)
                              (bv[i] && is_head_q[i]) |-> (int'(want[i]) < NP))
      else $error("noc_switch: input %0d routes to missing port %0d", i, want[i]);
  end
endmodule
