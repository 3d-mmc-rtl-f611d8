// ni_ps: network interface of the peripheral subsystem.
//
// It receives request packets from the switch (head, address, optional
// write data), performs each as the master of the PS bus (shared RAM and
// semaphores). A read is answered with a response packet: a head flit
// routed to the requesting PE, then the read data. Writes are posted and
// get no response. The return route is computed from the source layer and
// PE carried in the request head and from this layer's LayerID. Requests
// are served strictly one at a time, so the PS bus is the shared-memory
// bottleneck of a layer. The packet format is this design's choice.
//
// Responses wait in a queue of RESP_DEPTH {head, data} entries and are sent
// from there, so the request side never waits for the response path.
// Without this, a PS sending a response to another die blocks its request
// input; two PSs doing so across one vertical link, each link FIFO full of
// requests for the other PS, deadlock. Every PE has at most one read
// outstanding, so a queue with one entry per PE of the largest stack
// (2^ID_W dies) never fills; a read still waits for space should it do so.
module ni_ps
  import mmc_pkg::*;
#(
  parameter int unsigned RESP_DEPTH = (1 << ID_W) * NUM_PE
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [ID_W-1:0] layer_id_i,
  input  logic            in_valid_i,
  input  flit_t           in_flit_i,
  output logic            in_ready_o,
  output logic            out_valid_o,
  output flit_t           out_flit_o,
  input  logic            out_ready_i,
  output bus_req_t        req_o,
  input  bus_rsp_t        rsp_i
);
  typedef enum logic [1:0] {S_HEAD, S_ADDR, S_DATA, S_BUS} state_e;
  state_e            state_q;
  head_t             hd_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] wdata_q;
  head_t             rhead;
  logic              q_push, q_ready, q_valid, q_pop, sent_head_q;
  logic [2*DATA_W-1:0] q_data;

  always_comb begin
    rhead           = '0;
    rhead.route     = make_route(layer_id_i, hd_q.src_layer, {1'b0, hd_q.src_pe});
    rhead.src_layer = layer_id_i;
    rhead.src_pe    = hd_q.src_pe;
    rhead.we        = hd_q.we;
    rhead.resp      = 1'b1;
  end

  assign in_ready_o = (state_q == S_HEAD) || (state_q == S_ADDR) || (state_q == S_DATA);

  always_comb begin
    req_o       = '0;
    req_o.req   = (state_q == S_BUS) && (hd_q.we || q_ready);
    req_o.we    = hd_q.we;
    req_o.addr  = addr_q;
    req_o.wdata = wdata_q;
    req_o.wstrb = hd_q.wstrb;
  end

  assign q_push = (state_q == S_BUS) && rsp_i.ready && !hd_q.we;

  sync_fifo #(.WIDTH(2*DATA_W), .DEPTH(RESP_DEPTH)) u_respq (
    .clk_i, .rst_ni,
    .in_valid_i (q_push),  .in_data_i ({DATA_W'(rhead), rsp_i.rdata}), .in_ready_o(q_ready),
    .out_valid_o(q_valid), .out_data_o(q_data),                        .out_ready_i(q_pop)
  );

  // Response side: head flit, then data flit, of the oldest queued response.
  assign out_valid_o = q_valid;
  assign out_flit_o  = sent_head_q ? '{last: 1'b1, data: q_data[DATA_W-1:0]}
                                   : '{last: 1'b0, data: q_data[2*DATA_W-1:DATA_W]};
  assign q_pop       = q_valid && out_ready_i && sent_head_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                       sent_head_q <= 1'b0;
    else if (q_valid && out_ready_i)   sent_head_q <= !sent_head_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_HEAD;
      hd_q    <= '0;
      addr_q  <= '0;
      wdata_q <= '0;
    end else begin
      unique case (state_q)
        S_HEAD: if (in_valid_i) begin hd_q <= head_t'(in_flit_i.data); state_q <= S_ADDR; end
        S_ADDR: if (in_valid_i) begin
                  addr_q  <= in_flit_i.data;
                  state_q <= in_flit_i.last ? S_BUS : S_DATA;
                end
        S_DATA: if (in_valid_i) begin wdata_q <= in_flit_i.data; state_q <= S_BUS; end
        S_BUS:  if (rsp_i.ready) state_q <= S_HEAD;
        default: state_q <= S_HEAD;
      endcase
    end
  end
endmodule
