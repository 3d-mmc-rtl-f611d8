// ni_pe: network interface of a processing element.
//
// It is the PE-bus target for the shared-memory window (0x8xxx_xxxx). An
// accepted access becomes a source-routed request packet: a head flit, the
// address and, for a write, the data. The route is computed from this PE's
// own LayerID and the layer named by addr[25:24]: one Up or Down hop per
// layer of distance, then the PS (Local) port of the target switch. The NI
// answers the core with ready for one cycle: for a write as soon as the
// last flit has entered the switch (posted write, no response packet),
// for a read when the response packet (head, then data) has come back.
// One access is in the NI at a time. All packets from one PE to one
// shared memory follow the same path through in-order buffers, so a read
// always sees that PE's earlier writes. Packet format and posted writes
// are this design's choices. remote_o pulses when a request leaves for
// another layer's shared memory.
module ni_pe
  import mmc_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [ID_W-1:0] layer_id_i,
  input  logic [1:0]      pe_id_i,
  // bus target side
  input  bus_req_t        req_i,
  output bus_rsp_t        rsp_o,
  // to switch
  output logic            out_valid_o,
  output flit_t           out_flit_o,
  input  logic            out_ready_i,
  // from switch
  input  logic            in_valid_i,
  input  flit_t           in_flit_i,
  output logic            in_ready_o,
  output logic            remote_o
);
  typedef enum logic [2:0] {S_IDLE, S_HEAD, S_ADDR, S_DATA, S_RHEAD, S_RDATA, S_DONE} state_e;
  state_e            state_q;
  bus_req_t          cur_q;
  logic [DATA_W-1:0] rdata_q;
  head_t             head;
  logic [ID_W-1:0]   tgt_layer;

  assign tgt_layer = cur_q.addr[25:24];

  always_comb begin
    head           = '0;
    head.route     = make_route(layer_id_i, tgt_layer, PORT_L);
    head.src_layer = layer_id_i;
    head.src_pe    = pe_id_i;
    head.we        = cur_q.we;
    head.resp      = 1'b0;
    head.wstrb     = cur_q.wstrb;
  end

  always_comb begin
    out_valid_o = 1'b0;
    out_flit_o  = '0;
    unique case (state_q)
      S_HEAD: begin out_valid_o = 1'b1; out_flit_o = '{last: 1'b0,       data: head};        end
      S_ADDR: begin out_valid_o = 1'b1; out_flit_o = '{last: !cur_q.we,  data: cur_q.addr};  end
      S_DATA: begin out_valid_o = 1'b1; out_flit_o = '{last: 1'b1,       data: cur_q.wdata}; end
      default: ;
    endcase
  end

  assign in_ready_o  = (state_q == S_RHEAD) || (state_q == S_RDATA);
  assign rsp_o.ready = (state_q == S_DONE);
  assign rsp_o.rdata = rdata_q;
  assign remote_o    = (state_q == S_HEAD) && out_ready_i && (tgt_layer != layer_id_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      cur_q   <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (req_i.req) begin cur_q <= req_i; state_q <= S_HEAD; end
        S_HEAD:  if (out_ready_i) state_q <= S_ADDR;
        S_ADDR:  if (out_ready_i) state_q <= cur_q.we ? S_DATA : S_RHEAD;
        S_DATA:  if (out_ready_i) state_q <= S_DONE;
        S_RHEAD: if (in_valid_i) state_q <= S_RDATA;
        S_RDATA: if (in_valid_i) begin rdata_q <= in_flit_i.data; state_q <= S_DONE; end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
