// bus_ram: word-organised RAM on the request/ready bus, used as the PE
// private RAM and the PS shared RAM.
//
// The array has one write port and one read port. An access is accepted
// in the cycle req rises and answered one cycle later (ready=1 for one
// cycle, rdata valid for a read). Byte strobes select the bytes written.
// The word index is addr[AW+1:2]; higher address bits are ignored, the
// decoder in front of the RAM has already selected it. The size is this
// design's choice; the one-write/one-read port organisation follows the
// description of the shared memory.
module bus_ram
  import mmc_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic              busy_q;
  logic [DATA_W-1:0] rdata_q;
  logic [AW-1:0]     widx;

  assign widx = req_i.addr[AW+1:2];

  // Write port.
  always_ff @(posedge clk_i) begin
    if (req_i.req && !busy_q && req_i.we) begin
      for (int b = 0; b < 4; b++)
        if (req_i.wstrb[b]) mem[widx][b*8 +: 8] <= req_i.wdata[b*8 +: 8];
    end
  end

  // Read port.
  always_ff @(posedge clk_i) begin
    if (req_i.req && !busy_q && !req_i.we) rdata_q <= mem[widx];
  end

  // busy_q marks the response cycle so a held request is not taken twice.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) busy_q <= 1'b0;
    else         busy_q <= req_i.req && !busy_q;
  end

  assign rsp_o.ready = busy_q;
  assign rsp_o.rdata = rdata_q;
endmodule
