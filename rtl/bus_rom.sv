// bus_rom: boot ROM of a PE on the request/ready bus.
//
// The program image is loaded from a hex file named by INIT_FILE (one
// 32-bit word per line); with an empty name the ROM reads as zero.
// A read is answered one cycle after req rises; writes are acknowledged
// and ignored. Size and file loading are this design's choices: the
// original only says the compiled benchmarks are loaded into the ROM.
module bus_rom
  import mmc_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [DATA_W-1:0] rom [WORDS];
  logic              busy_q;
  logic [DATA_W-1:0] rdata_q;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk_i) begin
    if (req_i.req && !busy_q) rdata_q <= rom[req_i.addr[AW+1:2]];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) busy_q <= 1'b0;
    else         busy_q <= req_i.req && !busy_q;
  end

  assign rsp_o.ready = busy_q;
  assign rsp_o.rdata = req_i.we ? '0 : rdata_q;
endmodule
