// mmc_pe: processing element of a layer, without its processor core.
//
// Two masters share the PE bus through bus_arbiter: the core (core_req_i)
// and the debug master (dbg_req_i, for the original's JTAG debug module,
// which is outside this design). The winning request is decoded on
// addr[31:28]: region 0x0 goes to
// the boot ROM, 0x4 to the private RAM (program and private data) and 0x8
// to the network interface, which carries the access to the shared memory
// of this or another layer. Any other address is answered one cycle later
// with zero data and no effect. The core itself, the debug master and the
// APB peripherals are outside this module; their buses are the
// core_req_i/core_rsp_o and dbg_req_i/dbg_rsp_o ports. The set of slaves follows the original; the
// address map and bus are this design's choices.
module mmc_pe
  import mmc_pkg::*;
#(
  parameter int unsigned PRIV_WORDS = 16384,
  parameter int unsigned ROM_WORDS  = 1024,
  parameter string       ROM_FILE   = ""
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [ID_W-1:0] layer_id_i,
  input  logic [1:0]      pe_id_i,
  input  bus_req_t        core_req_i,
  output bus_rsp_t        core_rsp_o,
  input  bus_req_t        dbg_req_i,
  output bus_rsp_t        dbg_rsp_o,
  output logic            out_valid_o,
  output flit_t           out_flit_o,
  input  logic            out_ready_i,
  input  logic            in_valid_i,
  input  flit_t           in_flit_i,
  output logic            in_ready_o,
  output logic            remote_o
);
  bus_req_t rom_req, ram_req, ni_req, bus_req;
  bus_rsp_t rom_rsp, ram_rsp, ni_rsp, bus_rsp;
  bus_req_t m_req [2];
  bus_rsp_t m_rsp [2];
  logic     def_q;
  logic [3:0] region;

  assign m_req[0]   = core_req_i;
  assign m_req[1]   = dbg_req_i;
  assign core_rsp_o = m_rsp[0];
  assign dbg_rsp_o  = m_rsp[1];

  bus_arbiter #(.NM(2)) u_arb (
    .clk_i, .rst_ni, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(bus_req), .s_rsp_i(bus_rsp));

  assign region = bus_req.addr[31:28];

  always_comb begin
    rom_req = bus_req; rom_req.req = bus_req.req && (region == REGION_ROM);
    ram_req = bus_req; ram_req.req = bus_req.req && (region == REGION_PRIV);
    ni_req  = bus_req; ni_req.req  = bus_req.req && (region == REGION_SHARED);
    unique case (region)
      REGION_ROM:    bus_rsp = rom_rsp;
      REGION_PRIV:   bus_rsp = ram_rsp;
      REGION_SHARED: bus_rsp = ni_rsp;
      default:       bus_rsp = '{ready: def_q, rdata: '0};
    endcase
  end

  // Default slave for unmapped addresses.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) def_q <= 1'b0;
    else def_q <= bus_req.req && !def_q &&
                  !(region inside {REGION_ROM, REGION_PRIV, REGION_SHARED});
  end

  bus_rom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_FILE)) u_rom (
    .clk_i, .rst_ni, .req_i(rom_req), .rsp_o(rom_rsp));

  bus_ram #(.WORDS(PRIV_WORDS)) u_priv_ram (
    .clk_i, .rst_ni, .req_i(ram_req), .rsp_o(ram_rsp));

  ni_pe u_ni (
    .clk_i, .rst_ni, .layer_id_i, .pe_id_i,
    .req_i(ni_req), .rsp_o(ni_rsp),
    .out_valid_o, .out_flit_o, .out_ready_i,
    .in_valid_i, .in_flit_i, .in_ready_o, .remote_o
  );
endmodule
