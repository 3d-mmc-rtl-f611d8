// mmc_ps: peripheral subsystem of a layer: the layer's shared memory.
//
// Request packets from the switch's Local port enter the PS network
// interface, which performs them one at a time on the PS bus. Address bit
// 23 selects the semaphore bank, otherwise the shared RAM (one write port,
// one read port). Responses leave through the same switch port. As in the
// original, the PS bus has a second master, the debug master; it is
// outside this design and reaches the bus through dbg_req_i/dbg_rsp_o,
// shared with the network interface by bus_arbiter. The UART and APB
// bridge of the original PS are not part of this module. sem_busy_o
// pulses when a semaphore test-and-set finds the semaphore already taken.
module mmc_ps
  import mmc_pkg::*;
#(
  parameter int unsigned SHARED_WORDS = 16384,
  parameter int unsigned NUM_SEM      = 32
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
  input  bus_req_t        dbg_req_i,
  output bus_rsp_t        dbg_rsp_o,
  output logic            sem_busy_o
);
  bus_req_t bus_req, ram_req, sem_req;
  bus_rsp_t bus_rsp, ram_rsp, sem_rsp;
  bus_req_t m_req [2];
  bus_rsp_t m_rsp [2];
  logic     is_sem;

  ni_ps u_ni (
    .clk_i, .rst_ni, .layer_id_i,
    .in_valid_i, .in_flit_i, .in_ready_o,
    .out_valid_o, .out_flit_o, .out_ready_i,
    .req_o(m_req[0]), .rsp_i(m_rsp[0])
  );

  assign m_req[1]  = dbg_req_i;
  assign dbg_rsp_o = m_rsp[1];

  bus_arbiter #(.NM(2)) u_arb (
    .clk_i, .rst_ni, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(bus_req), .s_rsp_i(bus_rsp));

  assign is_sem = bus_req.addr[SEM_BIT];

  always_comb begin
    ram_req = bus_req; ram_req.req = bus_req.req && !is_sem;
    sem_req = bus_req; sem_req.req = bus_req.req &&  is_sem;
    bus_rsp = is_sem ? sem_rsp : ram_rsp;
  end

  bus_ram #(.WORDS(SHARED_WORDS)) u_shared_ram (
    .clk_i, .rst_ni, .req_i(ram_req), .rsp_o(ram_rsp));

  semaphore_bank #(.NUM_SEM(NUM_SEM)) u_sem (
    .clk_i, .rst_ni, .req_i(sem_req), .rsp_o(sem_rsp), .busy_read_o(sem_busy_o));
endmodule
