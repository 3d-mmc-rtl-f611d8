// mmc_pkg: types and constants shared by every block of the 3D modular
// multi-core stack.
//
// The on-chip bus of a PE and of the PS is a single-outstanding
// request/ready bus: a master holds bus_req_t (req=1) stable until the
// slave returns bus_rsp_t.ready=1 for one cycle, with rdata valid in that
// cycle for a read. This stands in for the AMBA AHB of the original chip.
//
// Network flits are 33 bits: a last-flit marker and 32 bits of data.
// A packet is a head flit, then for a request the address and, for a write,
// the write data. Writes are posted; a read is answered by a head flit and
// the read data.
// The head flit carries the source route (3-bit output-port codes, the
// next hop in the low bits), the source layer and PE, write/response flags
// and byte strobes. The packet layout and the address map are this
// design's own choices.
package mmc_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned ID_W     = 2;   // LayerID width, printed in Fig. 3(b)
  localparam int unsigned NUM_PE   = 4;   // PEs per layer
  localparam int unsigned HOP_W    = 3;
  localparam int unsigned MAX_HOPS = 6;
  localparam int unsigned FLIT_W   = DATA_W + 1;

  // Switch port codes. One switch per layer: the four horizontal
  // directions serve the four PEs, Up/Down the 3D macro, Local the PS.
  typedef enum logic [HOP_W-1:0] {
    PORT_N = 3'd0, PORT_E = 3'd1, PORT_S = 3'd2, PORT_W = 3'd3,
    PORT_U = 3'd4, PORT_D = 3'd5, PORT_L = 3'd6
  } port_e;
  localparam int unsigned NPORTS = 7;

  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [3:0]        wstrb;
  } bus_req_t;

  typedef struct packed {
    logic              ready;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  typedef struct packed {
    logic              last;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Head flit payload.
  typedef struct packed {
    logic [MAX_HOPS*HOP_W-1:0] route;     // [31:14]
    logic [ID_W-1:0]           src_layer; // [13:12]
    logic [1:0]                src_pe;    // [11:10]
    logic                      we;        // [9]
    logic                      resp;      // [8]
    logic [3:0]                wstrb;     // [7:4]
    logic [3:0]                rsvd;      // [3:0]
  } head_t;

  // Event strobes of a layer, for performance counting.
  typedef struct packed {
    logic [NPORTS-1:0] sw_stall;    // switch input holds a blocked head
    logic [NUM_PE-1:0] remote;      // PE sent a request to another layer
    logic [1:0]        tx_stopped;  // {down, up} TSV sender held by stop
    logic [1:0]        rx_overflow; // {down, up} receive FIFO overflow
    logic              sem_busy;    // semaphore test-and-set found it taken
  } stat_t;

  // Address map (PE view).
  //   0x0xxx_xxxx boot ROM, 0x4xxx_xxxx private RAM, 0x8xxx_xxxx shared
  //   memory of layer addr[25:24]; within it addr[23]=1 selects the
  //   semaphores, otherwise the shared RAM.
  localparam logic [3:0] REGION_ROM    = 4'h0;
  localparam logic [3:0] REGION_PRIV   = 4'h4;
  localparam logic [3:0] REGION_SHARED = 4'h8;
  localparam int unsigned SEM_BIT      = 23;

  // Route for the first hops of a packet: n vertical hops in direction
  // dir, then the final port. Unused hop fields are zero.
  function automatic logic [MAX_HOPS*HOP_W-1:0] make_route(
      input logic [ID_W-1:0] from_layer, input logic [ID_W-1:0] to_layer,
      input logic [HOP_W-1:0] final_port);
    logic [MAX_HOPS*HOP_W-1:0] r;
    int unsigned n;
    logic [HOP_W-1:0] dir;
    r = '0;
    if (to_layer > from_layer) begin
      n   = int'(to_layer) - int'(from_layer);
      dir = PORT_D;    // layer numbers grow downwards (top layer is 0)
    end else begin
      n   = int'(from_layer) - int'(to_layer);
      dir = PORT_U;
    end
    for (int unsigned i = 0; i < MAX_HOPS; i++) begin
      if (i < n)       r[i*HOP_W +: HOP_W] = dir;
      else if (i == n) r[i*HOP_W +: HOP_W] = final_port;
    end
    return r;
  endfunction

endpackage
