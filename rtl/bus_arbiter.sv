// bus_arbiter: shares one bus between NM masters.
//
// Each master holds req (and its fields) until it sees ready, as everywhere
// on this bus. When the bus is free, the arbiter picks one requesting master
// round-robin, starting after the master it served last. It forwards that
// master's request in the same cycle and keeps the choice until the slave
// answers with ready. The response goes only to the chosen master; the
// others see ready low and wait. Adds no cycle to an access when only one
// master requests.
//
// In a PE the masters are the core and the debug master; in the PS they are
// the network interface and the debug master. That every bus has these two
// masters follows the original; the arbitration rule is this design's
// choice (the original uses the standard AMBA arbiter).
module bus_arbiter
  import mmc_pkg::*;
#(
  parameter int unsigned NM = 2
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  bus_req_t m_req_i [NM],
  output bus_rsp_t m_rsp_o [NM],
  output bus_req_t s_req_o,
  input  bus_rsp_t s_rsp_i
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic          lock_q;
  logic [MW-1:0] owner_q, last_q, pick, cur;
  logic          any;

  always_comb begin
    logic [MW-1:0] c;
    any  = 1'b0;
    pick = last_q;
    c    = '0;
    for (int k = 1; k <= NM; k++) begin
      c = MW'((int'(last_q) + k) % NM);
      if (!any && m_req_i[c].req) begin
        any  = 1'b1;
        pick = c;
      end
    end
  end

  assign cur = lock_q ? owner_q : pick;

  always_comb begin
    s_req_o = (lock_q || any) ? m_req_i[cur] : '0;
    for (int m = 0; m < NM; m++) begin
      m_rsp_o[m].rdata = s_rsp_i.rdata;
      m_rsp_o[m].ready = s_rsp_i.ready && (lock_q || any) && (cur == MW'(m));
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lock_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= MW'(NM - 1);
    end else if (s_rsp_i.ready && (lock_q || any)) begin
      lock_q <= 1'b0;
      last_q <= cur;
    end else if (!lock_q && any) begin
      lock_q  <= 1'b1;
      owner_q <= pick;
    end
  end
endmodule
