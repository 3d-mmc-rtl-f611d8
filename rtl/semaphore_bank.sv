// semaphore_bank: hardware semaphores of the peripheral subsystem, used by
// software to arbitrate the PEs' access to the shared memory.
//
// NUM_SEM one-bit semaphores, one per word (index addr[log2(NUM_SEM)+1:2]).
// A read returns the semaphore in bit 0 and sets it (test-and-set): a
// reader that gets 0 owns it. A write stores wdata[0], so writing 0
// releases it. Answers one cycle after req rises, like the RAMs. The
// test-and-set rule and the count are this design's choices; the original
// only says that semaphores arbitrate the shared memory.
module semaphore_bank
  import mmc_pkg::*;
#(
  parameter int unsigned NUM_SEM = 32
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  bus_req_t req_i,
  output bus_rsp_t rsp_o,
  output logic     busy_read_o   // strobe: a test-and-set found it taken
);
  localparam int unsigned SW = $clog2(NUM_SEM);

  logic [NUM_SEM-1:0] sem_q;
  logic               busy_q;
  logic               rbit_q;
  logic [SW-1:0]      idx;

  assign idx = req_i.addr[SW+1:2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sem_q  <= '0;
      busy_q <= 1'b0;
      rbit_q <= 1'b0;
    end else begin
      busy_q <= req_i.req && !busy_q;
      if (req_i.req && !busy_q) begin
        if (req_i.we) begin
          sem_q[idx] <= req_i.wdata[0];
        end else begin
          rbit_q     <= sem_q[idx];
          sem_q[idx] <= 1'b1;
        end
      end
    end
  end

  assign rsp_o.ready = busy_q;
  assign rsp_o.rdata = {{(DATA_W-1){1'b0}}, rbit_q};
  assign busy_read_o = busy_q && !req_i.we && rbit_q;
endmodule
