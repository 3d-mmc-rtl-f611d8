// sync_fifo: single-clock first-in first-out buffer with valid/ready on
// both sides, used as the input buffer of each switch port.
//
// DEPTH entries of type-less WIDTH-bit words. in_ready is "not full" and
// out_valid is "not empty", both from registers, so the FIFO breaks any
// combinational path between its two sides. Data written in a cycle can
// be read from the next cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             in_valid_i,
  input  logic [WIDTH-1:0] in_data_i,
  output logic             in_ready_o,
  output logic             out_valid_o,
  output logic [WIDTH-1:0] out_data_o,
  input  logic             out_ready_i
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr_q, rptr_q;
  logic [PW:0]      cnt_q;
  logic             push, pop;

  assign in_ready_o  = (cnt_q != (PW+1)'(DEPTH));
  assign out_valid_o = (cnt_q != '0);
  assign out_data_o  = mem[rptr_q];
  assign push        = in_valid_i && in_ready_o;
  assign pop         = out_valid_o && out_ready_i;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i) begin
    if (push) mem[wptr_q] <= in_data_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) wptr_q <= incr(wptr_q);
      if (pop)  rptr_q <= incr(rptr_q);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end
endmodule
