// tsv_deserializer: receive half of a vertical TSV link, before the
// clock-domain crossing.
//
// It runs on the clock that arrives with the data (the sending layer's
// clock) and samples the TSV wires on its rising edge. A beat with sof
// starts a new flit; the following valid beats fill it in, least
// significant slice first. After BEATS beats the whole flit is presented
// for one cycle on flit_valid_o/flit_o, to be written into the dual-clock
// FIFO in the same clock domain. Framing and lane count are this design's
// choices and must match tsv_serializer.
module tsv_deserializer
  import mmc_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic             clk_i,        // forwarded clock
  input  logic             rst_ni,       // synchronous to clk_i on release
  input  logic             tsv_valid_i,
  input  logic             tsv_sof_i,
  input  logic [LANES-1:0] tsv_data_i,
  output logic             flit_valid_o,
  output flit_t            flit_o
);
  localparam int unsigned BEATS = (FLIT_W + LANES - 1) / LANES;
  localparam int unsigned BW    = $clog2(BEATS + 1);

  logic [BEATS*LANES-1:0] acc_q;
  logic [BW-1:0]          cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_q        <= '0;
      cnt_q        <= '0;
      flit_valid_o <= 1'b0;
    end else begin
      flit_valid_o <= 1'b0;
      if (tsv_valid_i) begin
        if (tsv_sof_i) begin
          acc_q <= (BEATS*LANES)'(tsv_data_i);
          cnt_q <= BW'(1);
          if (BEATS == 1) flit_valid_o <= 1'b1;
        end else if (cnt_q != '0 && cnt_q < BW'(BEATS)) begin
          acc_q <= acc_q | ((BEATS*LANES)'(tsv_data_i) << (int'(cnt_q) * LANES));
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == BW'(BEATS - 1)) flit_valid_o <= 1'b1;
        end
      end
    end
  end

  // The accumulator holds the complete flit in the cycle flit_valid_o is high.
  assign flit_o = flit_t'(acc_q[FLIT_W-1:0]);
endmodule
