// tsv_serializer: transmit half of a vertical TSV link.
//
// A 33-bit flit taken on the valid/ready side is sent over LANES data TSVs
// in BEATS = ceil(33/LANES) consecutive clock cycles, least significant
// slice first. tsv_valid_o is high on every beat and tsv_sof_o on the
// first beat of a flit; the data wires are driven from registers on the
// rising edge of the sender's clock, which travels with them on its own
// TSV. A new flit is only started while the receiver's stop wire
// (its FIFO almost full, synchronised here with two flops) is low;
// flits are sent back to back otherwise, so the raw rate is LANES bits
// per cycle: 8 lanes at 400 MHz give 3.2 Gbit/s. Lane count, framing and
// the stop wire are this design's choices.
module tsv_serializer
  import mmc_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             flit_valid_i,
  input  flit_t            flit_i,
  output logic             flit_ready_o,
  output logic             tsv_valid_o,
  output logic             tsv_sof_o,
  output logic [LANES-1:0] tsv_data_o,
  input  logic             tsv_stop_i,
  output logic             stopped_o     // a flit waits because of stop
);
  localparam int unsigned BEATS = (FLIT_W + LANES - 1) / LANES;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [BEATS*LANES-1:0] sh_q;
  logic [BW-1:0]          beat_q;
  logic                   busy_q;
  logic [1:0]             stop_sync_q;
  logic                   start;

  // Take a flit when idle, or in the last beat of the current one.
  assign flit_ready_o = !stop_sync_q[1] && (!busy_q || beat_q == BW'(BEATS - 1));
  assign start        = flit_valid_i && flit_ready_o;
  assign stopped_o    = flit_valid_i && stop_sync_q[1] && (!busy_q || beat_q == BW'(BEATS - 1));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sh_q        <= '0;
      beat_q      <= '0;
      busy_q      <= 1'b0;
      stop_sync_q <= '0;
      tsv_valid_o <= 1'b0;
      tsv_sof_o   <= 1'b0;
      tsv_data_o  <= '0;
    end else begin
      stop_sync_q <= {stop_sync_q[0], tsv_stop_i};
      if (start) begin
        sh_q        <= (BEATS*LANES)'(flit_i) >> LANES;
        tsv_data_o  <= flit_i[LANES-1:0];
        tsv_valid_o <= 1'b1;
        tsv_sof_o   <= 1'b1;
        beat_q      <= '0;
        busy_q      <= 1'b1;
      end else if (busy_q && beat_q != BW'(BEATS - 1)) begin
        tsv_data_o  <= sh_q[LANES-1:0];
        sh_q        <= sh_q >> LANES;
        tsv_valid_o <= 1'b1;
        tsv_sof_o   <= 1'b0;
        beat_q      <= beat_q + 1'b1;
      end else begin
        tsv_valid_o <= 1'b0;
        tsv_sof_o   <= 1'b0;
        busy_q      <= 1'b0;
      end
    end
  end
endmodule
