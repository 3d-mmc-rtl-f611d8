// rst_sync: reset synchroniser. The active-low reset output falls
// asynchronously with rst_ni and rises two rising edges of clk_i after
// rst_ni has risen, so every flop of a clock domain leaves reset in the
// same cycle.
module rst_sync (
  input  logic clk_i,
  input  logic rst_ni,
  output logic rst_no
);
  logic [1:0] q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) q <= '0;
    else         q <= {q[0], 1'b1};
  end
  assign rst_no = q[1];
endmodule
