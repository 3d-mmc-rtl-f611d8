// Testbench of clock_select: the top die (LayerID 0) follows the pad
// clock, every other die the clock from the TSV.
module tb_clock_select;
  import mmc_pkg::*;
  logic pad_clk, tsv_clk, ref_clk;
  logic [1:0] lid;
  int checks = 0, failures = 0;

  clock_select dut (.pad_clk_i(pad_clk), .tsv_clk_i(tsv_clk), .layer_id_i(lid), .pll_ref_o(ref_clk));

  initial begin
    for (int n = 0; n < 64; n++) begin
      lid = 2'(n % 4); pad_clk = 1'($urandom); tsv_clk = 1'($urandom);
      #1; checks++;
      if (ref_clk !== ((lid == 0) ? pad_clk : tsv_clk)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
