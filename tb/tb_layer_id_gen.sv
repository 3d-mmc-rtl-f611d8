// Testbench of layer_id_gen: a chain of four dies; the top one has its
// pads driven, the others pulled down. Each die must find its position.
module tb_layer_id_gen;
  import mmc_pkg::*;
  logic [1:0] id_v [5];
  logic [1:0] lid [4];
  logic [1:0] pad_id;
  int checks = 0, failures = 0;

  assign id_v[0] = 2'b11;   // nothing above the top die: must be ignored
  for (genvar l = 0; l < 4; l++) begin : g
    layer_id_gen u (.pad_id_i(l == 0 ? pad_id : 2'b00), .pad_sel_i(l == 0),
                    .tsv_id_i(id_v[l]), .layer_id_o(lid[l]), .tsv_id_o(id_v[l+1]));
  end

  initial begin
    for (int base = 0; base < 4; base++) begin
      pad_id = 2'(base);
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (lid[l] !== 2'(base + l)) begin failures++; $display("die %0d id %0d", l, lid[l]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
