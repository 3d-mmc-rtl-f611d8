// Testbench of the TSV serializer and deserializer joined by their wires:
// random flits must arrive intact and in order; back-to-back flits must
// use exactly BEATS = ceil(33/8) = 5 cycles each (8 bits per cycle); a
// raised stop wire must stop new flits within the synchroniser delay.
module tb_tsv_link;
  import mmc_pkg::*;
  localparam int unsigned LANES = 8, BEATS = 5, N = 200;
  logic clk = 1'b0, rst_n = 1'b1;
  logic fvalid = 1'b0, fready, tv, tsof, stop = 1'b0, stopped, ovalid;
  flit_t fin = '0, fout;
  logic [LANES-1:0] td;
  flit_t q[$];
  int checks = 0, failures = 0, nsent = 0, nrecv = 0;
  int first_cyc = -1, last_cyc = 0, cyc = 0, sof_during_stop = 0, stopped_seen = 0;

  tsv_serializer #(.LANES(LANES)) u_ser (
    .clk_i(clk), .rst_ni(rst_n), .flit_valid_i(fvalid), .flit_i(fin), .flit_ready_o(fready),
    .tsv_valid_o(tv), .tsv_sof_o(tsof), .tsv_data_o(td), .tsv_stop_i(stop), .stopped_o(stopped));
  tsv_deserializer #(.LANES(LANES)) u_des (
    .clk_i(clk), .rst_ni(rst_n), .tsv_valid_i(tv), .tsv_sof_i(tsof), .tsv_data_i(td),
    .flit_valid_o(ovalid), .flit_o(fout));

  initial #1 rst_n = 1'b0;  // a falling edge resets even the unclocked domains
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stopped) stopped_seen++;
    if (fvalid && fready) begin q.push_back(fin); nsent++; end
    if (ovalid) begin
      checks++; nrecv++;
      if (q.size() == 0 || fout !== q[0]) begin failures++; $display("flit %0d got %h", nrecv, fout); end
      if (q.size() != 0) void'(q.pop_front());
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
    end
  end

  // Flit source: offers a new random flit whenever the last one was taken.
  logic src_en = 1'b0;
  always @(posedge clk) begin
    if (src_en && nsent < N) begin
      if (!fvalid || fready) begin
        fvalid <= !(fvalid && fready && nsent == N - 1);
        fin    <= '{last: 1'($urandom), data: $urandom};
      end
    end else if (src_en) fvalid <= 1'b0;
  end

  // Counts start-of-flit beats that begin more than 3 cycles after stop rose.
  int stop_age = 0;
  always @(posedge clk) begin
    stop_age <= stop ? stop_age + 1 : 0;
    if (tsof && stop && stop_age > 3) sof_during_stop++;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1'b1;
    // Phase 1: continuous stream, throughput check.
    src_en = 1'b1;
    wait (nsent >= N);
    @(negedge clk); src_en = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (nrecv != N || last_cyc - first_cyc != int'(BEATS) * (nrecv - 1)) begin
      failures++; $display("%0d flits in %0d cycles", nrecv, last_cyc - first_cyc);
    end
    // Phase 2: stop wire.
    stop = 1'b1;
    fvalid = 1'b1; fin = '{last: 1'b1, data: 32'hcafe_f00d};
    repeat (30) @(negedge clk);
    checks++; if (sof_during_stop != 0 || stopped_seen == 0) begin failures++; $display("stop ignored"); end
    stop = 1'b0;
    repeat (20) @(negedge clk);
    fvalid = 1'b0;
    repeat (20) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("%0d flits lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
