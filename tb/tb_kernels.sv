// Four parallel benchmark kernels on mmc3d_top at its default size,
// with the processor cores modelled: the model does the arithmetic, and
// every operand and result moves through the real memory system.
//
//  - 1D median filter, window 3, over 64 integers (the two end points are
//    copied);
//  - 8x8 integer matrix multiplication, C = A * B;
//  - 1D DCT of each row of an 8x8 matrix, in fixed point: every core keeps
//    the 64 cosine coefficients, scaled by 4096, in its own private RAM and
//    reads them from there; out[r][k] = (sum_n x[r][n] * C[k][n]) >>> 12;
//  - 1D FFT of each row of an 8x8 matrix: radix 2, three stages of four
//    butterflies (12 per row), fixed-point twiddles (scaled by 4096) read
//    from private RAM. The unit of work is a row; the 8 complex results are
//    checked against a floating-point DFT computed here, to within 4.
//
// Each kernel runs on 1 and 4 cores of die 0 and on 8 cores (both dies). The
// outputs are split evenly among the cores. With 8 cores it runs twice:
//   single  all data in die 0's shared memory;
//   local   each die works on its own copy in its own shared memory.
// Last, the median filter runs on the four cores of die 0 with resource
// pooling: two of them work on the copy in die 1's shared memory. Its
// outputs are checked and its time reported.
// Every output is checked against a reference computed here. Checked also:
// 4 cores beat 1, 8 cores on local data beat 4, and local data is never
// slower than single.
// The core model spends COMPUTE cycles per output on arithmetic, an assumed
// figure. The time for a given core count comes from the memory system and
// this figure. With so little arithmetic per operand, 8 cores on a single
// memory lose to 4: the cores of die 1 wait for a vertical round trip on
// every operand. That is reported, not checked.
module tb_kernels;
  import mmc_pkg::*;
  localparam int unsigned NL = 2, N = 64, M = 8;
  localparam int unsigned COMPUTE_MED = 8, COMPUTE_MM = 16, COMPUTE_DCT = 16, COMPUTE_BF = 8;
  localparam int unsigned NK = 4, FTOL = 4;
  localparam realtime PHASE [NL] = '{0.3ns, 0.5ns};
  // word offsets in a shared memory
  localparam int unsigned IN = 0, OUT = 256, MA = 512, MB = 640, MC = 768, DX = 1024, DY = 1152, FX = 1280, FY = 1408;
  localparam int unsigned TW = 64;   // twiddles in private RAM, after the DCT coefficients
  localparam logic [31:0] PRIV = 32'h4000_0000;

  logic clk_pad = 1'b0, rst_n = 1'b1;
  logic pll_ref [NL];
  logic pll_clk [NL];
  bus_req_t core_req [NL][NUM_PE];
  bus_rsp_t core_rsp [NL][NUM_PE];
  bus_req_t dbg_req [NL][NUM_PE+1];
  bus_rsp_t dbg_rsp [NL][NUM_PE+1];
  logic [ID_W-1:0] lid [NL];
  stat_t st [NL];
  int checks = 0, failures = 0;

  mmc3d_top dut (
    .clk_pad_i(clk_pad), .rst_ni(rst_n), .id_pad_i(2'b00), .id_pad_sel_i(1'b1),
    .pll_ref_o(pll_ref), .pll_clk_i(pll_clk), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .dbg_req_i(dbg_req), .dbg_rsp_o(dbg_rsp),
    .layer_id_o(lid), .stat_o(st));

  for (genvar l = 0; l < NL; l++) begin : g_pll
    pll_model #(.DELAY(PHASE[l])) u_pll (.ref_i(pll_ref[l]), .clk_o(pll_clk[l]));
  end

  always #1.25 clk_pad = ~clk_pad;   // 400 MHz
  initial #1 rst_n = 1'b0;           // a falling edge resets even the unclocked domains

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc0 = 0;
  always @(posedge pll_clk[0]) cyc0 <= cyc0 + 1;

  task automatic wait_neg(input int l);
    if (l == 0) @(negedge pll_clk[0]);
    else        @(negedge pll_clk[1]);
  endtask

  task automatic cx(input int l, input int p, input bit we, input logic [31:0] addr,
                    input logic [31:0] wd, output logic [31:0] rd);
    int n;
    wait_neg(l);
    core_req[l][p] = '{req: 1'b1, we: we, addr: addr, wdata: wd, wstrb: 4'hF};
    n = 0;
    do begin wait_neg(l); n++; end while (!core_rsp[l][p].ready && n < 100000);
    if (n >= 100000) begin failures++; $display("core %0d.%0d hung at %h", l, p, addr); end
    rd = core_rsp[l][p].rdata;
    core_req[l][p].req = 1'b0;
  endtask

  function automatic logic [31:0] sh(int layer, int word);
    return 32'h8000_0000 | (32'(layer) << 24) | 32'(word * 4);
  endfunction

  function automatic int med3(int a, int b, int c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction

  int din [N], dref [N];
  int ma [M][M], mb [M][M], mref [M][M];
  int dx [M][M], dcoef [M][M], dyref [M][M];
  int fx [M][M], twr [M/2], twi [M/2];
  real fref_re [M][M], fref_im [M][M];

  function automatic int nout_of(int kernel);
    return (kernel == 0) ? N : (kernel == 3) ? M : M * M;
  endfunction

  function automatic int out_of(int kernel);
    return (kernel == 0) ? OUT : (kernel == 1) ? MC : (kernel == 2) ? DY : FY;
  endfunction

  // Core c of nc computes outputs [lo, hi) of a kernel whose data sits on die d.
  task automatic med_part(input int l, input int p, input int d, input int lo, input int hi);
    logic [31:0] a, b, c, rd;
    for (int i = lo; i < hi; i++) begin
      if (i == 0 || i == N - 1) begin
        cx(l, p, 1'b0, sh(d, IN + i), 0, b);
        cx(l, p, 1'b1, sh(d, OUT + i), b, rd);
      end else begin
        cx(l, p, 1'b0, sh(d, IN + i - 1), 0, a);
        cx(l, p, 1'b0, sh(d, IN + i), 0, b);
        cx(l, p, 1'b0, sh(d, IN + i + 1), 0, c);
        repeat (COMPUTE_MED) wait_neg(l);
        cx(l, p, 1'b1, sh(d, OUT + i), 32'(med3(int'(a), int'(b), int'(c))), rd);
      end
    end
  endtask

  task automatic mm_part(input int l, input int p, input int d, input int lo, input int hi);
    logic [31:0] x, y, rd; int acc;
    for (int e = lo; e < hi; e++) begin
      acc = 0;
      for (int k = 0; k < M; k++) begin
        cx(l, p, 1'b0, sh(d, MA + (e / M) * M + k), 0, x);
        cx(l, p, 1'b0, sh(d, MB + k * M + e % M), 0, y);
        acc += int'(x) * int'(y);
      end
      repeat (COMPUTE_MM) wait_neg(l);
      cx(l, p, 1'b1, sh(d, MC + e), 32'(acc), rd);
    end
  endtask

  int running = 0;

  task automatic dct_part(input int l, input int p, input int d, input int lo, input int hi);
    logic [31:0] x, c, rd; int acc;
    for (int e = lo; e < hi; e++) begin
      acc = 0;
      for (int n = 0; n < M; n++) begin
        cx(l, p, 1'b0, sh(d, DX + (e / M) * M + n), 0, x);
        cx(l, p, 1'b0, PRIV | 32'(((e % M) * M + n) * 4), 0, c);
        acc += int'(x) * int'(c);
      end
      repeat (COMPUTE_DCT) wait_neg(l);
      cx(l, p, 1'b1, sh(d, DY + e), 32'(acc >>> 12), rd);
    end
  endtask

  // One row per unit of work, results as 8 (re, im) pairs.
  task automatic fft_part(input int l, input int p, input int d, input int lo, input int hi);
    logic [31:0] v, rd;
    int re [M], im [M], wr [M/2], wi [M/2];
    int tr, ti, a, b, half, k;
    for (int j = 0; j < M / 2; j++) begin
      cx(l, p, 1'b0, PRIV | 32'((TW + 2 * j) * 4), 0, v);     wr[j] = int'(v);
      cx(l, p, 1'b0, PRIV | 32'((TW + 2 * j + 1) * 4), 0, v); wi[j] = int'(v);
    end
    for (int r = lo; r < hi; r++) begin
      for (int n = 0; n < M; n++) begin   // load in bit-reversed order
        cx(l, p, 1'b0, sh(d, FX + r * M + n), 0, v);
        re[{n[0], n[1], n[2]}] = int'(v);
        im[{n[0], n[1], n[2]}] = 0;
      end
      for (int size = 2; size <= M; size *= 2) begin
        half = size / 2;
        for (int st = 0; st < M; st += size)
          for (int j = 0; j < half; j++) begin
            a = st + j; b = a + half; k = j * (M / size);
            tr = (re[b] * wr[k] - im[b] * wi[k]) >>> 12;
            ti = (re[b] * wi[k] + im[b] * wr[k]) >>> 12;
            re[b] = re[a] - tr; im[b] = im[a] - ti;
            re[a] = re[a] + tr; im[a] = im[a] + ti;
            repeat (COMPUTE_BF) wait_neg(l);
          end
      end
      for (int j = 0; j < M; j++) begin
        cx(l, p, 1'b1, sh(d, FY + r * 2 * M + 2 * j), 32'(re[j]), rd);
        cx(l, p, 1'b1, sh(d, FY + r * 2 * M + 2 * j + 1), 32'(im[j]), rd);
      end
    end
  endtask

  // kernel 0: median, 1: matmul, 2: DCT, 3: FFT. nc cores: die 0 first, then die 1.
  // mode 0: all data on die 0; 1: each die on its own copy; 2: pooled, the
  // second half of the cores (all on die 0) use the copy on die 1.
  task automatic run(input int kernel, input int nc, input int mode, output longint t);
    longint t0;
    int nout;
    nout = nout_of(kernel);
    wait_neg(0);
    t0 = cyc0;
    for (int c = 0; c < nc; c++) begin
      automatic int l = c / NUM_PE, p = c % NUM_PE;
      automatic bit local_data = (mode == 1);
      automatic int d = (mode == 1) ? l : (mode == 2 && c >= nc / 2) ? 1 : 0;
      // the cores of one die share out the outputs of their data set
      automatic int per_set = local_data ? ((nc < NUM_PE) ? nc : NUM_PE) : nc;
      automatic int idx = local_data ? p : c;
      automatic int lo = idx * nout / per_set, hi = (idx + 1) * nout / per_set;
      if (local_data && nc > NUM_PE) begin
        // each die computes half of the outputs, on its own copy
        lo = l * (nout / 2) + p * (nout / 2) / NUM_PE;
        hi = l * (nout / 2) + (p + 1) * (nout / 2) / NUM_PE;
      end
      running++;
      fork
        begin
          if (kernel == 0)      med_part(l, p, d, lo, hi);
          else if (kernel == 1) mm_part(l, p, d, lo, hi);
          else if (kernel == 2) dct_part(l, p, d, lo, hi);
          else                  fft_part(l, p, d, lo, hi);
          running--;
        end
      join_none
    end
    wait (running == 0);
    t = cyc0 - t0;
  endtask

  // Check the outputs that were computed on die d (all when whole).
  task automatic verify(input int kernel, input int d, input int lo, input int hi);
    logic [31:0] rd;
    if (kernel == 3) begin
      for (int r = lo; r < hi; r++)
        for (int j = 0; j < 2 * M; j++) begin
          real want;
          cx(d, 0, 1'b0, sh(d, FY + r * 2 * M + j), 0, rd);
          want = (j % 2 == 0) ? fref_re[r][j / 2] : fref_im[r][j / 2];
          checks++;
          if (real'(int'(rd)) > want + FTOL || real'(int'(rd)) < want - FTOL) begin
            failures++; $display("FFT row %0d word %0d on die %0d: %0d, expected %0.1f", r, j, d, int'(rd), want);
          end
        end
      return;
    end
    for (int i = lo; i < hi; i++) begin
      cx(d, 0, 1'b0, sh(d, out_of(kernel) + i), 0, rd);
      checks++;
      if (kernel == 0 && int'(rd) != dref[i]) begin failures++; $display("median out %0d on die %0d: %0d, expected %0d", i, d, int'(rd), dref[i]); end
      if (kernel == 1 && int'(rd) != mref[i / M][i % M]) begin failures++; $display("C[%0d] on die %0d: %0d, expected %0d", i, d, int'(rd), mref[i / M][i % M]); end
      if (kernel == 2 && int'(rd) != dyref[i / M][i % M]) begin failures++; $display("DCT out %0d on die %0d: %0d, expected %0d", i, d, int'(rd), dyref[i / M][i % M]); end
    end
  endtask

  task automatic clear_out(input int kernel);
    logic [31:0] rd;
    for (int d = 0; d < NL; d++) begin
      for (int i = 0; i < ((kernel == 3) ? 2 * M * M : nout_of(kernel)); i++)
        cx(d, 1, 1'b1, sh(d, out_of(kernel) + i), 32'hdead_0000, rd);
      cx(d, 1, 1'b0, sh(d, out_of(kernel)), 0, rd);   // writes landed
    end
  endtask

  longint t [NK][4];   // [kernel][1 core, 4 cores, 8 single, 8 local]
  longint t_pool;
  string kname [NK] = '{"median filter", "matrix multiply", "1D DCT", "1D FFT"};

  initial begin
    logic [31:0] rd;
    foreach (core_req[l, p]) core_req[l][p] = '0;
    foreach (dbg_req[l, m]) dbg_req[l][m] = '0;
    #20 rst_n = 1'b1;
    repeat (20) wait_neg(0);

    // data and references
    for (int i = 0; i < N; i++) din[i] = int'($urandom_range(1000, 0)) - 500;
    for (int i = 0; i < N; i++) dref[i] = (i == 0 || i == N - 1) ? din[i] : med3(din[i-1], din[i], din[i+1]);
    foreach (ma[r, c]) begin ma[r][c] = int'($urandom_range(200, 0)) - 100; mb[r][c] = int'($urandom_range(200, 0)) - 100; end
    foreach (mref[r, c]) begin
      mref[r][c] = 0;
      for (int k = 0; k < M; k++) mref[r][c] += ma[r][k] * mb[k][c];
    end
    foreach (dx[r, c]) dx[r][c] = int'($urandom_range(255, 0)) - 128;
    foreach (dcoef[k, n])
      dcoef[k][n] = int'($floor(4096.0 * ((k == 0) ? $sqrt(1.0 / M) : $sqrt(2.0 / M))
                                * $cos((2 * n + 1) * k * 3.14159265358979 / (2 * M)) + 0.5));
    foreach (dyref[r, k]) begin
      dyref[r][k] = 0;
      for (int n = 0; n < M; n++) dyref[r][k] += dx[r][n] * dcoef[k][n];
      dyref[r][k] = dyref[r][k] >>> 12;
    end
    foreach (fx[r, c]) fx[r][c] = int'($urandom_range(255, 0)) - 128;
    for (int j = 0; j < M / 2; j++) begin
      twr[j] = int'($floor(4096.0 * $cos(2.0 * 3.14159265358979 * j / M) + 0.5));
      twi[j] = int'($floor(-4096.0 * $sin(2.0 * 3.14159265358979 * j / M) + 0.5));
    end
    foreach (fref_re[r, k]) begin
      fref_re[r][k] = 0.0; fref_im[r][k] = 0.0;
      for (int n = 0; n < M; n++) begin
        fref_re[r][k] += fx[r][n] * $cos(2.0 * 3.14159265358979 * k * n / M);
        fref_im[r][k] -= fx[r][n] * $sin(2.0 * 3.14159265358979 * k * n / M);
      end
    end
    // the coefficients and twiddles in every core's private RAM
    for (int l = 0; l < NL; l++)
      for (int p = 0; p < NUM_PE; p++)
      begin
        foreach (dcoef[k, n]) cx(l, p, 1'b1, PRIV | 32'((k * M + n) * 4), 32'(dcoef[k][n]), rd);
        for (int j = 0; j < M / 2; j++) begin
          cx(l, p, 1'b1, PRIV | 32'((TW + 2 * j) * 4), 32'(twr[j]), rd);
          cx(l, p, 1'b1, PRIV | 32'((TW + 2 * j + 1) * 4), 32'(twi[j]), rd);
        end
      end
    // a copy on each die
    for (int d = 0; d < NL; d++) begin
      for (int i = 0; i < N; i++) cx(d, 0, 1'b1, sh(d, IN + i), 32'(din[i]), rd);
      foreach (ma[r, c]) begin
        cx(d, 0, 1'b1, sh(d, MA + r * M + c), 32'(ma[r][c]), rd);
        cx(d, 0, 1'b1, sh(d, MB + r * M + c), 32'(mb[r][c]), rd);
        cx(d, 0, 1'b1, sh(d, DX + r * M + c), 32'(dx[r][c]), rd);
        cx(d, 0, 1'b1, sh(d, FX + r * M + c), 32'(fx[r][c]), rd);
      end
      cx(d, 0, 1'b0, sh(d, MB), 0, rd);
    end

    for (int k = 0; k < NK; k++) begin
      int nout;
      nout = nout_of(k);
      clear_out(k); run(k, 1, 0, t[k][0]); verify(k, 0, 0, nout);
      clear_out(k); run(k, 4, 0, t[k][1]); verify(k, 0, 0, nout);
      clear_out(k); run(k, 8, 0, t[k][2]); verify(k, 0, 0, nout);
      clear_out(k); run(k, 8, 1, t[k][3]); verify(k, 0, 0, nout / 2); verify(k, 1, nout / 2, nout);
      $display("%-16s cycles: 1 core %0d, 4 cores %0d, 8 cores single %0d, 8 cores local %0d",
               kname[k], t[k][0], t[k][1], t[k][2], t[k][3]);
      checks++; if (!(t[k][1] < t[k][0])) begin failures++; $display("%s: 4 cores not faster than 1", kname[k]); end
      checks++; if (!(t[k][3] < t[k][1])) begin failures++; $display("%s: 8 cores on local data not faster than 4", kname[k]); end
      checks++; if (t[k][3] > t[k][2])    begin failures++; $display("%s: local data slower than single", kname[k]); end
      $display("%-16s 8 cores (local) against 4: %0d%% less time; local against single: %0d%% less time",
               kname[k], (t[k][1] - t[k][3]) * 100 / t[k][1], (t[k][2] - t[k][3]) * 100 / t[k][2]);
    end

    // Median filter with resource pooling: four cores of die 0, two of them
    // on the copy in die 1's shared memory.
    clear_out(0); run(0, 4, 2, t_pool); verify(0, 0, 0, N / 2); verify(0, 1, N / 2, N);
    $display("median filter, 4 cores: one memory %0d cycles, pooled over two %0d cycles",
             t[0][1], t_pool);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
