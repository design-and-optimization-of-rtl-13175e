// End-to-end test of the BCNN engine with every parameter at its default
// (64 x 64 array, S = 16 register rows, 6-bit partial sums).
//
// Runs whole convolution layers through the engine: random binary inputs
// X (WO+WF-1 x HO+HF-1 x Cin) and filters (Cout x WF x HF x Cin), random
// per-channel thresholds. The testbench acts as the input, weight and
// threshold buffers, answering the engine's requests from its own arrays
// (unrolled row u = (p*HF + q)*Cin + c of the window at output pixel
// pix = oy*WO + ox). Every result bit is compared with an independent
// evaluation of the binary convolution: the +/-1 inner product of each row
// tile, accumulated tile by tile with the same partial-sum width as the engine, then compared with
// the channel threshold (or, when the layer fits in M rows, the tile sum
// compared directly). It also checks the number of busy cycles against
// col_tiles*row_tiles*(npix + ceil(npix/S)*N) and counts how often each
// mechanism occurred: column programming, tile reuse over several windows,
// the accumulation path, the direct comparator path, a short last row tile
// (masked rows), a short last window group, a short last column tile,
// non-zero thresholds and partial-sum saturation.
module tb_fefet_bcnn_accel_full;
  import fefet_pkg::*;
  localparam int M = 64, N = 64, S = 16, ACC_W = 6;
  localparam int MAXC = 128, MAXK = 256, MAXD = 16;

  logic clk = 0, rst_n, start, busy, done;
  logic [GEOM_W-1:0] cfg_k, cfg_cout, cfg_npix;
  logic wt_valid, in_valid, out_valid;
  logic [GEOM_W-1:0] wt_ctile, wt_rtile, in_pix, in_rtile, cur_ctile, out_pix, out_ctile;
  logic [$clog2(N)-1:0] wt_col;
  logic [M-1:0] wt_bits, in_bits;
  logic signed [THR_W-1:0] theta [N];
  logic [N-1:0] out_bits;
  logic [M-1:0] weights [N];

  fefet_bcnn_accel dut (.*);

  // Layer under test.
  int cin, wf, hf, wo, ho, cout, k_rows, npix;
  bit xmem [MAXD][MAXD][MAXC];   // X(x, y, c)
  bit wmem [MAXC][MAXK];         // filter f, unrolled row u
  int thr  [MAXC];

  int checks = 0, failures = 0, cycles = 0;
  int n_prog = 0, n_read = 0, n_reuse = 0, n_accum = 0, n_direct = 0, n_mask = 0;
  int n_short_grp = 0, n_short_ct = 0, n_thr = 0, n_sat = 0;

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 400000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic bit xin(int pix, int u);
    int ox, oy, p, q, c;
    ox = pix % wo; oy = pix / wo;
    c = u % cin; q = (u / cin) % hf; p = u / (cin * hf);
    return xmem[ox + p][oy + q][c];
  endfunction

  // Buffers: combinational answers to the engine's requests.
  always_comb begin
    for (int r = 0; r < M; r++) begin
      int u, f;
      u = int'(wt_rtile) * M + r;
      f = int'(wt_ctile) * N + int'(wt_col);
      wt_bits[r] = (u < k_rows && f < cout) ? wmem[f][u] : 1'b0;
      u = int'(in_rtile) * M + r;
      in_bits[r] = (u < k_rows && int'(in_pix) < npix) ? xin(int'(in_pix), u) : 1'b0;
    end
    for (int j = 0; j < N; j++) begin
      int f;
      f = int'(cur_ctile) * N + j;
      theta[j] = (f < cout) ? THR_W'(thr[f]) : '0;
    end
  end

  // Independent evaluation of one output bit.
  function automatic bit ref_bit(int f, int pix, output bit saturated);
    int rtn, acc, lo, hi;
    rtn = (k_rows + M - 1) / M;
    hi = (1 << (ACC_W - 1)) - 1; lo = -(1 << (ACC_W - 1));
    acc = 0; saturated = 0;
    for (int rt = 0; rt < rtn; rt++) begin
      int part;
      part = 0;
      for (int u = rt * M; u < k_rows && u < (rt + 1) * M; u++)
        part += (xin(pix, u) == wmem[f][u]) ? 1 : -1;
      if (rtn == 1) return part >= thr[f];
      acc += part;
      if (acc > hi) begin acc = hi; saturated = 1; end
      if (acc < lo) begin acc = lo; saturated = 1; end
    end
    return acc >= thr[f];
  endfunction

  // Result checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int j = 0; j < N; j++) begin
        int f;
        bit e, sat;
        f = int'(out_ctile) * N + j;
        if (f < cout) begin
          e = ref_bit(f, int'(out_pix), sat);
          if (sat) n_sat++;
          checks++;
          if (out_bits[j] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL pix %0d channel %0d: got %0b expected %0b", out_pix, f, out_bits[j], e);
          end
        end
      end
      if ((k_rows + M - 1) / M > 1) n_accum++; else n_direct++;
    end
    if (rst_n && wt_valid) n_prog++;
    if (rst_n && in_valid) begin
      n_read++;
      if (int'(in_rtile) * M + M > k_rows) n_mask++;
    end
  end

  task automatic run_layer(int cin_i, int wf_i, int hf_i, int wo_i, int ho_i, int cout_i);
    int rtn, ctn, grp, expect_cycles, busy_cycles, outs0;
    cin = cin_i; wf = wf_i; hf = hf_i; wo = wo_i; ho = ho_i; cout = cout_i;
    k_rows = cin * wf * hf; npix = wo * ho;
    for (int x = 0; x < wo + wf - 1; x++)
      for (int y = 0; y < ho + hf - 1; y++)
        for (int c = 0; c < cin; c++) xmem[x][y][c] = 1'($urandom);
    for (int f = 0; f < cout; f++) begin
      for (int u = 0; u < k_rows; u++) wmem[f][u] = 1'($urandom);
      thr[f] = (f % 3 == 0) ? 0 : int'($urandom_range(6)) - 3;
      if (thr[f] != 0) n_thr++;
    end
    rtn = (k_rows + M - 1) / M; ctn = (cout + N - 1) / N; grp = (npix + S - 1) / S;
    expect_cycles = ctn * rtn * (npix + grp * N);
    if (npix % S != 0) n_short_grp++;
    if (cout % N != 0) n_short_ct++;
    if (npix > 1 && S > 1) n_reuse += ctn * rtn * grp;
    cfg_k = GEOM_W'(k_rows); cfg_cout = GEOM_W'(cout); cfg_npix = GEOM_W'(npix);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    checks++;
    if (busy_cycles != expect_cycles) begin
      failures++; $display("FAIL cycle count %0d expected %0d", busy_cycles, expect_cycles);
    end
    $display("layer Cin=%0d %0dx%0d filters, %0dx%0d outputs, Cout=%0d: K=%0d, %0d busy cycles (expected %0d)",
             cin, wf, hf, wo, ho, cout, k_rows, busy_cycles, expect_cycles);
    repeat (2) @(negedge clk);
  endtask

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-34s %0d", what, count);
  endtask

  initial begin
    rst_n = 0; start = 0; cfg_k = 0; cfg_cout = 0; cfg_npix = 0;
    cin = 1; wf = 1; hf = 1; wo = 1; ho = 1; cout = 1; k_rows = 1; npix = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer(16, 3, 3, 9, 7, 80);
    run_layer(7, 3, 3, 6, 6, 64);
    $display("mechanisms:");
    need(n_prog,      "column programming cycles");
    need(n_read,      "array reads");
    need(n_reuse,     "tiles reused over several windows");
    need(n_accum,     "accumulation-path outputs");
    need(n_direct,    "direct comparator-path outputs");
    need(n_mask,      "reads with masked rows");
    need(n_short_grp, "layers with a short window group");
    need(n_short_ct,  "layers with a short column tile");
    need(n_thr,       "non-zero thresholds");
    need(n_sat,       "saturated partial sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
