// Workload test: the register-row sweep S = 1, 2, 4, 8, 16, 32, 64 on a
// 64 x 64 array with 6-bit partial sums. S = 1 is the vertical-move order
// (reprogram for every window); larger S is the strided-move order.
//
// One engine is built per S value and all run the same layer at once
// (Cin = 16, 3x3 filters -> K = 144, three row tiles; Cout = 64;
// 8 x 8 output pixels). For each engine the testbench checks every result
// bit against an independent evaluation (per-tile +/-1 sums accumulated with
// 6-bit saturation, then compared with the channel threshold) and checks
// the busy time against the execution-time formulas:
//   vertical (S = 1): ceil(Cout/N)*ceil(K/M)*npix*(1 + N)
//   strided         : ceil(Cout/N)*ceil(K/M)*(npix + ceil(npix/S)*N)
// It prints the cycle count and the number of column writes of each S.
module tb_register_row_sweep;
  import fefet_pkg::*;
  localparam int M = 64, N = 64, ACC_W = 6, NS = 7;
  localparam int SV [NS] = '{1, 2, 4, 8, 16, 32, 64};
  localparam int CIN = 16, WF = 3, HF = 3, WO = 8, HO = 8, COUT = 64;
  localparam int K = CIN * WF * HF, NPIX = WO * HO;
  localparam int RTN = (K + M - 1) / M, CTN = (COUT + N - 1) / N;

  logic clk = 0, rst_n, start;
  logic [GEOM_W-1:0] cfg_k, cfg_cout, cfg_npix;

  bit xmem [WO+WF-1][HO+HF-1][CIN];
  bit wmem [COUT][K];
  int thr  [COUT];

  int checks = 0, failures = 0, cycles = 0;
  int busy_cycles [NS];
  int col_writes  [NS];
  bit finished    [NS];

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic bit xin(int pix, int u);
    int c, q, p;
    c = u % CIN; q = (u / CIN) % HF; p = u / (CIN * HF);
    return xmem[pix % WO + p][pix / WO + q][c];
  endfunction

  function automatic bit ref_bit(int f, int pix);
    int acc, part;
    acc = 0;
    for (int rt = 0; rt < RTN; rt++) begin
      part = 0;
      for (int u = rt * M; u < K && u < (rt + 1) * M; u++)
        part += (xin(pix, u) == wmem[f][u]) ? 1 : -1;
      acc += part;
      if (acc > 31) acc = 31;
      if (acc < -32) acc = -32;
    end
    return acc >= thr[f];
  endfunction

  for (genvar i = 0; i < NS; i++) begin : g_s
    logic busy, done, wt_valid, in_valid, out_valid;
    logic [GEOM_W-1:0] wt_ctile, wt_rtile, in_pix, in_rtile, cur_ctile, out_pix, out_ctile;
    logic [$clog2(N)-1:0] wt_col;
    logic [M-1:0] wt_bits, in_bits;
    logic signed [THR_W-1:0] theta [N];
    logic [N-1:0] out_bits;
    logic [M-1:0] weights [N];

    fefet_bcnn_accel #(.S(SV[i])) dut (.*);

    always_comb begin
      for (int r = 0; r < M; r++) begin
        int u;
        u = int'(wt_rtile) * M + r;
        wt_bits[r] = (u < K) ? wmem[int'(wt_ctile) * N + int'(wt_col)][u] : 1'b0;
        u = int'(in_rtile) * M + r;
        in_bits[r] = (u < K) ? xin(int'(in_pix), u) : 1'b0;
      end
      for (int j = 0; j < N; j++) theta[j] = THR_W'(thr[int'(cur_ctile) * N + j]);
    end

    always @(posedge clk) begin
      if (rst_n && busy) busy_cycles[i]++;
      if (rst_n && wt_valid) col_writes[i]++;
      if (rst_n && done) finished[i] = 1;
      if (rst_n && out_valid) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (out_bits[j] !== ref_bit(int'(out_ctile) * N + j, int'(out_pix))) begin
            failures++;
            if (failures < 10) $display("FAIL S=%0d pix %0d channel %0d", SV[i], out_pix, j);
          end
        end
      end
    end
  end

  initial begin
    bit all_done;
    for (int x = 0; x < WO + WF - 1; x++)
      for (int y = 0; y < HO + HF - 1; y++)
        for (int c = 0; c < CIN; c++) xmem[x][y][c] = 1'($urandom);
    for (int f = 0; f < COUT; f++) begin
      for (int u = 0; u < K; u++) wmem[f][u] = 1'($urandom);
      thr[f] = int'($urandom_range(6)) - 3;
    end
    for (int i = 0; i < NS; i++) begin busy_cycles[i] = 0; col_writes[i] = 0; finished[i] = 0; end
    rst_n = 0; start = 0;
    cfg_k = GEOM_W'(K); cfg_cout = GEOM_W'(COUT); cfg_npix = GEOM_W'(NPIX);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int i = 0; i < NS; i++) all_done &= finished[i];
    end while (!all_done);
    for (int i = 0; i < NS; i++) begin
      int expect_cycles;
      if (SV[i] == 1) expect_cycles = CTN * RTN * NPIX * (1 + N);
      else            expect_cycles = CTN * RTN * (NPIX + ((NPIX + SV[i] - 1) / SV[i]) * N);
      checks++;
      if (busy_cycles[i] != expect_cycles) begin
        failures++; $display("FAIL S=%0d busy %0d expected %0d", SV[i], busy_cycles[i], expect_cycles);
      end
      $display("S=%2d: %6d cycles (formula %6d), %5d column writes", SV[i], busy_cycles[i],
               expect_cycles, col_writes[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
