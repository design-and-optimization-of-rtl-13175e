// Workload test: one VGG-16 convolution layer (Cin = Cout = 512, 3x3 filters,
// 32x32 output pixels) on the engine with every parameter at its default
// (64 x 64 array, S = 16 register rows, 6-bit partial sums).
//
// The layer needs 72 row tiles x 8 column tiles; the engine programs each
// tile once per group of 16 windows. Inputs, weights and thresholds are
// random. Data is kept packed, 64 bits per row tile: unrolled row
// u = (p*3 + q)*512 + c, so row tile rt covers filter tap (p, q) = rt/8 and
// channels 64*(rt%8) .. +63. Every one of the 512 x 1024 result bits is
// compared with a reference that accumulates the per-tile +/-1 sums
// 2*popcount(XNOR) - 64 with the same 6-bit saturation and compares with the
// channel threshold. The busy time must be
// 8 * 72 * (1024 + 64*64) = 2,949,120 cycles (29.5 ms at 100 MHz).
// Also reported: how many result bits equal the unsaturated sign.
module tb_vgg16_conv_layer;
  import fefet_pkg::*;
  localparam int M = 64, N = 64, S = 16, ACC_W = 6;
  localparam int CIN = 512, COUT = 512, WO = 32, HO = 32, WF = 3, HF = 3;
  localparam int K = CIN * WF * HF, NPIX = WO * HO;
  localparam int RT = K / M, CT = COUT / N, CW = CIN / 64;
  localparam int EXPECT = CT * RT * (NPIX + ((NPIX + S - 1) / S) * N);

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

  logic [63:0] xw [WO+WF-1][HO+HF-1][CW];   // X(x, y, 64-channel slice)
  logic [63:0] ww [COUT][RT];               // filter f, row tile
  int          thr [COUT];

  int checks = 0, failures = 0, cycles = 0, busy_cycles = 0, outs = 0;
  int n_exact = 0, n_sat = 0;
  longint n_prog = 0, n_read = 0;

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > EXPECT + 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [63:0] xtile(int pix, int rt);
    int p, q;
    p = (rt / CW) / HF; q = (rt / CW) % HF;
    return xw[pix % WO + p][pix / WO + q][rt % CW];
  endfunction

  always_comb begin
    wt_bits = ww[int'(wt_ctile) * N + int'(wt_col)][wt_rtile];
    in_bits = xtile(int'(in_pix), int'(in_rtile));
    for (int j = 0; j < N; j++) theta[j] = THR_W'(thr[int'(cur_ctile) * N + j]);
  end

  always @(posedge clk) begin
    if (rst_n && wt_valid) n_prog++;
    if (rst_n && in_valid) n_read++;
    if (rst_n && busy) busy_cycles++;
    if (rst_n && out_valid) begin
      outs++;
      for (int j = 0; j < N; j++) begin
        int f, acc, exact, part;
        bit sat, e;
        f = int'(out_ctile) * N + j;
        acc = 0; exact = 0; sat = 0;
        for (int rt = 0; rt < RT; rt++) begin
          part = 2 * $countones(~(xtile(int'(out_pix), rt) ^ ww[f][rt])) - M;
          exact += part;
          acc += part;
          if (acc > 31)  begin acc = 31;  sat = 1; end
          if (acc < -32) begin acc = -32; sat = 1; end
        end
        e = acc >= thr[f];
        if (sat) n_sat++;
        if (out_bits[j] == (exact >= thr[f])) n_exact++;
        checks++;
        if (out_bits[j] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL pix %0d channel %0d: got %0b expected %0b", out_pix, f, out_bits[j], e);
        end
      end
    end
  end

  initial begin
    for (int x = 0; x < WO + WF - 1; x++)
      for (int y = 0; y < HO + HF - 1; y++)
        for (int c = 0; c < CW; c++) xw[x][y][c] = {$urandom, $urandom};
    for (int f = 0; f < COUT; f++) begin
      for (int rt = 0; rt < RT; rt++) ww[f][rt] = {$urandom, $urandom};
      thr[f] = int'($urandom_range(8)) - 4;
    end
    rst_n = 0; start = 0;
    cfg_k = GEOM_W'(K); cfg_cout = GEOM_W'(COUT); cfg_npix = GEOM_W'(NPIX);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk); @(negedge clk);
    checks++;
    if (busy_cycles != EXPECT) begin
      failures++; $display("FAIL busy cycles %0d expected %0d", busy_cycles, EXPECT);
    end
    checks++;
    if (outs != CT * NPIX) begin failures++; $display("FAIL %0d output events, expected %0d", outs, CT * NPIX); end
    checks++;
    if (n_prog != longint'(CT) * RT * ((NPIX + S - 1) / S) * N) begin failures++; $display("FAIL column writes %0d", n_prog); end
    $display("busy cycles %0d (expected %0d) = %0.1f ms at 100 MHz; column writes %0d, reads %0d",
             busy_cycles, EXPECT, busy_cycles * 1.0e-5, n_prog, n_read);
    $display("result bits with saturated partial sums: %0d of %0d; equal to the unsaturated sign: %0d",
             n_sat, COUT * NPIX, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
