// Self-checking test of the crossbar model (reduced to 12 x 5).
// Programs random columns with the write-scheme levels, keeping a reference
// copy of the weights, checks the stored bits (so a write to one column
// leaves the others alone) and compares every column current with the
// XNOR popcount of random input vectors, with some rows grounded.
module tb_fefet_crossbar;
  import fefet_pkg::*;
  localparam int M = 12, N = 5, CNT_W = $clog2(M + 1);

  logic [M-1:0] hl, hlb;
  line_level_e  bl [M];
  line_level_e  blb [M];
  line_level_e  wl [N];
  logic [CNT_W-1:0] vl_count [N];
  logic [M-1:0] weights [N];
  logic [M-1:0] ref_w [N];
  int checks = 0, failures = 0;

  fefet_crossbar #(.M(M), .N(N)) dut (.hl, .hlb, .bl, .blb, .wl, .vl_count, .weights);

  task automatic write_col(input int c, input logic [M-1:0] bits);
    hl = '0; hlb = '0;
    for (int r = 0; r < M; r++) begin
      bl[r]  = bits[r] ? LV_VW_P : LV_VW_N;
      blb[r] = bits[r] ? LV_VW_N : LV_VW_P;
    end
    for (int j = 0; j < N; j++) wl[j] = (j == c) ? LV_VWL_P : LV_VWL_N;
    #1;
    for (int j = 0; j < N; j++) wl[j] = LV_ZERO;
    for (int r = 0; r < M; r++) begin bl[r] = LV_ZERO; blb[r] = LV_ZERO; end
    #1;
    ref_w[c] = bits;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hl = '0; hlb = '0;
    for (int r = 0; r < M; r++) begin bl[r] = LV_ZERO; blb[r] = LV_ZERO; end
    for (int j = 0; j < N; j++) wl[j] = LV_ZERO;
    for (int j = 0; j < N; j++) write_col(j, M'($urandom));
    for (int t = 0; t < 60; t++) begin
      logic [M-1:0] in_v, mask;
      if (t % 6 == 0) write_col($urandom_range(N - 1), M'($urandom));
      for (int j = 0; j < N; j++) begin
        checks++;
        if (weights[j] !== ref_w[j]) begin
          failures++; $display("FAIL column %0d stored %h expected %h", j, weights[j], ref_w[j]);
        end
      end
      in_v = M'($urandom);
      mask = (t % 3 == 0) ? M'($urandom) : '1;
      hl = in_v & mask; hlb = ~in_v & mask;
      for (int r = 0; r < M; r++) begin bl[r] = LV_VR; blb[r] = LV_VR; end
      for (int j = 0; j < N; j++) wl[j] = LV_VDD;
      #1;
      for (int j = 0; j < N; j++) begin
        int exp_cnt;
        exp_cnt = $countones(~(in_v ^ ref_w[j]) & mask);
        checks++;
        if (int'(vl_count[j]) != exp_cnt) begin
          failures++; $display("FAIL col %0d count %0d expected %0d", j, vl_count[j], exp_cnt);
        end
      end
      hl = '0; hlb = '0;
      for (int j = 0; j < N; j++) wl[j] = LV_ZERO;
      for (int r = 0; r < M; r++) begin bl[r] = LV_ZERO; blb[r] = LV_ZERO; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
