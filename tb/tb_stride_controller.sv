// Self-checking test of the strided-move sequencer (reduced: M = 8, N = 4).
// For several layer shapes and register-row counts it rebuilds the expected
// command stream from the loop nest column tile -> window group -> row tile
// -> (program N columns, read the group's windows), compares it cycle by
// cycle with the controller's outputs, checks the rows driven, the register
// row and first/last flags, the result tags, and that busy lasts exactly
// col_tiles*row_tiles*(npix + ceil(npix/S)*N) cycles.
module tb_stride_controller;
  import fefet_pkg::*;
  localparam int M = 8, N = 4, S = 3;

  logic clk = 0, rst_n, start, busy, done, first, last, use_analog, out_valid;
  logic [GEOM_W-1:0] cfg_k, cfg_cout, cfg_npix, wt_ctile, wt_rtile, in_pix, in_rtile;
  logic [GEOM_W-1:0] out_pix, out_ctile, cur_ctile;
  xbar_mode_e mode;
  logic [1:0] wr_col, reg_row;
  logic [3:0] rows_active;
  int checks = 0, failures = 0, cycles = 0;

  stride_controller #(.M(M), .N(N), .S(S)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  task automatic run_layer(input int k, input int cout, input int npix);
    int rtn, ctn, grp, busy_cycles, expect_cycles, outs;
    rtn = (k + M - 1) / M; ctn = (cout + N - 1) / N; grp = (npix + S - 1) / S;
    expect_cycles = ctn * rtn * (npix + grp * N);
    cfg_k = GEOM_W'(k); cfg_cout = GEOM_W'(cout); cfg_npix = GEOM_W'(npix);
    start = 1; @(posedge clk); #1; start = 0;
    busy_cycles = 0; outs = 0;
    for (int ct = 0; ct < ctn; ct++)
      for (int g = 0; g < grp; g++)
        for (int rt = 0; rt < rtn; rt++) begin
          int glen, rows;
          glen = (npix - g * S > S) ? S : npix - g * S;
          rows = (k - rt * M > M) ? M : k - rt * M;
          for (int j = 0; j < N; j++) begin
            chk(busy && mode == XB_WRITE, "program cycle");
            chk(int'(wr_col) == j && int'(wt_ctile) == ct && int'(wt_rtile) == rt, "weight request");
            if (out_valid) outs++;
            @(posedge clk); #1; busy_cycles++;
          end
          for (int s = 0; s < glen; s++) begin
            chk(busy && mode == XB_READ, "read cycle");
            chk(int'(in_pix) == g * S + s && int'(in_rtile) == rt, "input request");
            chk(int'(reg_row) == s, "register row");
            chk(int'(rows_active) == rows, "rows active");
            chk(first == (rt == 0) && last == (rt == rtn - 1), "first/last");
            chk(use_analog == (rtn == 1), "path select");
            chk(int'(cur_ctile) == ct, "column tile");
            @(posedge clk); #1; busy_cycles++;
            if (rt == rtn - 1) begin
              chk(out_valid && int'(out_pix) == g * S + s && int'(out_ctile) == ct, "result tag");
              outs++;
            end
          end
        end
    chk(done && !busy, "done pulse");
    chk(busy_cycles == expect_cycles, "cycle count");
    $display("layer K=%0d Cout=%0d npix=%0d: %0d cycles (expected %0d), %0d outputs",
             k, cout, npix, busy_cycles, expect_cycles, outs);
    @(posedge clk); #1;
    chk(!done && !busy, "idle after done");
  endtask

  initial begin
    rst_n = 0; start = 0; cfg_k = 0; cfg_cout = 0; cfg_npix = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_layer(20, 6, 7);    // 3 row tiles (last one 4 rows), 2 column tiles, partial group
    run_layer(8, 4, 3);     // fits: direct path, one group
    run_layer(5, 9, 10);    // one short row tile, 3 column tiles
    run_layer(17, 1, 1);    // single window
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
