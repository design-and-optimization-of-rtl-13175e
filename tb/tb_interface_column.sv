// Self-checking test of one column interface (reduced: M = 16, S = 4,
// 8-bit partial sums). Runs episodes of either the direct comparator path
// (layer fits in one row tile) or the accumulation path (2 to 4 row tiles,
// the last one shorter, 1 to S windows interleaved through the register
// rows, as the strided order does), and checks every result bit against
// sum(2*count - K) >= theta one cycle after the window's last read.
module tb_interface_column;
  localparam int M = 16, S = 4, ACC_W = 8, THR_W = 16, CNT_W = 5;
  logic clk = 0, rst_n;
  logic [CNT_W-1:0] vl_count, rows_active;
  logic signed [THR_W-1:0] theta;
  logic rd_en, first, last, use_analog, out_bit;
  logic [1:0] reg_row;
  int checks = 0, failures = 0, cycles = 0, n_analog = 0, n_accum = 0;

  interface_column #(.M(M), .S(S), .ACC_W(ACC_W), .THR_W(THR_W)) dut (
    .clk, .rst_n, .vl_count, .rows_active, .theta, .rd_en, .reg_row, .first, .last,
    .use_analog, .out_bit);

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

  task automatic expect_bit(input logic e, input string what);
    checks++;
    if (out_bit !== e) begin failures++; $display("FAIL %s: got %0b expected %0b", what, out_bit, e); end
  endtask

  initial begin
    rst_n = 0; rd_en = 0; first = 0; last = 0; use_analog = 0; reg_row = 0;
    vl_count = 0; rows_active = 0; theta = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int ep = 0; ep < 200; ep++) begin
      int th;
      th = (ep % 4 == 0) ? 0 : int'($urandom_range(20)) - 10;
      theta = THR_W'(th);
      if (ep % 3 == 0) begin
        // Direct path.
        int k, c;
        k = $urandom_range(1, M);
        use_analog = 1; first = 1; last = 1; rd_en = 1; rows_active = CNT_W'(k);
        for (int s = 0; s < S; s++) begin
          c = $urandom_range(k);
          reg_row = 2'(s); vl_count = CNT_W'(c);
          @(posedge clk); #1;
          expect_bit((2 * c - k) >= th, "direct path");
          n_analog++;
        end
      end else begin
        int tiles, g, ktot;
        int sums [S];
        tiles = $urandom_range(2, 4);
        g = $urandom_range(1, S);
        ktot = (tiles - 1) * M + $urandom_range(1, M);
        use_analog = 0; rd_en = 1;
        for (int rt = 0; rt < tiles; rt++) begin
          int k;
          k = (ktot - rt * M > M) ? M : ktot - rt * M;
          rows_active = CNT_W'(k);
          first = (rt == 0); last = (rt == tiles - 1);
          for (int s = 0; s < g; s++) begin
            int c;
            c = $urandom_range(k);
            if (rt == 0) sums[s] = 0;
            sums[s] += 2 * c - k;
            reg_row = 2'(s); vl_count = CNT_W'(c);
            @(posedge clk); #1;
            if (rt == tiles - 1) begin
              expect_bit(sums[s] >= th, "accumulation path");
              n_accum++;
            end
          end
        end
      end
      rd_en = 0; first = 0; last = 0;
      @(posedge clk); #1;
    end
    checks++;
    if (n_analog == 0 || n_accum == 0) begin failures++; $display("FAIL a path was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
