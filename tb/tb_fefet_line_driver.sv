// Self-checking test of the line drivers (reduced to 10 rows x 6 columns).
// For random commands, checks every line against the read levels (HL = in,
// HLb = ~in on active rows, WL = VDD, BL = BLb = VR), the write levels
// (HL = HLb = 0, WL = +VWL on the selected column and -VWL elsewhere,
// BL/BLb = +VW/-VW for a 1 and -VW/+VW for a 0) and idle (all 0 V).
module tb_fefet_line_driver;
  import fefet_pkg::*;
  localparam int M = 10, N = 6;

  xbar_mode_e   mode;
  logic [M-1:0] in_bits, wr_bits, hl, hlb;
  logic [$clog2(M+1)-1:0] rows_active;
  logic [$clog2(N)-1:0]   wr_col;
  line_level_e  bl [M];
  line_level_e  blb [M];
  line_level_e  wl [N];
  int checks = 0, failures = 0;

  fefet_line_driver #(.M(M), .N(N)) dut (.mode, .in_bits, .rows_active, .wr_bits, .wr_col,
                                         .hl, .hlb, .bl, .blb, .wl);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int m;
      m = $urandom_range(2);
      mode = (m == 0) ? XB_IDLE : (m == 1) ? XB_WRITE : XB_READ;
      in_bits = M'($urandom); wr_bits = M'($urandom);
      rows_active = 4'($urandom_range(M));
      wr_col = 3'($urandom_range(N - 1));
      #1;
      for (int r = 0; r < M; r++) begin
        if (mode == XB_READ) begin
          chk(hl[r] == ((r < rows_active) ? in_bits[r] : 1'b0), "read HL");
          chk(hlb[r] == ((r < rows_active) ? !in_bits[r] : 1'b0), "read HLb");
          chk(bl[r] == LV_VR && blb[r] == LV_VR, "read BL/BLb");
        end else if (mode == XB_WRITE) begin
          chk(hl[r] == 0 && hlb[r] == 0, "write HL/HLb zero");
          chk(bl[r]  == (wr_bits[r] ? LV_VW_P : LV_VW_N), "write BL");
          chk(blb[r] == (wr_bits[r] ? LV_VW_N : LV_VW_P), "write BLb");
        end else begin
          chk(hl[r] == 0 && hlb[r] == 0 && bl[r] == LV_ZERO && blb[r] == LV_ZERO, "idle rows");
        end
      end
      for (int j = 0; j < N; j++) begin
        if (mode == XB_READ)       chk(wl[j] == LV_VDD, "read WL");
        else if (mode == XB_WRITE) chk(wl[j] == ((j == wr_col) ? LV_VWL_P : LV_VWL_N), "write WL");
        else                       chk(wl[j] == LV_ZERO, "idle WL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
