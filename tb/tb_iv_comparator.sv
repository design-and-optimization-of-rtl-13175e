// Self-checking test of the current-to-voltage converter + comparator model:
// exhaustive column counts against random signed references, including
// references below zero and above the largest count.
module tb_iv_comparator;
  localparam int CNT_W = 7, VREF_W = 18;
  logic [CNT_W-1:0] vl_count;
  logic signed [VREF_W-1:0] vref_count;
  logic out_bit;
  int checks = 0, failures = 0;

  iv_comparator #(.CNT_W(CNT_W), .VREF_W(VREF_W)) dut (.vl_count, .vref_count, .out_bit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 64; c++) begin
      for (int t = 0; t < 8; t++) begin
        int v;
        v = (t == 0) ? c : (t == 1) ? c + 1 : int'($urandom_range(200)) - 100;
        vl_count = CNT_W'(c); vref_count = VREF_W'(v); #1;
        checks++;
        if (out_bit !== (c >= v)) begin
          failures++; $display("FAIL count %0d vref %0d -> %0b", c, v, out_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
