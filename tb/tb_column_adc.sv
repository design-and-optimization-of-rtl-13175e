// Self-checking test of the column ADC model: for every row count K and
// every matching count c <= K the code must be the +/-1 inner product 2c - K.
module tb_column_adc;
  localparam int CNT_W = 7;
  logic [CNT_W-1:0] vl_count, offset;
  logic signed [CNT_W:0] code;
  int checks = 0, failures = 0;

  column_adc #(.CNT_W(CNT_W)) dut (.vl_count, .offset, .code);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k <= 64; k++) begin
      for (int c = 0; c <= k; c++) begin
        vl_count = CNT_W'(c); offset = CNT_W'(k); #1;
        checks++;
        if (int'(code) != 2 * c - k) begin
          failures++; $display("FAIL c=%0d k=%0d code=%0d", c, k, code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
