// Self-checking test of the binarizer: every 6-bit signed sum against
// random signed thresholds, plus theta = 0 (plain sign).
module tb_binarizer;
  localparam int ACC_W = 6, THR_W = 16;
  logic signed [ACC_W-1:0] acc;
  logic signed [THR_W-1:0] theta;
  logic out_bit;
  int checks = 0, failures = 0;

  binarizer #(.ACC_W(ACC_W), .THR_W(THR_W)) dut (.acc, .theta, .out_bit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -32; a <= 31; a++) begin
      for (int t = 0; t < 10; t++) begin
        int th;
        th = (t == 0) ? 0 : (t == 1) ? a : (t == 2) ? a + 1 : int'($urandom_range(100)) - 50;
        acc = ACC_W'(a); theta = THR_W'(th); #1;
        checks++;
        if (out_bit !== (a >= th)) begin
          failures++; $display("FAIL acc=%0d theta=%0d out=%0b", a, th, out_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
