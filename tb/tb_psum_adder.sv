// Self-checking test of the saturating partial-sum adder at the default
// 6-bit width: exhaustive accumulator values, random ADC codes, with and
// without first (which ignores the accumulator).
module tb_psum_adder;
  localparam int ACC_W = 6, ADC_W = 8;
  logic signed [ACC_W-1:0] acc_in, sum;
  logic signed [ADC_W-1:0] code;
  logic first;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  psum_adder #(.ACC_W(ACC_W), .ADC_W(ADC_W)) dut (.acc_in, .code, .first, .sum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -32; a <= 31; a++) begin
      for (int t = 0; t < 20; t++) begin
        int c, e;
        c = int'($urandom_range(128)) - 64;
        first = (t % 5 == 0);
        acc_in = ACC_W'(a); code = ADC_W'(c); #1;
        e = (first ? 0 : a) + c;
        if (e > 31) begin e = 31; sat_hi++; end
        if (e < -32) begin e = -32; sat_lo++; end
        checks++;
        if (int'(sum) != e) begin
          failures++; $display("FAIL a=%0d c=%0d first=%0b sum=%0d exp=%0d", a, c, first, sum, e);
        end
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
