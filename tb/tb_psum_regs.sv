// Self-checking test of the partial-sum register rows (S = 16, 6 bits):
// reset clears all rows, random writes and reads match a reference array,
// and a cycle without write enable changes nothing.
module tb_psum_regs;
  localparam int S = 16, ACC_W = 6;
  logic clk = 0, rst_n, we;
  logic [3:0] rd_row, wr_row;
  logic signed [ACC_W-1:0] rd_data, wr_data;
  logic signed [ACC_W-1:0] model [S];
  int checks = 0, failures = 0, cycles = 0;

  psum_regs #(.S(S), .ACC_W(ACC_W)) dut (.clk, .rst_n, .rd_row, .rd_data, .we, .wr_row, .wr_data);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    rst_n = 0; we = 0; rd_row = 0; wr_row = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < S; s++) begin
      model[s] = '0;
      rd_row = 4'(s); #1;
      checks++;
      if (rd_data !== '0) begin failures++; $display("FAIL row %0d not cleared", s); end
    end
    for (int t = 0; t < 600; t++) begin
      we = 1'($urandom); wr_row = 4'($urandom); wr_data = ACC_W'($urandom);
      @(posedge clk);
      if (we) model[wr_row] = wr_data;
      #1;
      rd_row = 4'($urandom); #1;
      checks++;
      if (rd_data !== model[rd_row]) begin
        failures++; $display("FAIL row %0d read %0d expected %0d", rd_row, rd_data, model[rd_row]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
