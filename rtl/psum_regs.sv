// Partial-sum register rows of one column.
//
// S rows of ACC_W-bit signed registers. Each row holds the running partial
// sum of one convolution window while the crossbar, programmed with one
// weight tile, is read for S consecutive windows (strided moves). One read
// port (combinational, rd_row) and one write port (we, wr_row, wr_data,
// written at the rising clock edge). Reset clears every row.
//
// The number of rows S and the width B are published design parameters;
// the port structure and reset are this design's.
module psum_regs #(
  parameter int unsigned S     = 16,
  parameter int unsigned ACC_W = 6,
  localparam int unsigned SEL_W = (S > 1) ? $clog2(S) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [SEL_W-1:0] rd_row,
  output logic signed [ACC_W-1:0] rd_data,
  input  logic                    we,
  input  logic        [SEL_W-1:0] wr_row,
  input  logic signed [ACC_W-1:0] wr_data
);

  logic signed [ACC_W-1:0] rows [S];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++) rows[s] <= '0;
    end else if (we) begin
      rows[wr_row] <= wr_data;
    end
  end

  assign rd_data = rows[rd_row];

endmodule
