// Interface circuit of one crossbar column.
//
// Two paths turn the column current into the output bit of this output
// channel:
//   * direct path (layer fits in the array): current-to-voltage converter and
//     comparator. Vref is set to ceil((K + theta) / 2) cell currents, so the
//     bit is 1 when the +/-1 inner product 2*count - K is >= theta.
//   * accumulation path (layer split into row tiles): ADC -> shared adder ->
//     one of S partial-sum registers; on the last row tile of a window the
//     new sum is binarized against theta.
// A MUX (use_analog) picks the path. The chosen bit is registered.
//
// Timing: on a cycle with rd_en, vl_count is the current for window slot
// reg_row and row tile first/last. The register row is written at the next
// rising edge; if last is set, out_bit holds the window's result from that
// edge on (one cycle after the read).
//
// The two paths and the MUX are the published interface circuit; the
// threshold convention and the register timing are this design's.
module interface_column #(
  parameter int unsigned M     = 64,
  parameter int unsigned S     = 16,
  parameter int unsigned ACC_W = 6,
  parameter int unsigned THR_W = 16,
  localparam int unsigned CNT_W = $clog2(M + 1),
  localparam int unsigned ADC_W = CNT_W + 1,
  localparam int unsigned SEL_W = (S > 1) ? $clog2(S) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [CNT_W-1:0] vl_count,
  input  logic        [CNT_W-1:0] rows_active,  // K of this row tile
  input  logic signed [THR_W-1:0] theta,
  input  logic                    rd_en,
  input  logic        [SEL_W-1:0] reg_row,
  input  logic                    first,
  input  logic                    last,
  input  logic                    use_analog,
  output logic                    out_bit
);

  localparam int unsigned VREF_W = THR_W + 2;

  // Direct path.
  logic signed [VREF_W-1:0] vref;
  logic                     cmp_bit;
  assign vref = (VREF_W'(signed'({1'b0, rows_active})) + VREF_W'(theta)
                 + VREF_W'(signed'(1))) >>> 1;

  iv_comparator #(.CNT_W(CNT_W), .VREF_W(VREF_W)) u_cmp (
    .vl_count   (vl_count),
    .vref_count (vref),
    .out_bit    (cmp_bit)
  );

  // Accumulation path.
  logic signed [ADC_W-1:0] code;
  logic signed [ACC_W-1:0] acc_old, acc_new;
  logic                    bin_bit;

  column_adc #(.CNT_W(CNT_W)) u_adc (
    .vl_count (vl_count),
    .offset   (rows_active),
    .code     (code)
  );

  psum_regs #(.S(S), .ACC_W(ACC_W)) u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_row  (reg_row),
    .rd_data (acc_old),
    .we      (rd_en && !use_analog),
    .wr_row  (reg_row),
    .wr_data (acc_new)
  );

  psum_adder #(.ACC_W(ACC_W), .ADC_W(ADC_W)) u_add (
    .acc_in (acc_old),
    .code   (code),
    .first  (first),
    .sum    (acc_new)
  );

  binarizer #(.ACC_W(ACC_W), .THR_W(THR_W)) u_bin (
    .acc     (acc_new),
    .theta   (theta),
    .out_bit (bin_bit)
  );

  // Output MUX and register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               out_bit <= 1'b0;
    else if (rd_en && last)   out_bit <= use_analog ? cmp_bit : bin_bit;
  end

endmodule
