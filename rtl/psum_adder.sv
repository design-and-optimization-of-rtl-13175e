// Partial-sum adder of one column, shared by all register rows.
//
// sum = (first ? 0 : acc_in) + code, saturated to the signed ACC_W range of
// the partial-sum registers. first is set for the first row tile of a
// convolution window, so the stale register content is ignored instead of
// being cleared by a separate cycle. Combinational.
//
// One shared adder per column is published; clearing through first and
// saturating instead of wrapping are this design's choices.
module psum_adder #(
  parameter int unsigned ACC_W = 6,
  parameter int unsigned ADC_W = 8
) (
  input  logic signed [ACC_W-1:0] acc_in,
  input  logic signed [ADC_W-1:0] code,
  input  logic                    first,
  output logic signed [ACC_W-1:0] sum
);

  localparam int unsigned W = ((ACC_W > ADC_W) ? ACC_W : ADC_W) + 1;
  localparam logic signed [W-1:0] MAXV = W'(signed'((1 << (ACC_W - 1)) - 1));
  localparam logic signed [W-1:0] MINV = -MAXV - W'(signed'(1));

  logic signed [W-1:0] wide;

  always_comb begin
    wide = (first ? W'(signed'(0)) : W'(acc_in)) + W'(code);
    if (wide > MAXV)      sum = MAXV[ACC_W-1:0];
    else if (wide < MINV) sum = MINV[ACC_W-1:0];
    else                  sum = wide[ACC_W-1:0];
  end

endmodule
