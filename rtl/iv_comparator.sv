// Behavioural model of the direct binarization path of a column interface:
// an op-amp current-to-voltage converter (feedback resistor R) followed by a
// voltage comparator against Vref. Analog in silicon; modelled in units of
// one conducting cell.
//
// The VL current is vl_count cell currents, so the converter output is
// proportional to vl_count and the comparator output is 1 when
// vl_count >= vref_count, where vref_count is Vref expressed in the same
// units. Moving Vref is how a batch-normalization offset is applied on this
// path. Combinational.
//
// The converter/comparator pair and the Vref tuning follow the published
// interface circuit; the unit scaling is this model's.
module iv_comparator #(
  parameter int unsigned CNT_W  = 7,   // width of the column current count
  parameter int unsigned VREF_W = 18   // signed width of the reference
) (
  input  logic        [CNT_W-1:0] vl_count,
  input  logic signed [VREF_W-1:0] vref_count,
  output logic                     out_bit
);

  localparam int unsigned W = ((CNT_W + 1) > VREF_W) ? (CNT_W + 1) : VREF_W;

  assign out_bit = W'($signed({1'b0, vl_count})) >= W'(vref_count);

endmodule
