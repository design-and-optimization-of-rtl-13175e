// Behavioural model of the per-column ADC of the accumulation path.
//
// Converts the VL current of one column into a signed digital partial sum.
// With K rows driven, vl_count of them matching, the binary (+1/-1) inner
// product over those rows is 2*vl_count - K. The ADC produces exactly that:
// its offset point is set to K cell currents (offset input) and its step is
// half a cell current. Ideal and combinational; the register that follows
// samples it at the clock edge.
//
// That the column current is digitised before accumulation is published;
// the offset/step choice, which makes the code equal the +/-1 partial sum,
// is this design's own.
module column_adc #(
  parameter int unsigned CNT_W = 7,
  localparam int unsigned ADC_W = CNT_W + 1
) (
  input  logic        [CNT_W-1:0] vl_count,
  input  logic        [CNT_W-1:0] offset,    // rows driven in this read
  output logic signed [ADC_W-1:0] code
);

  assign code = $signed({vl_count, 1'b0}) - $signed({1'b0, offset});

endmodule
