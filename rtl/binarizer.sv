// Digital binarization of an accumulated convolution sum.
//
// out_bit = (acc >= theta), signed. theta is the per-output-channel threshold
// that folds in the batch-normalization offset; theta = 0 is the plain sign
// function (+1 coded as 1, -1 as 0). Combinational.
//
// Binarizing by sign after a fixed batch-normalization offset is published;
// expressing the offset as a threshold input is this design's choice.
module binarizer #(
  parameter int unsigned ACC_W = 6,
  parameter int unsigned THR_W = 16
) (
  input  logic signed [ACC_W-1:0] acc,
  input  logic signed [THR_W-1:0] theta,
  output logic                    out_bit
);

  localparam int unsigned W = ((ACC_W > THR_W) ? ACC_W : THR_W);

  assign out_bit = W'(acc) >= W'(theta);

endmodule
