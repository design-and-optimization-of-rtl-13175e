// Binary-CNN convolution-layer engine built around one FeFET XNOR crossbar.
//
// Weights (+1/-1 coded as 1/0) sit in an M x N FeFET crossbar, one filter
// slice per column; an input window slice is applied on the rows and every
// column returns, as a current, the number of rows where input and weight
// agree (an XNOR popcount). A layer larger than the array is cut into
// M x N tiles. The strided-move controller programs one tile column by column
// and then reuses it for up to S windows, accumulating each window's partial
// sums in its own register row, before programming the next tile. Every
// column ends in an interface circuit that binarizes the result, directly
// through a comparator when the layer fits in M rows, or through
// ADC + adder + registers + binarizer when it does not.
//
// Interfaces (all plain signals):
//   start / cfg_k (= Cin*WF*HF) / cfg_cout / cfg_npix (= WO*HO): layer setup,
//     taken in the start cycle while idle; busy and done report progress.
//   wt_ctile, wt_rtile, wt_col, wt_valid -> wt_bits: weight column request,
//     answered combinationally: bit r = weight of unrolled row rt*M + r of
//     filter ct*N + col (rows past K and filters past Cout are don't-care).
//   in_pix, in_rtile, in_valid -> in_bits: input request, answered
//     combinationally: bit r = unrolled input row rt*M + r of window pix.
//   cur_ctile -> theta[N]: signed threshold of each output channel of the
//     current column tile (batch-normalization offset; 0 = sign).
//   out_valid, out_pix, out_ctile, out_bits[N]: binarized outputs of one
//     output pixel for the N channels of a column tile.
//   weights[N]: stored array contents, for observation.
// Latency: busy lasts col_tiles*row_tiles*(npix + ceil(npix/S)*N) cycles;
// each output appears one cycle after its last read.
//
// The array, the cell, the read/write schemes, the interface circuit and the
// strided computation order follow the published design; the request/
// response interfaces standing in for the input and output buffers are this
// design's own.
module fefet_bcnn_accel
  import fefet_pkg::*;
#(
  parameter int unsigned M     = 64,  // crossbar rows
  parameter int unsigned N     = 64,  // crossbar columns
  parameter int unsigned S     = 16,  // partial-sum register rows
  parameter int unsigned ACC_W = 6,   // partial-sum width B
  localparam int unsigned CNT_W = $clog2(M + 1),
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic       [GEOM_W-1:0] cfg_k,
  input  logic       [GEOM_W-1:0] cfg_cout,
  input  logic       [GEOM_W-1:0] cfg_npix,
  output logic                    busy,
  output logic                    done,
  output logic                    wt_valid,
  output logic       [GEOM_W-1:0] wt_ctile,
  output logic       [GEOM_W-1:0] wt_rtile,
  output logic        [COL_W-1:0] wt_col,
  input  logic            [M-1:0] wt_bits,
  output logic                    in_valid,
  output logic       [GEOM_W-1:0] in_pix,
  output logic       [GEOM_W-1:0] in_rtile,
  input  logic            [M-1:0] in_bits,
  output logic       [GEOM_W-1:0] cur_ctile,
  input  logic signed [THR_W-1:0] theta [N],
  output logic                    out_valid,
  output logic       [GEOM_W-1:0] out_pix,
  output logic       [GEOM_W-1:0] out_ctile,
  output logic            [N-1:0] out_bits,
  output logic            [M-1:0] weights [N]
);

  xbar_mode_e             mode;
  logic       [CNT_W-1:0] rows_active;
  logic                   first, last, use_analog;
  logic [((S > 1) ? $clog2(S) : 1)-1:0] reg_row;

  stride_controller #(.M(M), .N(N), .S(S)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .cfg_k       (cfg_k),
    .cfg_cout    (cfg_cout),
    .cfg_npix    (cfg_npix),
    .busy        (busy),
    .done        (done),
    .mode        (mode),
    .wr_col      (wt_col),
    .rows_active (rows_active),
    .wt_ctile    (wt_ctile),
    .wt_rtile    (wt_rtile),
    .in_pix      (in_pix),
    .in_rtile    (in_rtile),
    .reg_row     (reg_row),
    .first       (first),
    .last        (last),
    .use_analog  (use_analog),
    .out_valid   (out_valid),
    .out_pix     (out_pix),
    .out_ctile   (out_ctile),
    .cur_ctile   (cur_ctile)
  );

  assign wt_valid = (mode == XB_WRITE);
  assign in_valid = (mode == XB_READ);

  logic        [M-1:0] hl, hlb;
  line_level_e         bl  [M];
  line_level_e         blb [M];
  line_level_e         wl  [N];
  logic    [CNT_W-1:0] vl_count [N];

  fefet_line_driver #(.M(M), .N(N)) u_drv (
    .mode        (mode),
    .in_bits     (in_bits),
    .rows_active (rows_active),
    .wr_bits     (wt_bits),
    .wr_col      (wt_col),
    .hl          (hl),
    .hlb         (hlb),
    .bl          (bl),
    .blb         (blb),
    .wl          (wl)
  );

  fefet_crossbar #(.M(M), .N(N)) u_xbar (
    .hl       (hl),
    .hlb      (hlb),
    .bl       (bl),
    .blb      (blb),
    .wl       (wl),
    .vl_count (vl_count),
    .weights  (weights)
  );

  for (genvar j = 0; j < N; j++) begin : g_if
    interface_column #(.M(M), .S(S), .ACC_W(ACC_W), .THR_W(THR_W)) u_col (
      .clk         (clk),
      .rst_n       (rst_n),
      .vl_count    (vl_count[j]),
      .rows_active (rows_active),
      .theta       (theta[j]),
      .rd_en       (mode == XB_READ),
      .reg_row     (reg_row),
      .first       (first),
      .last        (last),
      .use_analog  (use_analog),
      .out_bit     (out_bits[j])
    );
  end

endmodule
