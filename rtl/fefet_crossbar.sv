// Behavioural model of the M x N FeFET XNOR crossbar array.
//
// Rows carry HL, HLb (the input bit and its inverse), BL and BLb (the
// write data and the read gate voltage). Columns carry WL (column select for
// programming, VDD for reading) and VL, the line whose current is the sum of
// the currents of that column's cells. The array is programmed one column
// at a time and read all columns at once.
//
// vl_count[j] stands for the current on VL j, in units of one conducting
// cell: it is the number of rows r with input bit == weight(r, j) among the
// rows whose HL/HLb are driven. With HL = in and HLb = ~in this is the XNOR
// popcount of the binary inner product between the input vector and column j.
// The array is combinational for reads; writes take effect while the WL
// of the selected column is at +VWL.
//
// The organisation (rows of HL/HLb/BL/BLb, columns of WL/VL, one weight
// per cell) is the published one; the unit-current abstraction is this
// model's own.
module fefet_crossbar
  import fefet_pkg::*;
#(
  parameter int unsigned M = 64,   // rows (inner-product length per tile)
  parameter int unsigned N = 64,   // columns (filters per tile)
  localparam int unsigned CNT_W = $clog2(M + 1)
) (
  input  logic        [M-1:0] hl,
  input  logic        [M-1:0] hlb,
  input  line_level_e         bl  [M],
  input  line_level_e         blb [M],
  input  line_level_e         wl  [N],
  output logic    [CNT_W-1:0] vl_count [N],
  output logic        [M-1:0] weights  [N]   // stored bits, column-major, for observation
);

  logic [M-1:0] cell_vl [N];

  for (genvar j = 0; j < N; j++) begin : g_col
    for (genvar r = 0; r < M; r++) begin : g_row
      fefet_xnor_cell u_cell (
        .hl     (hl[r]),
        .hlb    (hlb[r]),
        .wl     (wl[j]),
        .bl     (bl[r]),
        .blb    (blb[r]),
        .vl     (cell_vl[j][r]),
        .weight (weights[j][r])
      );
    end

    // Current summation on the vertical line.
    always_comb begin
      vl_count[j] = '0;
      for (int r = 0; r < M; r++) vl_count[j] = vl_count[j] + CNT_W'(cell_vl[j][r]);
    end
  end

endmodule
