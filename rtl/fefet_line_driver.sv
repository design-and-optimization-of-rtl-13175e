// Row and column line drivers of the FeFET crossbar.
//
// Turns a digital command into the line levels of the array's two
// operating schemes:
//   XB_READ  : HL = in_bits, HLb = ~in_bits on the first rows_active rows
//              (HL = HLb = 0 on the rest, so those rows carry no current),
//              every WL = VDD, every BL and BLb = VR.
//   XB_WRITE : HL = HLb = 0, WL[wr_col] = +VWL, every other WL = -VWL,
//              BL/BLb = +VW/-VW where wr_bits is 1 and -VW/+VW where it is 0.
//   XB_IDLE  : every line at 0 V.
// Purely combinational: the levels follow the command in the same cycle.
//
// The read and write levels are the published schemes. Masking unused
// rows by grounding both HL and HLb (for a last tile shorter than M rows)
// is this design's choice; it relies on the cell carrying no current with
// both input lines at 0 V, as during programming.
module fefet_line_driver
  import fefet_pkg::*;
#(
  parameter int unsigned M = 64,
  parameter int unsigned N = 64,
  localparam int unsigned ROW_W = $clog2(M + 1),
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1
) (
  input  xbar_mode_e          mode,
  input  logic        [M-1:0] in_bits,      // input vector (read)
  input  logic    [ROW_W-1:0] rows_active,  // rows driven during read
  input  logic        [M-1:0] wr_bits,      // column weight bits (write)
  input  logic    [COL_W-1:0] wr_col,       // column being programmed
  output logic        [M-1:0] hl,
  output logic        [M-1:0] hlb,
  output line_level_e         bl  [M],
  output line_level_e         blb [M],
  output line_level_e         wl  [N]
);

  always_comb begin
    for (int r = 0; r < M; r++) begin
      hl[r]  = 1'b0;
      hlb[r] = 1'b0;
      bl[r]  = LV_ZERO;
      blb[r] = LV_ZERO;
      unique case (mode)
        XB_READ: begin
          if (r < int'(rows_active)) begin
            hl[r]  = in_bits[r];
            hlb[r] = !in_bits[r];
          end
          bl[r]  = LV_VR;
          blb[r] = LV_VR;
        end
        XB_WRITE: begin
          bl[r]  = wr_bits[r] ? LV_VW_P : LV_VW_N;
          blb[r] = wr_bits[r] ? LV_VW_N : LV_VW_P;
        end
        default: ;
      endcase
    end
    for (int j = 0; j < N; j++) begin
      unique case (mode)
        XB_READ:  wl[j] = LV_VDD;
        XB_WRITE: wl[j] = (j == int'(wr_col)) ? LV_VWL_P : LV_VWL_N;
        default:  wl[j] = LV_ZERO;
      endcase
    end
  end

endmodule
