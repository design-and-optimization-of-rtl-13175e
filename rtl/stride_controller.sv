// Strided-move sequencer for one convolution layer on one M x N crossbar.
//
// The unrolled layer is a stack of npix blocks (one per output pixel), each
// K x Cout with K = Cin*WF*HF. It is cut into M x N tiles: row_tiles =
// ceil(K/M) along the window, col_tiles = ceil(Cout/N) along the channels.
// A weight tile, once programmed, is reused for up to S windows before the
// array is reprogrammed ("strided move"), S being the number of partial-sum
// register rows. Loop order, outermost first:
//   column tile ct -> window group g (S windows) -> row tile rt ->
//     program N columns (one per cycle, weight request ct/rt/col),
//     then read the group's windows (one per cycle, input request pix/rt).
// Partial sums of window slot s live in register row s of every column;
// first/last mark the first and last row tile of a window. With S = 1 the
// order is the plain "vertical move".
//
// Timing: start is taken in IDLE together with the cfg_* values. busy is high
// from the next cycle for exactly
//   col_tiles * row_tiles * (npix + ceil(npix/S) * N)
// cycles, then done pulses for one cycle. Request outputs are valid in the
// same cycle as mode (the weight and input sources answer combinationally).
// out_valid/out_pix/out_ctile describe the column outputs one cycle after
// the read that completed the window.
//
// The tiling, the strided loop order and its cycle count are published;
// the request interface and the exact state machine are this design's.
module stride_controller
  import fefet_pkg::*;
#(
  parameter int unsigned M = 64,
  parameter int unsigned N = 64,
  parameter int unsigned S = 16,
  localparam int unsigned CNT_W = $clog2(M + 1),
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SEL_W = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [GEOM_W-1:0] cfg_k,      // Cin*WF*HF, >= 1
  input  logic [GEOM_W-1:0] cfg_cout,   // output channels, >= 1
  input  logic [GEOM_W-1:0] cfg_npix,   // WO*HO, >= 1
  output logic              busy,
  output logic              done,
  // array command
  output xbar_mode_e        mode,
  output logic  [COL_W-1:0] wr_col,
  output logic  [CNT_W-1:0] rows_active,
  // weight source request (mode == XB_WRITE)
  output logic [GEOM_W-1:0] wt_ctile,
  output logic [GEOM_W-1:0] wt_rtile,
  // input source request (mode == XB_READ)
  output logic [GEOM_W-1:0] in_pix,
  output logic [GEOM_W-1:0] in_rtile,
  // column interface control (valid with mode == XB_READ)
  output logic  [SEL_W-1:0] reg_row,
  output logic              first,
  output logic              last,
  output logic              use_analog,
  // result tag
  output logic              out_valid,
  output logic [GEOM_W-1:0] out_pix,
  output logic [GEOM_W-1:0] out_ctile,
  // current column tile (selects the thresholds)
  output logic [GEOM_W-1:0] cur_ctile
);

  typedef enum logic [1:0] {S_IDLE, S_PROG, S_READ, S_DONE} state_e;

  state_e            state;
  logic [GEOM_W-1:0] k_q, npix_q, row_tiles, col_tiles;
  logic [GEOM_W-1:0] ct, rt, grp_base;   // grp_base = first pixel of the group
  logic [COL_W-1:0]  col;
  logic [SEL_W-1:0]  slot;

  // Tile counts from the configuration (ceil divisions).
  logic [GEOM_W-1:0] row_tiles_d, col_tiles_d;
  assign row_tiles_d = GEOM_W'((32'(cfg_k)    + M - 1) / M);
  assign col_tiles_d = GEOM_W'((32'(cfg_cout) + N - 1) / N);

  // Windows in the current group.
  logic [GEOM_W-1:0] grp_len;
  always_comb begin
    grp_len = npix_q - grp_base;
    if (grp_len > GEOM_W'(S)) grp_len = GEOM_W'(S);
  end

  // Rows driven in the current row tile.
  logic [GEOM_W-1:0] rows_left;
  assign rows_left   = k_q - GEOM_W'(32'(rt) * M);
  assign rows_active = (rows_left > GEOM_W'(M)) ? CNT_W'(M) : CNT_W'(rows_left);

  logic last_col, last_slot, last_rt, last_grp, last_ct;
  assign last_col  = (col == COL_W'(N - 1));
  assign last_slot = (GEOM_W'(slot) == grp_len - 1);
  assign last_rt   = (rt == row_tiles - 1);
  assign last_grp  = (grp_base + grp_len >= npix_q);
  assign last_ct   = (ct == col_tiles - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k_q       <= '0;
      npix_q    <= '0;
      row_tiles <= '0;
      col_tiles <= '0;
      ct        <= '0;
      rt        <= '0;
      grp_base  <= '0;
      col       <= '0;
      slot      <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_ctile <= '0;
    end else begin
      out_valid <= (state == S_READ) && last_rt;
      out_pix   <= grp_base + GEOM_W'(slot);
      out_ctile <= ct;
      unique case (state)
        S_IDLE: if (start) begin
          k_q       <= cfg_k;
          npix_q    <= cfg_npix;
          row_tiles <= row_tiles_d;
          col_tiles <= col_tiles_d;
          ct        <= '0;
          rt        <= '0;
          grp_base  <= '0;
          col       <= '0;
          slot      <= '0;
          state     <= S_PROG;
        end
        S_PROG: begin
          col <= col + 1'b1;
          if (last_col) begin
            col   <= '0;
            state <= S_READ;
          end
        end
        S_READ: begin
          slot <= slot + 1'b1;
          if (last_slot) begin
            slot  <= '0;
            state <= S_PROG;
            if (!last_rt) begin
              rt <= rt + 1'b1;
            end else begin
              rt <= '0;
              if (!last_grp) begin
                grp_base <= grp_base + grp_len;
              end else begin
                grp_base <= '0;
                if (!last_ct) ct <= ct + 1'b1;
                else          state <= S_DONE;
              end
            end
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state == S_PROG) || (state == S_READ);
  assign done       = (state == S_DONE);
  assign mode       = (state == S_PROG) ? XB_WRITE : (state == S_READ) ? XB_READ : XB_IDLE;
  assign wr_col     = col;
  assign wt_ctile   = ct;
  assign wt_rtile   = rt;
  assign in_pix     = grp_base + GEOM_W'(slot);
  assign in_rtile   = rt;
  assign reg_row    = slot;
  assign first      = (rt == '0);
  assign last       = last_rt;
  assign use_analog = (row_tiles == GEOM_W'(1));
  assign cur_ctile  = ct;

  // The configuration must describe a non-empty layer.
  a_cfg: assert property (@(posedge clk)
    (state == S_IDLE && start) |-> (cfg_k != 0 && cfg_cout != 0 && cfg_npix != 0));

endmodule
