// Shared types for the FeFET XNOR crossbar BCNN engine.
//
// The crossbar lines carry analog voltages. In this RTL each line that can
// take more than two voltages is represented by an enumerated level, so the
// read scheme and the column-programming scheme can be written exactly as the
// level tables that define them:
//
//   read   : HL = input bit, HLb = inverse, every WL = VDD, BL = BLb = VR
//   write  : HL = HLb = 0, selected WL = +VWL, other WLs = -VWL,
//            BL/BLb = +VW/-VW to store 1, -VW/+VW to store 0
//
// HL and HLb are plain bits (1 = the read input level, 0 = 0 V).
// The operating-mode and the signed-threshold types are shared by the
// controller, the drivers and the column interfaces.
package fefet_pkg;

  // Voltage level of a WL, BL or BLb line.
  typedef enum logic [2:0] {
    LV_ZERO  = 3'd0,  // 0 V (idle)
    LV_VDD   = 3'd1,  // VDD on a WL during read: passes VR to the FeFET gates
    LV_VR    = 3'd2,  // read gate voltage on BL / BLb
    LV_VWL_P = 3'd3,  // +VWL on the WL of the column being programmed
    LV_VWL_N = 3'd4,  // -VWL on the WLs of every other column
    LV_VW_P  = 3'd5,  // +VW write voltage on BL / BLb
    LV_VW_N  = 3'd6   // -VW write voltage on BL / BLb
  } line_level_e;

  // What the array is doing in a given cycle.
  typedef enum logic [1:0] {
    XB_IDLE  = 2'd0,
    XB_WRITE = 2'd1,  // program one column
    XB_READ  = 2'd2   // evaluate one input vector on all columns
  } xbar_mode_e;

  // Width of the layer-geometry fields (rows of the unrolled window,
  // output channels, output pixels) and of the per-channel threshold.
  localparam int unsigned GEOM_W = 16;
  localparam int unsigned THR_W  = 16;

endpackage
