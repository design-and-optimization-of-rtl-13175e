// Behavioural model of one FeFET XNOR crossbar cell (two FeFETs, two access
// transistors). Not synthesizable logic in a real chip: the weight lives in
// the ferroelectric polarization of the two FeFETs, which store
// complementary copies of one bit.
//
// Write: when the column WL is at +VWL the access transistors pass BL and BLb
// to the FeFET gates; BL = +VW / BLb = -VW stores 1 and BL = -VW / BLb = +VW
// stores 0. With the WL at -VWL the cell keeps its state. The polarization is
// held by a latch here, which stands for the nonvolatile state.
//
// Read: with the WL at VDD and BL = BLb = VR, the FeFET on the HL side
// conducts when the weight is 1 and the one on the HLb side when it is 0, so
// current flows into VL exactly when the input bit equals the weight
// (HL = in, HLb = ~in), i.e. XNOR. With HL = HLb = 0 no current flows,
// whatever the weight; programming uses that, and so does row masking.
//
// vl is 1 when the cell sinks one unit of read current into its vertical
// line. The level scheme follows the published read/write tables; reducing
// the current to a single unit is a modelling choice.
module fefet_xnor_cell
  import fefet_pkg::*;
(
  input  logic        hl,
  input  logic        hlb,
  input  line_level_e wl,
  input  line_level_e bl,
  input  line_level_e blb,
  output logic        vl,
  output logic        weight
);

  logic pol;  // polarization of the HL-side FeFET (1 = low threshold)

  always_latch begin
    if (wl == LV_VWL_P) begin
      if (bl == LV_VW_P && blb == LV_VW_N)      pol = 1'b1;
      else if (bl == LV_VW_N && blb == LV_VW_P) pol = 1'b0;
    end
  end

  logic read_bias;
  assign read_bias = (wl == LV_VDD) && (bl == LV_VR) && (blb == LV_VR);

  assign vl     = read_bias && ((hl && pol) || (hlb && !pol));
  assign weight = pol;

endmodule
