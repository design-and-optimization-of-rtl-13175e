// Self-checking test of the FeFET XNOR cell model.
// Programs 1 and 0 through BL/BLb with the column selected (+VWL), checks
// that an unselected column (-VWL) keeps its bit, and that the cell conducts
// on VL only under read bias (WL = VDD, BL = BLb = VR) and only when the
// input bit equals the stored bit. Also checks that grounding HL and HLb
// stops the current.
module tb_fefet_xnor_cell;
  import fefet_pkg::*;

  logic        hl, hlb, vl, weight;
  line_level_e wl, bl, blb;
  int checks = 0, failures = 0;

  fefet_xnor_cell dut (.hl, .hlb, .wl, .bl, .blb, .vl, .weight);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic write_bit(input logic b);
    hl = 0; hlb = 0;
    bl  = b ? LV_VW_P : LV_VW_N;
    blb = b ? LV_VW_N : LV_VW_P;
    wl = LV_VWL_P; #1;
    wl = LV_VWL_N; #1;
    bl = LV_ZERO; blb = LV_ZERO; wl = LV_ZERO; #1;
  endtask

  task automatic read(input logic in_bit, output logic out);
    wl = LV_VDD; bl = LV_VR; blb = LV_VR; hl = in_bit; hlb = !in_bit; #1;
    out = vl;
    hl = 0; hlb = 0; wl = LV_ZERO; bl = LV_ZERO; blb = LV_ZERO; #1;
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic o;
    hl = 0; hlb = 0; wl = LV_ZERO; bl = LV_ZERO; blb = LV_ZERO; #1;
    for (int t = 0; t < 40; t++) begin
      logic b, in_bit;
      b = 1'($urandom);
      write_bit(b);
      check(weight, b, "stored bit");
      in_bit = 1'($urandom);
      read(in_bit, o);
      check(o, !(in_bit ^ b), "xnor read");
      // Unselected column: write data present but WL at -VWL.
      bl = b ? LV_VW_N : LV_VW_P; blb = b ? LV_VW_P : LV_VW_N; wl = LV_VWL_N; #1;
      check(weight, b, "unselected keeps bit");
      wl = LV_ZERO; bl = LV_ZERO; blb = LV_ZERO; #1;
      // No read bias: no current.
      hl = in_bit; hlb = !in_bit; wl = LV_ZERO; bl = LV_VR; blb = LV_VR; #1;
      check(vl, 1'b0, "no current without WL");
      // Both input lines grounded: no current.
      hl = 0; hlb = 0; wl = LV_VDD; #1;
      check(vl, 1'b0, "no current with HL=HLb=0");
      wl = LV_ZERO; bl = LV_ZERO; blb = LV_ZERO; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
