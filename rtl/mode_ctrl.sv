// mode_ctrl: control-logic circuit (CL-Circuit) of the multimode MAC.
//
// Decodes the mode-select code S[1:0] into the mode and the two enables
//   E1 = ~S0 & ~S1      (only in the single 64-bit MAC mode, S = 00)
//   E2 = ~(S0 & S1)     (in every mode except the single 32-bit MAC, S = 11)
// and produces the operand enables of the four 16x16 multipliers: multiplier 0
// (AL*BL) is enabled by start, the two middle ones (AH*BL, AL*BH) by start & E1
// and multiplier 3 (AH*BH) by start & E2, so idle multipliers see zero operands.
// The E1/E2 equations are the design's; gating them with start follows its rule
// that the multipliers get operands only when a new multiplication starts.
// Combinational.
module mode_ctrl
  import vedic_pkg::*;
(
  input  logic       start,
  input  logic [1:0] sel,     // {S1, S0}
  output mm_ctrl_t   ctrl
);

  always_comb begin
    ctrl.e1 = ~sel[0] & ~sel[1];
    ctrl.e2 = ~(sel[0] & sel[1]);
    unique case (sel)
      2'b00:         ctrl.mode = MM_MAC64;
      2'b01, 2'b10:  ctrl.mode = MM_DUAL16;
      default:       ctrl.mode = MM_MAC32;
    endcase
    ctrl.vm_en[0] = start;
    ctrl.vm_en[1] = start & ctrl.e1;
    ctrl.vm_en[2] = start & ctrl.e1;
    ctrl.vm_en[3] = start & ctrl.e2;
  end

endmodule
