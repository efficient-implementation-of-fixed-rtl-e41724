// vedic_pkg: types and constants shared by the multimode MAC blocks.
//
// The multimode MAC is selected by a two-bit code S[1:0] (S1 is the MSB):
//   00       single 64-bit MAC: one 32x32 product accumulated into 64 bits
//   01 / 10  the sum of two 16x16 products (AL*BL + AH*BH) accumulated
//   11       single 32-bit MAC: one 16x16 product (AL*BL) accumulated into 32 bits
// mm_mode_e is the decoded form of that code; mm_ctrl_t bundles the decoded
// mode with the two enables E1/E2 and the per-multiplier operand enables.
package vedic_pkg;

  // Width of the multimode operands (A = AH:AL, B = BH:BL) and of the sum.
  localparam int unsigned MM_OPW  = 32;
  localparam int unsigned MM_HALF = MM_OPW / 2;
  localparam int unsigned MM_ACCW = 2 * MM_OPW;

  typedef enum logic [1:0] {
    MM_MAC64  = 2'd0,  // S = 00
    MM_DUAL16 = 2'd1,  // S = 01 or 10
    MM_MAC32  = 2'd2   // S = 11
  } mm_mode_e;

  typedef struct packed {
    mm_mode_e   mode;
    logic       e1;      // E1 = ~S0 & ~S1 (middle multipliers and middle adders in use)
    logic       e2;      // E2 = ~(S0 & S1) (upper multiplier in use)
    logic [3:0] vm_en;   // operand enable of multiplier 0..3 (start gated)
  } mm_ctrl_t;

  // Four 2H-bit partial products of the 16x16 multiplier array, index:
  //   0 = AL*BL, 1 = AH*BL, 2 = AL*BH, 3 = AH*BH
  typedef logic [3:0][MM_OPW-1:0] mm_pp_t;

endpackage
