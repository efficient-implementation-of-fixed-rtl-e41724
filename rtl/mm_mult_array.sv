// mm_mult_array: operand buffers and the four 16x16 Adjusted Vedic multipliers
// of the multimode MAC.
//
// The 32-bit operands are split as A = AH:AL and B = BH:BL. Multiplier k receives
// its operand halves only while vm_en[k] is 1; otherwise its inputs are forced to
// zero, so it computes 0 and does not toggle. The design gates the operands with
// tri-state buffers; on-chip tri-states are not synthesizable logic, so this
// version uses AND gates, which give the same defined zero product.
//   pp[0] = AL*BL   pp[1] = AH*BL   pp[2] = AL*BH   pp[3] = AH*BH
// Combinational.
module mm_mult_array
  import vedic_pkg::*;
(
  input  logic [MM_OPW-1:0] a,
  input  logic [MM_OPW-1:0] b,
  input  logic [3:0]        vm_en,
  output mm_pp_t            pp
);

  localparam int unsigned H = MM_HALF;

  logic [3:0][H-1:0] op_a, op_b;

  always_comb begin
    op_a[0] = vm_en[0] ? a[H-1:0]      : '0;
    op_b[0] = vm_en[0] ? b[H-1:0]      : '0;
    op_a[1] = vm_en[1] ? a[MM_OPW-1:H] : '0;
    op_b[1] = vm_en[1] ? b[H-1:0]      : '0;
    op_a[2] = vm_en[2] ? a[H-1:0]      : '0;
    op_b[2] = vm_en[2] ? b[MM_OPW-1:H] : '0;
    op_a[3] = vm_en[3] ? a[MM_OPW-1:H] : '0;
    op_b[3] = vm_en[3] ? b[MM_OPW-1:H] : '0;
  end

  for (genvar k = 0; k < 4; k++) begin : g_vm
    adjusted_vm #(.N(H)) u_vm (.a(op_a[k]), .b(op_b[k]), .p(pp[k]));
  end

endmodule
