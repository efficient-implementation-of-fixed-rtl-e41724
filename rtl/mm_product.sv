// mm_product: partial-product reduction and mode multiplexing of the multimode MAC.
//
// Takes the four 32-bit partial products of mm_mult_array and forms the 64-bit
// word that the accumulator adds, according to the mode:
//   MM_MAC64  : the 32x32 product. A 32-bit carry-save adder reduces the middle
//               columns (pp0[31:16], pp1, pp2, pp3[15:0]); a 32-bit HBK-CSLA adds
//               its sum and carry vectors to give product bits 47:16. The two
//               carries (C1 = carry-save top carry, C2 = HBK-CSLA carry out)
//               pass a multiplexer into the first of two chained 8-bit
//               HBK-CSLAs that add them to pp3[31:16]: C1 as its second operand,
//               C2 as its carry in. (An OR of C1 and C2 would lose a carry when
//               both are 1, which happens for some operands.)
//   MM_DUAL16 : pp0 + pp3 = AL*BL + AH*BH, a 33-bit value, zero-extended.
//   MM_MAC32  : pp0 = AL*BL, zero-extended.
// In MM_DUAL16 the 32-bit HBK-CSLA is given pp0 and pp3 instead of the
// carry-save vectors, so the two products are summed without a further adder.
// That reuse is this design's choice. Combinational.
module mm_product
  import vedic_pkg::*;
(
  input  mm_pp_t              pp,
  input  mm_mode_e            mode,
  output logic [MM_ACCW-1:0]  prod
);

  localparam int unsigned W = MM_OPW;    // 32
  localparam int unsigned H = MM_HALF;   // 16
  localparam int unsigned Q = H / 2;     // 8

  logic [W-1:0] cs_s, cs_c;
  logic [W-1:0] mid_a, mid_b, mid;
  logic         c1, c2, c1_sel, c2_sel, c_q, unused_c;
  logic [H-1:0] top;

  csa #(.W(W)) u_csa (
    .x({pp[3][H-1:0], pp[0][W-1:H]}), .y(pp[1]), .z(pp[2]), .s(cs_s), .c(cs_c)
  );

  // operand multiplexers of the middle adder
  always_comb begin
    if (mode == MM_DUAL16) begin
      mid_a = pp[0];
      mid_b = pp[3];
    end else begin
      mid_a = cs_s;
      mid_b = {cs_c[W-2:0], 1'b0};
    end
  end

  hbk_csla #(.W(W)) u_mid (.a(mid_a), .b(mid_b), .cin(1'b0), .s(mid), .cout(c2));

  assign c1     = cs_c[W-1];
  assign c1_sel = (mode == MM_MAC64) ? c1 : 1'b0;
  assign c2_sel = (mode == MM_MAC64) ? c2 : 1'b0;

  hbk_csla #(.W(Q)) u_top_lo (
    .a(pp[3][H+Q-1:H]), .b(Q'(c1_sel)), .cin(c2_sel), .s(top[Q-1:0]), .cout(c_q)
  );
  hbk_csla #(.W(Q)) u_top_hi (
    .a(pp[3][W-1:H+Q]), .b('0), .cin(c_q), .s(top[H-1:Q]), .cout(unused_c)
  );

  // output multiplexer
  always_comb begin
    unique case (mode)
      MM_MAC64:  prod = {top, mid, pp[0][H-1:0]};
      MM_DUAL16: prod = {{(MM_ACCW - W - 1){1'b0}}, c2, mid};
      default:   prod = {{(MM_ACCW - W){1'b0}}, pp[0]};
    endcase
  end

endmodule
