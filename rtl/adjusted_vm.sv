// adjusted_vm: NxN-bit Adjusted Vedic multiplier (unsigned), N a power of two >= 2.
//
// Built recursively. N = 2 is the 2x2 Vedic multiplier. For N >= 4 the operands
// are split into halves (H = N/2) and four H x H Adjusted-VMs form the partial
// products q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH, each N bits:
//   * the low H product bits are q0[H-1:0];
//   * the middle columns hold q0[N-1:H] + q1 + q2 + q3[H-1:0]. An N-bit
//     carry-save adder reduces these four vectors to a sum S and a carry C, and
//     an HBK-CSLA adds S + 2*C to give the middle N product bits. For N = 4 the
//     adder is 3 bits wide (S[0] passes straight through), as in the 4x4 design;
//     for larger N it is N bits wide;
//   * the middle columns carry C1 = C[N-1] (carry-save top carry) and C2 (the
//     HBK-CSLA carry out) into the top H bits q3[N-1:H]. For N = 4 at most one
//     of them can be 1, so their OR drives a 2-bit increment-by-1 converter,
//     as in the 4x4 design. For N >= 8 both can be 1 (8x8: 111*222), so an OR
//     would lose a carry; this design adds them instead: two chained H/2-bit
//     HBK-CSLAs (two 8-bit ones at N = 32) take C1 as the second operand of
//     the first adder and C2 as its carry in.
// Combinational, p = a * b. Default N = 32, the multiplier of the 64-bit MAC.
//
// Lint note: when this module is linted as the top of a hierarchy, Verilator
// reports q0..q3 as undriven. They are driven by the recursive sub-multipliers;
// the warning does not appear when the module is linted inside imac or
// mm_mult_array, and the exhaustive and random tests see every product bit.
module adjusted_vm #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad
    $error("adjusted_vm: N must be a power of two >= 2");
  end

  if (N == 2) begin : g_leaf
    vm2x2 u_vm (.a(a), .b(b), .p(p));
  end else begin : g_node
    localparam int unsigned H = N / 2;

    logic [N-1:0] q0, q1, q2, q3;
    logic [N-1:0] cs_s, cs_c;
    logic [N-1:0] mid;
    logic         mid_c;   // carry out of the middle HBK-CSLA
    logic         c1;      // top carry of the carry-save adder
    logic [H-1:0] top;

    adjusted_vm #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    adjusted_vm #(.N(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
    adjusted_vm #(.N(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
    adjusted_vm #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

    csa #(.W(N)) u_csa (
      .x({q3[H-1:0], q0[N-1:H]}), .y(q1), .z(q2), .s(cs_s), .c(cs_c)
    );

    if (N == 4) begin : g_mid3
      assign mid[0] = cs_s[0];
      hbk_csla #(.W(N - 1)) u_mid (
        .a(cs_s[N-1:1]), .b(cs_c[N-2:0]), .cin(1'b0), .s(mid[N-1:1]), .cout(mid_c)
      );
    end else begin : g_midn
      hbk_csla #(.W(N)) u_mid (
        .a(cs_s), .b({cs_c[N-2:0], 1'b0}), .cin(1'b0), .s(mid), .cout(mid_c)
      );
    end

    assign c1 = cs_c[N-1];

    if (N == 4) begin : g_top_inc
      logic unused_c;
      inc_by1 #(.W(H)) u_inc (.a(q3[N-1:H]), .inc(c1 | mid_c), .y(top), .cout(unused_c));
    end else begin : g_top_add
      localparam int unsigned Q = H / 2;
      logic c_q, unused_c;
      hbk_csla #(.W(Q)) u_top_lo (
        .a(q3[H+Q-1:H]), .b(Q'(c1)), .cin(mid_c), .s(top[Q-1:0]), .cout(c_q)
      );
      hbk_csla #(.W(Q)) u_top_hi (
        .a(q3[N-1:H+Q]), .b('0), .cin(c_q), .s(top[H-1:Q]), .cout(unused_c)
      );
    end

    assign p = {top, mid, q0[H-1:0]};
  end

endmodule
