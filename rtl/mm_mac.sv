// mm_mac: multimode fixed-point MAC, unpipelined.
//
// One datapath serves three precisions, chosen by sel = {S1, S0}:
//   00       sum <= sum + A*B                  (32x32 product, 64-bit sum)
//   01 / 10  sum <= sum + AL*BL + AH*BH        (two 16x16 products)
//   11       sum <= (sum + AL*BL) mod 2^32     (16x16 product, 32-bit sum)
// with A = AH:AL and B = BH:BL unsigned. The control-logic circuit (mode_ctrl)
// enables only the multipliers that the mode needs; mm_mult_array holds the four
// 16x16 Adjusted Vedic multipliers; mm_product reduces their partial products
// and selects the product word; mm_accum adds it with a 64-bit HBK-CSLA.
//
// Timing: one operation per clock, no pipeline. On a rising edge with start = 1
// sum takes the new value; with start = 0 it holds. sel may change on any cycle;
// the accumulator is not cleared on a mode change. rst_n (asynchronous, active
// low) clears the sum.
module mm_mac
  import vedic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [1:0]         sel,
  input  logic [MM_OPW-1:0]  a,
  input  logic [MM_OPW-1:0]  b,
  output logic [MM_ACCW-1:0] sum
);

  mm_ctrl_t           ctrl;
  mm_pp_t             pp;
  logic [MM_ACCW-1:0] prod;

  mode_ctrl     u_ctrl (.start(start), .sel(sel), .ctrl(ctrl));
  mm_mult_array u_mult (.a(a), .b(b), .vm_en(ctrl.vm_en), .pp(pp));
  mm_product    u_prod (.pp(pp), .mode(ctrl.mode), .prod(prod));
  mm_accum      u_acc  (.clk(clk), .rst_n(rst_n), .en(start), .mode(ctrl.mode),
                        .prod(prod), .acc(sum));

endmodule
