// vedic_mac_top: the three MAC blocks of the design side by side.
//
//   imac_*  : the 64-bit I-MAC (32x32 Adjusted Vedic multiplier, 64-bit
//             HBK-CSLA accumulation), sum <= sum + a*b per clock with start = 1.
//   mm_*    : the unpipelined multimode MAC (one result per clock, sum updated
//             at the edge that samples the inputs).
//   mmp_*   : the two-stage pipelined multimode MAC (sum updated one edge later).
// The three share clk and rst_n (asynchronous, active low) and have their own
// operand, start and mode ports; the multimode ports take sel = {S1, S0}:
// 00 = 64-bit MAC, 01/10 = sum of two 16x16 products, 11 = 32-bit MAC.
module vedic_mac_top
  import vedic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // 64-bit I-MAC
  input  logic               imac_start,
  input  logic [31:0]        imac_a,
  input  logic [31:0]        imac_b,
  output logic [63:0]        imac_sum,
  // multimode MAC, unpipelined
  input  logic               mm_start,
  input  logic [1:0]         mm_sel,
  input  logic [MM_OPW-1:0]  mm_a,
  input  logic [MM_OPW-1:0]  mm_b,
  output logic [MM_ACCW-1:0] mm_sum,
  // multimode MAC, pipelined
  input  logic               mmp_start,
  input  logic [1:0]         mmp_sel,
  input  logic [MM_OPW-1:0]  mmp_a,
  input  logic [MM_OPW-1:0]  mmp_b,
  output logic [MM_ACCW-1:0] mmp_sum
);

  imac #(.N(32)) u_imac (
    .clk(clk), .rst_n(rst_n), .start(imac_start), .a(imac_a), .b(imac_b), .sum(imac_sum)
  );

  mm_mac u_mm (
    .clk(clk), .rst_n(rst_n), .start(mm_start), .sel(mm_sel), .a(mm_a), .b(mm_b), .sum(mm_sum)
  );

  mm_mac_pipe u_mmp (
    .clk(clk), .rst_n(rst_n), .start(mmp_start), .sel(mmp_sel), .a(mmp_a), .b(mmp_b),
    .sum(mmp_sum)
  );

endmodule
