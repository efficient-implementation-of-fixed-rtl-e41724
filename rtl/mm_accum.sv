// mm_accum: 64-bit accumulator of the multimode MAC.
//
// A 64-bit HBK-CSLA adds the product word to the accumulator register. On a
// rising clock edge with en = 1 the register takes acc + prod; with en = 0 it
// holds. In MM_MAC32 mode only the low 32 bits of the adder are used: the
// register takes {32'b0, (acc + prod)[31:0]}, a 32-bit MAC that wraps at 2^32.
// The other modes wrap at 2^64. rst_n (asynchronous, active low) clears it.
// Clearing the upper half in MM_MAC32 and the reset are this design's choices.
module mm_accum
  import vedic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  mm_mode_e           mode,
  input  logic [MM_ACCW-1:0] prod,
  output logic [MM_ACCW-1:0] acc
);

  logic [MM_ACCW-1:0] acc_sum;
  logic               unused_cout;

  hbk_csla #(.W(MM_ACCW)) u_add (
    .a(acc), .b(prod), .cin(1'b0), .s(acc_sum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (en) begin
      if (mode == MM_MAC32) acc <= {{(MM_ACCW - MM_OPW){1'b0}}, acc_sum[MM_OPW-1:0]};
      else                  acc <= acc_sum;
    end
  end

endmodule
