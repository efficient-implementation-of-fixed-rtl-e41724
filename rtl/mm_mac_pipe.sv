// mm_mac_pipe: multimode fixed-point MAC, two-stage pipeline.
//
// Same function and modes as mm_mac. The pipeline register sits after the four
// 16x16 Adjusted Vedic multipliers: stage 1 is the control-logic circuit and the
// multiplier array, stage 2 the carry-save reduction, the product adders and the
// 64-bit accumulation. The design gives only "two stages"; the cut after the
// multipliers is this design's choice (it splits the path nearly in half).
//
// Timing: a new operation may enter every clock. Inputs sampled with start = 1
// at edge k are in sum after edge k+1 (one cycle more than mm_mac). The mode
// travels with its partial products, so sel may change on every cycle. rst_n
// (asynchronous, active low) clears the sum and empties the pipeline.
module mm_mac_pipe
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
  mm_pp_t             pp, pp_q;
  mm_mode_e           mode_q;
  logic               valid_q;
  logic [MM_ACCW-1:0] prod;

  // stage 1
  mode_ctrl     u_ctrl (.start(start), .sel(sel), .ctrl(ctrl));
  mm_mult_array u_mult (.a(a), .b(b), .vm_en(ctrl.vm_en), .pp(pp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_q    <= '0;
      mode_q  <= MM_MAC64;
      valid_q <= 1'b0;
    end else begin
      valid_q <= start;
      if (start) begin
        pp_q   <= pp;
        mode_q <= ctrl.mode;
      end
    end
  end

  // stage 2
  mm_product u_prod (.pp(pp_q), .mode(mode_q), .prod(prod));
  mm_accum   u_acc  (.clk(clk), .rst_n(rst_n), .en(valid_q), .mode(mode_q),
                     .prod(prod), .acc(sum));

endmodule
