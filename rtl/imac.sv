// imac: 2N-bit fixed-point improved MAC (I-MAC), Sum <= Sum + A*B.
//
// An NxN Adjusted Vedic multiplier forms the 2N-bit product of the unsigned
// operands a and b; a 2N-bit HBK-CSLA adds it to the accumulator register. The
// structure (multiplier, HBK-CSLA, accumulator) follows the I-MAC; the default
// N = 32 is the 64-bit I-MAC, and N = 4, 8, 16 give the 8-, 16- and 32-bit ones.
//
// Timing: one multiply-accumulate per clock. On a rising edge of clk with
// start = 1, sum takes the value sum + a*b (modulo 2^(2N)); with start = 0 it
// holds. rst_n (asynchronous, active low) clears the accumulator. The reset, the
// wrap-around on overflow and the hold with start = 0 are this design's choices.
module imac #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] sum
);

  logic [2*N-1:0] prod;
  logic [2*N-1:0] sum_next;
  logic           unused_cout;

  adjusted_vm #(.N(N)) u_vm (.a(a), .b(b), .p(prod));

  hbk_csla #(.W(2 * N)) u_acc_add (
    .a(sum), .b(prod), .cin(1'b0), .s(sum_next), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sum <= '0;
    else if (start) sum <= sum_next;
  end

endmodule
