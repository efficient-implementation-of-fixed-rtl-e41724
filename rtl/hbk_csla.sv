// hbk_csla: W-bit hybrid Brent-Kung / carry-select adder (HBK-CSLA).
//
// The adder used throughout the design: inside the Adjusted Vedic multiplier to
// turn the carry-save (sum, carry) pair into the product, and as the
// accumulation adder of every MAC. The design combines a Brent-Kung prefix adder
// with a carry-select adder. Here the low L = ceil(W/2) bits are one Brent-Kung
// adder; the high W-L bits are computed twice by two Brent-Kung adders, once for
// a carry of 0 and once for 1, and the low half's carry out selects between them.
// That split is this design's own choice; only the combination of the two adder
// styles is given. Combinational: s + 2^W*cout = a + b + cin.
module hbk_csla #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  if (W < 2) begin : g_small
    bk_adder #(.W(W)) u_bk (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else begin : g_split
    localparam int unsigned L = (W + 1) / 2;
    localparam int unsigned H = W - L;

    logic         c_lo;
    logic [H-1:0] s_hi0, s_hi1;
    logic         c_hi0, c_hi1;

    bk_adder #(.W(L)) u_lo (
      .a(a[L-1:0]), .b(b[L-1:0]), .cin(cin), .s(s[L-1:0]), .cout(c_lo)
    );
    bk_adder #(.W(H)) u_hi0 (
      .a(a[W-1:L]), .b(b[W-1:L]), .cin(1'b0), .s(s_hi0), .cout(c_hi0)
    );
    bk_adder #(.W(H)) u_hi1 (
      .a(a[W-1:L]), .b(b[W-1:L]), .cin(1'b1), .s(s_hi1), .cout(c_hi1)
    );

    // carry-select multiplexer
    always_comb begin
      s[W-1:L] = c_lo ? s_hi1 : s_hi0;
      cout     = c_lo ? c_hi1 : c_hi0;
    end
  end

endmodule
