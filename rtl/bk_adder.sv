// bk_adder: W-bit Brent-Kung parallel-prefix adder with carry in.
//
// Generate/propagate pairs are combined with the usual prefix operator
// (g,p) o (g',p') = (g | p&g', p&p'). The carry in is folded into bit 0's
// generate. An up-sweep builds group signals at spans 1, 2, 4, ...; a down-sweep
// fills in the remaining positions, giving the Brent-Kung 2*log2(W)-1 levels with
// few prefix cells. Any W >= 1 is allowed. Combinational; a building block of
// hbk_csla.
module bk_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] p0;   // bit propagate (kept for the sum)
  logic [W-1:0] gg;   // group generate, prefix from bit 0
  logic [W-1:0] pp;   // group propagate

  always_comb begin
    p0 = a ^ b;
    gg = a & b;
    pp = p0;
    gg[0] = gg[0] | (p0[0] & cin);
    // up-sweep
    for (int unsigned d = 1; d < W; d = d * 2) begin
      for (int unsigned i = 2 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
    // down-sweep
    for (int unsigned d = 2 ** ($clog2(W > 1 ? W : 2) - 1); d >= 1; d = d / 2) begin
      for (int unsigned i = 3 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end
    s[0] = p0[0] ^ cin;
    for (int unsigned i = 1; i < W; i++) s[i] = p0[i] ^ gg[i-1];
    cout = gg[W-1];
  end

endmodule
