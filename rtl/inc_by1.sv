// inc_by1: W-bit increment-by-1 (Ib-1) converter.
//
// y = a + inc, with cout the carry out of the top bit. Built as a chain of half
// adders (bit i flips when inc and all lower bits of a are 1). The 4x4 Adjusted
// Vedic multiplier uses a 2-bit one to add the carry of its middle columns into
// the two product MSBs. Combinational.
module inc_by1 #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic         inc,
  output logic [W-1:0] y,
  output logic         cout
);

  logic [W:0] t;   // t[i]: inc and a[i-1:0] all ones

  assign t[0] = inc;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign y[i]   = a[i] ^ t[i];
    assign t[i+1] = a[i] & t[i];
  end
  assign cout = t[W];

endmodule
