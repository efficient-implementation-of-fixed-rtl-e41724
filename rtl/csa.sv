// csa: W-bit 3:2 carry-save adder.
//
// Reduces three W-bit vectors x, y, z to a sum vector s and a carry vector c with
// x + y + z = s + 2*c. Bit c[i] therefore has weight 2^(i+1); c[W-1] is the
// carry out of the top column. Used to reduce the four partial products of the
// Adjusted Vedic multiplier to the redundant (sum, carry) form. Combinational.
module csa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
