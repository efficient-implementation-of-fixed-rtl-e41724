// vm2x2: 2x2-bit Vedic multiplier (Urdhva Tiryakbhyam, "vertically and crosswise").
//
// The leaf of the Adjusted Vedic multiplier tree. Four AND gates form the partial
// products; two half adders combine them:
//   P[0] = A0*B0
//   P[1] = A1*B0 xor A0*B1,             carry C01 = A1*B0 and A0*B1
//   P[2] = A1*B1 xor C01,               P[3] = A1*B1 and C01
// This gate structure is the one the design is based on. Purely combinational.
module vm2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a1b0, a0b1, a1b1, c01;

  always_comb begin
    p[0] = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
    // half adder 1: crosswise products
    p[1] = a1b0 ^ a0b1;
    c01  = a1b0 & a0b1;
    // half adder 2: vertical product of the MSBs plus the crosswise carry
    p[2] = a1b1 ^ c01;
    p[3] = a1b1 & c01;
  end

endmodule
