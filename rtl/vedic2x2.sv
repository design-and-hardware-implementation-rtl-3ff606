// vedic2x2: 2x2-bit unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// It applies the "vertically and crosswise" (Urdhva Tiryakbhyam) rule to two
// 2-bit numbers a = a1a0 and b = b1b0:
//   step 1, vertical on the LSBs:  q0 = a0b0
//   step 2, crosswise:            q1 = a1b0 ^ a0b1, carry k = a1b0 & a0b1
//   step 3, vertical on the MSBs: q2 = a1b1 ^ k,    q3 = a1b1 & k
// That is four AND gates for the partial products and two half adders.
//
// Interface: a[1:0], b[1:0] in, q[3:0] = a*b out. Purely combinational.
// The gate network is the design's; nothing here is this RTL's own choice.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic p00, p10, p01, p11;  // partial products a_i b_j
  logic k;                   // carry of the crosswise step

  always_comb begin
    p00  = a[0] & b[0];
    p10  = a[1] & b[0];
    p01  = a[0] & b[1];
    p11  = a[1] & b[1];
    k    = p10 & p01;
    q[0] = p00;
    q[1] = p10 ^ p01;
    q[2] = p11 ^ k;
    q[3] = p11 & k;
  end

endmodule
