// vedic8x8: 8x8-bit unsigned multiplier built from four 4x4 Vedic multipliers
// and three ripple-carry adders.
//
// The same decomposition as every level of the tree, on 4-bit halves
// a = aH:aL, b = bH:bL:
//   M1 = aL*bL, M2 = aH*bL, M3 = aL*bH, M4 = aH*bH   (8 bits each, vedic4x4)
//   ADDER 1 ( 8 bits): A1 = M2 + (M1 >> 4)
//   ADDER 2 (12 bits): A2 = (M4 << 4) + M3
//   ADDER 3 (12 bits): q[15:4] = A2 + A1
//   q[3:0] = M1[3:0]
//
// Interface: a[7:0], b[7:0] in, q[15:0] = a*b out. Purely combinational.
// The 16x16 multiplier of this design is built from four 8x8 blocks, but the
// 8x8 level itself is not drawn out; this block repeats the pattern of the
// 4x4 and 16x16 levels at 8 bits, which is this RTL's reading. As in the
// other levels, A1 is zero-extended for ADDER 3, carry ins are tied to 0, and
// the carry outs, which cannot be 1 here, are only checked by an assertion.
module vedic8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);

  logic [7:0]  m1, m2, m3, m4;  // half products
  logic [7:0]  a1;              // ADDER 1 sum
  logic [11:0] a2;              // ADDER 2 sum
  logic        c1, c2, c3;      // adder carry outs, always 0

  vedic4x4 u_m1 (.a(a[3:0]), .b(b[3:0]), .q(m1));
  vedic4x4 u_m2 (.a(a[7:4]), .b(b[3:0]), .q(m2));
  vedic4x4 u_m3 (.a(a[3:0]), .b(b[7:4]), .q(m3));
  vedic4x4 u_m4 (.a(a[7:4]), .b(b[7:4]), .q(m4));

  generic_adder #(.N(8)) u_adder1 (
    .x(m2), .y({4'b0000, m1[7:4]}), .cin(1'b0), .sum(a1), .cout(c1)
  );

  generic_adder #(.N(12)) u_adder2 (
    .x({m4, 4'b0000}), .y({4'b0000, m3}), .cin(1'b0), .sum(a2), .cout(c2)
  );

  generic_adder #(.N(12)) u_adder3 (
    .x(a2), .y({4'b0000, a1}), .cin(1'b0), .sum(q[15:4]), .cout(c3)
  );

  assign q[3:0] = m1[3:0];

  always_comb begin
    assert ({c1, c2, c3} == 3'b000)
      else $error("vedic8x8: adder carry out set for a=%0d b=%0d", a, b);
  end

endmodule
