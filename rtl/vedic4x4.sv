// vedic4x4: 4x4-bit unsigned multiplier built from four 2x2 Vedic multipliers
// and three ripple-carry adders.
//
// Split a = aH:aL and b = bH:bL into 2-bit halves. Then
//   a*b = aH bH 2^4 + (aH bL + aL bH) 2^2 + aL bL
// The four half products come from vedic2x2 blocks:
//   M1 = aL*bL, M2 = aH*bL, M3 = aL*bH, M4 = aH*bH   (4 bits each)
// and the adder tree aligns and sums them:
//   ADDER 1 (4 bits): A1 = M2 + (M1 >> 2)
//   ADDER 2 (6 bits): A2 = (M4 << 2) + M3
//   ADDER 3 (6 bits): q[7:2] = A2 + A1
//   q[1:0] = M1[1:0]  (the low two bits of M1 pass straight to the output)
// The low bits of M1 never take part in an addition, which is why M1's upper
// half is folded into ADDER 1 together with M2.
//
// Interface: a[3:0], b[3:0] in, q[7:0] = a*b out. Purely combinational.
// The split, the four multipliers and the three adders with their operand
// alignment are the design's. This RTL's choices: ADDER 3's narrower operand
// A1 is zero-extended to 6 bits, and the carry ins are tied to 0. No adder's
// carry out can be 1 for these operand ranges, so the carry outs are not
// used by the datapath; an assertion states that invariant.
module vedic4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  logic [3:0] m1, m2, m3, m4;  // half products
  logic [3:0] a1;              // ADDER 1 sum
  logic [5:0] a2;              // ADDER 2 sum
  logic       c1, c2, c3;      // adder carry outs, always 0

  vedic2x2 u_m1 (.a(a[1:0]), .b(b[1:0]), .q(m1));
  vedic2x2 u_m2 (.a(a[3:2]), .b(b[1:0]), .q(m2));
  vedic2x2 u_m3 (.a(a[1:0]), .b(b[3:2]), .q(m3));
  vedic2x2 u_m4 (.a(a[3:2]), .b(b[3:2]), .q(m4));

  generic_adder #(.N(4)) u_adder1 (
    .x(m2), .y({2'b00, m1[3:2]}), .cin(1'b0), .sum(a1), .cout(c1)
  );

  generic_adder #(.N(6)) u_adder2 (
    .x({m4, 2'b00}), .y({2'b00, m3}), .cin(1'b0), .sum(a2), .cout(c2)
  );

  generic_adder #(.N(6)) u_adder3 (
    .x(a2), .y({2'b00, a1}), .cin(1'b0), .sum(q[7:2]), .cout(c3)
  );

  assign q[1:0] = m1[1:0];

  always_comb begin
    assert ({c1, c2, c3} == 3'b000)
      else $error("vedic4x4: adder carry out set for a=%0d b=%0d", a, b);
  end

endmodule
