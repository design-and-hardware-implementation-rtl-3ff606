// vedic16x16: 16x16-bit unsigned combinational multiplier after the Vedic
// "vertically and crosswise" (Urdhva Tiryakbhyam) method. Top of the design.
//
// Split a = aH:aL and b = bH:bL into bytes. Then
//   a*b = aH bH 2^16 + (aH bL + aL bH) 2^8 + aL bL
// The four byte products come from vedic8x8 blocks, which in turn are built
// from vedic4x4 and vedic2x2 blocks by the same rule:
//   M1 = aL*bL, M2 = aH*bL, M3 = aL*bH, M4 = aH*bH   (16 bits each)
// Three ripple-carry generic adders align and sum them:
//   ADDER 1 (16 bits): A1 = M2 + (M1 >> 8)
//   ADDER 2 (24 bits): A2 = (M4 << 8) + M3
//   ADDER 3 (24 bits): qout[31:8] = A2 + A1
//   qout[7:0] = M1[7:0]
//
// Interface: a[15:0], b[15:0] in, qout[31:0] = a*b out (64 I/O in all).
// There is no clock or reset: every partial product and every sum is formed
// in a single combinational pass, so the result is valid one propagation
// delay after the inputs settle. The structure, the adder widths and the
// operand alignment are the design's. This RTL's own choices: A1 is
// zero-extended to 24 bits for ADDER 3 and the carry ins are tied to 0. No
// adder's carry out can be 1 for these operand ranges, so the carry outs are
// not used by the datapath; an assertion states that invariant.
module vedic16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] qout
);

  logic [15:0] m1, m2, m3, m4;  // half products
  logic [15:0] a1;              // ADDER 1 sum
  logic [23:0] a2;              // ADDER 2 sum
  logic        c1, c2, c3;      // adder carry outs, always 0

  vedic8x8 u_m1 (.a(a[7:0]),  .b(b[7:0]),  .q(m1));
  vedic8x8 u_m2 (.a(a[15:8]), .b(b[7:0]),  .q(m2));
  vedic8x8 u_m3 (.a(a[7:0]),  .b(b[15:8]), .q(m3));
  vedic8x8 u_m4 (.a(a[15:8]), .b(b[15:8]), .q(m4));

  generic_adder #(.N(16)) u_adder1 (
    .x(m2), .y({8'h00, m1[15:8]}), .cin(1'b0), .sum(a1), .cout(c1)
  );

  generic_adder #(.N(24)) u_adder2 (
    .x({m4, 8'h00}), .y({8'h00, m3}), .cin(1'b0), .sum(a2), .cout(c2)
  );

  generic_adder #(.N(24)) u_adder3 (
    .x(a2), .y({8'h00, a1}), .cin(1'b0), .sum(qout[31:8]), .cout(c3)
  );

  assign qout[7:0] = m1[7:0];

  always_comb begin
    assert ({c1, c2, c3} == 3'b000)
      else $error("vedic16x16: adder carry out set for a=%0d b=%0d", a, b);
  end

endmodule
