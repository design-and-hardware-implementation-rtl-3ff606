// generic_adder: N-bit ripple-carry adder, the adder used at every level of
// the Vedic multiplier tree.
//
// A chain of N full_adder cells. Bit i adds x[i], y[i] and the carry c[i-1]
// of the cell below it; the carry into bit 0 is the cin port and the carry out
// of bit N-1 is cout:
//   sum[i] = x[i] ^ y[i] ^ c[i-1]
//   c[i]   = x[i]y[i] | x[i]c[i-1] | y[i]c[i-1],   c[-1] = cin, cout = c[N-1]
//
// Interface: two N-bit addends, a carry in, an N-bit sum and a carry out.
// Purely combinational; the delay grows linearly with N (one full-adder carry
// path per bit). The ripple structure and the equations are the design's;
// the default width of 16 is a choice of this RTL (the multipliers set N on
// every instance).
module generic_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // c[i+1] is the carry out of bit i; c[0] is the carry in.
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
