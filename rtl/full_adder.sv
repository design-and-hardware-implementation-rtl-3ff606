// full_adder: one-bit full adder, the cell that the ripple-carry generic
// adder chains together.
//
// sum  = x ^ y ^ cin
// cout = x&y | x&cin | y&cin   (majority of the three inputs)
//
// Interface: three one-bit inputs (two addend bits and the carry in from the
// next lower bit), two one-bit outputs. Purely combinational, no clock.
// The equations are the ripple-carry equations of the design; the port names
// x, y, cin, sum, cout are taken from them.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end

endmodule
