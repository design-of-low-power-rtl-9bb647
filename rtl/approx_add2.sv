// approx_add2 - approximate 2-bit adder, the slice of the recoding adder that
// forms 3Y = Y + 2Y.
//
// The two sum bits are the exact sum of a + b + cin. The carry out, however,
// is taken from the slice's own operands only: cout = g1 | p1 & g0. The carry
// in never reaches cout, so in a chain of these slices no carry travels more
// than two bit positions and the critical path is that of one 2-bit slice.
// The price is an error when the slice fully propagates (p1 & p0) and cin is
// 1: cout should then be 1 and is 0, which makes the chained result 4 too
// small at this slice's weight.
//
// The use of an approximate 2-bit adder for Y + 2Y follows the multiplier's
// design; the exact logic equations above are this implementation's choice.
// Purely combinational.
module approx_add2 (
  input  logic [1:0] a,     // slice of Y
  input  logic [1:0] b,     // slice of 2Y
  input  logic       cin,   // carry from the slice below
  output logic [1:0] s,     // sum bits
  output logic       cout   // approximate carry to the slice above
);

  logic [1:0] g, p;
  logic       c1;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    s[0] = p[0] ^ cin;
    c1   = g[0] | (p[0] & cin);
    s[1] = p[1] ^ c1;
    cout = g[1] | (p[1] & g[0]);
  end

endmodule
