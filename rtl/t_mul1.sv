// t_mul1: 1-trit ternary multiplier.
//
// Multiplies two trits a and b and returns the low product trit p and the
// carry trit c, so that a*b = 3*c + p. The truth table is the ternary
// multiplication table: only 1*2 and 2*1 give product 2, 1*1 and 2*2 give
// product 1, and only 2*2 carries (2*2 = 4 = 11 in base 3). Inside, both
// operands are decoded into one-hot literals and the outputs are sums of
// products of those literals, grouped by output value as in the design's
// K-map equations:
//   p = 2 for a^1 b^2 + a^2 b^1,  p = 1 for a^1 b^1 + a^2 b^2,
//   c = 1 for a^2 b^2.
// Purely combinational, no clock. Trits use the two-wire code of tern_pkg.
module t_mul1
  import tern_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t p,
  output trit_t c
);

  lit_t la, lb;
  logic p2, p1, c1;

  always_comb begin
    la = decode(a);
    lb = decode(b);
    p2 = (la.l1 & lb.l2) | (la.l2 & lb.l1);
    p1 = (la.l1 & lb.l1) | (la.l2 & lb.l2);
    c1 = la.l2 & lb.l2;
    p  = encode(p2, p1);
    c  = encode(1'b0, c1);
  end

endmodule
