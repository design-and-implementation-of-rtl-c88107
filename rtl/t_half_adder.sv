// t_half_adder: ternary half adder.
//
// Adds two trits a and b, with no carry in, and returns sum s and carry c
// so that a + b = 3*c + s. Both operands are decoded into one-hot literals;
// the sum is a sum of products grouped by output value:
//   s = 2 for a^2 b^0 + a^1 b^1 + a^0 b^2,
//   s = 1 for a^1 b^0 + a^0 b^1 + a^2 b^2,
//   c = 1 for a^2 b^1 + a^1 b^2 + a^2 b^2.
// The carry never exceeds 1. Purely combinational. Trits use the two-wire
// code of tern_pkg.
module t_half_adder
  import tern_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t s,
  output trit_t c
);

  lit_t la, lb;
  logic s2, s1, c1;

  always_comb begin
    la = decode(a);
    lb = decode(b);
    s2 = (la.l2 & lb.l0) | (la.l1 & lb.l1) | (la.l0 & lb.l2);
    s1 = (la.l1 & lb.l0) | (la.l0 & lb.l1) | (la.l2 & lb.l2);
    c1 = (la.l2 & lb.l1) | (la.l1 & lb.l2) | (la.l2 & lb.l2);
    s  = encode(s2, s1);
    c  = encode(1'b0, c1);
  end

endmodule
