// t_full_adder: ternary full adder.
//
// Adds trits a, b and a carry-in ci, each 0..2, and returns sum s and carry
// co so that a + b + ci = 3*co + s. Because ci may be 2, the carry can be 2
// (2 + 2 + 2 = 6 = 20 in base 3). All three inputs are decoded into one-hot
// literals and the outputs are sums of products grouped by output value:
//   s  = 2 for the nine minterms with a+b+ci equal to 2 or 5,
//   s  = 1 for the nine minterms with a+b+ci equal to 1 or 4,
//   co = 2 for a^2 b^2 ci^2,
//   co = 1 whenever two literals already sum to 3 or more (a^2 b^1, a^1 b^2,
//        a^2 b^2, a^2 ci^1, a^1 ci^2, a^2 ci^2, b^2 ci^1, b^1 ci^2, b^2 ci^2)
//        or for a^1 b^1 ci^1; the 2-group takes priority over it.
// Purely combinational. Trits use the two-wire code of tern_pkg.
module t_full_adder
  import tern_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t ci,
  output trit_t s,
  output trit_t co
);

  lit_t la, lb, lc;
  logic s2, s1, c2, c1;

  always_comb begin
    la = decode(a);
    lb = decode(b);
    lc = decode(ci);
    s2 = (la.l2 & lb.l0 & lc.l0) | (la.l1 & lb.l0 & lc.l1) | (la.l0 & lb.l0 & lc.l2)
       | (la.l1 & lb.l1 & lc.l0) | (la.l0 & lb.l1 & lc.l1) | (la.l2 & lb.l1 & lc.l2)
       | (la.l0 & lb.l2 & lc.l0) | (la.l2 & lb.l2 & lc.l1) | (la.l1 & lb.l2 & lc.l2);
    s1 = (la.l1 & lb.l0 & lc.l0) | (la.l0 & lb.l0 & lc.l1) | (la.l2 & lb.l0 & lc.l2)
       | (la.l0 & lb.l1 & lc.l0) | (la.l2 & lb.l1 & lc.l1) | (la.l1 & lb.l1 & lc.l2)
       | (la.l2 & lb.l2 & lc.l0) | (la.l1 & lb.l2 & lc.l1) | (la.l0 & lb.l2 & lc.l2);
    c2 = la.l2 & lb.l2 & lc.l2;
    c1 = (la.l2 & lb.l1) | (la.l1 & lb.l2) | (la.l2 & lb.l2)
       | (la.l2 & lc.l1) | (la.l1 & lc.l2) | (la.l2 & lc.l2)
       | (lb.l2 & lc.l1) | (lb.l1 & lc.l2) | (lb.l2 & lc.l2)
       | (la.l1 & lb.l1 & lc.l1);
    s  = encode(s2, s1);
    co = encode(c2, c1);
  end

endmodule
