// t_mul2: 2-trit by 2-trit ternary multiplier, the leaf of the hierarchical
// multiplier.
//
// Four 1-trit multipliers form the partial products a_i*b_j, each as a
// product trit s_ij and a carry trit c_ij of weight 3^(i+j+1). Ternary half
// and full adders then reduce the columns:
//   m[0] = s00
//   m[1] : full adder (s01, s10, c00)          -> carry k1
//   m[2] : full adder (s11, c01, c10) -> t, k2a; half adder (t, k1) -> k2b
//   m[3] : full adder (c11, k2a, k2b)          -> cout
// The building blocks (1-trit multipliers, half and full T-adders, a 4-trit
// result m3..m0 and a carry out) follow the design; the exact column wiring
// above is this implementation's own arrangement. The largest product,
// 8*8 = 64 = 2101 in base 3, fits in four trits, so cout is 0 for valid
// trits. Purely combinational.
module t_mul2
  import tern_pkg::*;
(
  input  trit_t [1:0] a,
  input  trit_t [1:0] b,
  output trit_t [3:0] m,
  output trit_t       cout
);

  trit_t s00, s01, s10, s11;
  trit_t c00, c01, c10, c11;
  trit_t k1, t2, k2a, k2b;

  t_mul1 u_pp00 (.a(a[0]), .b(b[0]), .p(s00), .c(c00));
  t_mul1 u_pp01 (.a(a[0]), .b(b[1]), .p(s01), .c(c01));
  t_mul1 u_pp10 (.a(a[1]), .b(b[0]), .p(s10), .c(c10));
  t_mul1 u_pp11 (.a(a[1]), .b(b[1]), .p(s11), .c(c11));

  assign m[0] = s00;

  t_full_adder u_fa1  (.a(s01), .b(s10), .ci(c00), .s(m[1]), .co(k1));
  t_full_adder u_fa2  (.a(s11), .b(c01), .ci(c10), .s(t2),   .co(k2a));
  t_half_adder u_ha2  (.a(t2),  .b(k1),            .s(m[2]), .c(k2b));
  t_full_adder u_fa3  (.a(c11), .b(k2a), .ci(k2b), .s(m[3]), .co(cout));

endmodule
