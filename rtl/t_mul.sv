// t_mul: hierarchical N-trit by N-trit ternary multiplier.
//
// The multiplier is a tree of levels. Level 0 cuts both operands into
// blocks of 2 trits and multiplies every block of a with every block of b in
// a 2-trit leaf multiplier (t_mul2, made of 1-trit multipliers and half/full
// T-adders). Each further level doubles the block size S: the product of an
// S-trit block pair is put together from the four products of its halves
// (H = S/2 trits, x = xH*3^H + xL) found one level below,
//   xy = {xH*yH, xL*yL} + (xL*yH << H) + (xH*yL << H)
// where {.,.} is trit concatenation and << shifts by whole trits; the two
// additions are 2S-trit ternary ripple-carry adders. The last level has one
// block pair, the whole operands. A 16-trit multiplier thus has sixty-four
// 2-trit multipliers, sixteen 4-trit and four 8-trit products, and one
// 16-trit product.
// That the multiplier is hierarchical and built from 1-trit multipliers,
// half and full T-adders follows the design; how the four sub-products are
// added is this implementation's own choice.
//
// Interface: a and b are N trits, little-endian; p is the full 2N-trit
// product, which never overflows. Purely combinational. N must be a power
// of two, at least 2.
module t_mul
  import tern_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  trit_t [N-1:0]   a,
  input  trit_t [N-1:0]   b,
  output trit_t [2*N-1:0] p
);

  localparam int unsigned LV = $clog2(N);  // number of levels

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("t_mul: N must be a power of two and at least 2");
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned S  = 2 << l;   // trits per operand block
    localparam int unsigned H  = S / 2;
    localparam int unsigned NB = N / S;    // blocks per operand

    // pp[i][j] = (block i of a) * (block j of b), 2S trits
    trit_t [NB-1:0][NB-1:0][2*S-1:0] pp;

    for (genvar i = 0; i < NB; i++) begin : g_i
      for (genvar j = 0; j < NB; j++) begin : g_j
        if (l == 0) begin : g_leaf
          trit_t unused_cout;
          t_mul2 u_leaf (
            .a   (a[S*i +: S]),
            .b   (b[S*j +: S]),
            .m   (pp[i][j]),
            .cout(unused_cout)
          );
        end else begin : g_node
          trit_t [S-1:0]   pll, plh, phl, phh;
          trit_t [2*S-1:0] lo_hi, mid_lh, mid_hl, sum1;
          trit_t           unused_co1, unused_co2;

          assign pll = g_lvl[l-1].pp[2*i][2*j];
          assign plh = g_lvl[l-1].pp[2*i][2*j+1];
          assign phl = g_lvl[l-1].pp[2*i+1][2*j];
          assign phh = g_lvl[l-1].pp[2*i+1][2*j+1];

          // cross products aligned to weight 3^H, zero trits elsewhere
          always_comb begin
            lo_hi  = {phh, pll};
            mid_lh = '0;
            mid_hl = '0;
            mid_lh[H +: S] = plh;
            mid_hl[H +: S] = phl;
          end

          t_rca #(.N(2*S)) u_add1 (
            .x(lo_hi), .y(mid_lh), .ci(T0), .s(sum1), .co(unused_co1)
          );
          t_rca #(.N(2*S)) u_add2 (
            .x(sum1), .y(mid_hl), .ci(T0), .s(pp[i][j]), .co(unused_co2)
          );
        end
      end
    end
  end

  assign p = g_lvl[LV-1].pp[0][0];

endmodule
