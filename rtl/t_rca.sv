// t_rca: N-trit ternary ripple-carry adder.
//
// Adds two N-trit numbers x and y and a carry-in trit ci with a chain of N
// ternary full adders: stage i adds x[i], y[i] and the carry of stage i-1.
// The result is s (N trits) and the carry out of the last stage, co, so
// that x + y + ci = 3^N * co + s. Operands are little-endian trit vectors
// (index 0 is the least significant trit). With ci at most 1 the carries
// are at most 1; a carry-in of 2 is also handled. Purely combinational; the
// delay grows linearly with N.
//
// The ripple-carry structure is the adder type the design names for its MAC;
// the default width of 33 trits is the accumulator width of the 16-trit MAC.
module t_rca
  import tern_pkg::*;
#(
  parameter int unsigned N = 33
) (
  input  trit_t [N-1:0] x,
  input  trit_t [N-1:0] y,
  input  trit_t         ci,
  output trit_t [N-1:0] s,
  output trit_t         co
);

  trit_t [N:0] carry;

  assign carry[0] = ci;

  for (genvar i = 0; i < N; i++) begin : g_stage
    t_full_adder u_fa (
      .a (x[i]),
      .b (y[i]),
      .ci(carry[i]),
      .s (s[i]),
      .co(carry[i+1])
    );
  end

  assign co = carry[N];

endmodule
