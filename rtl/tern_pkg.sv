// tern_pkg: shared types and helpers for the binary-coded ternary datapath.
//
// Every ternary digit (trit) is carried on two wires. The code is
//   2'b00 = 0, 2'b01 = 1, 2'b10 = 2, and 2'b11 is unused.
// The adder and multiplier cells work the way the ternary circuits they
// model do: a decoder turns a trit into three one-hot literals (X^0, X^1,
// X^2), sum-of-products logic selects the minterms whose output is 2 and the
// minterms whose output is 1, and an encoder forms the output trit from those
// two groups. The decoder maps the unused code 2'b11 to no literal at all, so
// a cell fed with it behaves as if no input term were true. The two-wire code
// and the handling of 2'b11 are choices of this implementation.
package tern_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'b00;
  localparam trit_t T1 = 2'b01;
  localparam trit_t T2 = 2'b10;

  // One-hot literals of a trit: l0 = (x == 0), l1 = (x == 1), l2 = (x == 2).
  typedef struct packed {
    logic l2;
    logic l1;
    logic l0;
  } lit_t;

  function automatic lit_t decode(input trit_t x);
    lit_t r;
    r.l0 = (x == T0);
    r.l1 = (x == T1);
    r.l2 = (x == T2);
    return r;
  endfunction

  // Output trit from the "value 2" group and the "value 1" group of a cell.
  // The 2-group wins if both are true (only possible for a malformed cell).
  function automatic trit_t encode(input logic grp2, input logic grp1);
    return grp2 ? T2 : (grp1 ? T1 : T0);
  endfunction

endpackage
