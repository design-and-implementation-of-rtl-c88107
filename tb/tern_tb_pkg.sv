// tern_tb_pkg: testbench helpers for the binary-coded ternary datapath.
//
// Converts between unsigned integers and little-endian vectors of trits in
// the two-wire code (00 = 0, 01 = 1, 10 = 2), and draws random trit vectors.
// Vectors are up to 40 trits (3^40 fits in 64 bits). The reference values
// the testbenches compare against are computed with these integer helpers,
// independently of the ternary cells under test.
package tern_tb_pkg;

  localparam int MAXT = 40;
  typedef logic [1:0] trit_t;
  typedef trit_t [MAXT-1:0] tvec_t;

  function automatic longint unsigned pow3(input int n);
    longint unsigned r = 1;
    for (int i = 0; i < n; i++) r = r * 3;
    return r;
  endfunction

  // Integer value of the low n trits of v.
  function automatic longint unsigned tval(input tvec_t v, input int n);
    longint unsigned r = 0;
    for (int i = n - 1; i >= 0; i--) r = r * 3 + longint'(v[i]);
    return r;
  endfunction

  // Trit vector of x (trits above the value are zero).
  function automatic tvec_t tvec(input longint unsigned x);
    tvec_t r = '0;
    for (int i = 0; i < MAXT; i++) begin
      r[i] = trit_t'(x % 3);
      x = x / 3;
    end
    return r;
  endfunction

  // Random n-trit vector; every trit uniformly 0, 1 or 2.
  function automatic tvec_t trand(input int n);
    tvec_t r = '0;
    for (int i = 0; i < n; i++) r[i] = trit_t'($urandom % 3);
    return r;
  endfunction

  // True when the low n trits all use a valid code.
  function automatic bit tvalid(input tvec_t v, input int n);
    for (int i = 0; i < n; i++) if (v[i] == 2'b11) return 0;
    return 1;
  endfunction

endpackage
