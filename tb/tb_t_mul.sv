// tb_t_mul: checks the hierarchical ternary multiplier at its default size
// (16 x 16 trits, 32-trit product). Corner cases (zero, one, largest
// operands) and 3000 random operand pairs; the product must equal the
// integer product of the operands.
module tb_t_mul;
  import tern_pkg::*;
  import tern_tb_pkg::tvec_t, tern_tb_pkg::tval, tern_tb_pkg::tvec, tern_tb_pkg::trand,
         tern_tb_pkg::pow3, tern_tb_pkg::tvalid;

  localparam int N = 16;

  trit_t [N-1:0]   a, b;
  trit_t [2*N-1:0] p;
  int checks = 0, failures = 0;

  t_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input tvec_t av, input tvec_t bv);
    longint unsigned exp_v, got_v;
    tvec_t pv;
    a = av[N-1:0];
    b = bv[N-1:0];
    #1;
    pv = '0;
    pv[2*N-1:0] = p;
    exp_v = tval(av, N) * tval(bv, N);
    got_v = tval(pv, 2 * N);
    checks++;
    if (exp_v != got_v || !tvalid(pv, 2 * N)) begin
      failures++;
      $display("FAIL %0d * %0d: expected %0d got %0d", tval(av, N), tval(bv, N), exp_v, got_v);
    end
  endtask

  initial begin
    apply(tvec(0), tvec(0));
    apply(tvec(1), tvec(pow3(N) - 1));
    apply(tvec(pow3(N) - 1), tvec(pow3(N) - 1));
    apply(tvec(pow3(N) - 1), tvec(2));
    apply(tvec(11), tvec(6));
    for (int i = 0; i < 3000; i++) apply(trand(N), trand(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
