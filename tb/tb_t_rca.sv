// tb_t_rca: checks the ternary ripple-carry adder at its default width
// (33 trits). Corner cases (all zero, all twos, long carry chains) and
// 2000 random operand pairs with carry-in 0, 1 and 2; each result must
// satisfy x + y + ci = 3^N * co + s.
module tb_t_rca;
  import tern_pkg::*;
  import tern_tb_pkg::tvec_t, tern_tb_pkg::tval, tern_tb_pkg::tvec, tern_tb_pkg::trand,
         tern_tb_pkg::pow3, tern_tb_pkg::tvalid;

  localparam int N = 33;

  trit_t [N-1:0] x, y, s;
  trit_t         ci, co;
  int checks = 0, failures = 0;

  t_rca dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input tvec_t xv, input tvec_t yv, input int c);
    longint unsigned exp_v, got_v;
    tvec_t sv;
    x  = xv[N-1:0];
    y  = yv[N-1:0];
    ci = trit_t'(c);
    #1;
    sv = '0;
    sv[N-1:0] = s;
    exp_v = tval(xv, N) + tval(yv, N) + longint'(c);
    got_v = tval(sv, N) + longint'(co) * pow3(N);
    checks++;
    if (exp_v != got_v || !tvalid(sv, N) || co == 2'b11) begin
      failures++;
      $display("FAIL x=%0d y=%0d ci=%0d: expected %0d got %0d", tval(xv, N), tval(yv, N), c,
               exp_v, got_v);
    end
  endtask

  initial begin
    apply(tvec(0), tvec(0), 0);
    apply(tvec(pow3(N) - 1), tvec(1), 0);
    apply(tvec(pow3(N) - 1), tvec(0), 1);
    apply(tvec(pow3(N) - 1), tvec(pow3(N) - 1), 2);
    apply(tvec(pow3(N) - 1), tvec(pow3(N) - 1), 0);
    apply(tvec(12345678), tvec(87654321), 1);
    for (int i = 0; i < 2000; i++) apply(trand(N), trand(N), i % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
