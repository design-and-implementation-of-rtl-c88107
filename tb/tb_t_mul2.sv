// tb_t_mul2: exhaustive check of the 2-trit ternary multiplier.
// All 81 operand pairs (0..8 each); the 4-trit result must equal the
// integer product and the carry out must stay 0.
module tb_t_mul2;
  import tern_pkg::*;

  trit_t [1:0] a, b;
  trit_t [3:0] m;
  trit_t       cout;
  int checks = 0, failures = 0;

  t_mul2 dut (.a(a), .b(b), .m(m), .cout(cout));

  function automatic int val4(input trit_t [3:0] v);
    return int'(v[0]) + 3 * int'(v[1]) + 9 * int'(v[2]) + 27 * int'(v[3]);
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 9; x++) begin
      for (int y = 0; y < 9; y++) begin
        a = {trit_t'(x / 3), trit_t'(x % 3)};
        b = {trit_t'(y / 3), trit_t'(y % 3)};
        #1;
        checks++;
        if (val4(m) != x * y || cout != 2'b00 || m[3] == 2'b11 || m[2] == 2'b11
            || m[1] == 2'b11 || m[0] == 2'b11) begin
          failures++;
          $display("FAIL %0d*%0d: m=%0d cout=%0d", x, y, val4(m), cout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
