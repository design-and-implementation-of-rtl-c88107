// tb_t_half_adder: exhaustive check of the ternary half adder.
// All nine input pairs; each must satisfy a + b = 3*c + s.
module tb_t_half_adder;
  import tern_pkg::*;

  trit_t a, b, s, c;
  int checks = 0, failures = 0;

  t_half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        a = trit_t'(i);
        b = trit_t'(j);
        #1;
        checks++;
        if (s == 2'b11 || c == 2'b11 || int'(s) + 3 * int'(c) != i + j) begin
          failures++;
          $display("FAIL %0d+%0d: s=%0d c=%0d", i, j, s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
