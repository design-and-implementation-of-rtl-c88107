// tb_t_mul1: exhaustive check of the 1-trit ternary multiplier.
// All nine operand pairs are applied; each result must satisfy
// a*b = 3*c + p with p and c valid trits. Ends with a TB_RESULT line.
module tb_t_mul1;
  import tern_pkg::*;

  trit_t a, b, p, c;
  int checks = 0, failures = 0;

  t_mul1 dut (.a(a), .b(b), .p(p), .c(c));

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
        if (p == 2'b11 || c == 2'b11 || int'(p) + 3 * int'(c) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d: p=%0d c=%0d", i, j, p, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
