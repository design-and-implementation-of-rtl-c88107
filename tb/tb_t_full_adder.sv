// tb_t_full_adder: exhaustive check of the ternary full adder.
// All 27 input triples (carry-in 0, 1 and 2); each must satisfy
// a + b + ci = 3*co + s with valid output codes.
module tb_t_full_adder;
  import tern_pkg::*;

  trit_t a, b, ci, s, co;
  int checks = 0, failures = 0;

  t_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        for (int k = 0; k < 3; k++) begin
          a  = trit_t'(i);
          b  = trit_t'(j);
          ci = trit_t'(k);
          #1;
          checks++;
          if (s == 2'b11 || co == 2'b11 || int'(s) + 3 * int'(co) != i + j + k) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: s=%0d co=%0d", i, j, k, s, co);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
