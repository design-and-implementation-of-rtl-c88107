// tb_t_accumulator: checks the ternary accumulator at its default size
// (32-trit input, 33-trit register) against an integer model reduced
// modulo 3^33. Random inputs, clock enable low on about a quarter of the
// cycles, occasional asynchronous clears, and bursts of the largest input
// that force the register to wrap. Every cycle the adder output must equal
// q + b and, after the edge, q must equal the model. Each mechanism
// (accumulate, hold, clear, wrap) must occur at least once.
module tb_t_accumulator;
  import tern_pkg::*;
  import tern_tb_pkg::tvec_t, tern_tb_pkg::tval, tern_tb_pkg::tvec, tern_tb_pkg::trand,
         tern_tb_pkg::pow3, tern_tb_pkg::tvalid;

  localparam int BW = 32;
  localparam int W  = 33;

  logic clk = 0, rst = 1, clken = 0;
  trit_t [BW-1:0] b = '0;
  trit_t [W-1:0]  sum, q;
  int checks = 0, failures = 0, cycles = 0;
  int n_acc = 0, n_hold = 0, n_clear = 0, n_wrap = 0;
  longint unsigned model = 0, mod_w, bval;

  t_accumulator dut (.clk(clk), .rst(rst), .clken(clken), .b(b), .sum(sum), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned qval();
    tvec_t v = '0;
    v[W-1:0] = q;
    return tval(v, W);
  endfunction

  function automatic longint unsigned sval();
    tvec_t v = '0;
    v[W-1:0] = sum;
    return tval(v, W);
  endfunction

  initial begin
    tvec_t bv;
    mod_w = pow3(W);
    #12 rst = 0;
    checks++;
    if (qval() != 0) begin failures++; $display("FAIL q not cleared by reset"); end
    for (cycles = 0; cycles < 3000; cycles++) begin
      @(negedge clk);
      if (cycles % 200 >= 190) bv = tvec(pow3(BW) - 1);     // wrap burst
      else bv = trand(BW);
      b = bv[BW-1:0];
      bval = tval(bv, BW);
      clken = ($urandom % 4) != 0;
      #1;
      checks++;
      if (sval() != (model + bval) % mod_w) begin
        failures++;
        $display("FAIL sum: q=%0d b=%0d sum=%0d", model, bval, sval());
      end
      if (cycles % 500 == 250) begin
        // asynchronous clear in the middle of the low clock phase
        rst = 1;
        #1;
        checks++;
        if (qval() != 0) begin failures++; $display("FAIL async clear"); end
        if (model != 0) n_clear++;
        model = 0;
        rst = 0;
      end
      @(posedge clk);
      if (clken) begin
        if (model + bval >= mod_w) n_wrap++;
        model = (model + bval) % mod_w;
        n_acc++;
      end else begin
        n_hold++;
      end
      #1;
      checks++;
      if (qval() != model) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", cycles, qval(), model);
      end
    end
    checks++;
    if (n_acc == 0 || n_hold == 0 || n_clear == 0 || n_wrap == 0) failures++;
    $display("mechanisms: accumulate=%0d hold=%0d clear=%0d wrap=%0d", n_acc, n_hold, n_clear,
             n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
