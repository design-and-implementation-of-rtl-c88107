// tb_mac_unit: end-to-end test of the ternary MAC at its default size
// (16-trit operands, 33-trit accumulator), no parameter overrides.
//
// Phases:
//   1. latency: after reset one operand pair is presented for a single
//      clock, then zeros; the product must appear on dataout exactly three
//      rising edges after it was first sampled, and not earlier;
//   2. repeated accumulation: the same pair is held, so dataout must grow by
//      the same product every clock (one MAC per clock);
//   3. a random run with clock enable low on some cycles, asynchronous
//      clears, and bursts of the largest operands that make the accumulator
//      wrap, checked every clock against a cycle-accurate integer model.
// Each mechanism (accumulate, pipeline freeze, clear, wrap) is counted and
// must occur at least once.
module tb_mac_unit;
  import tern_pkg::*;
  import tern_tb_pkg::tvec_t, tern_tb_pkg::tval, tern_tb_pkg::tvec, tern_tb_pkg::trand,
         tern_tb_pkg::pow3, tern_tb_pkg::tvalid;

  localparam int N     = 16;
  localparam int ACC_W = 2 * N + 1;

  logic clk = 0, rst = 1, clken = 0;
  trit_t [N-1:0]     dataa = '0, datab = '0;
  trit_t [ACC_W-1:0] dataout;
  int checks = 0, failures = 0;
  int n_acc = 0, n_freeze = 0, n_clear = 0, n_wrap = 0;

  // cycle-accurate model of the three register stages
  longint unsigned m_a = 0, m_b = 0, m_p = 0, m_acc = 0, mod_acc;

  mac_unit dut (.clk(clk), .rst(rst), .clken(clken), .dataa(dataa), .datab(datab),
                .dataout(dataout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned outval();
    tvec_t v = '0;
    v[ACC_W-1:0] = dataout;
    return tval(v, ACC_W);
  endfunction

  task automatic set_ops(input tvec_t av, input tvec_t bv);
    dataa = av[N-1:0];
    datab = bv[N-1:0];
  endtask

  task automatic model_clock();
    longint unsigned va, vb;
    tvec_t v;
    if (!clken) begin
      n_freeze++;
      return;
    end
    v = '0; v[N-1:0] = dataa; va = tval(v, N);
    v = '0; v[N-1:0] = datab; vb = tval(v, N);
    if (m_acc + m_p >= mod_acc) n_wrap++;
    if (m_p != 0) n_acc++;
    m_acc = (m_acc + m_p) % mod_acc;
    m_p   = m_a * m_b;
    m_a   = va;
    m_b   = vb;
  endtask

  // called in the low clock phase
  task automatic do_reset();
    if (m_acc != 0) n_clear++;
    rst = 1;
    #1;
    checks++;
    if (outval() != 0) begin failures++; $display("FAIL clear"); end
    m_a = 0; m_b = 0; m_p = 0; m_acc = 0;
    #2 rst = 0;
  endtask

  task automatic step_check(input string what);
    @(posedge clk);
    model_clock();
    #1;
    checks++;
    if (outval() != m_acc) begin
      failures++;
      $display("FAIL %s at %0t: dataout=%0d expected %0d", what, $time, outval(), m_acc);
    end
  endtask

  initial begin
    longint unsigned pa, pb, prev_out;
    mod_acc = pow3(ACC_W);

    // ---- phase 1: latency ----
    #2 rst = 0;
    @(negedge clk);
    do_reset();
    clken = 1;
    @(negedge clk);
    pa = 1234567; pb = 7654321;
    set_ops(tvec(pa), tvec(pb));
    for (int e = 1; e <= 3; e++) begin
      @(posedge clk);
      model_clock();
      #1;
      checks++;
      if (e < 3 && outval() != 0) begin
        failures++; $display("FAIL latency: result early at edge %0d", e);
      end
      if (e == 3 && outval() != pa * pb) begin
        failures++; $display("FAIL latency: edge 3 dataout=%0d expected %0d", outval(), pa * pb);
      end
      @(negedge clk);
      set_ops(tvec(0), tvec(0));
    end

    // ---- phase 2: hold one operand pair, one accumulation per clock ----
    do_reset();
    pa = 11; pb = 6;
    set_ops(tvec(pa), tvec(pb));
    repeat (3) step_check("fill");
    for (int k = 0; k < 10; k++) begin
      prev_out = outval();
      step_check("repeat");
      checks++;
      if (outval() != prev_out + pa * pb) begin
        failures++; $display("FAIL rate: step %0d grew by %0d", k, outval() - prev_out);
      end
    end

    // ---- phase 3: random run ----
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      if (c % 400 >= 380) set_ops(tvec(pow3(N) - 1), tvec(pow3(N) - 1));
      else set_ops(trand(N), trand(N));
      clken = ($urandom % 5) != 0;
      if (c % 1000 == 999) do_reset();
      step_check("random");
    end

    checks++;
    if (n_acc == 0 || n_freeze == 0 || n_clear == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: accumulate=%0d freeze=%0d clear=%0d wrap=%0d", n_acc, n_freeze,
             n_clear, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
