// Self-checking testbench for rs_circuit.
// Two instances share R and S: one with level filters (the default) and one
// without. Each clock cycle both are compared with a step model kept in the
// testbench. On top of that it checks the circuit's stated behaviour:
//   - R <= 1 - S stores: Q1 = 1 - R and Q2 = 1 - S within two cycles, from
//     whatever state came before;
//   - Q1 = 1 - Q2 with S > Q1 and R > Q2 keeps the state;
//   - R > 1 - S is invalid: the outputs stay within 1 - R <= Q1 <= S and
//     1 - S <= Q2 <= R, and from Q1 = Q2 = 1 they oscillate;
//   - a gate error below half a level step leaves the filtered circuit's
//     stored value unchanged, while the same kind of error makes the
//     unfiltered circuit's stored value drift down to 0;
//   - a state with Q1 != 1 - Q2 under S > Q1, R > Q2 keeps each output
//     between its own value and the negation of the other output.
module tb_rs_circuit;
  localparam int W = 8;
  localparam int MAXV = 255;
  localparam int STEP = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] r, s;
  logic signed [W-1:0] ef1, ef2, ep1, ep2;
  logic [W-1:0] qf1, qf2, qp1, qp2;
  int checks = 0, failures = 0;
  int n_store = 0, n_hold = 0, n_osc = 0, n_absorb = 0, n_drift = 0, n_interval = 0;

  // Model state.
  int mf1, mf2, mp1, mp2;

  rs_circuit #(.W(W), .LEVELS(16), .FILTERED(1'b1)) dut_f (
    .clk(clk), .rst_n(rst_n), .r(r), .s(s), .err1(ef1), .err2(ef2), .q1(qf1), .q2(qf2));
  rs_circuit #(.W(W), .LEVELS(16), .FILTERED(1'b0)) dut_p (
    .clk(clk), .rst_n(rst_n), .r(r), .s(s), .err1(ep1), .err2(ep2), .q1(qp1), .q2(qp2));

  always #5 clk = ~clk;

  function automatic int gate(int a, int b, int e, bit filt);
    int v;
    v = MAXV - ((a < b) ? a : b) + e;
    if (v < 0) v = 0;
    if (v > MAXV) v = MAXV;
    if (filt) v = ((v * 2 + STEP) / (2 * STEP)) * STEP;
    return v;
  endfunction

  function automatic int grid();
    return STEP * int'($urandom_range(0, 15));
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 15)
      $display("FAIL %s r=%0d s=%0d qf=%0d/%0d qp=%0d/%0d", what, r, s, qf1, qf2, qp1, qp2);
  endtask

  // One step: advance the model, clock the circuits, compare.
  task automatic tick();
    int nf1, nf2, np1, np2;
    nf1 = gate(mf2, int'(r), int'(ef1), 1'b1);
    nf2 = gate(mf1, int'(s), int'(ef2), 1'b1);
    np1 = gate(mp2, int'(r), int'(ep1), 1'b0);
    np2 = gate(mp1, int'(s), int'(ep2), 1'b0);
    @(posedge clk); #1;
    mf1 = nf1; mf2 = nf2; mp1 = np1; mp2 = np2;
    checks++;
    if (int'(qf1) != mf1 || int'(qf2) != mf2 || int'(qp1) != mp1 || int'(qp2) != mp2)
      fail("model");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '0; s = '0; ef1 = '0; ef2 = '0; ep1 = '0; ep2 = '0;
    #12;
    checks++;
    if (qf1 != '0 || qf2 != '1 || qp1 != '0 || qp2 != '1) fail("reset");
    mf1 = 0; mf2 = MAXV; mp1 = 0; mp2 = MAXV;
    rst_n = 1'b1;

    // Store: R <= 1 - S, both settle within two steps.
    for (int k = 0; k < 300; k++) begin
      int sv, rv;
      sv = grid();
      rv = (k % 3 == 0) ? MAXV - sv : STEP * int'($urandom_range(0, (MAXV - sv) / STEP));
      s = W'(sv); r = W'(rv);
      tick(); tick();
      checks++;
      if (int'(qf1) != MAXV - rv || int'(qf2) != MAXV - sv ||
          int'(qp1) != MAXV - rv || int'(qp2) != MAXV - sv) fail("store");
      else n_store++;

      // Hold: after R = 1 - S, raise R above Q2 and S above Q1.
      if (rv == MAXV - sv && rv < MAXV && sv < MAXV) begin
        int q1v, q2v;
        q1v = sv; q2v = rv;
        r = W'(q2v + STEP * int'($urandom_range(1, (MAXV - q2v) / STEP)));
        s = W'(q1v + STEP * int'($urandom_range(1, (MAXV - q1v) / STEP)));
        repeat (4) begin
          tick();
          checks++;
          if (int'(qf1) != q1v || int'(qf2) != q2v || int'(qp1) != q1v || int'(qp2) != q2v)
            fail("hold");
        end
        n_hold++;
      end
    end

    // Invalid input R > 1 - S: bounded outputs, oscillation from Q1 = Q2 = 1.
    r = '0; s = '0;
    tick(); tick();
    checks++;
    if (qf1 != '1 || qf2 != '1) fail("set both to 1");
    r = W'(9 * STEP); s = W'(9 * STEP);
    begin
      int prev1;
      prev1 = int'(qf1);
      for (int c = 0; c < 12; c++) begin
        tick();
        checks++;
        if (int'(qf1) < MAXV - int'(r) || int'(qf1) > int'(s) ||
            int'(qf2) < MAXV - int'(s) || int'(qf2) > int'(r)) fail("invalid bounds");
        if (c > 0 && int'(qf1) != prev1) n_osc++;
        prev1 = int'(qf1);
      end
    end
    checks++;
    if (n_osc < 10) fail("no oscillation");

    // Inconsistent state (Q1 != 1 - Q2, left by the oscillation) with S > Q1
    // and R > Q2: each output stays in the interval delimited by its own
    // value and the negation of the other output.
    begin
      int lo1, hi1, lo2, hi2;
      lo1 = (int'(qp1) < MAXV - int'(qp2)) ? int'(qp1) : MAXV - int'(qp2);
      hi1 = (int'(qp1) < MAXV - int'(qp2)) ? MAXV - int'(qp2) : int'(qp1);
      lo2 = (int'(qp2) < MAXV - int'(qp1)) ? int'(qp2) : MAXV - int'(qp1);
      hi2 = (int'(qp2) < MAXV - int'(qp1)) ? MAXV - int'(qp1) : int'(qp2);
      checks++;
      if (int'(qp1) == MAXV - int'(qp2)) fail("state not inconsistent");
      r = '1; s = '1;
      for (int c = 0; c < 8; c++) begin
        tick();
        checks++;
        if (int'(qp1) < lo1 || int'(qp1) > hi1 || int'(qp2) < lo2 || int'(qp2) > hi2)
          fail("inconsistent state left its interval");
        else n_interval++;
      end
    end
    for (int k = 0; k < 200; k++) begin
      r = W'($urandom); s = W'($urandom);
      if (int'(r) <= MAXV - int'(s)) r = W'(MAXV - int'(r));
      if (int'(r) <= MAXV - int'(s)) continue;
      tick();
      tick();
      checks++;
      if (int'(qf1) < MAXV - int'(r) - STEP || int'(qf1) > int'(s) + STEP ||
          int'(qp1) < MAXV - int'(r) || int'(qp1) > int'(s) ||
          int'(qp2) < MAXV - int'(s) || int'(qp2) > int'(r)) fail("random invalid bounds");
    end

    // Gate errors while holding level 7.
    s = W'(7 * STEP); r = W'(MAXV - 7 * STEP);
    tick(); tick();
    r = '1; s = '1;
    for (int c = 0; c < 300; c++) begin
      ef1 = W'($urandom_range(0, 16)) - W'(8);
      ef2 = W'($urandom_range(0, 16)) - W'(8);
      ep1 = -1;
      tick();
      checks++;
      if (int'(qf1) != 7 * STEP || int'(qf2) != MAXV - 7 * STEP) fail("filtered error hold");
      else if (ef1 != 0 || ef2 != 0) n_absorb++;
      if (int'(qp1) < 7 * STEP) n_drift++;
    end
    checks++;
    if (qp1 != '0) fail("unfiltered circuit did not drift to 0");
    ef1 = '0; ef2 = '0; ep1 = '0;

    $display("store=%0d hold=%0d oscillate=%0d absorbed=%0d drift=%0d",
             n_store, n_hold, n_osc, n_absorb, n_drift);
    checks++;
    if (n_store == 0 || n_hold == 0 || n_absorb == 0 || n_drift == 0 || n_interval == 0) fail("mechanism never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
