// End-to-end testbench for the fuzzy D latch, at its default sizes (8-bit
// codes, 16 levels, level step 17 codes).
//
// It writes values with T = 1 and checks that Q1 = D and Q2 = 1 - D within
// two cycles, holds them with T = 0 while D changes, lowers T from 1 to 0
// through intermediate levels with D held, stores values that lie between two
// levels (they must come out as the nearest level), and injects random gate
// errors of up to half a level step into both loop gates while the value is
// held. Every cycle the outputs are also compared with a step model of the
// whole circuit kept in the testbench. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_fuzzy_d_latch;
  localparam int MAXV = 255;
  localparam int STEP = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d, t, q1, q2;
  logic signed [7:0] e1, e2;
  int checks = 0, failures = 0;
  int n_reset = 0, n_write = 0, n_hold = 0, n_ramp = 0, n_quant = 0, n_absorb = 0;
  int m1, m2, stored;

  fuzzy_d_latch dut (.clk(clk), .rst_n(rst_n), .d(d), .t(t),
                     .err1(e1), .err2(e2), .q1(q1), .q2(q2));

  always #5 clk = ~clk;

  function automatic int level_of(int v);
    return ((v * 2 + STEP) / (2 * STEP)) * STEP;
  endfunction

  function automatic int nand_raw(int a, int b);
    return MAXV - ((a < b) ? a : b);
  endfunction

  function automatic int clamp(int v);
    return (v < 0) ? 0 : (v > MAXV) ? MAXV : v;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 15)
      $display("FAIL %s d=%0d t=%0d q=%0d/%0d model=%0d/%0d stored=%0d",
               what, d, t, q1, q2, m1, m2, stored);
  endtask

  task automatic tick();
    int u, v, raw1, raw2, n1, n2;
    u    = nand_raw(int'(d), int'(t));
    v    = nand_raw(MAXV - int'(d), int'(t));
    raw1 = clamp(nand_raw(u, m2) + int'(e1));
    raw2 = clamp(nand_raw(v, m1) + int'(e2));
    n1   = level_of(raw1);
    n2   = level_of(raw2);
    // The filter did work when a gate's erroneous result was off the grid.
    if ((e1 != 0 || e2 != 0) && ((raw1 % STEP) != 0 || (raw2 % STEP) != 0)) n_absorb++;
    @(posedge clk); #1;
    m1 = n1; m2 = n2;
    checks++;
    if (int'(q1) != m1 || int'(q2) != m2) fail("model");
  endtask

  task automatic expect_stored(string what);
    checks++;
    if (int'(q1) != stored || int'(q2) != MAXV - stored) fail(what);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; t = '0; e1 = '0; e2 = '0;
    #12;
    stored = 0;
    expect_stored("reset");
    n_reset++;
    m1 = 0; m2 = MAXV;
    rst_n = 1'b1;

    for (int k = 0; k < 400; k++) begin
      int dv;
      bit off_grid;
      off_grid = (k % 4 == 3);
      dv = off_grid ? int'($urandom_range(0, MAXV)) : STEP * int'($urandom_range(0, 15));
      // Write.
      d = 8'(dv); t = '1;
      tick(); tick();
      stored = level_of(dv);
      expect_stored("write");
      n_write++;
      if (off_grid && stored != dv) n_quant++;

      // Lower T to 0 through intermediate levels, D held.
      begin
        int tv;
        tv = MAXV;
        while (tv > 0) begin
          tv = tv - int'($urandom_range(1, 60));
          if (tv < 0) tv = 0;
          t = 8'(tv);
          tick();
          expect_stored("ramp");
        end
        n_ramp++;
      end

      // Hold with T = 0, D changing, gate errors up to half a step.
      repeat (10) begin
        d = 8'($urandom);
        if (k % 2 == 0) begin
          e1 = 8'($urandom_range(0, 16)) - 8'sd8;
          e2 = 8'($urandom_range(0, 16)) - 8'sd8;
        end
        tick();
        expect_stored("hold");
      end
      n_hold++;
      e1 = '0; e2 = '0;
    end

    $display("reset=%0d write=%0d hold=%0d ramp=%0d quantised=%0d error_absorbed=%0d",
             n_reset, n_write, n_hold, n_ramp, n_quant, n_absorb);
    checks++;
    if (n_reset == 0 || n_write == 0 || n_hold == 0 || n_ramp == 0 ||
        n_quant == 0 || n_absorb == 0) fail("mechanism never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
