// Self-checking testbench for rs_latch.
// Every clock cycle the latch is compared with a step model kept in the
// testbench (U = 1 - min(S,T), V = 1 - min(R,T), then the filtered
// cross-coupled pair). On top of that it checks the latch's stated behaviour:
//   - T = 1 with R >= 1 - S: Q1 = S and Q2 = R within two cycles;
//   - R = 1 - S held while T falls from 1 to 0 through intermediate levels,
//     in random steps: Q1 = S and Q2 = R in every cycle;
//   - T = 0 with random R and S: the stored value does not move.
// Random R, S, T (also off the level grid) then exercise the model check.
module tb_rs_latch;
  localparam int W = 8;
  localparam int MAXV = 255;
  localparam int STEP = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] r, s, t, q1, q2;
  logic signed [W-1:0] e1, e2;
  int checks = 0, failures = 0;
  int n_open = 0, n_ramp = 0, n_closed = 0;
  int m1, m2;

  rs_latch dut (.clk(clk), .rst_n(rst_n), .r(r), .s(s), .t(t),
                .err1(e1), .err2(e2), .q1(q1), .q2(q2));

  always #5 clk = ~clk;

  function automatic int nand_raw(int a, int b);
    return MAXV - ((a < b) ? a : b);
  endfunction

  function automatic int nand_filt(int a, int b, int e);
    int v;
    v = nand_raw(a, b) + e;
    if (v < 0) v = 0;
    if (v > MAXV) v = MAXV;
    return ((v * 2 + STEP) / (2 * STEP)) * STEP;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 15)
      $display("FAIL %s r=%0d s=%0d t=%0d q=%0d/%0d model=%0d/%0d", what, r, s, t, q1, q2, m1, m2);
  endtask

  task automatic tick();
    int u, v, n1, n2;
    u  = nand_raw(int'(s), int'(t));
    v  = nand_raw(int'(r), int'(t));
    n1 = nand_filt(u, m2, int'(e1));
    n2 = nand_filt(v, m1, int'(e2));
    @(posedge clk); #1;
    m1 = n1; m2 = n2;
    checks++;
    if (int'(q1) != m1 || int'(q2) != m2) fail("model");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '0; s = '0; t = '0; e1 = '0; e2 = '0;
    #12;
    checks++;
    if (q1 != '0 || q2 != '1) fail("reset");
    m1 = 0; m2 = MAXV;
    rst_n = 1'b1;

    for (int k = 0; k < 300; k++) begin
      int sv, rv;
      // Open: T = 1 with R >= 1 - S.
      sv = STEP * int'($urandom_range(0, 15));
      rv = (k % 2 == 0) ? MAXV - sv
                        : MAXV - sv + STEP * int'($urandom_range(0, sv / STEP));
      s = W'(sv); r = W'(rv); t = '1;
      tick(); tick();
      checks++;
      if (int'(q1) != sv || int'(q2) != rv) fail("open");
      else n_open++;

      if (rv == MAXV - sv) begin
        // T falls from 1 to 0 through intermediate levels.
        int tv;
        tv = MAXV;
        while (tv > 0) begin
          tv = tv - int'($urandom_range(1, 40));
          if (tv < 0) tv = 0;
          t = W'(tv);
          repeat ($urandom_range(1, 3)) begin
            tick();
            checks++;
            if (int'(q1) != sv || int'(q2) != rv) fail("ramp");
          end
        end
        n_ramp++;
        // Closed: R and S change freely.
        repeat (8) begin
          r = W'($urandom); s = W'($urandom);
          tick();
          checks++;
          if (int'(q1) != sv || int'(q2) != rv) fail("closed");
        end
        n_closed++;
      end
    end

    // Random stimulus, including values between levels and invalid pairs.
    for (int k = 0; k < 3000; k++) begin
      r = W'($urandom); s = W'($urandom); t = W'($urandom);
      if (k % 5 == 0) t = '1;
      if (k % 5 == 1) t = '0;
      tick();
    end

    $display("open=%0d ramp=%0d closed=%0d", n_open, n_ramp, n_closed);
    checks++;
    if (n_open == 0 || n_ramp == 0 || n_closed == 0) fail("mechanism never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
