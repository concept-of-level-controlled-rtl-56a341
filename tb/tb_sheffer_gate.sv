// Self-checking testbench for sheffer_gate.
// Applies every pair of 8-bit inputs with an ideal gate (err = 0) and checks
// y = 255 - min(a, b), then random pairs with random errors and checks the
// clamped sum. Also checks that the gate is commutative and that 1 and 0 give
// the two-valued NAND table.
module tb_sheffer_gate;
  localparam int W = 8;
  localparam int MAXV = (1 << W) - 1;

  logic [W-1:0]        a, b, y, y_swap;
  logic signed [W-1:0] err;
  int checks = 0, failures = 0;

  sheffer_gate #(.W(W)) dut      (.a(a), .b(b), .err(err), .y(y));
  sheffer_gate #(.W(W)) dut_swap (.a(b), .b(a), .err(err), .y(y_swap));

  function automatic int ref_gate(int ai, int bi, int ei);
    int m, v;
    m = (ai < bi) ? ai : bi;
    v = MAXV - m + ei;
    if (v < 0) v = 0;
    if (v > MAXV) v = MAXV;
    return v;
  endfunction

  task automatic check(string what);
    int exp;
    exp = ref_gate(int'(a), int'(b), int'(err));
    checks++;
    if (int'(y) != exp || y != y_swap) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d err=%0d y=%0d swap=%0d exp=%0d", what, a, b, err, y, y_swap, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err = '0;
    for (int i = 0; i <= MAXV; i++) begin
      for (int j = 0; j <= MAXV; j++) begin
        a = W'(i); b = W'(j);
        #1 check("exhaustive");
      end
    end
    // Two-valued corner cases: NAND truth table.
    a = '0; b = '0; #1; checks++; if (y != '1) failures++;
    a = '1; b = '0; #1; checks++; if (y != '1) failures++;
    a = '0; b = '1; #1; checks++; if (y != '1) failures++;
    a = '1; b = '1; #1; checks++; if (y != '0) failures++;
    // Random inputs and gate errors, including clamping at both ends.
    for (int k = 0; k < 20000; k++) begin
      a = W'($urandom); b = W'($urandom); err = W'($urandom_range(0, 40)) - W'(20);
      if (k % 7 == 0) err = W'($urandom);
      #1 check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
