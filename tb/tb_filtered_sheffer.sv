// Self-checking testbench for filtered_sheffer.
// Random inputs and gate errors: the output must equal the nearest level to
// clamp(255 - min(a, b) + err). With inputs on the level grid and
// |err| <= 8 (less than half of the 17-code level step) the output must be
// exactly the ideal result 255 - min(a, b): the filter removes the error.
module tb_filtered_sheffer;
  localparam int W = 8;
  localparam int MAXV = 255;
  localparam int STEP = 17;

  logic [W-1:0]        a, b, y;
  logic signed [W-1:0] err;
  int checks = 0, failures = 0;
  int absorbed = 0;

  filtered_sheffer dut (.a(a), .b(b), .err(err), .y(y));

  function automatic int ref_out(int ai, int bi, int ei);
    int v;
    v = MAXV - ((ai < bi) ? ai : bi) + ei;
    if (v < 0) v = 0;
    if (v > MAXV) v = MAXV;
    return ((v * 2 + STEP) / (2 * STEP)) * STEP;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      a = W'($urandom); b = W'($urandom); err = W'($urandom_range(0, 60)) - W'(30);
      #1;
      checks++;
      if (int'(y) != ref_out(int'(a), int'(b), int'(err))) begin
        failures++;
        if (failures < 10) $display("FAIL random a=%0d b=%0d err=%0d y=%0d", a, b, err, y);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      a = W'(STEP * $urandom_range(0, 15)); b = W'(STEP * $urandom_range(0, 15));
      err = W'($urandom_range(0, 16)) - W'(8);
      #1;
      checks++;
      if (int'(y) != MAXV - ((a < b) ? int'(a) : int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL grid a=%0d b=%0d err=%0d y=%0d", a, b, err, y);
      end
      if (err != 0) absorbed++;
    end
    checks++;
    if (absorbed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
