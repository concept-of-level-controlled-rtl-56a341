// Self-checking testbench for level_filter.
// Three sizes: 8-bit codes with 16 levels (the default), 8-bit codes with 4
// levels and 4-bit codes with 6 levels. For every input code it checks the
// output against round(x * (LEVELS-1) / MAX) * MAX / (LEVELS-1) computed in
// real arithmetic, that the output is no further than half a step from the
// input, and that the filter commutes with negation.
module tb_level_filter;
  int checks = 0, failures = 0;

  logic [7:0] x8, y16, y4, ny16, ny4;
  logic [3:0] x4, y6, ny6;

  level_filter                          dut16  (.x(x8),  .y(y16));
  level_filter #(.W(8), .LEVELS(4))     dut4   (.x(x8),  .y(y4));
  level_filter #(.W(4), .LEVELS(6))     dut6   (.x(x4),  .y(y6));
  level_filter                          dut16n (.x(~x8), .y(ny16));
  level_filter #(.W(8), .LEVELS(4))     dut4n  (.x(~x8), .y(ny4));
  level_filter #(.W(4), .LEVELS(6))     dut6n  (.x(~x4), .y(ny6));

  function automatic int ref_filter(int x, int maxv, int levels);
    int j;
    j = $rtoi($floor(real'(x) * real'(levels - 1) / real'(maxv) + 0.5));
    return j * maxv / (levels - 1);
  endfunction

  task automatic check(string what, int x, int y, int ny, int maxv, int levels);
    int exp, delta;
    exp  = ref_filter(x, maxv, levels);
    delta = (y > x) ? y - x : x - y;
    checks++;
    if (y != exp || delta > (maxv / (levels - 1)) / 2 || ny != maxv - y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%0d y=%0d exp=%0d ny=%0d", what, x, y, exp, ny);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i); x4 = 4'(i);
      #1;
      check("W8/L16", i, int'(y16), int'(ny16), 255, 16);
      check("W8/L4",  i, int'(y4),  int'(ny4),  255, 4);
      if (i < 16) check("W4/L6", i, int'(y6), int'(ny6), 15, 6);
    end
    // Explicit points: level codes are multiples of 17 for the default size.
    x8 = 8'd8;   #1; checks++; if (y16 != 8'd0)   failures++;
    x8 = 8'd9;   #1; checks++; if (y16 != 8'd17)  failures++;
    x8 = 8'd246; #1; checks++; if (y16 != 8'd238) failures++;
    x8 = 8'd247; #1; checks++; if (y16 != 8'd255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
