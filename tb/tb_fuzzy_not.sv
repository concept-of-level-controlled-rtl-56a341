// Self-checking testbench for fuzzy_not.
// Checks both forms (plain inverter and Sheffer gate with tied inputs) over
// every 8-bit code against 255 - x.
module tb_fuzzy_not;
  logic [7:0] x, y_inv, y_sh;
  int checks = 0, failures = 0;

  fuzzy_not                         dut_inv (.x(x), .y(y_inv));
  fuzzy_not #(.SHEFFER_FORM(1'b1))  dut_sh  (.x(x), .y(y_sh));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      checks++;
      if (int'(y_inv) != 255 - i || int'(y_sh) != 255 - i) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d inv=%0d sh=%0d", x, y_inv, y_sh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
