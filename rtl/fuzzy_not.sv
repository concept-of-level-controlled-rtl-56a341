// Standard fuzzy negation: y = 1 - x.
//
// With values coded as k / (2**W - 1) the negation is the bitwise complement.
// SHEFFER_FORM = 1 builds it instead from a Sheffer gate with both inputs tied
// to x, since 1 - min(x, x) = 1 - x; both forms give the same output. Purely
// combinational. Both forms are the document's; the default (a plain
// inverter) is this design's choice.
module fuzzy_not #(
  parameter int unsigned W            = fuzzy_pkg::W_DEFAULT,
  parameter bit          SHEFFER_FORM = 1'b0
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  if (SHEFFER_FORM) begin : g_sheffer
    sheffer_gate #(.W(W)) u_gate (
      .a  (x),
      .b  (x),
      .err('0),
      .y  (y)
    );
  end else begin : g_inverter
    assign y = ~x;
  end

endmodule
