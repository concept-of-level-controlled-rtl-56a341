// Filtered standard Sheffer gate: a Sheffer gate (y = 1 - min(a, b), plus
// the gate's own error err) followed by a level filter that snaps the result
// onto the nearest of LEVELS evenly spread values.
//
// As long as |err| stays below half the distance between two levels and the
// ideal result is itself a level, the output is exactly the ideal result.
// Purely combinational. The structure (gate, then filter) follows the
// document; the error port is this design's model of an inexact gate.
module filtered_sheffer #(
  parameter int unsigned W      = fuzzy_pkg::W_DEFAULT,
  parameter int unsigned LEVELS = fuzzy_pkg::LEVELS_DEFAULT
) (
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  input  logic signed [W-1:0] err,
  output logic [W-1:0]        y
);

  logic [W-1:0] raw;

  sheffer_gate #(.W(W)) u_gate (
    .a  (a),
    .b  (b),
    .err(err),
    .y  (raw)
  );

  level_filter #(.W(W), .LEVELS(LEVELS)) u_filter (
    .x(raw),
    .y(y)
  );

endmodule
