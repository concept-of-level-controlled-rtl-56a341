// Many-valued D level-controlled memory element (fuzzy D latch).
//
// An R-S latch whose S input is D and whose R input is the standard negation
// of D, so that R = 1 - S always holds and the latch never sees an invalid
// input pair. The level-control input T decides:
//   T = 1 : open, Q1 -> D and Q2 -> 1 - D (both snapped to the nearest of
//           LEVELS evenly spread values by the loop filters);
//   T = 0 : closed, Q1 and Q2 keep their value whatever D does;
//   T moving from 1 to 0 through intermediate levels with D held: the value
//           is not lost on the way.
// In all, four Sheffer gates, one negation and two filters.
//
// Interface: d, t, q1, q2 are W-bit fuzzy codes (code k means k / (2**W - 1)).
// clk steps the loop gates (one cycle = one gate delay, see rs_circuit), rst_n
// (asynchronous, active low) stores 0. err1/err2 add a fixed or varying error
// to the two loop gates, for studying defective gates; tie them to zero for
// ideal gates. From T = 1 with D applied, Q1 and Q2 settle within two cycles.
//
// The circuit follows the document; the value code, the step timing, reset,
// the error inputs and the default sizes are this design's choices.
module fuzzy_d_latch #(
  parameter int unsigned W      = fuzzy_pkg::W_DEFAULT,
  parameter int unsigned LEVELS = fuzzy_pkg::LEVELS_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        d,
  input  logic [W-1:0]        t,
  input  logic signed [W-1:0] err1,
  input  logic signed [W-1:0] err2,
  output logic [W-1:0]        q1,
  output logic [W-1:0]        q2
);

  logic [W-1:0] d_n;

  fuzzy_not #(.W(W)) u_not (
    .x(d),
    .y(d_n)
  );

  rs_latch #(.W(W), .LEVELS(LEVELS)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .r    (d_n),
    .s    (d),
    .t    (t),
    .err1 (err1),
    .err2 (err2),
    .q1   (q1),
    .q2   (q2)
  );

endmodule
