// Level filter: restricts a fuzzy value to a finite set of LEVELS values
// spread evenly over [0,1] (0, 1/(LEVELS-1), ..., 1).
//
// The filter rounds its input to the nearest of those values. With
// STEP = (2**W - 1) / (LEVELS - 1) codes between neighbouring values the
// output is round(x / STEP) * STEP. STEP is odd whenever 2**W - 1 is, so no
// input lies exactly half-way between two levels, and the filter commutes with
// negation: filter(1 - x) = 1 - filter(x). An input that is off its level by
// at most (STEP - 1) / 2 codes comes out exactly on that level, which is how
// the filter removes small gate errors. Purely combinational.
//
// That the set is finite and evenly spread follows the document; the rounding
// rule (nearest level) and the requirement that STEP be a whole number of
// codes are this design's choices.
module level_filter #(
  parameter int unsigned W      = fuzzy_pkg::W_DEFAULT,
  parameter int unsigned LEVELS = fuzzy_pkg::LEVELS_DEFAULT
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int unsigned MAXV = (1 << W) - 1;
  localparam int unsigned STEP = MAXV / (LEVELS - 1);

  if (LEVELS < 2 || (MAXV % (LEVELS - 1)) != 0) begin : g_bad_levels
    $error("level_filter: 2**W - 1 must be a multiple of LEVELS - 1");
  end

  logic [W:0] idx;  // index of the nearest level, 0 .. LEVELS-1

  always_comb begin
    idx = ((W+1)'(x) + (W+1)'(STEP / 2)) / (W+1)'(STEP);
    y   = W'(idx * (W+1)'(STEP));
  end

endmodule
