// Standard many-valued Sheffer gate (fuzzy NAND): y = 1 - min(a, b).
//
// Values are unsigned W-bit codes for k / (2**W - 1), so 1 - min(a, b) is the
// bitwise complement of the smaller input. The gate is purely combinational.
//
// A physical many-valued gate is never exact. The signed input err models
// that: it is added to the ideal result, and the sum is clamped to [0, 1]
// (codes 0 .. 2**W - 1). Tie err to zero for an ideal gate. The operation
// follows the document; the error port, its width and the clamping are this
// design's own way of making gate errors visible to simulation.
module sheffer_gate #(
  parameter int unsigned W = fuzzy_pkg::W_DEFAULT
) (
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  input  logic signed [W-1:0] err,   // deviation of this gate, in codes
  output logic [W-1:0]        y
);

  localparam logic [W-1:0] MAXV = '1;

  logic [W-1:0]        ideal;
  logic signed [W+1:0] sum;

  always_comb begin
    ideal = ~((a < b) ? a : b);
    sum   = $signed({2'b00, ideal}) + (W+2)'(err);
    if (sum < 0)
      y = '0;
    else if (sum > $signed({2'b00, MAXV}))
      y = MAXV;
    else
      y = sum[W-1:0];
  end

endmodule
