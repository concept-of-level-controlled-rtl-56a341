// Many-valued R-S circuit: two standard Sheffer gates, cross-coupled.
//
//   Q1' = 1 - min(Q2, R)        Q2' = 1 - min(Q1, S)
//
// With FILTERED = 1 each gate is followed by a level filter, so both outputs
// always sit on one of LEVELS evenly spread values; with FILTERED = 0 the raw
// gates are used.
//
// Timing: the feedback loop is evaluated in discrete steps. Each gate output
// is held in a register that takes its next value on every rising edge of clk,
// so one clock cycle stands for one gate delay, and both gates step at the
// same time from the previous Q1 and Q2. clk is therefore the simulation step
// of the circuit, not a clock of the memory element. rst_n (asynchronous,
// active low) sets Q1 = 0 and Q2 = 1, a valid stored value.
//
// Behaviour (ideal gates):
//   R <= 1 - S            : Q1 -> 1 - R and Q2 -> 1 - S within two steps,
//                           whatever the state was (so R = 1 - S stores S).
//   Q1 = 1 - Q2, S > Q1, R > Q2 : the state is kept.
//   R > 1 - S             : invalid input; the outputs may oscillate, but
//                           stay within 1 - R <= Q1 <= S and 1 - S <= Q2 <= R.
//
// The equations and the filters follow the document. The register per gate,
// the simultaneous update, the reset value and the gate error inputs
// err1/err2 (which feed the Q1 and Q2 gates) are this design's choices.
module rs_circuit #(
  parameter int unsigned W        = fuzzy_pkg::W_DEFAULT,
  parameter int unsigned LEVELS   = fuzzy_pkg::LEVELS_DEFAULT,
  parameter bit          FILTERED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        r,
  input  logic [W-1:0]        s,
  input  logic signed [W-1:0] err1,  // error of the gate driving Q1
  input  logic signed [W-1:0] err2,  // error of the gate driving Q2
  output logic [W-1:0]        q1,
  output logic [W-1:0]        q2
);

  localparam int unsigned STEP = ((1 << W) - 1) / (LEVELS - 1);

  logic [W-1:0] q1_next;
  logic [W-1:0] q2_next;

  if (FILTERED) begin : g_filtered
    filtered_sheffer #(.W(W), .LEVELS(LEVELS)) u_g1 (
      .a(q2), .b(r), .err(err1), .y(q1_next)
    );
    filtered_sheffer #(.W(W), .LEVELS(LEVELS)) u_g2 (
      .a(q1), .b(s), .err(err2), .y(q2_next)
    );
  end else begin : g_plain
    sheffer_gate #(.W(W)) u_g1 (
      .a(q2), .b(r), .err(err1), .y(q1_next)
    );
    sheffer_gate #(.W(W)) u_g2 (
      .a(q1), .b(s), .err(err2), .y(q2_next)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0;
      q2 <= '1;
    end else begin
      // Filtered gates only ever produce values on the level grid.
      if (FILTERED)
        a_on_grid: assert ((int'(q1_next) % STEP == 0) && (int'(q2_next) % STEP == 0));
      q1 <= q1_next;
      q2 <= q2_next;
    end
  end

endmodule
