// Many-valued R-S level-controlled memory element (R-S latch).
//
// Two unfiltered input Sheffer gates gate R and S with the level-control
// input T,
//
//   U = 1 - min(S, T)           V = 1 - min(R, T)
//
// and drive a filtered R-S circuit (rs_circuit) whose Q1 gate takes U and
// whose Q2 gate takes V:
//
//   Q1' = F(1 - min(U, Q2))     Q2' = F(1 - min(V, Q1))
//
// where F is the level filter. T is a many-valued level, not an edge:
//   T = 1 and R >= 1 - S : open, Q1 -> S and Q2 -> R (R = 1 - S stores S).
//   T = 0                : closed, U = V = 1 and a stored Q1 = 1 - Q2 is kept
//                          whatever R and S do.
//   T falling from 1 to 0 through intermediate levels with R = 1 - S held
//                          constant: the stored value is kept throughout.
//
// Timing: U and V are combinational; the two loop gates step once per rising
// edge of clk (one clk cycle = one gate delay), see rs_circuit. rst_n is
// asynchronous, active low, and stores 0 (Q1 = 0, Q2 = 1).
//
// Gates, connections and filters follow the document; the step timing, reset
// and error inputs err1/err2 of the two loop gates are this design's choices.
module rs_latch #(
  parameter int unsigned W      = fuzzy_pkg::W_DEFAULT,
  parameter int unsigned LEVELS = fuzzy_pkg::LEVELS_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        r,
  input  logic [W-1:0]        s,
  input  logic [W-1:0]        t,
  input  logic signed [W-1:0] err1,  // error of the loop gate driving Q1
  input  logic signed [W-1:0] err2,  // error of the loop gate driving Q2
  output logic [W-1:0]        q1,
  output logic [W-1:0]        q2
);

  logic [W-1:0] u;
  logic [W-1:0] v;

  sheffer_gate #(.W(W)) u_gate_u (
    .a(s), .b(t), .err('0), .y(u)
  );

  sheffer_gate #(.W(W)) u_gate_v (
    .a(r), .b(t), .err('0), .y(v)
  );

  rs_circuit #(.W(W), .LEVELS(LEVELS), .FILTERED(1'b1)) u_core (
    .clk  (clk),
    .rst_n(rst_n),
    .r    (u),
    .s    (v),
    .err1 (err1),
    .err2 (err2),
    .q1   (q1),
    .q2   (q2)
  );

endmodule
