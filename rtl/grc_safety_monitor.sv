// grc_safety_monitor: run-time observer of the safety requirement
// "whenever a train is in the crossing, the gate is down" (always IN_I -> DOWN).
//
// In every reaction it evaluates the requirement on the present signals:
// violated is 1 in a reaction with IN_I present and DOWN absent (the
// VIOLATED signal of the property), sat is its complement. A sticky flag,
// ever_violated, remembers any violation since reset, and a saturating
// counter counts the violating reactions, so that a test or a status
// register can read the verdict at the end of a run.
//
// Interface: clk, rst_n (asynchronous, active low, clears the flag and the
// counter), in_i, down; outputs sat, violated (same cycle), ever_violated and
// n_violations (from the next cycle on).
//
// The property is the published one. Checking it at run time in logic,
// rather than over the reachable state space, and the flag and counter, are
// this design's.
module grc_safety_monitor #(
  parameter int unsigned CNT_W = 16  // width of the violation counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_i,
  input  logic             down,
  output logic             sat,
  output logic             violated,
  output logic             ever_violated,
  output logic [CNT_W-1:0] n_violations
);

  assign violated = in_i & ~down;
  assign sat      = ~violated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ever_violated <= 1'b0;
      n_violations  <= '0;
    end else if (violated) begin
      ever_violated <= 1'b1;
      if (n_violations != '1) n_violations <= n_violations + CNT_W'(1);
    end
  end

endmodule
