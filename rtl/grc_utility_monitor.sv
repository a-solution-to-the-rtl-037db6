// grc_utility_monitor: run-time observer of the utility requirement
// "if no train has been in R or in I for XI2 consecutive reactions, the
// gate is up", written with the bounded-ensures operator as
//   always not(IN_R or IN_I)  ensures-within-XI2  UP,
// that is  (quiet now and in each of the XI2-1 previous reactions) -> UP.
//
// A saturating counter holds how many reactions in a row before this one
// were quiet (no IN_R, no IN_I), capped at XI2-1. In the present reaction
// the window is full when the present reaction is quiet and the counter is
// at its cap; violated is 1 when the window is full and UP is absent. The
// "previous" operator is false before the first reaction, so after reset the
// window must fill with XI2 real reactions before the property can fail.
// A sticky flag and a saturating counter keep the verdict, as in the safety
// observer.
//
// Interface: clk, rst_n (asynchronous, active low), in_r, in_i, up; outputs
// sat, violated, window_full (same cycle), ever_violated and n_violations.
//
// The property and XI2 = 5 are the published ones. The counter form of the
// window (instead of XI2 delayed copies) and the flag and counter are this
// design's.
module grc_utility_monitor
  import grc_pkg::*;
#(
  parameter int unsigned XI2   = DEF_XI2,  // window length in reactions
  parameter int unsigned CNT_W = 16        // width of the violation counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_r,
  input  logic             in_i,
  input  logic             up,
  output logic             sat,
  output logic             violated,
  output logic             window_full,
  output logic             ever_violated,
  output logic [CNT_W-1:0] n_violations
);

  localparam int unsigned QW = $clog2(XI2 + 1);

  logic          quiet;
  logic [QW-1:0] quiet_q;  // quiet reactions in a row before this one

  assign quiet       = ~(in_r | in_i);
  assign window_full = quiet && (quiet_q >= QW'(XI2 - 1));
  assign violated    = window_full & ~up;
  assign sat         = ~violated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quiet_q       <= '0;
      ever_violated <= 1'b0;
      n_violations  <= '0;
    end else begin
      if (!quiet)                       quiet_q <= '0;
      else if (quiet_q < QW'(XI2 - 1))  quiet_q <= quiet_q + QW'(1);
      if (violated) begin
        ever_violated <= 1'b1;
        if (n_violations != '1) n_violations <= n_violations + CNT_W'(1);
      end
    end
  end

  initial begin
    assert (XI2 >= 1) else $error("grc_utility_monitor: XI2 must be at least 1");
  end

endmodule
