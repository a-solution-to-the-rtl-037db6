// grc_main: top level of the railroad crossing: the crossing system (tracks,
// controller, gate) with its two requirement observers alongside.
//
// Inputs are one APPROACH per track; everything else is computed. The safety
// observer watches IN_I and DOWN, the utility observer IN_R, IN_I and UP.
// Their violated outputs are 1 in a reaction in which a requirement fails,
// and the sticky flags report whether one ever failed since reset. With the
// default timings (trains 6 reactions in R and 4 in I, gate travel 4,
// window 5) neither requirement can fail for any pattern of APPROACH.
//
// Interface: clk (one edge per reaction), rst_n (asynchronous, active low),
// approach[N_TRACKS]; outputs the gate state signals, the broadcast train
// signals, the controller commands, the observers' verdicts. All signals of
// a reaction are valid in the clock cycle of that reaction.
//
// The structure follows the published top program; the port list beyond
// UP and DOWN, and the verdict flags and counters, are this design's.
module grc_main
  import grc_pkg::*;
#(
  parameter int unsigned N_TRACKS = DEF_N_TRACKS,
  parameter int unsigned T_R      = DEF_T_R,
  parameter int unsigned T_I      = DEF_T_I,
  parameter int unsigned T_GATE   = DEF_T_GATE,
  parameter int unsigned XI2      = DEF_XI2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_TRACKS-1:0] approach,
  output logic                up,
  output logic                down,
  output logic                going_up,
  output logic                going_down,
  output gate_state_t         gate_state,
  output track_sig_t          bcast,
  output logic [N_TRACKS-1:0] trk_busy,
  output logic                raise_cmd,
  output logic                lower_cmd,
  output logic                safety_violated,
  output logic                utility_violated,
  output logic                utility_window_full,
  output logic                safety_ever_violated,
  output logic                utility_ever_violated,
  output logic [15:0]         safety_n_violations,
  output logic [15:0]         utility_n_violations
);

  track_sig_t trk_sig [N_TRACKS];
  logic       safety_sat, utility_sat;

  grc_system #(
    .N_TRACKS (N_TRACKS),
    .T_R      (T_R),
    .T_I      (T_I),
    .T_GATE   (T_GATE)
  ) u_sys (
    .clk        (clk),
    .rst_n      (rst_n),
    .approach   (approach),
    .up         (up),
    .down       (down),
    .going_up   (going_up),
    .going_down (going_down),
    .gate_state (gate_state),
    .bcast      (bcast),
    .trk_sig    (trk_sig),
    .trk_busy   (trk_busy),
    .raise_cmd  (raise_cmd),
    .lower_cmd  (lower_cmd)
  );

  grc_safety_monitor #(.CNT_W(16)) u_safety (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_i          (bcast.in_i),
    .down          (down),
    .sat           (safety_sat),
    .violated      (safety_violated),
    .ever_violated (safety_ever_violated),
    .n_violations  (safety_n_violations)
  );

  grc_utility_monitor #(.XI2(XI2), .CNT_W(16)) u_utility (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_r          (bcast.in_r),
    .in_i          (bcast.in_i),
    .up            (up),
    .sat           (utility_sat),
    .violated      (utility_violated),
    .window_full   (utility_window_full),
    .ever_violated (utility_ever_violated),
    .n_violations  (utility_n_violations)
  );

endmodule
