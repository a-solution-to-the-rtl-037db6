// grc_system: the railroad crossing: N_TRACKS tracks, the controller and the
// gate running side by side.
//
// Each track emits its own ENTER_R, ENTER_I, EXIT, IN_R and IN_I. They are
// broadcast: a signal is present in a reaction when at least one track emits
// it, so the shared signals are the OR of all tracks. The controller turns
// IN_R / IN_I into LOWER or RAISE and the gate follows. All of this happens
// within one reaction: APPROACH on an empty track makes IN_R, LOWER and (if
// the gate was up or rising) GOING_DOWN appear in the same clock cycle.
//
// Interface: clk (one edge per reaction), rst_n (asynchronous, active low),
// approach[N_TRACKS] (APPROACH_0 .. APPROACH_N); outputs the gate's four state
// signals, the broadcast train signals, the per-track signals, and the
// controller's commands.
//
// The composition and the broadcast rule are the published program's; the
// OR tree is how broadcast is done in logic.
module grc_system
  import grc_pkg::*;
#(
  parameter int unsigned N_TRACKS = DEF_N_TRACKS,
  parameter int unsigned T_R      = DEF_T_R,
  parameter int unsigned T_I      = DEF_T_I,
  parameter int unsigned T_GATE   = DEF_T_GATE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_TRACKS-1:0] approach,
  output logic                up,
  output logic                down,
  output logic                going_up,
  output logic                going_down,
  output gate_state_t         gate_state,
  output track_sig_t          bcast,                // OR of all tracks
  output track_sig_t          trk_sig [N_TRACKS],   // per track
  output logic [N_TRACKS-1:0] trk_busy,
  output logic                raise_cmd,
  output logic                lower_cmd
);

  for (genvar i = 0; i < N_TRACKS; i++) begin : g_track
    grc_track #(.T_R(T_R), .T_I(T_I)) u_track (
      .clk      (clk),
      .rst_n    (rst_n),
      .approach (approach[i]),
      .sig      (trk_sig[i]),
      .busy     (trk_busy[i])
    );
  end

  // Broadcast: present if emitted by at least one track.
  always_comb begin
    bcast = '0;
    for (int i = 0; i < N_TRACKS; i++) bcast = bcast | trk_sig[i];
  end

  grc_controller u_ctrl (
    .in_r      (bcast.in_r),
    .in_i      (bcast.in_i),
    .raise_cmd (raise_cmd),
    .lower_cmd (lower_cmd)
  );

  grc_gate #(.T_GATE(T_GATE)) u_gate (
    .clk        (clk),
    .rst_n      (rst_n),
    .raise_cmd  (raise_cmd),
    .lower_cmd  (lower_cmd),
    .up         (up),
    .down       (down),
    .going_up   (going_up),
    .going_down (going_down),
    .state      (gate_state)
  );

endmodule
