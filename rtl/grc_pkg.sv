// grc_pkg: types and default constants shared by the railroad-crossing blocks.
//
// The crossing system is a synchronous reactive program turned into logic: one
// rising clock edge is one reaction ("instant"), a signal that is "present" in
// a reaction is a 1 on its wire during that clock cycle, and "emit" is a
// combinational function of the present state and the present inputs.
//
// The default timings follow the published model: a train spends 6 reactions
// in the approach region R before it reaches the crossing I, then 4 reactions
// in I; the gate needs 4 reactions to travel either way; the utility
// requirement uses a 5-reaction window; the model has 3 tracks.
package grc_pkg;

  // Defaults of the published model.
  localparam int unsigned DEF_N_TRACKS = 3;  // tracks (one train per track at a time)
  localparam int unsigned DEF_T_R      = 6;  // reactions with IN_R per train
  localparam int unsigned DEF_T_I      = 4;  // reactions with IN_I per train
  localparam int unsigned DEF_T_GATE   = 4;  // reactions for the gate to travel
  localparam int unsigned DEF_XI2      = 5;  // utility window (reactions)

  // Signals a track broadcasts in one reaction.
  typedef struct packed {
    logic enter_r;  // ENTER_R: a train enters region R
    logic enter_i;  // ENTER_I: the train enters the crossing I
    logic exit_i;   // EXIT   : the train has left I (and R)
    logic in_r;     // IN_R   : a train is in R, before I
    logic in_i;     // IN_I   : a train is in I
  } track_sig_t;

  // Where the gate process is paused between reactions.
  typedef enum logic [1:0] {
    G_DOWN       = 2'd0,  // sustaining DOWN, watching RAISE
    G_GOING_UP   = 2'd1,  // sustaining GOING_UP, rise timer running
    G_UP         = 2'd2,  // sustaining UP, watching LOWER
    G_GOING_DOWN = 2'd3   // sustaining GOING_DOWN, fall timer running
  } gate_state_t;

endpackage
