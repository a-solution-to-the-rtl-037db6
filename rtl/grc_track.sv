// grc_track: model of one track of the railroad crossing.
//
// A train shows up on the track with APPROACH. The track reacts to APPROACH
// only while it is empty. In the reaction where the train is accepted it
// emits ENTER_R and IN_R; IN_R then stays present for T_R reactions in all.
// In the following reaction the train reaches the crossing: ENTER_I and IN_I,
// with IN_I present for T_I reactions. In the reaction after that it emits
// EXIT and, in that same reaction, is ready again: an APPROACH present with
// EXIT starts the next train at once. A train therefore occupies the track for
// T_R + T_I reactions and EXIT follows APPROACH by exactly T_R + T_I reactions.
//
// Implementation: one counter, phase, tells where the train is (0 = empty,
// k = the k-th reaction after acceptance). The outputs are combinational in
// phase and approach, so everything is visible in the cycle of the reaction
// itself; the counter advances on the clock edge that ends the reaction.
//
// Interface: clk (one edge per reaction), rst_n (asynchronous, active low,
// track empty), approach, and the struct of broadcast signals sig.
//
// The behaviour and the default timings (6 and 4) are the published model's.
// Reset and the counter encoding are choices of this design.
module grc_track
  import grc_pkg::*;
#(
  parameter int unsigned T_R = DEF_T_R,  // reactions with IN_R
  parameter int unsigned T_I = DEF_T_I   // reactions with IN_I
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       approach,
  output track_sig_t sig,
  output logic       busy       // a train is on the track (phase != 0)
);

  localparam int unsigned LAST = T_R + T_I;  // phase of the EXIT reaction
  localparam int unsigned PW   = $clog2(LAST + 1);

  logic [PW-1:0] phase_q, phase_d;

  always_comb begin
    sig     = '0;
    phase_d = phase_q;
    if (phase_q == PW'(LAST)) begin
      sig.exit_i = 1'b1;
      phase_d    = '0;
    end else if (phase_q >= PW'(1) && phase_q < PW'(T_R)) begin
      sig.in_r = 1'b1;
      phase_d  = phase_q + PW'(1);
    end else if (phase_q == PW'(T_R)) begin
      sig.enter_i = 1'b1;
      sig.in_i    = 1'b1;
      phase_d     = phase_q + PW'(1);
    end else if (phase_q > PW'(T_R)) begin
      sig.in_i = 1'b1;
      phase_d  = phase_q + PW'(1);
    end
    // Waiting for a train: in the empty state and in the EXIT reaction.
    if ((phase_q == '0 || phase_q == PW'(LAST)) && approach) begin
      sig.enter_r = 1'b1;
      sig.in_r    = 1'b1;
      phase_d     = PW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= '0;
    else        phase_q <= phase_d;
  end

  assign busy = (phase_q != '0) && (phase_q != PW'(LAST));

  initial begin
    assert (T_R >= 1 && T_I >= 1)
      else $error("grc_track: T_R and T_I must be at least 1");
  end

endmodule
