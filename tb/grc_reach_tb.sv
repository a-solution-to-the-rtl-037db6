// grc_reach_tb: exhaustive check of the two crossing requirements over every
// reachable state of the design at its published configuration.
//
// The state of grc_main is the phase counter of each track, the gate's state
// and travel counter, and the utility observer's quiet-run counter. The test
// explores it breadth first: for every state found it resets the design,
// replays the shortest APPROACH sequence known to reach that state, applies
// each of the 2^N_TRACKS APPROACH combinations in turn (one per replay) and
// records the successor state. In every reaction applied it checks that the
// safety requirement (IN_I implies DOWN) and the utility requirement (5 quiet
// reactions imply UP) hold, both on the outputs and by the observers, and
// that exactly one of the four gate signals is present. The exploration
// ends when no new state turns up. The number of reachable states is
// printed, and the reachable states of each process are counted and
// checked: 2 + 2*T_GATE for the gate and T_R + T_I + 1 for a track. This is the same question the state-space search answers for the
// original program, asked of the RTL.
module grc_reach_tb;
  import grc_pkg::*;

  localparam int unsigned N = DEF_N_TRACKS;
  localparam int unsigned NIN = 1 << N;

  logic         clk = 1'b0, rst_n;
  logic [N-1:0] approach;
  logic         up, down, going_up, going_down, raise_cmd, lower_cmd;
  gate_state_t  gate_state;
  track_sig_t   bcast;
  logic [N-1:0] trk_busy;
  logic         s_v, u_v, u_full, s_ever, u_ever;
  logic [15:0]  s_n, u_n;

  int checks = 0, failures = 0, reactions = 0;

  grc_main dut (
    .clk(clk), .rst_n(rst_n), .approach(approach), .up(up), .down(down),
    .going_up(going_up), .going_down(going_down), .gate_state(gate_state),
    .bcast(bcast), .trk_busy(trk_busy), .raise_cmd(raise_cmd), .lower_cmd(lower_cmd),
    .safety_violated(s_v), .utility_violated(u_v), .utility_window_full(u_full),
    .safety_ever_violated(s_ever), .utility_ever_violated(u_ever),
    .safety_n_violations(s_n), .utility_n_violations(u_n));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pack the design state into one number.
  function automatic longint unsigned state_key();
    longint unsigned k;
    k = 0;
    k = (k << 4) | 64'(dut.u_sys.g_track[0].u_track.phase_q);
    k = (k << 4) | 64'(dut.u_sys.g_track[1].u_track.phase_q);
    k = (k << 4) | 64'(dut.u_sys.g_track[2].u_track.phase_q);
    k = (k << 2) | 64'(dut.u_sys.u_gate.st_q);
    k = (k << 3) | 64'(dut.u_sys.u_gate.cnt_q);
    k = (k << 3) | 64'(dut.u_utility.quiet_q);
    return k;
  endfunction

  task automatic require(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One reaction, called at the falling edge; returns at the next one.
  task automatic react(input logic [N-1:0] a);
    approach = a;
    #1;
    require("safety: IN_I without DOWN", !(bcast.in_i && !down));
    require("utility: quiet window without UP", !(u_full && !up));
    require("observers silent", !s_v && !u_v);
    require("gate signals one-hot", $countones({up, down, going_up, going_down}) == 1);
    reactions++;
    @(negedge clk);
  endtask

  task automatic do_reset();
    approach = '0;
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
  endtask

  typedef byte unsigned path_t [$];
  path_t           path_of [longint unsigned];
  longint unsigned frontier [$];
  int              n_trans = 0;

  initial begin
    longint unsigned s0;
    rst_n = 1'b0; approach = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    do_reset();
    s0 = state_key();
    path_of[s0] = {};
    frontier.push_back(s0);
    while (frontier.size() > 0) begin
      longint unsigned s;
      path_t p;
      s = frontier.pop_front();
      p = path_of[s];
      for (int in = 0; in < NIN; in++) begin
        longint unsigned nxt;
        do_reset();
        foreach (p[j]) react(N'(p[j]));
        checks++;
        if (state_key() != s) begin
          failures++; $display("FAIL replay did not reach state %h", s);
        end
        react(N'(in));
        n_trans++;
        nxt = state_key();
        if (!path_of.exists(nxt)) begin
          path_t q;
          q = p;
          q.push_back(byte'(in));
          path_of[nxt] = q;
          frontier.push_back(nxt);
        end
      end
    end
    begin
      bit sys_states [longint unsigned];
      bit gate_states [longint unsigned];
      bit trk_phases [longint unsigned];
      foreach (path_of[k]) begin
        sys_states[k >> 3] = 1'b1;
        gate_states[(k >> 3) & 64'h1f] = 1'b1;
        trk_phases[(k >> 8) & 64'hf] = 1'b1;
      end
      // Per process: a track has T_R+T_I+1 phases (empty and one per
      // reaction of the train); the gate has DOWN, UP and T_GATE counter
      // values in each moving state.
      $display("reachable gate states=%0d track phases=%0d", gate_states.num(), trk_phases.num());
      require("gate: 2 + 2*T_GATE reachable states", gate_states.num() == 2 + 2 * DEF_T_GATE);
      require("track: T_R + T_I + 1 reachable phases", trk_phases.num() == DEF_T_R + DEF_T_I + 1);
      $display("reachable states=%0d (without the utility observer: %0d) transitions=%0d reactions simulated=%0d",
               path_of.num(), sys_states.num(), n_trans, reactions);
    end
    require("more than one state reached", path_of.num() > 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
