// grc_bounds_case: one configuration of the crossing (grc_main with given
// timings) checked reaction by reaction against the reference model in
// grc_ref_pkg, observers included. Used by grc_bounds_tb to run several
// timing configurations side by side on the same APPROACH stream.
//
// Ports: clk, rst_n, approach (applied by the caller at the falling edge),
// sample (pulse from the caller once the inputs have settled, before the
// rising edge); outputs the running check and failure counts and the
// numbers of safety and utility violations and of fall reversals the model
// predicted.
module grc_bounds_case
  import grc_pkg::*;
  import grc_ref_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned T_R    = 6,
  parameter int unsigned T_I    = 4,
  parameter int unsigned T_GATE = 4,
  parameter int unsigned XI2    = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] approach,
  input  logic         sample,
  output int           checks,
  output int           failures,
  output int           exp_safety_viol,
  output int           exp_utility_viol,
  output int           fall_reversals
);

  logic         up, down, going_up, going_down, raise_cmd, lower_cmd;
  gate_state_t  gate_state;
  track_sig_t   bcast;
  logic [N-1:0] trk_busy;
  logic         s_v, u_v, u_full, s_ever, u_ever;
  logic [15:0]  s_n, u_n;
  grc_ref       m;

  grc_main #(.N_TRACKS(N), .T_R(T_R), .T_I(T_I), .T_GATE(T_GATE), .XI2(XI2)) dut (
    .clk(clk), .rst_n(rst_n), .approach(approach), .up(up), .down(down),
    .going_up(going_up), .going_down(going_down), .gate_state(gate_state),
    .bcast(bcast), .trk_busy(trk_busy), .raise_cmd(raise_cmd), .lower_cmd(lower_cmd),
    .safety_violated(s_v), .utility_violated(u_v), .utility_window_full(u_full),
    .safety_ever_violated(s_ever), .utility_ever_violated(u_ever),
    .safety_n_violations(s_n), .utility_n_violations(u_n));

  initial begin
    m = new(N, T_R, T_I, T_GATE, XI2);
    checks = 0; failures = 0; exp_safety_viol = 0; exp_utility_viol = 0; fall_reversals = 0;
  end

  task automatic cmp(input string what, input logic got, input bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL (T_R=%0d T_I=%0d T_GATE=%0d XI2=%0d) reaction %0d %s: got %0b expected %0b",
                 T_R, T_I, T_GATE, XI2, m.now, what, got, exp);
    end
  endtask

  always @(posedge sample) begin
    bit av [];
    av = new[N];
    foreach (av[i]) av[i] = approach[i];
    m.react(av);
    cmp("IN_R", bcast.in_r, m.b_in_r);
    cmp("IN_I", bcast.in_i, m.b_in_i);
    cmp("UP", up, m.up);
    cmp("DOWN", down, m.down);
    cmp("GOING_UP", going_up, m.going_up);
    cmp("GOING_DOWN", going_down, m.going_down);
    cmp("safety observer", s_v, m.safety_viol);
    cmp("utility observer", u_v, m.utility_viol);
    cmp("window full", u_full, m.window_full);
    if (m.safety_viol)  exp_safety_viol++;
    if (m.utility_viol) exp_utility_viol++;
    fall_reversals = m.n_rev_to_up;
  end

endmodule
