// grc_main_tb: end-to-end test of the railroad crossing at its default
// (published) configuration: 3 tracks, trains 6 reactions in R and 4 in I,
// gate travel 4 reactions, utility window 5 reactions.
//
// Directed part, with hand-worked timing:
//  * from reset with no train, the gate rises and shows UP in reaction 4,
//    the very reaction in which the utility window of 5 quiet reactions is
//    first full;
//  * a train arriving at a raised gate: the gate is DOWN 4 reactions after
//    APPROACH and the train enters the crossing 6 reactions after APPROACH
//    (2 reactions of margin); EXIT comes 10 reactions after APPROACH and the
//    gate is UP again 4 reactions after EXIT.
// Random part: alternating dense and sparse traffic on all tracks. Every top
// output is compared with the reference model in grc_ref_pkg, both observers
// must stay silent, and every mechanism must occur at least once: accepted
// and ignored APPROACH, back-to-back trains, trains overlapping on different
// tracks, two trains in the crossing, lowering from UP, a rise turned around,
// complete rises and falls, full utility windows.
module grc_main_tb;
  import grc_pkg::*;
  import grc_ref_pkg::*;

  localparam int unsigned N = DEF_N_TRACKS;

  logic         clk = 1'b0, rst_n;
  logic [N-1:0] approach;
  logic         up, down, going_up, going_down, raise_cmd, lower_cmd;
  gate_state_t  gate_state;
  track_sig_t   bcast;
  logic [N-1:0] trk_busy;
  logic         safety_violated, utility_violated, utility_window_full;
  logic         safety_ever_violated, utility_ever_violated;
  logic [15:0]  safety_n_violations, utility_n_violations;

  int checks = 0, failures = 0, cyc = 0;
  grc_ref m;

  grc_main dut (
    .clk(clk), .rst_n(rst_n), .approach(approach), .up(up), .down(down),
    .going_up(going_up), .going_down(going_down), .gate_state(gate_state),
    .bcast(bcast), .trk_busy(trk_busy), .raise_cmd(raise_cmd), .lower_cmd(lower_cmd),
    .safety_violated(safety_violated), .utility_violated(utility_violated),
    .utility_window_full(utility_window_full),
    .safety_ever_violated(safety_ever_violated),
    .utility_ever_violated(utility_ever_violated),
    .safety_n_violations(safety_n_violations),
    .utility_n_violations(utility_n_violations));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic got, input bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL reaction %0d %s: got %0b expected %0b", cyc, what, got, exp);
    end
  endtask

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++; $display("FAIL reaction %0d: %s", cyc, what);
    end
  endtask

  // One reaction: apply APPROACH at the falling edge, compare, pass the edge.
  task automatic react(input logic [N-1:0] a);
    bit av [];
    av = new[N];
    foreach (av[i]) av[i] = a[i];
    approach = a;
    #1;
    m.react(av);
    cmp("ENTER_R", bcast.enter_r, m.b_enter_r);
    cmp("ENTER_I", bcast.enter_i, m.b_enter_i);
    cmp("EXIT",    bcast.exit_i,  m.b_exit);
    cmp("IN_R",    bcast.in_r,    m.b_in_r);
    cmp("IN_I",    bcast.in_i,    m.b_in_i);
    cmp("RAISE",   raise_cmd,     m.raise_cmd);
    cmp("LOWER",   lower_cmd,     m.lower_cmd);
    cmp("UP",      up,            m.up);
    cmp("DOWN",    down,          m.down);
    cmp("GOING_UP",   going_up,   m.going_up);
    cmp("GOING_DOWN", going_down, m.going_down);
    cmp("window full", utility_window_full, m.window_full);
    // The requirements hold: checked on the outputs and by the observers.
    expect_true("safety: IN_I without DOWN", !(bcast.in_i && !down));
    expect_true("utility: quiet window without UP", !(m.window_full && !up));
    cmp("safety observer",  safety_violated,  1'b0);
    cmp("utility observer", utility_violated, 1'b0);
    cyc++;
    @(negedge clk);
  endtask

  int t0, t_down, t_in_i, t_exit, t_up;

  initial begin
    m = new(N, DEF_T_R, DEF_T_I, DEF_T_GATE, DEF_XI2);
    rst_n = 1'b0; approach = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // From reset, no train: UP first in reaction T_GATE = XI2 - 1.
    t_up = -1;
    for (int k = 0; k < 8; k++) begin
      #1;
      if (up && t_up < 0) t_up = k;
      if (k == DEF_XI2 - 1) expect_true("window full at reaction XI2-1", utility_window_full == 1'b1);
      react('0);
    end
    expect_true($sformatf("first UP at reaction %0d, expected %0d", t_up, DEF_T_GATE),
                t_up == DEF_T_GATE);

    // One train at a raised gate.
    t0 = cyc; t_down = -1; t_in_i = -1; t_exit = -1; t_up = -1;
    for (int k = 0; k < 25; k++) begin
      #1;
      if (down && t_down < 0)                    t_down = cyc;
      if (bcast.enter_i && t_in_i < 0)           t_in_i = cyc;
      if (bcast.exit_i && t_exit < 0)            t_exit = cyc;
      if (t_exit >= 0 && up && t_up < 0)         t_up = cyc;
      react(k == 0 ? N'(1) : '0);
    end
    expect_true("APPROACH to DOWN = T_GATE",  t_down - t0 == DEF_T_GATE);
    expect_true("APPROACH to ENTER_I = T_R",  t_in_i - t0 == DEF_T_R);
    expect_true("APPROACH to EXIT = T_R+T_I", t_exit - t0 == DEF_T_R + DEF_T_I);
    expect_true("EXIT to UP = T_GATE",        t_up - t_exit == DEF_T_GATE);

    // Random traffic.
    for (int blk = 0; blk < 60; blk++) begin
      int p;
      p = (blk % 3 == 0) ? 4 : (blk % 3 == 1) ? 12 : 60;
      repeat (500) begin
        logic [N-1:0] a;
        for (int i = 0; i < N; i++) a[i] = ($urandom % p) == 0;
        react(a);
      end
    end

    #1;
    cmp("safety never violated",  safety_ever_violated,  1'b0);
    cmp("utility never violated", utility_ever_violated, 1'b0);
    checks++;
    if (safety_n_violations != 0 || utility_n_violations != 0) begin
      failures++; $display("FAIL observer counters not zero");
    end
    m.report();
    begin
      int cov [string];
      cov["accepted APPROACH"]       = m.n_accept;
      cov["ignored APPROACH"]        = m.n_ignored;
      cov["back-to-back trains"]     = m.n_back_to_back;
      cov["trains overlapping"]      = m.n_overlap;
      cov["two trains in crossing"]  = m.n_two_in_i;
      cov["LOWER at raised gate"]    = m.n_lower_from_up;
      cov["rise turned around"]      = m.n_rev_to_down;
      cov["complete rise"]           = m.n_arrive_up;
      cov["complete fall"]           = m.n_arrive_down;
      cov["IN_I with DOWN"]          = m.n_in_i_down;
      cov["utility window full"]     = m.n_window_full;
      foreach (cov[k]) begin
        checks++;
        if (cov[k] == 0) begin
          failures++; $display("FAIL mechanism never happened: %s", k);
        end
      end
    end
    $display("reactions=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
