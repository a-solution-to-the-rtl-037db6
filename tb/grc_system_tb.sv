// grc_system_tb: self-checking test of the crossing system (tracks,
// controller and gate together) at the published timings.
//
// Random APPROACH patterns, alternating dense and sparse traffic, are applied
// one reaction per clock cycle. The expected value of every per-track
// signal, of the broadcast signals, of the controller's commands and of the
// gate's four state signals comes from the reference model in grc_ref_pkg.
// The test also requires that trains overlap on different tracks, that the
// gate completes both travels and that a rise is turned around by an arriving
// train.
module grc_system_tb;
  import grc_pkg::*;
  import grc_ref_pkg::*;

  localparam int unsigned N = 3, TR = 6, TI = 4, TG = 4;

  logic              clk = 1'b0, rst_n;
  logic [N-1:0]      approach;
  logic              up, down, going_up, going_down, raise_cmd, lower_cmd;
  gate_state_t       gate_state;
  track_sig_t        bcast;
  track_sig_t        trk_sig [N];
  logic [N-1:0]      trk_busy;

  int checks = 0, failures = 0, cyc = 0;
  grc_ref m;

  grc_system #(.N_TRACKS(N), .T_R(TR), .T_I(TI), .T_GATE(TG)) dut (
    .clk(clk), .rst_n(rst_n), .approach(approach), .up(up), .down(down),
    .going_up(going_up), .going_down(going_down), .gate_state(gate_state),
    .bcast(bcast), .trk_sig(trk_sig), .trk_busy(trk_busy),
    .raise_cmd(raise_cmd), .lower_cmd(lower_cmd));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Apply one reaction at the falling edge, compare, let the rising edge pass.
  task automatic react(input logic [N-1:0] a);
    bit av [];
    av = new[N];
    foreach (av[i]) av[i] = a[i];
    approach = a;
    #1;
    m.react(av);
    for (int i = 0; i < N; i++) begin
      cmp($sformatf("trk%0d ENTER_R", i), trk_sig[i].enter_r, m.enter_r[i]);
      cmp($sformatf("trk%0d ENTER_I", i), trk_sig[i].enter_i, m.enter_i[i]);
      cmp($sformatf("trk%0d EXIT", i),    trk_sig[i].exit_i,  m.exit_i[i]);
      cmp($sformatf("trk%0d IN_R", i),    trk_sig[i].in_r,    m.in_r[i]);
      cmp($sformatf("trk%0d IN_I", i),    trk_sig[i].in_i,    m.in_i[i]);
    end
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
    cyc++;
    @(negedge clk);
  endtask

  initial begin
    m = new(N, TR, TI, TG, 5);
    rst_n = 1'b0; approach = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int blk = 0; blk < 40; blk++) begin
      int p;
      p = (blk % 2 == 0) ? 5 : 60;    // dense, then sparse traffic
      repeat (200) begin
        logic [N-1:0] a;
        for (int i = 0; i < N; i++) a[i] = ($urandom % p) == 0;
        react(a);
      end
    end
    m.report();
    checks++;
    if (m.n_overlap == 0 || m.n_two_in_i == 0 || m.n_back_to_back == 0 || m.n_ignored == 0 ||
        m.n_arrive_up == 0 || m.n_arrive_down == 0 || m.n_rev_to_down == 0 ||
        m.n_lower_from_up == 0) begin
      failures++; $display("FAIL coverage of a mechanism is zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
