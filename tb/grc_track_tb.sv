// grc_track_tb: self-checking test of one track.
//
// The expected outputs come from a time-stamp model: the test remembers the
// reaction in which the present train was accepted and derives every signal
// from the distance d to it (IN_R for d < T_R, IN_I for T_R <= d < T_R+T_I,
// EXIT at d = T_R+T_I, a new train accepted only when the track is free or
// in the EXIT reaction). It runs a directed sequence (a single train, then an
// APPROACH in the EXIT reaction, then APPROACH pulses while busy, which must
// be ignored) and a random stretch, and checks the latency from APPROACH to
// ENTER_I (T_R) and to EXIT (T_R+T_I) in cycles.
module grc_track_tb;
  import grc_pkg::*;

  localparam int unsigned T_R = 6;
  localparam int unsigned T_I = 4;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       approach;
  track_sig_t sig;
  logic       busy;

  int checks = 0, failures = 0;
  int cyc = 0;
  int start = -1;         // reaction in which the present train was accepted
  int accepted = 0, ignored = 0, back_to_back = 0;
  int t_app = -1, t_ei = -1, t_ex = -1;  // latency measurement

  grc_track #(.T_R(T_R), .T_I(T_I)) dut (
    .clk(clk), .rst_n(rst_n), .approach(approach), .sig(sig), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0b expected %0b", cyc, what, got, exp);
    end
  endtask

  // One reaction: apply the input, compare with the model, advance.
  task automatic react(input logic a);
    int d;
    logic exp_enter_r, exp_enter_i, exp_exit, exp_in_r, exp_in_i, free, acc;
    @(negedge clk);
    approach = a;
    #1;
    d = (start < 0) ? -1 : cyc - start;
    exp_exit    = (d == T_R + T_I);
    free        = (start < 0) || (d >= T_R + T_I);
    acc         = free && a;
    exp_enter_r = acc;
    exp_in_r    = acc || (d >= 0 && d < T_R && !free);
    exp_enter_i = (d == T_R);
    exp_in_i    = (d >= T_R && d < T_R + T_I);
    if (sig.enter_i && t_ei < 0) t_ei = cyc;
    if (sig.exit_i  && t_ex < 0) t_ex = cyc;
    check("ENTER_R", sig.enter_r, exp_enter_r);
    check("IN_R",    sig.in_r,    exp_in_r);
    check("ENTER_I", sig.enter_i, exp_enter_i);
    check("IN_I",    sig.in_i,    exp_in_i);
    check("EXIT",    sig.exit_i,  exp_exit);
    if (acc) begin
      accepted++;
      if (exp_exit) back_to_back++;
      start = cyc;
    end else if (a) ignored++;
    if (!acc && start >= 0 && d >= T_R + T_I) start = -1;
    cyc++;
  endtask

  initial begin
    rst_n = 1'b0; approach = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Directed: one train, measure latencies.
    react(1'b0);
    t_app = cyc; react(1'b1);
    repeat (12) react(1'b0);
    checks++;
    if (t_ei - t_app != T_R) begin
      failures++; $display("FAIL APPROACH->ENTER_I latency %0d", t_ei - t_app);
    end
    checks++;
    if (t_ex - t_app != T_R + T_I) begin
      failures++; $display("FAIL APPROACH->EXIT latency %0d", t_ex - t_app);
    end

    // Directed: train, APPROACH held all the time (back-to-back trains and
    // ignored approaches while busy).
    repeat (35) react(1'b1);
    repeat (12) react(1'b0);

    // Random stretch.
    repeat (2000) react(($urandom % 4) == 0);

    checks++;
    if (accepted < 5 || ignored < 5 || back_to_back < 2) begin
      failures++;
      $display("FAIL coverage accepted=%0d ignored=%0d back_to_back=%0d",
               accepted, ignored, back_to_back);
    end
    $display("accepted=%0d ignored=%0d back_to_back=%0d", accepted, ignored, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
