// grc_bounds_tb: the two crossing requirements at and beyond the limits of
// the timing constants, with the observers checked reaction by reaction.
//
// The same random APPROACH stream drives five configurations:
//   A  published timings (T_R 6, T_I 4, T_GATE 4, XI2 5): no violation;
//   B  T_R = T_GATE = 4: the gate is down in the very reaction the train
//      enters the crossing, still safe;
//   C  T_R = 3 < T_GATE: a train can enter the crossing before the gate is
//      down, so the safety observer must fire;
//   D  XI2 = 4 < T_GATE + 1: the gate cannot be up by the end of the window,
//      so the utility observer must fire;
//   E  trains of 2 reactions (T_R 1, T_I 1): the train is gone while the gate
//      is still falling, so RAISE turns a fall around (and the safety
//      requirement fails).
// Each configuration's outputs and observer verdicts are compared with the
// reference model; the expected numbers of violations are then required to
// be zero or non-zero as listed above.
module grc_bounds_tb;
  localparam int unsigned N = 3;
  localparam int NC = 5;

  logic         clk = 1'b0, rst_n, sample = 1'b0;
  logic [N-1:0] approach;
  int c [NC], f [NC], sv [NC], uv [NC], fr [NC];
  int checks = 0, failures = 0;

  grc_bounds_case #(.N(N))                                  u_a (clk, rst_n, approach, sample, c[0], f[0], sv[0], uv[0], fr[0]);
  grc_bounds_case #(.N(N), .T_R(4))                         u_b (clk, rst_n, approach, sample, c[1], f[1], sv[1], uv[1], fr[1]);
  grc_bounds_case #(.N(N), .T_R(3))                         u_c (clk, rst_n, approach, sample, c[2], f[2], sv[2], uv[2], fr[2]);
  grc_bounds_case #(.N(N), .XI2(4))                         u_d (clk, rst_n, approach, sample, c[3], f[3], sv[3], uv[3], fr[3]);
  grc_bounds_case #(.N(N), .T_R(1), .T_I(1))                u_e (clk, rst_n, approach, sample, c[4], f[4], sv[4], uv[4], fr[4]);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic require(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++; $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; approach = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int blk = 0; blk < 30; blk++) begin
      int p;
      p = (blk % 2 == 0) ? 6 : 40;
      repeat (300) begin
        for (int i = 0; i < N; i++) approach[i] = ($urandom % p) == 0;
        #1 sample = 1'b1;
        #1 sample = 1'b0;
        @(negedge clk);
      end
    end
    for (int k = 0; k < NC; k++) begin
      $display("config %s: checks=%0d failures=%0d safety_violations=%0d utility_violations=%0d fall_reversals=%0d",
               string'(8'("A") + 8'(k)), c[k], f[k], sv[k], uv[k], fr[k]);
      checks += c[k]; failures += f[k];
    end
    require("A: no safety violation",   sv[0] == 0);
    require("A: no utility violation",  uv[0] == 0);
    require("B: no safety violation",   sv[1] == 0);
    require("B: no utility violation",  uv[1] == 0);
    require("C: safety violated",       sv[2] > 0);
    require("D: utility violated",      uv[3] > 0);
    require("D: safety still holds",    sv[3] == 0);
    require("E: fall turned around",    fr[4] > 0);
    require("E: safety violated",       sv[4] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
