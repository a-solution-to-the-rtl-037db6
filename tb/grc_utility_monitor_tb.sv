// grc_utility_monitor_tb: self-checking test of the utility observer.
// The test keeps the last XI2 "quiet" values (no IN_R, no IN_I) in a shift
// history that starts empty at reset (the "previous" of the first reaction is
// false), and expects a violation in a reaction whose whole window of XI2
// reactions is quiet while UP is absent. Directed part: after reset the
// window fills in exactly XI2 reactions; a single busy reaction empties it.
// Random part with long quiet stretches.
module grc_utility_monitor_tb;
  localparam int unsigned XI2 = 5;

  logic        clk = 1'b0, rst_n, in_r, in_i, up;
  logic        sat, violated, window_full, ever_violated;
  logic [15:0] n_violations;
  int checks = 0, failures = 0, n_exp = 0, n_full = 0;
  bit hist [XI2];   // hist[0] = present reaction
  int valid = 0;    // reactions seen since reset

  grc_utility_monitor #(.XI2(XI2), .CNT_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_r(in_r), .in_i(in_i), .up(up), .sat(sat),
    .violated(violated), .window_full(window_full), .ever_violated(ever_violated),
    .n_violations(n_violations));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic i, input logic u);
    bit full;
    in_r = r; in_i = i; up = u;
    #1;
    for (int k = XI2 - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = !(r || i);
    valid++;
    full = (valid >= XI2);
    for (int k = 0; k < XI2; k++) if (!hist[k]) full = 0;
    checks++;
    if (window_full !== full) begin
      failures++; $display("FAIL window_full=%0b expected %0b (reaction %0d)", window_full, full, valid);
    end
    checks++;
    if (violated !== (full && !u) || sat !== !(full && !u)) begin
      failures++; $display("FAIL violated=%0b expected %0b", violated, full && !u);
    end
    if (full) n_full++;
    if (full && !u) n_exp++;
    @(posedge clk); #1;
    checks++;
    if (ever_violated !== (n_exp != 0) || n_violations !== 16'(n_exp)) begin
      failures++; $display("FAIL sticky/count %0d expected %0d", n_violations, n_exp);
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; in_r = 0; in_i = 0; up = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Quiet from reset, gate not up: the first violation is in reaction XI2.
    repeat (XI2 + 2) step(0, 0, 0);
    checks++;
    if (n_violations !== 16'd3) begin
      failures++; $display("FAIL window after reset: %0d violations, expected 3", n_violations);
    end
    // One busy reaction restarts the window.
    step(1, 0, 0);
    for (int k = 1; k <= XI2; k++) step(0, 0, k == XI2);
    repeat (3) step(0, 1, 0);
    // Random, biased towards quiet.
    repeat (3000) begin
      int q;
      q = $urandom % 16;
      step(q == 0, q == 1, ($urandom % 3) != 0);
    end
    checks++;
    if (n_full == 0 || n_exp == 0) begin
      failures++; $display("FAIL coverage full=%0d violations=%0d", n_full, n_exp);
    end
    $display("window_full=%0d violations=%0d", n_full, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
