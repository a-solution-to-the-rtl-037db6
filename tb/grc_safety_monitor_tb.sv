// grc_safety_monitor_tb: self-checking test of the safety observer.
// Random IN_I / DOWN values (plus one directed violation); the expected
// verdict of each reaction is "IN_I present and DOWN absent", and the test
// keeps its own count of violations to compare with the sticky flag and the
// counter after each reaction.
module grc_safety_monitor_tb;
  logic        clk = 1'b0, rst_n, in_i, down;
  logic        sat, violated, ever_violated;
  logic [15:0] n_violations;
  int checks = 0, failures = 0, n_exp = 0;

  grc_safety_monitor #(.CNT_W(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_i(in_i), .down(down), .sat(sat), .violated(violated),
    .ever_violated(ever_violated), .n_violations(n_violations));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic i, input logic d);
    logic exp_v;
    @(negedge clk);
    in_i = i; down = d;
    #1;
    checks++;
    if (ever_violated !== (n_exp != 0) || n_violations !== 16'(n_exp)) begin
      failures++;
      $display("FAIL sticky/count: ever=%0b n=%0d expected %0d", ever_violated, n_violations, n_exp);
    end
    exp_v = i && !d;
    checks++;
    if (violated !== exp_v || sat !== !exp_v) begin
      failures++; $display("FAIL in_i=%0b down=%0b violated=%0b", i, d, violated);
    end
    if (exp_v) n_exp++;
  endtask

  initial begin
    rst_n = 1'b0; in_i = 0; down = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Safe reactions only: no violation may be reported.
    repeat (50) step(1'b0, $urandom % 2);
    repeat (50) step($urandom % 2, 1'b1);
    step(1'b1, 1'b0);                         // one violation
    repeat (1000) step($urandom % 2, $urandom % 2);
    step(1'b0, 1'b1);
    $display("violations=%0d", n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
