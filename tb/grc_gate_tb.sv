// grc_gate_tb: self-checking test of the gate model.
//
// Directed part: from reset with RAISE held, the gate must show GOING_UP for
// exactly T_GATE reactions and UP in the next one; with LOWER held it must
// then fall in T_GATE reactions; a LOWER in the middle of a rise must turn it
// around in the same reaction and restart the full fall time; RAISE arriving
// in the reaction in which the fall timer fires must win over DOWN.
// Random part: RAISE, LOWER or neither (never both) against a reference model
// kept as "target position, reactions since the last start of motion".
// Exactly one of the four state outputs must be 1 in every reaction.
module grc_gate_tb;
  import grc_pkg::*;

  localparam int unsigned T_GATE = 4;

  logic clk = 1'b0, rst_n, raise_cmd, lower_cmd;
  logic up, down, going_up, going_down;
  gate_state_t state;

  int checks = 0, failures = 0, cyc = 0;
  int n_rev_up = 0, n_rev_down = 0, n_arrive_up = 0, n_arrive_down = 0;

  // Reference: target (1 = up), moving, elapsed reactions of motion.
  bit ref_target, ref_moving;
  int ref_elapsed;

  grc_gate #(.T_GATE(T_GATE)) dut (
    .clk(clk), .rst_n(rst_n), .raise_cmd(raise_cmd), .lower_cmd(lower_cmd),
    .up(up), .down(down), .going_up(going_up), .going_down(going_down), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input logic eu, ed, egu, egd);
    checks++;
    if ({up, down, going_up, going_down} !== {eu, ed, egu, egd}) begin
      failures++;
      $display("FAIL cycle %0d: got U/D/GU/GD=%b%b%b%b expected %b%b%b%b (raise=%b lower=%b)",
               cyc, up, down, going_up, going_down, eu, ed, egu, egd, raise_cmd, lower_cmd);
    end
    checks++;
    if ($countones({up, down, going_up, going_down}) != 1) begin
      failures++; $display("FAIL cycle %0d: state outputs not one-hot", cyc);
    end
  endtask

  // One reaction against the reference model.
  task automatic react(input logic r, input logic l);
    bit cmd_up, cmd_dn;
    logic eu, ed, egu, egd;
    @(negedge clk);
    raise_cmd = r; lower_cmd = l;
    #1;
    cmd_up = r; cmd_dn = l;
    eu = 0; ed = 0; egu = 0; egd = 0;
    if (!ref_moving) begin
      if (ref_target && cmd_dn) begin
        ref_target = 0; ref_moving = 1; ref_elapsed = 0; egd = 1;
      end else if (!ref_target && cmd_up) begin
        ref_target = 1; ref_moving = 1; ref_elapsed = 0; egu = 1;
      end else begin
        eu = ref_target; ed = !ref_target;
      end
    end else begin
      if ((ref_target && cmd_dn) || (!ref_target && cmd_up)) begin
        if (ref_target) n_rev_down++; else n_rev_up++;
        ref_target = !ref_target; ref_elapsed = 0;
        egu = ref_target; egd = !ref_target;
      end else begin
        ref_elapsed++;
        if (ref_elapsed == T_GATE) begin
          ref_moving = 0;
          eu = ref_target; ed = !ref_target;
          if (ref_target) n_arrive_up++; else n_arrive_down++;
        end else begin
          egu = ref_target; egd = !ref_target;
        end
      end
    end
    expect4(eu, ed, egu, egd);
    cyc++;
  endtask

  initial begin
    rst_n = 1'b0; raise_cmd = 1'b0; lower_cmd = 1'b0;
    ref_target = 0; ref_moving = 0; ref_elapsed = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Hand-worked sequences (independent of the reference model).
    @(negedge clk); #1; expect4(0, 1, 0, 0);            // starts down
    // RAISE held: GOING_UP x T_GATE then UP.
    for (int k = 0; k < T_GATE; k++) begin
      raise_cmd = 1; lower_cmd = 0; #1; expect4(0, 0, 1, 0); @(negedge clk);
    end
    #1; expect4(1, 0, 0, 0); @(negedge clk);
    // LOWER for 2 reactions, then RAISE: reversal in the same reaction.
    raise_cmd = 0; lower_cmd = 1; #1; expect4(0, 0, 0, 1); @(negedge clk);
    #1; expect4(0, 0, 0, 1); @(negedge clk);
    raise_cmd = 1; lower_cmd = 0; #1; expect4(0, 0, 1, 0); @(negedge clk);
    // LOWER again: full fall time restarts.
    raise_cmd = 0; lower_cmd = 1;
    for (int k = 0; k < T_GATE; k++) begin
      #1; expect4(0, 0, 0, 1); @(negedge clk);
    end
    #1; expect4(0, 1, 0, 0); @(negedge clk);
    // RAISE; then LOWER exactly in the reaction where the rise timer fires.
    raise_cmd = 1; lower_cmd = 0;
    for (int k = 0; k < T_GATE; k++) begin
      #1; expect4(0, 0, 1, 0); @(negedge clk);
    end
    raise_cmd = 0; lower_cmd = 1; #1; expect4(0, 0, 0, 1); @(negedge clk);
    // Idle (no command) keeps moving to DOWN.
    raise_cmd = 0; lower_cmd = 0;
    for (int k = 1; k < T_GATE; k++) begin
      #1; expect4(0, 0, 0, 1); @(negedge clk);
    end
    #1; expect4(0, 1, 0, 0);

    // Resynchronise the reference model with a reset, then random commands.
    rst_n = 1'b0; #1; rst_n = 1'b1;
    ref_target = 0; ref_moving = 0; ref_elapsed = 0;
    for (int n = 0; n < 8000; n++) begin
      int k;
      k = $urandom % 8;
      // Bursts of one command make full travels likely.
      if (k < 3)      react(1, 0);
      else if (k < 6) react(0, 1);
      else            react(0, 0);
      if ((n % 200) < 30) begin
        if ((n / 200) % 2 == 0) repeat (6) react(1, 0); else repeat (6) react(0, 1);
      end
    end

    checks++;
    if (n_rev_up == 0 || n_rev_down == 0 || n_arrive_up == 0 || n_arrive_down == 0) begin
      failures++;
      $display("FAIL coverage rev_up=%0d rev_down=%0d arrive_up=%0d arrive_down=%0d",
               n_rev_up, n_rev_down, n_arrive_up, n_arrive_down);
    end
    $display("rev_up=%0d rev_down=%0d arrive_up=%0d arrive_down=%0d",
             n_rev_up, n_rev_down, n_arrive_up, n_arrive_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
