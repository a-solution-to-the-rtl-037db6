// grc_controller_tb: exhaustive test of the controller. For each of the four
// combinations of IN_R and IN_I it checks that LOWER is present exactly when a
// train is in R or I, that RAISE is present exactly otherwise, and that the
// two are never present together. The controller is combinational, so the
// answer must be there in the same reaction.
module grc_controller_tb;
  logic in_r, in_i, raise_cmd, lower_cmd;
  int checks = 0, failures = 0;

  grc_controller dut (.in_r(in_r), .in_i(in_i), .raise_cmd(raise_cmd), .lower_cmd(lower_cmd));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        logic occupied;
        in_r = v[0]; in_i = v[1];
        occupied = (v != 0);
        #1;
        checks++;
        if (lower_cmd !== occupied) begin
          failures++; $display("FAIL LOWER in_r=%0b in_i=%0b", in_r, in_i);
        end
        checks++;
        if (raise_cmd !== !occupied) begin
          failures++; $display("FAIL RAISE in_r=%0b in_i=%0b", in_r, in_i);
        end
        checks++;
        if (raise_cmd && lower_cmd) begin
          failures++; $display("FAIL RAISE and LOWER together");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
