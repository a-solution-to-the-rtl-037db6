// grc_controller: the gate controller of the railroad crossing.
//
// In every reaction it looks at the broadcast occupancy signals: if any train
// is in the approach region R or in the crossing I (IN_R or IN_I) it emits
// LOWER, otherwise RAISE. The command is therefore sustained for as long as
// it applies, and exactly one of the two is present in every reaction, which
// meets the gate's rule that the two never come together.
//
// Interface: in_r, in_i in; raise_cmd, lower_cmd out. It holds no state and
// answers in the same cycle (zero-delay reaction), so the gate starts moving
// in the very reaction in which a train enters R.
//
// This is the published controller. The published variant that emits each
// command only once per change is not part of this design.
module grc_controller (
  input  logic in_r,
  input  logic in_i,
  output logic raise_cmd,
  output logic lower_cmd
);

  always_comb begin
    lower_cmd = in_r | in_i;
    raise_cmd = ~(in_r | in_i);
  end

endmodule
