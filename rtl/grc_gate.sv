// grc_gate: model of the crossing gate.
//
// The gate is in one of four states, DOWN, GOING_UP, UP and GOING_DOWN, and
// emits the signal of its state in every reaction. It starts down. It is
// commanded by RAISE and LOWER, which never arrive together.
//
//   DOWN:        RAISE starts the rise in the same reaction (GOING_UP).
//   GOING_UP:    a timer counts the reactions since the rise began; in the
//                T_GATE-th one after it the timer fires and the gate is UP in
//                that reaction. LOWER reverses it at once: GOING_DOWN in the
//                same reaction, with a fresh timer (a partial rise earns no
//                shorter fall).
//   UP:          LOWER starts the fall in the same reaction (GOING_DOWN).
//   GOING_DOWN:  mirror image of GOING_UP, with RAISE reversing it.
//
// So with a steady command the gate spends exactly T_GATE reactions moving
// and shows the end state in the next one. A command that arrives in the
// reaction in which the timer fires still wins: the gate turns around
// without emitting the end state.
//
// Interface: clk (one edge per reaction), rst_n (asynchronous, active low,
// gate down), raise_cmd, lower_cmd; outputs up, down, going_up, going_down
// (exactly one is 1 in every reaction) and the present state.
//
// The states, commands, immediate reversal and the 4-reaction travel are the
// published model's. Reset and the encoding are this design's.
module grc_gate
  import grc_pkg::*;
#(
  parameter int unsigned T_GATE = DEF_T_GATE  // reactions of travel
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        raise_cmd,
  input  logic        lower_cmd,
  output logic        up,
  output logic        down,
  output logic        going_up,
  output logic        going_down,
  output gate_state_t state
);

  localparam int unsigned CW = $clog2(T_GATE + 1);

  gate_state_t   st_q, st_d;
  logic [CW-1:0] cnt_q, cnt_d;  // reactions of travel completed
  logic [CW-1:0] cnt_inc;
  logic          timer;         // TIMER_UP / TIMER_DOWN in this reaction

  assign cnt_inc = cnt_q + CW'(1);
  assign timer   = (cnt_inc == CW'(T_GATE));

  always_comb begin
    st_d       = st_q;
    cnt_d      = cnt_q;
    up         = 1'b0;
    down       = 1'b0;
    going_up   = 1'b0;
    going_down = 1'b0;
    unique case (st_q)
      G_DOWN: begin
        if (raise_cmd) begin
          going_up = 1'b1; st_d = G_GOING_UP; cnt_d = '0;
        end else begin
          down = 1'b1;
        end
      end
      G_GOING_UP: begin
        if (lower_cmd) begin
          going_down = 1'b1; st_d = G_GOING_DOWN; cnt_d = '0;
        end else if (timer) begin
          up = 1'b1; st_d = G_UP; cnt_d = '0;
        end else begin
          going_up = 1'b1; cnt_d = cnt_inc;
        end
      end
      G_UP: begin
        if (lower_cmd) begin
          going_down = 1'b1; st_d = G_GOING_DOWN; cnt_d = '0;
        end else begin
          up = 1'b1;
        end
      end
      G_GOING_DOWN: begin
        if (raise_cmd) begin
          going_up = 1'b1; st_d = G_GOING_UP; cnt_d = '0;
        end else if (timer) begin
          down = 1'b1; st_d = G_DOWN; cnt_d = '0;
        end else begin
          going_down = 1'b1; cnt_d = cnt_inc;
        end
      end
      default: begin
        down = 1'b1; st_d = G_DOWN; cnt_d = '0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= G_DOWN;
      cnt_q <= '0;
    end else begin
      st_q  <= st_d;
      cnt_q <= cnt_d;
    end
  end

  assign state = st_q;

  // RAISE and LOWER are exclusive (relation RAISE # LOWER).
  a_cmd_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(raise_cmd && lower_cmd))
    else $error("grc_gate: RAISE and LOWER in the same reaction");

  initial begin
    assert (T_GATE >= 1) else $error("grc_gate: T_GATE must be at least 1");
  end

endmodule
