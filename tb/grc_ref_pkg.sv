// grc_ref_pkg: reference model of the whole railroad crossing, used by the
// system-level testbenches to work out the expected signals of each reaction
// independently of the RTL.
//
// Trains are modelled by time stamps (the reaction in which each track's
// present train was accepted; every signal follows from the distance to it),
// the gate by its target position and the reactions of motion so far, and
// the utility window by the number of quiet reactions in a row. The model
// also counts how often each mechanism of the design occurs, so a test can
// show that it exercised all of them.
package grc_ref_pkg;

  class grc_ref;
    int n_tracks, t_r, t_i, t_gate, xi2;
    int now;
    int start[];               // -1: track empty
    // Expected signals of the present reaction.
    bit enter_r[], enter_i[], exit_i[], in_r[], in_i[];
    bit b_enter_r, b_enter_i, b_exit, b_in_r, b_in_i;
    bit raise_cmd, lower_cmd;
    bit up, down, going_up, going_down;
    bit window_full, safety_viol, utility_viol;
    // Gate: target (1 = up), moving, reactions of motion so far.
    bit g_target, g_moving;
    int g_elapsed;
    int quiet_run;             // quiet reactions in a row before this one
    // Mechanism counts.
    int n_accept, n_ignored, n_back_to_back, n_overlap, n_two_in_i;
    int n_rev_to_down, n_rev_to_up, n_arrive_up, n_arrive_down, n_lower_from_up;
    int n_window_full, n_in_i_down;

    function new(int n_tracks, int t_r, int t_i, int t_gate, int xi2);
      this.n_tracks = n_tracks; this.t_r = t_r; this.t_i = t_i;
      this.t_gate = t_gate; this.xi2 = xi2;
      start   = new[n_tracks];
      enter_r = new[n_tracks]; enter_i = new[n_tracks]; exit_i = new[n_tracks];
      in_r    = new[n_tracks]; in_i    = new[n_tracks];
      reset();
      n_accept = 0; n_ignored = 0; n_back_to_back = 0; n_overlap = 0; n_two_in_i = 0;
      n_rev_to_down = 0; n_rev_to_up = 0; n_arrive_up = 0; n_arrive_down = 0;
      n_lower_from_up = 0; n_window_full = 0; n_in_i_down = 0;
    endfunction

    function void reset();
      now = 0;
      foreach (start[i]) start[i] = -1;
      g_target = 0; g_moving = 0; g_elapsed = 0;
      quiet_run = 0;
    endfunction

    // Compute the expected signals of one reaction and advance the model.
    function void react(bit approach[]);
      int busy_cnt, in_i_cnt;
      b_enter_r = 0; b_enter_i = 0; b_exit = 0; b_in_r = 0; b_in_i = 0;
      busy_cnt = 0; in_i_cnt = 0;
      foreach (start[i]) begin
        int d;
        bit free;
        d = (start[i] < 0) ? -1 : now - start[i];
        free       = (start[i] < 0) || (d >= t_r + t_i);
        exit_i[i]  = (d == t_r + t_i);
        enter_i[i] = (d == t_r);
        in_i[i]    = (d >= t_r) && (d < t_r + t_i);
        in_r[i]    = !free && (d < t_r);
        enter_r[i] = 0;
        if (free && approach[i]) begin
          enter_r[i] = 1; in_r[i] = 1;
          n_accept++;
          if (exit_i[i]) n_back_to_back++;
          start[i] = now;
        end else begin
          if (approach[i]) n_ignored++;
          if (free) start[i] = -1;
        end
        if (in_r[i] || in_i[i]) busy_cnt++;
        if (in_i[i]) in_i_cnt++;
        b_enter_r |= enter_r[i]; b_enter_i |= enter_i[i]; b_exit |= exit_i[i];
        b_in_r    |= in_r[i];    b_in_i    |= in_i[i];
      end
      if (busy_cnt >= 2) n_overlap++;
      if (in_i_cnt >= 2) n_two_in_i++;
      lower_cmd = b_in_r || b_in_i;
      raise_cmd = !lower_cmd;
      // Gate.
      up = 0; down = 0; going_up = 0; going_down = 0;
      if (!g_moving) begin
        if (g_target && lower_cmd) begin
          g_target = 0; g_moving = 1; g_elapsed = 0; going_down = 1; n_lower_from_up++;
        end else if (!g_target && raise_cmd) begin
          g_target = 1; g_moving = 1; g_elapsed = 0; going_up = 1;
        end else begin
          up = g_target; down = !g_target;
        end
      end else if ((g_target && lower_cmd) || (!g_target && raise_cmd)) begin
        if (g_target) n_rev_to_down++; else n_rev_to_up++;
        g_target = !g_target; g_elapsed = 0;
        going_up = g_target; going_down = !g_target;
      end else begin
        g_elapsed++;
        if (g_elapsed == t_gate) begin
          g_moving = 0; up = g_target; down = !g_target;
          if (g_target) n_arrive_up++; else n_arrive_down++;
        end else begin
          going_up = g_target; going_down = !g_target;
        end
      end
      // Requirements.
      safety_viol  = b_in_i && !down;
      if (b_in_i && down) n_in_i_down++;
      window_full  = !lower_cmd && (quiet_run >= xi2 - 1);
      utility_viol = window_full && !up;
      if (window_full) n_window_full++;
      quiet_run = lower_cmd ? 0 : quiet_run + 1;
      now++;
    endfunction

    function void report();
      $display("accepted=%0d ignored=%0d back_to_back=%0d overlap=%0d two_in_I=%0d",
               n_accept, n_ignored, n_back_to_back, n_overlap, n_two_in_i);
      $display("gate: lower_from_up=%0d rise_reversed=%0d fall_reversed=%0d arrive_up=%0d arrive_down=%0d",
               n_lower_from_up, n_rev_to_down, n_rev_to_up, n_arrive_up, n_arrive_down);
      $display("requirements: IN_I with DOWN=%0d utility windows=%0d",
               n_in_i_down, n_window_full);
    endfunction
  endclass

endpackage
