// leader_control: driving control of the leader robot and of the formation.
//
// The leader core runs the scenario of the formation. It waits until all
// three localization cores have locked their robots in the docking areas, lets
// START_DELAY frames pass, then sends the leader forward and releases the
// followers (go). When the leader's tag centre enters the goal area the leader
// is stopped and waits. Each follower that reaches the goal area is asked to
// stop (halt), and once both have stopped the run is done. If the leader is
// lost while driving it is stopped and the formation waits to re-lock.
//
// Interface: tick is the once-per-frame update strobe of the leader's
// localization core; trk[0] is the leader, trk[1] and trk[2] the followers.
// Decisions are taken on tick. cmd is the command for the leader's robot and
// cmd_req pulses for one clock when it changes. go, halt and waiting (the
// leader stands in the goal area) are levels.
//
// The scenario (lock, delay, drive, wait at the goal, stop the followers) is
// the document's; the frame-counted delay, its length, the goal test on the tag
// centre and the reaction to a lost leader are this design's choices.
module leader_control
  import ct_pkg::*;
#(
  parameter int unsigned START_DELAY = 12   // frames, 1 s at 12 frames/s
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  track_t     trk [NUM_ROBOTS],
  input  rect_t      goal,
  output cmd_e       cmd,
  output logic       cmd_req,
  output logic       go,
  output logic [2:1] halt,
  output logic       waiting,   // leader stopped in the goal area
  output logic       done
);

  typedef enum logic [2:0] {S_WAIT_LOCK, S_DELAY, S_DRIVE, S_WAIT_FOLLOWERS, S_DONE} state_e;

  state_e state;
  logic [$clog2(START_DELAY + 1)-1:0] delay_cnt;

  logic all_locked;
  logic [2:0] at_goal;

  always_comb begin
    all_locked = 1'b1;
    for (int k = 0; k < NUM_ROBOTS; k++) begin
      all_locked = all_locked && trk[k].locked;
      at_goal[k] = trk[k].locked && in_rect(trk[k].cx, trk[k].cy, goal);
    end
  end

  // Next state, decided on a tick.
  state_e             state_n;
  logic [2:1]         halt_n;
  always_comb begin
    state_n = state;
    halt_n  = halt;
    unique case (state)
      S_WAIT_LOCK: if (all_locked) state_n = S_DELAY;
      S_DELAY: begin
        if (!all_locked) state_n = S_WAIT_LOCK;
        else if (32'(delay_cnt) >= START_DELAY - 1) state_n = S_DRIVE;
      end
      S_DRIVE: begin
        if (!trk[0].locked) state_n = S_WAIT_LOCK;
        else if (at_goal[0]) state_n = S_WAIT_FOLLOWERS;
      end
      S_WAIT_FOLLOWERS: begin
        halt_n = halt | at_goal[2:1];
        if (&halt_n) state_n = S_DONE;
      end
      default: ;
    endcase
  end

  // The leader drives only in S_DRIVE; the command follows the new state.
  cmd_e cmd_next;
  assign cmd_next = (state_n == S_DRIVE) ? CMD_FWD : CMD_STOP;

  assign go   = (state == S_DRIVE) || (state == S_WAIT_FOLLOWERS);
  assign done    = (state == S_DONE);
  assign waiting = (state == S_WAIT_FOLLOWERS) || (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_WAIT_LOCK;
      delay_cnt <= '0;
      halt      <= '0;
      cmd       <= CMD_STOP;
      cmd_req   <= 1'b0;
    end else begin
      cmd_req <= 1'b0;
      if (tick) begin
        state   <= state_n;
        halt    <= halt_n;
        cmd     <= cmd_next;
        cmd_req <= (cmd_next != cmd);
        delay_cnt <= (state == S_DELAY && state_n == S_DELAY) ? delay_cnt + 1'b1 : '0;
      end
    end
  end

endmodule
