// follower_control: driving control of one follower in the wedge formation.
//
// A follower keeps a slot behind the leader: SLOT_DX pixels to the side and
// SLOT_DY pixels behind the leader's tag centre (the robots drive towards
// smaller y, the top of the image). Every frame, once the leader core has
// released the followers (go), it compares its robot's tag centre with the
// slot:
//   - halted by the leader, not released, or own robot not tracked: stop;
//   - ahead of the slot by more than TOL while the leader is still driving:
//     stop and let the leader pull ahead (once the leader waits in the goal
//     area the followers close up and drive into it);
//   - more than TOL left (right) of the slot: veer right (left);
//   - otherwise: forward.
// cmd_req pulses for one clock whenever the command changes.
//
// Interface: tick once per frame (the follower's localization update), own and
// leader track records, go/halt/leader_waiting from the leader control.
//
// Following the leader's release, keeping a wedge and stopping on the
// leader's request are the document's; the slot geometry and the bang-bang
// steering rule are this design's choices.
module follower_control
  import ct_pkg::*;
#(
  parameter int          SLOT_DX = -427,  // slot offset across (pixels, signed)
  parameter int unsigned SLOT_DY = 128,   // slot distance behind the leader
  parameter int unsigned TOL     = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick,
  input  track_t own,
  input  track_t leader,
  input  logic   go,
  input  logic   halt,
  input  logic   leader_waiting,
  output cmd_e   cmd,
  output logic   cmd_req
);

  int   tx, ty, ox, oy;
  cmd_e cmd_next;

  always_comb begin
    tx = int'(leader.cx) + SLOT_DX;
    ty = int'(leader.cy) + int'(SLOT_DY);
    ox = int'(own.cx);
    oy = int'(own.cy);
    if (halt || !go || !own.locked || !leader.locked)
      cmd_next = CMD_STOP;
    else if (oy + int'(TOL) < ty && !leader_waiting)
      cmd_next = CMD_STOP;
    else if (ox + int'(TOL) < tx)
      cmd_next = CMD_RIGHT;
    else if (ox > tx + int'(TOL))
      cmd_next = CMD_LEFT;
    else
      cmd_next = CMD_FWD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd     <= CMD_STOP;
      cmd_req <= 1'b0;
    end else begin
      cmd_req <= 1'b0;
      if (tick) begin
        cmd     <= cmd_next;
        cmd_req <= (cmd_next != cmd);
      end
    end
  end

endmodule
