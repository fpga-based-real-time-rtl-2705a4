// ct_bench: end-to-end scenario for the tracking server (testbench only).
//
// Drives a complete run of the formation: three robots stand in their docking
// areas, the server locks them, waits, sends the leader forward, the followers
// take their wedge slots, everyone reaches the goal area and is stopped. The
// camera and the robots are behavioural models; the robots move only when
// they decode infrared frames addressed to them with the right key.
//
// Checks: every tracked position against the rendered one; the leader starts
// exactly START_DELAY frames after all three locked; no corrupted or foreign
// IR frame is accepted; a wedge (followers behind and on either side of the
// leader) is held while driving; the run ends with every robot in the goal
// area and stopped, the followers still on either side; the display
// stream shows red outlines and white tags. Each mechanism of the design is
// counted and must occur: locking, trust-region tracking, colour prediction
// deciding a pixel, the noise filter removing pixels, green marking rejecting
// blue pixels, a follower waiting behind its slot, a follower veering, the
// leader halting each follower, and a command waiting while the IR line is
// busy.
module ct_bench
  import ct_pkg::*;
#(
  parameter int IMG_W       = 1280,
  parameter int IMG_H       = 1024,
  parameter int TAG_W       = 48,
  parameter int TAG_H       = 32,
  parameter int BORDER      = 12,
  parameter int SPEED       = 12,
  parameter int HALF        = 44448,
  parameter int HBLANK      = 16,
  parameter int VBLANK      = 200,
  parameter int START_DELAY = 12,
  parameter int MAX_FRAMES  = 150
) (
  output logic        clk,
  output logic        rst_n,
  output logic        fval,
  output logic        lval,
  output logic [11:0] pix,
  output logic [3:0][11:0] d_r,
  output logic [3:0][11:0] d_g,
  output logic [3:0][11:0] d_b,
  input  logic        ir_env,
  input  track_t      tracks [3],
  input  logic        frame_upd,
  input  logic [2:0]  ev_lock,
  input  logic        go,
  input  logic [2:1]  halt,
  input  logic        done,
  input  cmd_e        cmds [3],
  input  strm_t       disp_s,
  input  logic [29:0] disp_rgb,
  // probes into the design, for counting mechanisms
  input  logic        pred_fire,
  input  logic        cp_b,
  input  logic        nf_b,
  input  logic        ir_wait,
  input  logic        gate_reject
);

  localparam int THIRD = IMG_W / 3;
  localparam int TOL   = IMG_W / 64;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ models
  int rx [3], ry [3], rcmd [3], nacc [3], nbad [3];
  logic frame_done;
  int frames;

  scene_camera #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TAG_W(TAG_W), .TAG_H(TAG_H),
                 .BORDER(BORDER), .HBLANK(HBLANK), .VBLANK(VBLANK)) u_cam (
    .clk, .rst_n, .rx, .ry, .fval, .lval, .pix, .frame_done, .frames
  );

  // Robot 0 leads from the middle docking area, 1 and 2 start left and right,
  // a little off their slots so that they have to steer.
  eyebot_model #(.ADDR(5'd1), .KEY(6'h36), .HALF(HALF), .SPEED(SPEED),
                 .X0(THIRD + THIRD / 2), .Y0(IMG_H - IMG_H / 8)) u_bot0 (
    .clk, .rst_n, .ir_env, .frame_tick(frame_done), .x(rx[0]), .y(ry[0]),
    .cmd(rcmd[0]), .n_accepted(nacc[0]), .n_bad(nbad[0]));
  eyebot_model #(.ADDR(5'd2), .KEY(6'h1B), .HALF(HALF), .SPEED(SPEED),
                 .X0(THIRD / 2 + 3 * TOL), .Y0(IMG_H - IMG_H / 8)) u_bot1 (
    .clk, .rst_n, .ir_env, .frame_tick(frame_done), .x(rx[1]), .y(ry[1]),
    .cmd(rcmd[1]), .n_accepted(nacc[1]), .n_bad(nbad[1]));
  eyebot_model #(.ADDR(5'd3), .KEY(6'h2D), .HALF(HALF), .SPEED(SPEED),
                 .X0(2 * THIRD + THIRD / 2 - 3 * TOL), .Y0(IMG_H - IMG_H / 8)) u_bot2 (
    .clk, .rst_n, .ir_env, .frame_tick(frame_done), .x(rx[2]), .y(ry[2]),
    .cmd(rcmd[2]), .n_accepted(nacc[2]), .n_bad(nbad[2]));

  // ------------------------------------------------------ observations
  int shown_x [3], shown_y [3];   // positions rendered in the current frame
  logic fval_q;
  int n_lock = 0, n_tracked = 0, n_pred = 0, n_cp_b = 0, n_nf_b = 0;
  int n_ir_wait = 0, n_gate = 0, n_wait_slot = 0, n_veer = 0, n_red = 0, n_white = 0;
  int lock_frame = -1, drive_frame = -1, n_upd = 0;
  int max_err = 0, n_wedge = 0;
  logic [2:1] halt_seen = '0;

  always @(posedge clk) if (rst_n) begin
    fval_q <= fval;
    if (fval && !fval_q)
      for (int k = 0; k < 3; k++) begin shown_x[k] = rx[k]; shown_y[k] = ry[k]; end
    if (pred_fire) n_pred++;
    if (cp_b) n_cp_b++;
    if (nf_b) n_nf_b++;
    if (ir_wait) n_ir_wait++;
    if (gate_reject) n_gate++;
    n_lock += $countones(ev_lock);
    halt_seen |= halt;
    if (disp_s.valid && disp_rgb == 30'h3FF00000) n_red++;
    if (disp_s.valid && disp_rgb == 30'h3FFFFFFF) n_white++;
    if (frame_upd) begin
      n_upd++;
      for (int k = 0; k < 3; k++) if (tracks[k].locked) begin
        int ex, ey;
        ex = int'(tracks[k].cx) - shown_x[k];
        ey = int'(tracks[k].cy) - shown_y[k];
        if (ex < 0) ex = -ex;
        if (ey < 0) ey = -ey;
        if (ex > max_err) max_err = ex;
        if (ey > max_err) max_err = ey;
        check(ex <= TAG_W / 8 + 1 && ey <= TAG_H / 8 + 2,
              $sformatf("robot %0d tracked at (%0d,%0d), shown at (%0d,%0d)", k,
                        tracks[k].cx, tracks[k].cy, shown_x[k], shown_y[k]));
        if (!ev_lock[k]) n_tracked++;
      end
      if (shown_x[1] < shown_x[0] && shown_x[0] < shown_x[2] &&
          shown_y[1] > shown_y[0] + TAG_H && shown_y[2] > shown_y[0] + TAG_H) n_wedge++;
      if (lock_frame < 0 && tracks[0].locked && tracks[1].locked && tracks[2].locked) lock_frame = n_upd;
    end
  end

  // Per-frame decisions, sampled two clocks after each update.
  always @(posedge clk) if (rst_n && frame_upd) begin
    repeat (2) @(posedge clk);
    if (drive_frame < 0 && cmds[0] == CMD_FWD) drive_frame = n_upd;
    for (int k = 1; k < 3; k++) begin
      if (go && !halt[k] && tracks[k].locked && cmds[k] == CMD_STOP) n_wait_slot++;
      if (cmds[k] == CMD_LEFT || cmds[k] == CMD_RIGHT) n_veer++;
    end
  end

  initial begin : watchdog
    repeat (longint'(MAX_FRAMES + 10) * (IMG_W + HBLANK) * (IMG_H + 2) + 64'd1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    for (int n = 0; n < 4; n++) begin
      d_r[n] = 12'(64 + 32 * n); d_g[n] = 12'(96 + 16 * n); d_b[n] = 12'(48 + 8 * n);
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    wait (done || frames >= MAX_FRAMES);
    // Let the last stop commands reach the robots.
    wait ((rcmd[0] == 0 && rcmd[1] == 0 && rcmd[2] == 0) || frames >= MAX_FRAMES);
    repeat (2) @(posedge frame_done);

    $display("wedge_frames=%0d", n_wedge);
    $display("frames=%0d lock_frame=%0d drive_frame=%0d max_pos_err=%0d", frames, lock_frame, drive_frame, max_err);
    $display("positions L(%0d,%0d) F1(%0d,%0d) F2(%0d,%0d)", rx[0], ry[0], rx[1], ry[1], rx[2], ry[2]);
    $display("mechanisms: lock=%0d tracked=%0d prediction=%0d filter_in=%0d filter_out=%0d gate=%0d wait_slot=%0d veer=%0d ir_wait=%0d halt=%b",
             n_lock, n_tracked, n_pred, n_cp_b, n_nf_b, n_gate, n_wait_slot, n_veer, n_ir_wait, halt_seen);
    $display("ir frames accepted %0d %0d %0d, rejected %0d %0d %0d", nacc[0], nacc[1], nacc[2], nbad[0], nbad[1], nbad[2]);

    check(done, "formation run completed");
    check(n_lock >= 3, "all three robots locked");
    check(lock_frame > 0 && drive_frame - lock_frame == START_DELAY,
          $sformatf("leader started %0d frames after lock", drive_frame - lock_frame));
    for (int k = 0; k < 3; k++) begin
      check(nacc[k] > 0 && nbad[k] == 0, $sformatf("robot %0d IR frames", k));
      check(ry[k] < IMG_H / 4, $sformatf("robot %0d in goal area", k));
      check(rcmd[k] == 0, $sformatf("robot %0d stopped", k));
    end
    check(rx[1] < rx[0] && rx[0] < rx[2], "followers on either side of the leader");
    check(n_wedge > 0, $sformatf("wedge formation held in %0d frames", n_wedge));
    check(n_tracked > 0, "trust-region tracking");
    check(n_pred > 0, "colour prediction decided pixels");
    check(n_nf_b < n_cp_b && n_nf_b > 0, "noise filter removed pixels");
    check(n_gate > 0, "green marking rejected blue pixels");
    check(n_wait_slot > 0, "a follower waited for its slot");
    check(n_veer > 0, "a follower steered");
    check(halt_seen == 2'b11, "both followers halted by the leader");
    check(n_ir_wait > 0, "a command waited for the IR line");
    check(n_red > 0 && n_white > 0, "display outlines and tags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
