// tb_ct_speed: how fast a robot may move and still be tracked.
//
// The whole server runs on a 320 x 256 image. The robot positions are set by
// this bench directly, without the infrared path. All three robots stand in
// their docking areas until they are locked. Then the leader moves up the
// image, first by half its tag height per frame, which is the largest step the
// trust region is built for. Every frame it must stay locked and be found where it was
// drawn. Then it makes one step of 2.2 tag heights in a single frame. That is
// the step of a robot at 3.8 km/h seen at 12 frames/s with a 4 cm tag: 8.8 cm
// per frame. The leader must be reported lost in that frame, its search window must
// fall back to its docking area, and the two followers must stay locked. Put
// back into its docking area, the leader must lock again in the next frame.
// Loss and re-lock are counted and must both happen.
module tb_ct_speed;
  import ct_pkg::*;

  localparam int IMG_W  = 320;
  localparam int IMG_H  = 256;
  localparam int TAG_W  = 16;
  localparam int TAG_H  = 12;
  localparam int THIRD  = IMG_W / 3;
  localparam int TOL    = IMG_W / 64;
  localparam int SLOW   = TAG_H / 2;          // largest step the trust region covers
  localparam int FAST   = TAG_H * 22 / 10;    // 3.8 km/h against a 4 cm tag at 12 frames/s
  localparam int HBLANK = 16;
  localparam int VBLANK = 100;

  logic        clk, rst_n, fval, lval;
  logic [11:0] pix;
  logic [3:0][11:0] d_r, d_g, d_b;
  logic        ir_out, ir_env, ir_busy, ir_sent, frame_upd, go, done;
  logic [1:0]  ir_sent_robot;
  logic [13:0] ir_sent_frame;
  track_t      tracks [3];
  logic [2:0]  ev_lock, ev_lost;
  logic [2:1]  halt;
  cmd_e        cmds [3];
  strm_t       disp_s;
  logic [29:0] disp_rgb;

  ct_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DOCK_THRESH(48), .TRACK_THRESH(48), .START_DELAY(3),
           .CARRIER_DIV(8), .HALF_BIT(4), .GAP_HALF(20)) dut (.*);

  int   rx [3], ry [3];
  logic frame_done;
  int   frames;

  scene_camera #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TAG_W(TAG_W), .TAG_H(TAG_H), .BORDER(4),
                 .HBLANK(HBLANK), .VBLANK(VBLANK)) u_cam (
    .clk, .rst_n, .rx, .ry, .fval, .lval, .pix, .frame_done, .frames
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Positions drawn in the current frame, and the events of its update.
  int   shown_x [3], shown_y [3];
  logic fval_q;
  logic [2:0] lock_seen, lost_seen;
  int   n_lost = 0, n_relock = 0;

  always @(posedge clk) if (rst_n) begin
    fval_q <= fval;
    if (fval && !fval_q)
      for (int k = 0; k < 3; k++) begin shown_x[k] = rx[k]; shown_y[k] = ry[k]; end
  end

  // Wait for the next frame update and report which robots locked or got lost.
  task automatic next_update();
    @(posedge clk iff (rst_n && frame_upd));
    lock_seen = ev_lock;
    lost_seen = ev_lost;
    @(posedge clk);
  endtask

  function automatic bit near(int k);
    int ex, ey;
    ex = int'(tracks[k].cx) - shown_x[k];
    ey = int'(tracks[k].cy) - shown_y[k];
    return (ex <= TAG_W / 8 + 1) && (ex >= -(TAG_W / 8 + 1)) &&
           (ey <= TAG_H / 8 + 2) && (ey >= -(TAG_H / 8 + 2));
  endfunction

  initial begin : watchdog
    repeat (40 * (IMG_W + HBLANK) * (IMG_H + 2) + 40 * VBLANK + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    for (int n = 0; n < 4; n++) begin
      d_r[n] = 12'(64 + 32 * n); d_g[n] = 12'(96 + 16 * n); d_b[n] = 12'(48 + 8 * n);
    end
    rx[0] = THIRD + THIRD / 2;          ry[0] = IMG_H - IMG_H / 8;
    rx[1] = THIRD / 2 + 3 * TOL;        ry[1] = IMG_H - IMG_H / 8;
    rx[2] = 2 * THIRD + THIRD / 2 - 3 * TOL; ry[2] = IMG_H - IMG_H / 8;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // Docking: all three lock in the first frame.
    next_update();
    check(lock_seen == 3'b111 && tracks[0].locked && tracks[1].locked && tracks[2].locked,
          $sformatf("all robots locked in the first frame (events %b)", lock_seen));

    // Half a tag height per frame: tracked every frame.
    for (int f = 0; f < 6; f++) begin
      ry[0] -= SLOW;
      next_update();
      check(tracks[0].locked && lost_seen == 3'b000,
            $sformatf("leader kept at a step of %0d rows (frame %0d)", SLOW, f));
      check(near(0), $sformatf("leader tracked at (%0d,%0d), drawn at (%0d,%0d)",
                               tracks[0].cx, tracks[0].cy, shown_x[0], shown_y[0]));
    end

    // One step at 3.8 km/h: the leader leaves its trust region.
    ry[0] -= FAST;
    next_update();
    check(lost_seen == 3'b001, $sformatf("only the leader lost at a step of %0d rows (events %b)",
                                         FAST, lost_seen));
    if (lost_seen[0]) n_lost++;
    check(!tracks[0].locked, "leader reported unlocked after the fast step");
    check(tracks[1].locked && tracks[2].locked, "followers stay locked");
    check(dut.search[0] == dut.dock[0], "leader's search window is its docking area again");

    // Nothing to find outside the docking area: still unlocked.
    next_update();
    check(!tracks[0].locked && lock_seen == 3'b000, "leader stays unlocked away from its docking area");

    // Back into the docking area: locked again in the next frame.
    ry[0] = IMG_H - IMG_H / 8;
    next_update();
    check(lock_seen == 3'b001 && tracks[0].locked, $sformatf("leader locks again (events %b)", lock_seen));
    if (lock_seen[0]) n_relock++;
    check(near(0), $sformatf("leader found at (%0d,%0d), drawn at (%0d,%0d)",
                             tracks[0].cx, tracks[0].cy, shown_x[0], shown_y[0]));

    $display("mechanisms: lost=%0d relock=%0d", n_lost, n_relock);
    check(n_lost > 0, "a robot was lost");
    check(n_relock > 0, "a lost robot was locked again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
