// tb_localization: docking, locking, trust-region tracking and loss.
//
// The filtered class stream is driven directly with synthetic frames: a blue
// tag, optionally framed by green cloth, plus a blue distractor blob. A
// reference model in the testbench counts the blue pixels the core should
// accept (docking area with green start/end marking, or trust region) and
// predicts the track record after each frame. The sequence covers: a tag with
// no green cloth (must not lock), a tag too small for the threshold, locking,
// tracking over a random walk with steps below half the tag size while a
// distractor sits outside the trust region, a jump that loses the robot, and
// relocking in the docking area.
module tb_localization;
  import ct_pkg::*;
  localparam int W = 64, H = 48, THR = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   rst_n;
  strm_t  in_s;
  cls_t   in_cls;
  rect_t  dock, search;
  track_t track;
  logic   upd, ev_lock, ev_lost;

  localization #(.IMG_W(W), .IMG_H(H), .DOCK_THRESH(THR), .TRACK_THRESH(THR)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cls_t map [H][W];
  int   n_lock = 0, n_lost = 0, n_track_frames = 0, n_gate_rejects = 0;

  always @(posedge clk) begin
    if (ev_lock) n_lock++;
    if (ev_lost) n_lost++;
  end

  // Scene: blue tag bw x bh at (tx, ty), green border of 2 pixels if green.
  task automatic draw(int tx, int ty, int bw, int bh, bit green, bit distractor);
    foreach (map[y, x]) map[y][x] = '0;
    for (int y = ty - 2; y < ty + bh + 2; y++)
      for (int x = tx - 2; x < tx + bw + 2; x++)
        if (x >= 0 && x < W && y >= 0 && y < H) begin
          if (x >= tx && x < tx + bw && y >= ty && y < ty + bh) map[y][x].b = 1;
          else if (green) map[y][x].g = 1;
        end
    if (distractor)
      for (int y = 2; y < 8; y++) for (int x = 50; x < 58; x++) map[y][x].b = 1;
  endtask

  // Reference: state kept by the testbench.
  bit     r_locked;
  rect_t  r_region;
  track_t r_track;

  task automatic reference();
    int cnt, x0, x1, y0, y1;
    rect_t win;
    cnt = 0; x0 = W; x1 = -1; y0 = H; y1 = -1;
    win = r_locked ? r_region : dock;
    for (int y = 0; y < H; y++) begin
      int st;  // 0 wait for green, 1 counting, 2 done
      bit seen_b;
      st = 0; seen_b = 0;
      for (int x = 0; x < W; x++) begin
        bit in_win, counted;
        in_win = x >= int'(win.x0) && x <= int'(win.x1) && y >= int'(win.y0) && y <= int'(win.y1);
        if (!in_win) continue;
        counted = 0;
        if (map[y][x].b) begin
          counted = r_locked || st == 1;
          if (!counted) n_gate_rejects++;
          if (st == 1) seen_b = 1;
        end else if (map[y][x].g) begin
          if (st == 0) st = 1;
          else if (st == 1 && seen_b) st = 2;
        end
        if (counted) begin
          cnt++;
          if (x < x0) x0 = x; if (x > x1) x1 = x;
          if (y < y0) y0 = y; if (y > y1) y1 = y;
        end
      end
    end
    if (cnt > THR) begin
      int cx, cy, w, h;
      cx = (x0 + x1) / 2; cy = (y0 + y1) / 2; w = x1 - x0 + 1; h = y1 - y0 + 1;
      // The size measured at lock is kept while tracking.
      if (r_locked) begin w = int'(r_track.w); h = int'(r_track.h); end
      r_locked = 1;
      r_track.locked = 1;
      r_track.cx = coord_t'(cx); r_track.cy = coord_t'(cy);
      r_track.w = coord_t'(w); r_track.h = coord_t'(h);
      r_region.x0 = coord_t'((cx - w < 0) ? 0 : cx - w);
      r_region.x1 = coord_t'((cx + w > W - 1) ? W - 1 : cx + w);
      r_region.y0 = coord_t'((cy - h < 0) ? 0 : cy - h);
      r_region.y1 = coord_t'((cy + h > H - 1) ? H - 1 : cy + h);
      r_track.region = r_region;
    end else begin
      r_locked = 0;
      r_track.locked = 0;
    end
  endtask

  task automatic send_frame(string what);
    bit was_locked;
    was_locked = r_locked;
    @(negedge clk); in_s = '0; in_s.sof = 1; in_cls = '0;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        in_s = '0; in_s.valid = 1; in_s.x = coord_t'(x); in_s.y = coord_t'(y);
        in_cls = map[y][x];
      end
      @(negedge clk); in_s = '0; in_cls = '0;
    end
    @(negedge clk); in_s = '0; in_s.eof = 1;
    reference();
    @(negedge clk); in_s = '0;
    check(upd, {what, ": update strobe"});
    check(track.locked == r_track.locked, $sformatf("%s: locked %0d expected %0d", what, track.locked, r_track.locked));
    if (r_track.locked) begin
      check(track == r_track, $sformatf("%s: track cx%0d cy%0d w%0d h%0d expected cx%0d cy%0d w%0d h%0d",
            what, track.cx, track.cy, track.w, track.h, r_track.cx, r_track.cy, r_track.w, r_track.h));
      check(search == r_region, {what, ": search window is the trust region"});
      if (was_locked) n_track_frames++;
    end else begin
      check(search == dock, {what, ": search window is the docking area"});
    end
    check(ev_lock == (!was_locked && r_locked), {what, ": lock event"});
    check(ev_lost == (was_locked && !r_locked), {what, ": lost event"});
    @(negedge clk);
  endtask

  initial begin
    int tx, ty;
    rst_n = 0; in_s = '0; in_cls = '0;
    dock = '{x0: 11'd4, x1: 11'd31, y0: 11'd28, y1: 11'd47};
    r_locked = 0; r_track = '0; r_region = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    draw(12, 34, 8, 6, 1'b0, 1'b0); send_frame("tag without green cloth");
    check(!track.locked, "no lock without green marking");
    draw(12, 34, 4, 4, 1'b1, 1'b0); send_frame("tag below threshold");
    check(!track.locked, "no lock below threshold");
    draw(12, 34, 8, 6, 1'b1, 1'b0); send_frame("tag in dock");
    check(track.locked, "locked in docking area");

    tx = 12; ty = 34;
    for (int f = 0; f < 12; f++) begin
      tx += $urandom_range(0, 6) - 3;   // at most 3 < 8/2 across
      ty -= $urandom_range(0, 2);       // at most 2 < 6/2 up
      if (tx < 2) tx = 2;
      draw(tx, ty, 8, 6, f % 2 == 0, 1'b1);
      send_frame($sformatf("track step %0d", f));
    end
    check(track.locked, "still tracked after the walk");

    draw(tx + 24, ty - 16, 8, 6, 1'b1, 1'b0); send_frame("jump out of trust region");
    check(!track.locked, "lost after jump");

    draw(14, 36, 8, 6, 1'b1, 1'b0); send_frame("back in dock");
    check(track.locked, "relocked");

    check(n_lock == 2 && n_lost == 1, $sformatf("events lock=%0d lost=%0d", n_lock, n_lost));
    check(n_track_frames >= 12, $sformatf("tracked frames %0d", n_track_frames));
    check(n_gate_rejects > 0, "green marking rejected blue pixels");
    $display("lock=%0d lost=%0d tracked=%0d gate_rejects=%0d", n_lock, n_lost, n_track_frames, n_gate_rejects);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
