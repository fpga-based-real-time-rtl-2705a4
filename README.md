# Raw-Bayer colour tracking and leader–follower control on one FPGA

This design watches three small mobile robots through one overhead camera and
drives them in a wedge formation with infrared TV-remote commands. It does this
in a single streaming pass over the camera's raw Bayer image. It never
demosaics the image, never stores a frame, and needs no processor. Each robot
carries a blue tag on a green cloth. The hardware finds the tags pixel by pixel
as the sensor reads them out. At the end of every frame it knows where each robot
is, and it decides what each robot should do next.

The image path uses three ideas:

* **Raw-pattern colour tests.** Every sample, together with its left neighbour
  and the two samples above them, forms a 2x2 Bayer window. Each window holds
  one red, one blue and two green samples. The tests are plain comparisons: a
  window is green if both greens beat red and blue, and blue if blue beats red
  and both greens.
* **Colour prediction.** Light and shadow make fixed comparisons unreliable.
  If the pixel directly above already had a class, the test for that class is
  relaxed by an error margin, so a tag stays whole where part of it lies in
  shadow.
* **Docking areas and trust regions.** A robot is first found in a fixed
  docking area. After that it is searched only in a small window that moves
  with it. This keeps the per-pixel work to a few counters for each robot.

## Block diagram

```
 sensor  fval/lval/pix
   │
 raw_capture ──► color_prediction ──► noise_filter ──┬──► localization[0] (leader) ──┐
  (x, y, sof/eof)  2x2 window,          3-line AND   ├──► localization[1] (follower 1)├─► tracks
                   prediction,                       └──► localization[2] (follower 2)┘
                   2 line buffers                                     │
                                                leader_control ◄──────┤
                                                   │ go/halt/waiting  │
                                        follower_control x2 ◄─────────┘
                                                   │ commands
                                               ir_remote ──► ir_out (to the IR emitter)
      noise_filter + search windows ──► region_overlay ──► disp_s/disp_rgb (to a video path)
```

| File | Role |
|---|---|
| `rtl/ct_pkg.sv` | stream sideband `strm_t`, classes `cls_t`, `rect_t`, `track_t`, `cmd_e` |
| `rtl/raw_capture.sv` | sensor strobes → pixel stream with (x, y), frame start/end |
| `rtl/line_buffer.sv` | one image line of simple dual-port memory |
| `rtl/color_prediction.sv` | 2x2 Bayer window, basic and predicted green/blue tests |
| `rtl/noise_filter.sv` | keeps a class only if present on three lines in a row |
| `rtl/localization.sv` | docking detection and trust-region tracking for one robot |
| `rtl/leader_control.sv` | formation scenario and the leader's commands |
| `rtl/follower_control.sv` | wedge-slot keeping for one follower |
| `rtl/ir_remote.sv` | round-robin command queue and encrypted RC-5-style IR sender |
| `rtl/region_overlay.sv` | monitor picture: confirmed colour in white, windows in red |
| `rtl/ct_top.sv` | the whole server |

## The pixel path

All blocks share one clock and take at most one sample per clock. A pixel
travels as a `strm_t`, which holds valid, sof, eof and 11-bit x and y. Frame
start and frame end travel through the same pipeline registers as the pixels,
so each block sees them in order.

**Bayer window.** The mosaic is G R G R on even lines and B G B G on odd lines.
`BAYER_OFFSET` flips either parity for a sensor that starts elsewhere. The
window is anchored at the current sample (x, y). It uses (x-1, y), (x, y-1) and
(x-1, y-1). The parity of (x, y) decides which of the four is r, g1, g2 and b.
This gives every pixel its own window, so the class map has full sensor
resolution. Row 0 and column 0 have no window and are never classified.

**Colour tests.** With `gmin`/`gmax` the smaller/larger green:

| class | basic test | predicted test (pixel above has the class) |
|---|---|---|
| green | `gmin > r` and `gmin > b` | `gmin > r−Δr` and `gmin > b−Δb` |
| blue  | `b > r` and `b > gmax`   | `b > r−Δr` and `b > gmax−Δg` |

Subtraction saturates at 0. Each Δ is looked up in a four-entry table indexed
by the top two bits of the value it is subtracted from. A bright red value can
therefore get a different margin from a dim one. The tables (`d_r`, `d_g`,
`d_b`) are inputs, because they must be measured on the real scene under its
lighting. The class of each pixel is stored in a second line buffer. The next
line reads it back to decide which test to use. The stored class is the one
*before* noise filtering, so a shaded area keeps being predicted from the
class above it.

**Noise filter.** One line buffer of 4 bits per column holds the classes of the
two previous lines. The output class is the AND of the three. Isolated specks
disappear. A tag loses its top two rows. The output keeps the coordinates of
the bottom pixel, so tag centres come out about one row low.

Latency: raw_capture 1 clock, color_prediction 2, noise_filter 1. The
localization cores then use the sample in the clock it arrives.

## Localization: docking, locking, trust regions

Each robot has its own core. All three cores see the same filtered stream.

* **Docking.** The core counts blue pixels inside its robot's docking area.
  The green cloth marks where counting starts and stops on each line. Blue
  counts only after a green pixel has been seen on that line inside the area,
  and counting on the line stops at the first green pixel after blue. Blue
  objects without a cloth frame are therefore ignored. The test bench places
  such a floor mark in a docking area. At end of frame, the robot locks if
  the count is **greater than** `DOCK_THRESH`.
* **Tag size.** The tag's width and height come from the bounding box of the
  blue pixels counted in the frame that locks. At that point the whole tag
  stands in the docking area. The size is then held for as long as the robot
  is tracked.
* **Tracking.** After locking, the core counts every blue pixel inside the
  *trust region* and takes the middle of their bounding box as the centre. The
  next trust region is centre ± one tag width and ± one tag height. That is
  twice the tag in each direction, four times its area, clipped to the image.
  The rule assumes a tag moves at most half its own length per frame. A robot
  that moves faster leaves its trust region. The size is not re-measured
  inside the trust region. A moving tag is partly cut off by the region's
  edge, so a re-measured size would shrink the next region, and the one after
  it, until the robot is lost even at a legal speed.
* **Loss.** If a frame's count in the trust region is not above `TRACK_THRESH`,
  the core reports the robot as lost and goes back to docking. The robot must
  then come back through its docking area.

The track record (`track_t`: locked, cx, cy, w, h, region) changes only at
end of frame. `upd` pulses then.

## Formation control

The top fixes the arena layout. The three docking areas lie side by side in
the bottom quarter of the image, with the leader's in the middle. The goal
area is the top quarter. "Forward" means toward smaller y.

`leader_control` runs the scenario on each frame update:

1. Wait until all three robots are locked.
2. Count `START_DELAY` frames. The count restarts if any lock is lost.
3. Send the leader forward and raise `go`, which releases the followers.
4. When the leader's centre is in the goal area, stop the leader and raise
   `waiting`.
5. Raise `halt[k]` for each follower that reaches the goal area. When both are
   halted, the run is `done`.

`follower_control` keeps a slot `SLOT_DX` to the side of the leader and `SLOT_DY`
behind it. In the top, the slot is one third of the image width and one eighth
of its height. The follower stops if it is not released, is halted, or is not
tracked. It also stops while it is ahead of its slot, unless the leader is
already waiting at the goal. If it is more than `TOL` to the side of its slot,
it veers back toward the slot. Otherwise it drives forward. Without the
"leader waiting" exception, a goal area shallower than the slot distance could
never be reached.

Commands are `CMD_STOP`, `CMD_FWD`, `CMD_LEFT` and `CMD_RIGHT`; left and right
mean forward while veering. A control posts a command only when it changes.

## Infrared sender

`ir_remote` has one waiting slot per robot, and a newer command replaces the
one waiting. When it is idle, it serves the waiting robots in round-robin
order. Each command goes out as a 14-bit RC-5-style frame:

```
1 1 toggle a4..a0 d5..d0      d = {0000, cmd} XOR KEY[robot]
```

Each bit is Manchester-coded over two half-bits: '1' is off then on, '0' is
on then off. During "on" half-bits the output carries a square-wave carrier
of `CARRIER_DIV` clocks. At 50 MHz the defaults give 36 kHz, 32 carrier periods
per half-bit (0.889 ms), a 24.9 ms frame and 88.9 ms of silence after it. A
robot accepts only frames with its address whose data decodes with its key.
This XOR scrambling is a minimal stand-in for encryption and is not secure.
Because of the silence, one command takes about 114 ms of air time. With three
robots, a command can wait up to about a third of a second. The control loop
tolerates this because every decision is re-evaluated each frame and only
changes are sent.

## Display stream

`region_overlay` turns the filtered stream into an RGB pixel, 10 bits per
channel. Search-window outlines are red. The search window is the trust
region once a robot is locked and its docking area before that. Pixels with a
confirmed class are white, and all others are black. Buffering and scaling the
picture for a monitor are left to an external video path.

## Parameters and sizes

| Parameter (ct_top) | Default | Meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 1280, 1024 | raw image size |
| `PIX_W` | 12 | raw sample width |
| `DOCK_THRESH`, `TRACK_THRESH` | 256 | blue pixels needed to lock / stay locked |
| `START_DELAY` | 12 | frames between lock and the leader's start (1 s at 12 frames/s) |
| `CARRIER_DIV`, `HALF_BIT`, `GAP_HALF` | 1389, 32, 100 | IR timing in clocks / carrier periods / half-bits |

At the defaults, the on-chip memory is three line buffers: 1280 × (12 + 2 + 4)
= 23,040 bits. No multipliers are used. Tracking needs a clock of at least the
sensor's pixel rate: 1280 × 1024 × 12 frames/s ≈ 15.7 Msamples/s plus blanking.

**Speed limit.** A robot is tracked only while it moves at most half its tag
per frame. A 6 × 4 cm tag at 12 frames/s allows 2–3 cm per frame, which is
0.9–1.3 km/h. A robot at 3.8 km/h moves about 8.8 cm per frame and would be
lost. To track faster robots, use a higher frame rate or a larger tag.

Other limits:
* The centre is the middle of the bounding box, so any blue in the trust
  region pulls it.
* The leader only drives straight.
* Nothing detects collisions or obstacles.

## Where this design departs from or goes beyond its source description

These parts of the design follow the source description:
* the four-sample window
* the basic and predicted colour tests
* the three-line filter
* the docking threshold
* the four-times trust region based on half-length motion
* the three parallel localization and driving cores
* the leader's scenario
* encrypted TV-remote commands
* white for confirmed colour and red trust regions on the monitor

These are this design's own choices, and each file's header says which:
* all widths, thresholds, delays and the error-table format
* subtracting the error term (the source writes "±")
* the line-by-line meaning of the green start/end marking
* the loss rule, and holding the tag size measured at lock
* the wedge geometry and steering rule
* the RC-5 framing and XOR key
* round-robin sharing of the IR line
* the arena layout

The leader control also reads the two followers' track records. It needs them
to start only when all three robots are locked, and to halt each follower in
the goal area. In the source's block diagram, only the leader's own
localization feeds the leader control. The leader's go/halt signals then feed
the followers.

Not included:
* the camera itself
* the PLL
* the frame buffer and scaler that show the overlay on a monitor
* the IR emitter

## Simulating

Each block has a self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ct_pkg.sv tb/tb_localization.sv --top-module tb_localization
./obj_dir/Vtb_localization
```

End-to-end tests share `tb/ct_bench.sv`, which contains:
* a camera model (`tb/scene_camera.sv`) that renders the tagged robots as a
  raw Bayer stream with sensor noise, specks, a shaded part of each tag and a
  blue floor mark without cloth
* three robot models (`tb/eyebot_model.sv`) that decode the IR envelope and
  move each frame

The bench checks:
* every tracked position against the rendered one
* that the leader starts exactly `START_DELAY` frames after lock
* that the wedge is held
* that all robots end stopped in the goal area

It also counts each mechanism: locking, tracking, predicted decisions,
filtered pixels, green-marking rejections, slot waits, steering, halts and IR
queueing. It fails if any mechanism never happens.

* `tb/tb_ct_top.sv` runs on a 320 × 256 image with short IR timing. It takes
  about 57 frames and a few seconds.
* `tb/tb_ct_speed.sv` tests the speed limit at 320 × 256. The bench moves
  the robots itself. The leader moves half a tag height per frame and must
  stay tracked. It then makes one step of 2.2 tag heights, which is 3.8 km/h at
  12 frames/s with a 4 cm tag. The core must report it lost and fall back to
  the docking area. Put back into the docking area, the leader must lock again.
* `tb/tb_ct_top_full.sv` runs `ct_top` with every parameter at its default
  (1280 × 1024, 50 MHz IR timing). It takes about 86 frames and a little over
  two minutes of simulation.

The simulator used is two-state, so every register that is read is reset or
written before use.
