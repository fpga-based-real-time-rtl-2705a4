// ct_top: FPGA colour-tracking server for a three-robot leader-follower team.
//
// A single overhead camera streams its raw Bayer image (IMG_W x IMG_H). The
// image is never demosaicked or stored: each sample passes once through
//
//   raw_capture -> color_prediction -> noise_filter -> 3 x localization
//
// and the three localization cores (leader, follower 1, follower 2) run side
// by side on the same filtered stream, each with its own docking area. At the
// end of every frame they publish their robots' positions; the leader control
// and the two follower controls turn these into driving commands, which the
// infrared remote sends to the robots. A display stream with the confirmed
// colours and the red search windows is brought out for an external video path.
//
// Scene layout (this design's choice, after the test arena of the document):
// the three docking areas lie side by side in the bottom quarter of the image,
// the leader's in the middle; the goal area is the top quarter; the robots drive
// towards the top. Follower 1 keeps the slot left of and behind the leader,
// follower 2 the slot right of and behind it, forming a wedge.
//
// Interface: clk (one raw sample per clock at most), rst_n (asynchronous,
// active low), the sensor's fval/lval/pix, the colour error tables, the
// modulated IR output, the track records, the leader's state, and the overlay
// stream. Latency from a sample to its class is four clocks; commands follow
// the end-of-frame event by two clocks and the IR frame starts one clock later.
module ct_top
  import ct_pkg::*;
#(
  parameter int unsigned IMG_W        = 1280,
  parameter int unsigned IMG_H        = 1024,
  parameter int unsigned PIX_W        = 12,
  parameter int unsigned DOCK_THRESH  = 256,
  parameter int unsigned TRACK_THRESH = 256,
  parameter int unsigned START_DELAY  = 12,
  parameter int unsigned CARRIER_DIV  = 1389,
  parameter int unsigned HALF_BIT     = 32,
  parameter int unsigned GAP_HALF     = 100,
  localparam int unsigned NLEV        = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // camera
  input  logic                       fval,
  input  logic                       lval,
  input  logic [PIX_W-1:0]           pix,
  // colour-prediction error terms, one per strength level
  input  logic [NLEV-1:0][PIX_W-1:0] d_r,
  input  logic [NLEV-1:0][PIX_W-1:0] d_g,
  input  logic [NLEV-1:0][PIX_W-1:0] d_b,
  // infrared remote
  output logic                       ir_out,
  output logic                       ir_env,
  output logic                       ir_busy,
  output logic                       ir_sent,
  output logic [1:0]                 ir_sent_robot,
  output logic [13:0]                ir_sent_frame,
  // tracking and formation state
  output track_t                     tracks [NUM_ROBOTS],
  output logic                       frame_upd,
  output logic [NUM_ROBOTS-1:0]      ev_lock,
  output logic [NUM_ROBOTS-1:0]      ev_lost,
  output logic                       go,
  output logic [2:1]                 halt,
  output logic                       done,
  output cmd_e                       cmds [NUM_ROBOTS],
  // display path
  output strm_t                      disp_s,
  output logic [29:0]                disp_rgb
);

  // --------------------------------------------------------- scene geometry
  localparam int unsigned THIRD  = IMG_W / 3;
  localparam int unsigned MARGIN = IMG_W / 24;
  localparam int unsigned TOL    = (IMG_W / 64 > 1) ? IMG_W / 64 : 1;

  // Robot index -> docking column: leader in the middle, follower 1 left,
  // follower 2 right.
  function automatic rect_t dock_area(int col);
    rect_t r;
    r.x0 = coord_t'(col * THIRD + MARGIN);
    r.x1 = coord_t'((col + 1) * THIRD - MARGIN - 1);
    r.y0 = coord_t'(IMG_H - IMG_H / 4);
    r.y1 = coord_t'(IMG_H - 1);
    return r;
  endfunction

  rect_t dock [NUM_ROBOTS];
  rect_t goal;
  assign dock[0] = dock_area(1);
  assign dock[1] = dock_area(0);
  assign dock[2] = dock_area(2);
  assign goal    = '{x0: '0, x1: coord_t'(IMG_W - 1), y0: '0, y1: coord_t'(IMG_H / 4 - 1)};

  // ------------------------------------------------------------ pixel path
  strm_t            cap_s, cp_s, nf_s;
  logic [PIX_W-1:0] cap_pix;
  cls_t             cp_cls, nf_cls;

  raw_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_capture (
    .clk, .rst_n, .fval, .lval, .pix_in(pix), .out_s(cap_s), .out_pix(cap_pix)
  );

  color_prediction #(.IMG_W(IMG_W), .PIX_W(PIX_W)) u_predict (
    .clk, .rst_n, .in_s(cap_s), .in_pix(cap_pix), .d_r, .d_g, .d_b,
    .out_s(cp_s), .out_cls(cp_cls)
  );

  noise_filter #(.IMG_W(IMG_W)) u_filter (
    .clk, .rst_n, .in_s(cp_s), .in_cls(cp_cls), .out_s(nf_s), .out_cls(nf_cls)
  );

  // ---------------------------------------------- three localization cores
  rect_t                 search [NUM_ROBOTS];
  logic [NUM_ROBOTS-1:0] upd;

  for (genvar k = 0; k < NUM_ROBOTS; k++) begin : g_loc
    localization #(
      .IMG_W(IMG_W), .IMG_H(IMG_H),
      .DOCK_THRESH(DOCK_THRESH), .TRACK_THRESH(TRACK_THRESH)
    ) u_loc (
      .clk, .rst_n, .in_s(nf_s), .in_cls(nf_cls), .dock(dock[k]),
      .track(tracks[k]), .search(search[k]), .upd(upd[k]),
      .ev_lock(ev_lock[k]), .ev_lost(ev_lost[k])
    );
  end

  // All cores see the same end-of-frame event, so their updates coincide.
  assign frame_upd = upd[0];

  // ------------------------------------------------------ driving controls
  logic [NUM_ROBOTS-1:0] cmd_req;
  logic                  leader_waiting;

  leader_control #(.START_DELAY(START_DELAY)) u_leader (
    .clk, .rst_n, .tick(upd[0]), .trk(tracks), .goal,
    .cmd(cmds[0]), .cmd_req(cmd_req[0]), .go, .halt, .waiting(leader_waiting), .done
  );

  follower_control #(
    .SLOT_DX(-int'(THIRD)), .SLOT_DY(IMG_H / 8), .TOL(TOL)
  ) u_follower1 (
    .clk, .rst_n, .tick(upd[1]), .own(tracks[1]), .leader(tracks[0]),
    .go, .halt(halt[1]), .leader_waiting, .cmd(cmds[1]), .cmd_req(cmd_req[1])
  );

  follower_control #(
    .SLOT_DX(int'(THIRD)), .SLOT_DY(IMG_H / 8), .TOL(TOL)
  ) u_follower2 (
    .clk, .rst_n, .tick(upd[2]), .own(tracks[2]), .leader(tracks[0]),
    .go, .halt(halt[2]), .leader_waiting, .cmd(cmds[2]), .cmd_req(cmd_req[2])
  );

  // -------------------------------------------------------- infrared remote
  ir_remote #(
    .CARRIER_DIV(CARRIER_DIV), .HALF_BIT(HALF_BIT), .GAP_HALF(GAP_HALF)
  ) u_ir (
    .clk, .rst_n, .req(cmd_req), .cmd(cmds),
    .ir_out, .ir_env, .busy(ir_busy), .sent(ir_sent),
    .sent_robot(ir_sent_robot), .sent_frame(ir_sent_frame)
  );

  // ----------------------------------------------------------- display path
  region_overlay #(.CH_W(10)) u_overlay (
    .clk, .rst_n, .in_s(nf_s), .in_cls(nf_cls), .win(search),
    .out_s(disp_s), .rgb(disp_rgb)
  );

endmodule
