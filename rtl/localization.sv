// localization: one robot's docking detection and trust-region tracker.
//
// Each robot wears a blue tag on a green cloth. A core starts in the docking
// state: it counts the blue pixels inside its robot's docking area, and locks
// once a frame's count is over DOCK_THRESH. While docking, the green cloth
// marks where counting starts and stops on each scan line: blue pixels count
// only after a green pixel has been seen on that line inside the area, and
// counting on the line ends at the first green pixel after a blue one.
//
// The tag's size is the bounding box of the blue pixels counted in the frame
// that locks, when the whole tag stands in the docking area; it is held while
// the robot is tracked. Once locked, the core tracks: each frame it counts all
// blue pixels inside the trust region and takes the middle of their bounding
// box as the centre. The tag's centre may move by at most half the tag's width
// (height) between frames, so the next trust region is centred on the new
// centre and is twice the tag's width and height (four times its area),
// clipped to the image. The size is not re-measured inside the trust region:
// a tag cut by the region's edge would shrink the next region, and the one
// after it, until the robot is lost. If a frame's count in the trust
// region is not over TRACK_THRESH the robot is lost and the core returns to
// docking; the robot must come back through its docking area.
//
// Interface: the filtered pixel stream (in_s, in_cls) and the docking area.
// The track record is updated at each end-of-frame event, and upd pulses for
// one clock then; ev_lock / ev_lost pulse with it when the state changes.
// search is the window used in the current frame.
//
// The docking threshold, the trust-region rule (half-length motion, four
// times the tag) and the green start/end marking are the document's; how the
// green marking works along a line, the bounding box at lock as tag size, the
// lost rule and the threshold values are this design's choices.
module localization
  import ct_pkg::*;
#(
  parameter int unsigned IMG_W        = 1280,
  parameter int unsigned IMG_H        = 1024,
  parameter int unsigned DOCK_THRESH  = 256,
  parameter int unsigned TRACK_THRESH = 256,
  parameter bit          GREEN_GATE   = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  strm_t  in_s,
  input  cls_t   in_cls,
  input  rect_t  dock,
  output track_t track,
  output rect_t  search,
  output logic   upd,
  output logic   ev_lock,
  output logic   ev_lost
);

  localparam int unsigned CNT_W = $clog2(IMG_W * IMG_H + 1);

  typedef enum logic {S_DOCK, S_TRACK} state_e;
  typedef enum logic [1:0] {L_WAIT, L_RUN, L_DONE} line_e;

  state_e             state;
  line_e              line_st;
  coord_t             line_y;
  logic               line_blue;
  logic [CNT_W-1:0]   count;
  coord_t             minx, maxx, miny, maxy;

  assign search = (state == S_TRACK) ? track.region : dock;

  logic   inwin, new_line, counts;
  line_e  line_now;

  always_comb begin
    inwin    = in_s.valid && in_rect(in_s.x, in_s.y, search);
    new_line = in_s.y != line_y;
    line_now = new_line ? L_WAIT : line_st;
    counts   = 1'b0;
    if (inwin && in_cls.b) begin
      counts = (state == S_TRACK) || !GREEN_GATE || (line_now == L_RUN);
    end
  end

  // Result of the frame that is closing.
  logic             found;
  coord_t           ncx, ncy, nw, nh, sw, sh;
  rect_t            nreg;
  int               rx0, rx1, ry0, ry1;

  always_comb begin
    found = (state == S_TRACK) ? (32'(count) > TRACK_THRESH)
                               : (32'(count) > DOCK_THRESH);
    ncx   = coord_t'((32'(minx) + 32'(maxx)) >> 1);
    ncy   = coord_t'((32'(miny) + 32'(maxy)) >> 1);
    nw    = maxx - minx + 1'b1;
    nh    = maxy - miny + 1'b1;
    sw    = (state == S_TRACK) ? track.w : nw;
    sh    = (state == S_TRACK) ? track.h : nh;
    rx0   = int'(ncx) - int'(sw);
    rx1   = int'(ncx) + int'(sw);
    ry0   = int'(ncy) - int'(sh);
    ry1   = int'(ncy) + int'(sh);
    nreg.x0 = (rx0 < 0) ? '0 : coord_t'(rx0);
    nreg.y0 = (ry0 < 0) ? '0 : coord_t'(ry0);
    nreg.x1 = (rx1 > int'(IMG_W) - 1) ? coord_t'(IMG_W - 1) : coord_t'(rx1);
    nreg.y1 = (ry1 > int'(IMG_H) - 1) ? coord_t'(IMG_H - 1) : coord_t'(ry1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DOCK;
      line_st   <= L_WAIT;
      line_y    <= '0;
      line_blue <= 1'b0;
      count     <= '0;
      minx      <= '1;
      maxx      <= '0;
      miny      <= '1;
      maxy      <= '0;
      track     <= '0;
      upd       <= 1'b0;
      ev_lock   <= 1'b0;
      ev_lost   <= 1'b0;
    end else begin
      upd     <= 1'b0;
      ev_lock <= 1'b0;
      ev_lost <= 1'b0;

      if (in_s.sof) begin
        count <= '0;
        minx  <= '1;
        maxx  <= '0;
        miny  <= '1;
        maxy  <= '0;
      end else if (in_s.eof) begin
        upd <= 1'b1;
        if (found) begin
          track.locked <= 1'b1;
          track.cx     <= ncx;
          track.cy     <= ncy;
          track.w      <= sw;
          track.h      <= sh;
          track.region <= nreg;
          state        <= S_TRACK;
          ev_lock      <= (state == S_DOCK);
        end else if (state == S_TRACK) begin
          track.locked <= 1'b0;
          state        <= S_DOCK;
          ev_lost      <= 1'b1;
        end
      end else if (counts) begin
        count <= count + 1'b1;
        if (in_s.x < minx) minx <= in_s.x;
        if (in_s.x > maxx) maxx <= in_s.x;
        if (in_s.y < miny) miny <= in_s.y;
        if (in_s.y > maxy) maxy <= in_s.y;
      end

      // Green start/end marking along the current line (docking only).
      if (in_s.valid) begin
        line_y <= in_s.y;
        line_st <= line_now;
        if (new_line) line_blue <= 1'b0;
        if (inwin) begin
          if (in_cls.b) begin
            if (line_now == L_RUN) line_blue <= 1'b1;
          end else if (in_cls.g) begin
            if (line_now == L_WAIT) line_st <= L_RUN;
            else if (line_now == L_RUN && line_blue && !new_line) line_st <= L_DONE;
          end
        end
      end
    end
  end

endmodule
