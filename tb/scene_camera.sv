// scene_camera: behavioural model of the overhead CMOS camera (testbench only).
//
// Renders, every frame, an arena seen from above as a raw Bayer stream: a
// warm grey floor (red above green and blue) with random sensor noise and rare single-sample blue specks, and
// for each robot a blue tag of TAG_W x TAG_H samples on a green cloth BORDER
// samples wide, and a blue floor mark without cloth in the corner of the
// middle docking area. The lower quarter of each tag is "shaded": blue there is no
// brighter than green, so it is recognised only through colour prediction.
// The mosaic is G R G R on even lines and B G B G on odd lines. Timing: frame
// valid rises VBLANK clocks after the previous frame, each line is IMG_W
// samples with line valid high followed by HBLANK idle clocks. Robot positions
// (tag centres) are sampled at the start of each frame; frame_done pulses
// after frame valid falls.
module scene_camera #(
  parameter int IMG_W  = 1280,
  parameter int IMG_H  = 1024,
  parameter int PIX_W  = 12,
  parameter int TAG_W  = 48,
  parameter int TAG_H  = 32,
  parameter int BORDER = 12,
  parameter int HBLANK = 16,
  parameter int VBLANK = 200,
  parameter int MARK_X = IMG_W / 3 + IMG_W / 24 + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  int               rx [3],
  input  int               ry [3],
  output logic             fval,
  output logic             lval,
  output logic [PIX_W-1:0] pix,
  output logic             frame_done,
  output int               frames
);

  int hc, vc, blank;
  int fx [3], fy [3];

  function automatic logic [PIX_W-1:0] sample(int x, int y);
    int r, g, b;
    r = 1500 + int'($urandom_range(0, 150));
    g = 900 + int'($urandom_range(0, 150));
    b = 900 + int'($urandom_range(0, 150));
    if ($urandom_range(0, 2999) == 0) b = 3000;   // speck
    // A blue floor mark without green cloth in the leader's docking area.
    if (x >= MARK_X && x < MARK_X + TAG_W / 3 && y >= IMG_H - TAG_H / 2 - 2 && y < IMG_H - 2) begin
      r = 600; g = 700; b = 2400;
    end
    for (int k = 0; k < 3; k++) begin
      int dx, dy;
      dx = x - (fx[k] - TAG_W / 2);
      dy = y - (fy[k] - TAG_H / 2);
      if (dx >= -BORDER && dx < TAG_W + BORDER && dy >= -BORDER && dy < TAG_H + BORDER) begin
        if (dx >= 0 && dx < TAG_W && dy >= 0 && dy < TAG_H) begin
          r = 600; g = 1200;
          b = (dy >= TAG_H - TAG_H / 4) ? 1200 : 2400;
        end else begin
          r = 700; g = 2200; b = 900;
        end
      end
    end
    if (y % 2 == 0) return PIX_W'((x % 2 == 0) ? g : r);
    return PIX_W'((x % 2 == 0) ? b : g);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval <= 0; lval <= 0; pix <= '0; frame_done <= 0;
      hc <= 0; vc <= 0; blank <= VBLANK; frames <= 0;
    end else begin
      frame_done <= 0;
      if (blank > 0) begin
        blank <= blank - 1;
        if (blank == 1) begin
          fval <= 1; hc <= 0; vc <= 0;
          for (int k = 0; k < 3; k++) begin fx[k] = rx[k]; fy[k] = ry[k]; end
        end
      end else if (vc < IMG_H) begin
        if (hc < IMG_W) begin
          lval <= 1;
          pix  <= sample(hc, vc);
        end else begin
          lval <= 0;
        end
        if (hc == IMG_W + HBLANK - 1) begin
          hc <= 0; vc <= vc + 1;
        end else begin
          hc <= hc + 1;
        end
      end else begin
        fval <= 0; lval <= 0;
        frame_done <= 1;
        frames <= frames + 1;
        blank <= VBLANK;
      end
    end
  end

endmodule
