// ct_pkg: types and constants shared by the colour-tracking server.
//
// The server reads a raw Bayer image line by line, classifies every pixel
// neighbourhood as green and/or blue, filters the classes over three scan
// lines, tracks three robots in parallel and sends them infrared commands.
// This package holds the pixel-stream sideband, the rectangle and track
// records that the localization cores publish, and the command codes that the
// driving controls hand to the infrared remote.
//
// Coordinates are 11 bits wide, enough for the 1280 x 1024 sensor image and
// for any smaller test image. The command set (stop, forward, veer left, veer
// right) is this design's own choice: the robots are only said to be driven
// forward, made to follow and stopped.
package ct_pkg;

  localparam int unsigned COORD_W = 11;
  typedef logic [COORD_W-1:0] coord_t;

  // Sideband of the pixel stream. sof/eof are events that may come with or
  // without a pixel; x/y belong to the pixel when valid is set.
  typedef struct packed {
    logic   valid;
    logic   sof;
    logic   eof;
    coord_t x;
    coord_t y;
  } strm_t;

  // Per-pixel classes produced by colour prediction and the noise filter.
  typedef struct packed {
    logic g;
    logic b;
  } cls_t;

  // Closed rectangle [x0, x1] x [y0, y1] in image coordinates.
  typedef struct packed {
    coord_t x0;
    coord_t x1;
    coord_t y0;
    coord_t y1;
  } rect_t;

  // What a localization core reports once per frame.
  typedef struct packed {
    logic   locked;  // robot has been found in its docking area and is tracked
    coord_t cx;      // centre of the blue tag
    coord_t cy;
    coord_t w;       // tag size: its bounding box in the frame that locked
    coord_t h;
    rect_t  region;  // trust region searched in the next frame
  } track_t;

  typedef enum logic [1:0] {
    CMD_STOP  = 2'd0,
    CMD_FWD   = 2'd1,
    CMD_LEFT  = 2'd2,  // drive forward while veering left
    CMD_RIGHT = 2'd3   // drive forward while veering right
  } cmd_e;

  localparam int unsigned NUM_ROBOTS = 3;

  function automatic logic in_rect(coord_t x, coord_t y, rect_t r);
    return (x >= r.x0) && (x <= r.x1) && (y >= r.y0) && (y <= r.y1);
  endfunction

endpackage
