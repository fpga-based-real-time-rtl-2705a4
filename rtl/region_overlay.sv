// region_overlay: monitor picture of the tracking result.
//
// For every pixel of the filtered class stream this block produces the colour
// handed to the display path: red on the outline of each robot's search
// window (the trust region of a locked robot, the docking area of one that is
// not), full-scale grey (white) where green or blue has been confirmed, black
// elsewhere. The display path itself (frame buffer, scaling to the monitor)
// is outside this design.
//
// Interface: in_s/in_cls from the noise filter and the three search windows;
// out_s/rgb one clock later, 10 bits per colour channel, {R, G, B}.
//
// Showing confirmed colour at full grey and drawing the trust regions in red
// are the document's; drawing the docking areas, the outline width of one
// pixel and the 10-bit channels are this design's choices.
module region_overlay
  import ct_pkg::*;
#(
  parameter int unsigned CH_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  strm_t             in_s,
  input  cls_t              in_cls,
  input  rect_t             win [NUM_ROBOTS],
  output strm_t             out_s,
  output logic [3*CH_W-1:0] rgb
);

  localparam logic [CH_W-1:0] FULL = '1;

  function automatic logic on_border(coord_t x, coord_t y, rect_t r);
    return in_rect(x, y, r) &&
           (x == r.x0 || x == r.x1 || y == r.y0 || y == r.y1);
  endfunction

  logic border;
  always_comb begin
    border = 1'b0;
    for (int k = 0; k < NUM_ROBOTS; k++)
      border = border || on_border(in_s.x, in_s.y, win[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_s <= '0;
      rgb   <= '0;
    end else begin
      out_s <= in_s;
      if (!in_s.valid)           rgb <= '0;
      else if (border)           rgb <= {FULL, {CH_W{1'b0}}, {CH_W{1'b0}}};
      else if (in_cls.g || in_cls.b) rgb <= {FULL, FULL, FULL};
      else                       rgb <= '0;
    end
  end

endmodule
