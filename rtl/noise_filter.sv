// noise_filter: three-line continuity filter for the pixel classes.
//
// A pixel keeps its green (blue) class only if the pixels at the same column
// on the current scan line and on the two lines before it are green (blue)
// too. Isolated specks left by colour prediction vanish, while a tag that is
// several lines tall survives with its top two lines trimmed.
//
// The classes of the previous two lines are held in one line buffer of four
// bits per column: each pixel reads {line-1, line-2} for its column and writes
// back {current, line-1}. Timing: one pixel per clock, one clock from in_s to
// out_s, sof/eof delayed alike. The output carries the coordinates of the
// current (bottom) pixel. Rows 0 and 1 of a frame have no two lines above and
// are cleared.
//
// The three-line AND is the document's rule; the single shared buffer, the
// output coordinate convention and the clearing of the first two rows are
// this design's choices.
module noise_filter
  import ct_pkg::*;
#(
  parameter int unsigned IMG_W = 1280
) (
  input  logic  clk,
  input  logic  rst_n,
  input  strm_t in_s,
  input  cls_t  in_cls,
  output strm_t out_s,
  output cls_t  out_cls
);

  localparam int unsigned AW = $clog2(IMG_W);

  strm_t      s1;
  cls_t       cur_q;
  logic [3:0] hist;       // {class on line-1, class on line-2} at this column
  cls_t       up1, up2;

  line_buffer #(.WIDTH(4), .DEPTH(IMG_W)) u_hist (
    .clk  (clk),
    .we   (s1.valid),
    .waddr(AW'(s1.x)),
    .wdata({cur_q, up1}),
    .re   (in_s.valid),
    .raddr(AW'(in_s.x)),
    .rdata(hist)
  );

  assign up1 = cls_t'(hist[3:2]);
  assign up2 = cls_t'(hist[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '0;
      cur_q <= '0;
    end else begin
      s1    <= in_s;
      cur_q <= in_s.valid ? in_cls : '0;
    end
  end

  logic rows_ok;
  assign rows_ok = (s1.y >= coord_t'(2));

  // Output is combinational on the registered stage: one clock of latency.
  always_comb begin
    out_s     = s1;
    out_cls.g = s1.valid && rows_ok && cur_q.g && up1.g && up2.g;
    out_cls.b = s1.valid && rows_ok && cur_q.b && up1.b && up2.b;
  end

endmodule
