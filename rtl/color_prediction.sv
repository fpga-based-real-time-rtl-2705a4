// color_prediction: green/blue classification of the raw Bayer image.
//
// Every incoming raw sample closes a 2x2 window with the sample to its left and
// the two samples above them (one scan line back, from a line buffer). Whatever
// the window's position in the Bayer mosaic, it holds one red, one blue and two
// green samples; the Bayer phase of the current sample tells which is which.
// The window is then classified:
//
//   green: min(g1, g2) > max(r, b)
//   blue : b > max(r, g1, g2)
//
// Colour prediction relaxes these tests where the same class was found at the
// same column on the line above: r and b (for green) or r and max(g1, g2) (for
// blue) are first reduced by an error term. The error terms are looked up by
// the strength level of the value they are taken from (its top LEV_BITS bits),
// so bright and dark surfaces can be given different margins; they are inputs
// so that they can be calibrated on the real scene. The classes of the current
// line are kept in a second line buffer for the next line's prediction.
//
// Timing: one pixel per clock at most, two clocks from in_s to out_s; sof/eof
// events travel with the same latency. Pixels on the first row or first column
// of the image have no complete window and are classified as neither.
//
// From the document: the four-pixel neighbourhood, the two basic tests, the
// relaxation by level-dependent errors when the pixel above had the class.
// This design's choices: subtracting the error (the document writes "+/-"),
// four strength levels, the window anchored at the current sample, the default
// mosaic phase (green-red on even lines starting with green) set by BAYER_OFFSET.
module color_prediction
  import ct_pkg::*;
#(
  parameter int unsigned IMG_W        = 1280,
  parameter int unsigned PIX_W        = 12,
  parameter int unsigned LEV_BITS     = 2,
  parameter logic [1:0]  BAYER_OFFSET = 2'b00,  // [0] flips column, [1] flips row parity
  localparam int unsigned NLEV        = 1 << LEV_BITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  strm_t                      in_s,
  input  logic [PIX_W-1:0]           in_pix,
  input  logic [NLEV-1:0][PIX_W-1:0] d_r,    // red error per strength level
  input  logic [NLEV-1:0][PIX_W-1:0] d_g,    // green error per strength level
  input  logic [NLEV-1:0][PIX_W-1:0] d_b,    // blue error per strength level
  output strm_t                      out_s,
  output cls_t                       out_cls
);

  localparam int unsigned AW = $clog2(IMG_W);
  typedef logic [PIX_W-1:0] pix_t;

  // ---------------------------------------------------------------- stage 1
  strm_t s1;
  pix_t  cur_q;        // current sample
  pix_t  up_raw;       // sample above, from the raw line buffer
  cls_t  up_cls;       // class above, from the class line buffer
  pix_t  left_q;       // previous sample on this line
  pix_t  upleft_q;     // sample above the previous one

  line_buffer #(.WIDTH(PIX_W), .DEPTH(IMG_W)) u_raw_line (
    .clk  (clk),
    .we   (in_s.valid),
    .waddr(AW'(in_s.x)),
    .wdata(in_pix),
    .re   (in_s.valid),
    .raddr(AW'(in_s.x)),
    .rdata(up_raw)
  );

  logic [1:0] up_cls_bits;
  line_buffer #(.WIDTH(2), .DEPTH(IMG_W)) u_cls_line (
    .clk  (clk),
    .we   (out_s.valid),
    .waddr(AW'(out_s.x)),
    .wdata(out_cls),
    .re   (in_s.valid),
    .raddr(AW'(in_s.x)),
    .rdata(up_cls_bits)
  );
  assign up_cls = cls_t'(up_cls_bits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1       <= '0;
      cur_q    <= '0;
      left_q   <= '0;
      upleft_q <= '0;
    end else begin
      s1 <= in_s;
      if (in_s.valid) cur_q <= in_pix;
      if (s1.valid) begin
        left_q   <= cur_q;
        upleft_q <= up_raw;
      end
    end
  end

  // ------------------------------------------------- window and classification
  pix_t r, g1, g2, b;
  logic yr, xr;

  assign yr = s1.y[0] ^ BAYER_OFFSET[1];
  assign xr = s1.x[0] ^ BAYER_OFFSET[0];

  // Even rows: G R G R ..., odd rows: B G B G ... (after BAYER_OFFSET).
  always_comb begin
    unique case ({yr, xr})
      2'b00: begin g1 = cur_q;    r = left_q;   b = up_raw;   g2 = upleft_q; end
      2'b01: begin r  = cur_q;    g1 = left_q;  g2 = up_raw;  b  = upleft_q; end
      2'b10: begin b  = cur_q;    g2 = left_q;  g1 = up_raw;  r  = upleft_q; end
      default: begin g2 = cur_q;  b = left_q;   r = up_raw;   g1 = upleft_q; end
    endcase
  end

  function automatic pix_t sat_sub(pix_t a, pix_t d);
    return (a > d) ? a - d : '0;
  endfunction

  function automatic logic [LEV_BITS-1:0] level(pix_t v);
    return v[PIX_W-1 -: LEV_BITS];
  endfunction

  pix_t gmin, gmax, r_rel, b_rel, g_rel;
  logic g_basic, b_basic, g_pred, b_pred, window_ok;
  cls_t cls;

  always_comb begin
    gmin    = (g1 < g2) ? g1 : g2;
    gmax    = (g1 < g2) ? g2 : g1;
    r_rel   = sat_sub(r,    d_r[level(r)]);
    b_rel   = sat_sub(b,    d_b[level(b)]);
    g_rel   = sat_sub(gmax, d_g[level(gmax)]);
    g_basic = (gmin > r) && (gmin > b);
    b_basic = (b > r) && (b > gmax);
    g_pred  = (gmin > r_rel) && (gmin > b_rel);
    b_pred  = (b > r_rel) && (b > g_rel);
    window_ok = (s1.x != '0) && (s1.y != '0);
    cls.g   = window_ok && (up_cls.g ? g_pred : g_basic);
    cls.b   = window_ok && (up_cls.b ? b_pred : b_basic);
  end

  // ---------------------------------------------------------------- stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_s   <= '0;
      out_cls <= '0;
    end else begin
      out_s   <= s1;
      out_cls <= s1.valid ? cls : '0;
    end
  end

endmodule
