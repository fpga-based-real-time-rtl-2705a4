// raw_capture: pixel coordinates for the raw camera stream.
//
// The CMOS sensor delivers its image row by row with a frame-valid and a
// line-valid strobe and one raw Bayer sample per clock while both are high.
// This block counts columns within a line and lines within a frame and turns
// the strobes into the pipeline's sideband: a pixel with its (x, y), a
// start-of-frame event on the rising edge of frame-valid and an end-of-frame
// event on its falling edge. The sample itself is registered alongside.
//
// Interface: fval/lval/pix_in from the sensor, sampled on clk; out_s and
// out_pix follow one clock later. Lines and columns beyond the image size are
// dropped. The document names only the 1280 x 1024 sensor; the strobe-style
// interface and the one-cycle latency are this design's choices.
module raw_capture
  import ct_pkg::*;
#(
  parameter int unsigned IMG_W = 1280,
  parameter int unsigned IMG_H = 1024,
  parameter int unsigned PIX_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fval,
  input  logic             lval,
  input  logic [PIX_W-1:0] pix_in,
  output strm_t            out_s,
  output logic [PIX_W-1:0] out_pix
);

  logic   fval_q, lval_q;
  coord_t xcnt, ycnt;
  logic   sof, eol;
  coord_t cur_x, cur_y;

  assign sof   = fval && !fval_q;
  assign eol   = fval_q && lval_q && !lval;
  // Position of the sample arriving now (a frame may start with a line).
  assign cur_x = (sof || eol) ? '0 : xcnt;
  assign cur_y = sof ? '0 : (eol ? ycnt + 1'b1 : ycnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_q  <= 1'b0;
      lval_q  <= 1'b0;
      xcnt    <= '0;
      ycnt    <= '0;
      out_s   <= '0;
      out_pix <= '0;
    end else begin
      fval_q    <= fval;
      lval_q    <= lval;
      out_s     <= '0;
      out_pix   <= pix_in;
      out_s.sof <= sof;
      out_s.eof <= !fval && fval_q;
      xcnt      <= cur_x;
      ycnt      <= cur_y;
      if (fval && lval) begin
        if (32'(cur_x) < IMG_W && 32'(cur_y) < IMG_H) begin
          out_s.valid <= 1'b1;
          out_s.x     <= cur_x;
          out_s.y     <= cur_y;
        end
        xcnt <= cur_x + 1'b1;
      end
    end
  end

endmodule
