// tb_raw_capture: checks coordinates, data and frame events of the capture
// stage. Frames of a small image are sent with line and frame blanking, with
// extra lines and columns beyond the image size (which must be dropped), and
// every output pixel is compared with the position and sample that were sent
// one clock earlier.
module tb_raw_capture;
  import ct_pkg::*;
  localparam int W = 10, H = 6, PW = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, fval, lval;
  logic [PW-1:0] pix_in, out_pix;
  strm_t out_s;

  raw_capture #(.IMG_W(W), .IMG_H(H), .PIX_W(PW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected pixel for the sample sent in the previous clock.
  logic          exp_valid;
  int            exp_x, exp_y;
  logic [PW-1:0] exp_pix;
  int            n_pix, n_sof, n_eof;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (exp_valid) begin
      check(out_s.valid && out_s.x == coord_t'(exp_x) && out_s.y == coord_t'(exp_y) && out_pix == exp_pix,
            $sformatf("pixel (%0d,%0d): got v=%0d (%0d,%0d) %h", exp_x, exp_y, out_s.valid, out_s.x, out_s.y, out_pix));
      n_pix++;
    end else begin
      check(!out_s.valid, "no pixel expected");
    end
    if (out_s.sof) n_sof++;
    if (out_s.eof) n_eof++;
  end

  task automatic send_frame(int lines, int cols, bit lval_with_fval);
    @(negedge clk); fval = 1; exp_valid = 0;
    for (int y = 0; y < lines; y++) begin
      if (!(lval_with_fval && y == 0)) begin
        @(negedge clk); exp_valid = 0; lval = 0;
      end
      for (int x = 0; x < cols; x++) begin
        if (!(lval_with_fval && y == 0 && x == 0)) @(negedge clk);
        lval = 1; pix_in = PW'($urandom);
        exp_valid = (x < W) && (y < H); exp_x = x; exp_y = y; exp_pix = pix_in;
      end
      @(negedge clk); lval = 0; exp_valid = 0;
      repeat (3) @(negedge clk);
    end
    fval = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; fval = 0; lval = 0; pix_in = 0; exp_valid = 0;
    n_pix = 0; n_sof = 0; n_eof = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_frame(H, W, 1'b0);
    send_frame(H + 2, W + 3, 1'b0);
    send_frame(H, W, 1'b0);
    check(n_pix == 3 * W * H, $sformatf("pixel count %0d", n_pix));
    check(n_sof == 3 && n_eof == 3, $sformatf("frame events sof=%0d eof=%0d", n_sof, n_eof));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
