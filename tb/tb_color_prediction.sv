// tb_color_prediction: compares the classifier with a reference model.
//
// Frames of a small raw image are streamed in scan order. Each frame holds a
// random background, a green patch, and a blue patch whose lower half is
// "shaded": there blue is slightly below green, so it is blue only through
// the prediction rule (the pixel above was blue and the error term bridges the
// gap). The reference model rebuilds each 2x2 window from the stored frame,
// applies the basic and relaxed tests with the same error tables and tracks
// the class of the line above. Every output pixel, its coordinates and the
// two-clock latency are checked, and the test counts how often prediction
// changed a decision.
module tb_color_prediction;
  import ct_pkg::*;
  localparam int W = 24, H = 16, PW = 12, NLEV = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  strm_t in_s, out_s;
  logic [PW-1:0] in_pix;
  logic [NLEV-1:0][PW-1:0] d_r, d_g, d_b;
  cls_t out_cls;

  color_prediction #(.IMG_W(W), .PIX_W(PW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   raw [H][W];
  cls_t ref_cls [H][W];
  longint t_in [H][W];
  longint cyc = 0;
  int   n_pred = 0, n_out = 0;
  always @(posedge clk) cyc++;

  function automatic int lvl(int v);
    return v >> (PW - 2);
  endfunction
  function automatic int relax(int v, int d);
    return (v > d) ? v - d : 0;
  endfunction
  function automatic int maxi(int a, int b); return a > b ? a : b; endfunction
  function automatic int mini(int a, int b); return a < b ? a : b; endfunction

  // Channel at (x, y): even rows G R G R, odd rows B G B G.
  function automatic int chan(int x, int y);  // 0 r, 1 g, 2 b
    if (y % 2 == 0) return (x % 2 == 0) ? 1 : 0;
    return (x % 2 == 0) ? 2 : 1;
  endfunction

  function automatic cls_t ref_model(int x, int y);
    int r, b, g[$], gmin, gmax, rr, br, gr;
    bit gb, bb, gp, bp;
    cls_t c;
    c = '0;
    if (x == 0 || y == 0) return c;
    for (int dy = -1; dy <= 0; dy++)
      for (int dx = -1; dx <= 0; dx++) begin
        int v, ch;
        v = raw[y+dy][x+dx]; ch = chan(x+dx, y+dy);
        if (ch == 0) r = v; else if (ch == 2) b = v; else g.push_back(v);
      end
    gmin = mini(g[0], g[1]); gmax = maxi(g[0], g[1]);
    rr = relax(r, int'(d_r[lvl(r)]));
    br = relax(b, int'(d_b[lvl(b)]));
    gr = relax(gmax, int'(d_g[lvl(gmax)]));
    gb = gmin > r && gmin > b;
    bb = b > r && b > gmax;
    gp = gmin > rr && gmin > br;
    bp = b > rr && b > gr;
    c.g = ref_cls[y-1][x].g ? gp : gb;
    c.b = ref_cls[y-1][x].b ? bp : bb;
    if (c.g != gb || c.b != bb) n_pred++;
    return c;
  endfunction

  // Scene colour -> raw sample.
  function automatic int scene(int x, int y, int f);
    int r, g, b, ch;
    r = 800 + $urandom_range(0, 300); g = 800 + $urandom_range(0, 300); b = 800 + $urandom_range(0, 300);
    if (x >= 3 && x < 9 && y >= 2 && y < 10) begin g = 2600; r = 900; b = 1000; end
    if (x >= 12 + f % 3 && x < 20 + f % 3 && y >= 3 && y < 13) begin
      r = 700; g = 1500;
      b = (y < 8) ? 2400 : 1500 - 20;   // shaded lower half: b just below g
    end
    ch = chan(x, y);
    return ch == 0 ? r : (ch == 1 ? g : b);
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_s.valid) begin
      int x, y;
      x = int'(out_s.x); y = int'(out_s.y);
      n_out++;
      ref_cls[y][x] = ref_model(x, y);
      check(out_cls == ref_cls[y][x],
            $sformatf("class (%0d,%0d): got g%0d b%0d expected g%0d b%0d", x, y,
                      out_cls.g, out_cls.b, ref_cls[y][x].g, ref_cls[y][x].b));
      check(cyc - t_in[y][x] == 2, $sformatf("latency %0d", cyc - t_in[y][x]));
    end
  end

  initial begin
    rst_n = 0; in_s = '0; in_pix = 0;
    for (int n = 0; n < NLEV; n++) begin
      d_r[n] = PW'(64 + 32 * n); d_g[n] = PW'(100 + 16 * n); d_b[n] = PW'(48 + 8 * n);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk); in_s = '0; in_s.sof = 1;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          raw[y][x] = scene(x, y, f);
          in_s = '0; in_s.valid = 1; in_s.x = coord_t'(x); in_s.y = coord_t'(y);
          in_pix = PW'(raw[y][x]);
          t_in[y][x] = cyc;
        end
        @(negedge clk); in_s = '0;
        @(negedge clk);
      end
      @(negedge clk); in_s = '0; in_s.eof = 1;
      @(negedge clk); in_s = '0;
      repeat (4) @(negedge clk);
    end
    check(n_out == 3 * W * H, $sformatf("output count %0d", n_out));
    check(n_pred > 0, $sformatf("prediction changed %0d decisions", n_pred));
    $display("prediction changed %0d decisions", n_pred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
