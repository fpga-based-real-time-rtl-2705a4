// tb_region_overlay: monitor colours. Streams a small image with random classes
// and three windows; each output pixel must be red on a window outline, white
// where a class is set, black elsewhere, one clock after its input.
module tb_region_overlay;
  import ct_pkg::*;
  localparam int W = 40, H = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  strm_t in_s, out_s;
  cls_t in_cls;
  rect_t win [NUM_ROBOTS];
  logic [29:0] rgb;

  region_overlay dut (.*);

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

  int n_red = 0, n_white = 0;

  initial begin
    rst_n = 0; in_s = '0; in_cls = '0;
    win[0] = '{x0: 11'd2, x1: 11'd10, y0: 11'd3, y1: 11'd9};
    win[1] = '{x0: 11'd15, x1: 11'd25, y0: 11'd10, y1: 11'd28};
    win[2] = '{x0: 11'd30, x1: 11'd38, y0: 11'd0, y1: 11'd5};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [29:0] exp;
        bit border;
        @(negedge clk);
        in_s = '0; in_s.valid = 1; in_s.x = coord_t'(x); in_s.y = coord_t'(y);
        in_cls.g = ($urandom_range(0, 3) == 0); in_cls.b = ($urandom_range(0, 3) == 0);
        border = 0;
        for (int k = 0; k < 3; k++)
          if (x >= int'(win[k].x0) && x <= int'(win[k].x1) && y >= int'(win[k].y0) && y <= int'(win[k].y1) &&
              (x == int'(win[k].x0) || x == int'(win[k].x1) || y == int'(win[k].y0) || y == int'(win[k].y1)))
            border = 1;
        exp = border ? 30'h3FF00000 : ((in_cls.g || in_cls.b) ? 30'h3FFFFFFF : 30'h0);
        @(posedge clk); #1;
        check(rgb == exp && out_s.valid && out_s.x == coord_t'(x) && out_s.y == coord_t'(y),
              $sformatf("(%0d,%0d) rgb %h expected %h", x, y, rgb, exp));
        if (border) n_red++; else if (exp != 0) n_white++;
      end
    @(negedge clk); in_s = '0;
    @(posedge clk); #1;
    check(rgb == '0 && !out_s.valid, "black without pixel");
    check(n_red > 50 && n_white > 50, "both colours drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
