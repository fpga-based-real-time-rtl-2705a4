// tb_noise_filter: three-line AND filter against a reference model.
// Random class maps (dense enough that long vertical runs occur, sparse enough
// that isolated specks occur) are streamed; each output must equal the AND of
// the input class at the same column on its own line and the two lines above,
// be cleared on rows 0 and 1, and appear one clock after its input.
module tb_noise_filter;
  import ct_pkg::*;
  localparam int W = 20, H = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  strm_t in_s, out_s;
  cls_t in_cls, out_cls;

  noise_filter #(.IMG_W(W)) dut (.*);

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

  cls_t   map [H][W];
  longint t_in [H][W];
  longint cyc = 0;
  int     n_out = 0, n_removed = 0, n_kept = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_s.valid) begin
      int x, y;
      cls_t e;
      x = int'(out_s.x); y = int'(out_s.y);
      e = '0;
      if (y >= 2) begin
        e.g = map[y][x].g && map[y-1][x].g && map[y-2][x].g;
        e.b = map[y][x].b && map[y-1][x].b && map[y-2][x].b;
      end
      if ((map[y][x].g && !e.g) || (map[y][x].b && !e.b)) n_removed++;
      if (e.g || e.b) n_kept++;
      n_out++;
      check(out_cls == e, $sformatf("(%0d,%0d) got %b expected %b", x, y, out_cls, e));
      check(cyc - t_in[y][x] == 1, "latency");
    end
  end

  initial begin
    rst_n = 0; in_s = '0; in_cls = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk); in_s = '0; in_s.sof = 1;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          map[y][x].g = ($urandom_range(0, 99) < 75);
          map[y][x].b = ($urandom_range(0, 99) < 60);
          in_s = '0; in_s.valid = 1; in_s.x = coord_t'(x); in_s.y = coord_t'(y);
          in_cls = map[y][x];
          t_in[y][x] = cyc;
        end
        @(negedge clk); in_s = '0; in_cls = '0;
      end
      @(negedge clk); in_s = '0; in_s.eof = 1;
      @(negedge clk); in_s = '0;
    end
    repeat (3) @(negedge clk);
    check(n_out == 3 * W * H, "output count");
    check(n_removed > 0 && n_kept > 0, $sformatf("removed %0d kept %0d", n_removed, n_kept));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
