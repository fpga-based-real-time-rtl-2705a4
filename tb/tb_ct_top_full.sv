// tb_ct_top_full: end-to-end run of the tracking server at its default size.
// The server is instantiated with all parameters at their defaults (1280 x
// 1024 raw image, 50 MHz infrared timing); ct_bench renders the arena at that
// size and runs the complete formation scenario.
module tb_ct_top_full;
  import ct_pkg::*;

  logic        clk, rst_n, fval, lval;
  logic [11:0] pix;
  logic [3:0][11:0] d_r, d_g, d_b;
  logic        ir_out, ir_env, ir_busy, ir_sent, frame_upd, go, done;
  logic [1:0]  ir_sent_robot;
  logic [13:0] ir_sent_frame;
  track_t      tracks [3];
  logic [2:0]  ev_lock, ev_lost;
  logic [2:1]  halt;
  cmd_e        cmds [3];
  strm_t       disp_s;
  logic [29:0] disp_rgb;

  ct_top dut (.*);

  // Probes for counting the design's mechanisms.
  logic pred_fire, cp_b, nf_b, ir_wait, gate_reject;
  assign pred_fire = dut.u_predict.s1.valid && dut.u_predict.window_ok &&
                     ((dut.u_predict.up_cls.g && (dut.u_predict.g_pred != dut.u_predict.g_basic)) ||
                      (dut.u_predict.up_cls.b && (dut.u_predict.b_pred != dut.u_predict.b_basic)));
  assign cp_b    = dut.cp_s.valid && dut.cp_cls.b;
  assign nf_b    = dut.nf_s.valid && dut.nf_cls.b;
  assign ir_wait = ir_busy && (|dut.u_ir.pend);
  assign gate_reject =
      (dut.g_loc[0].u_loc.inwin && dut.g_loc[0].u_loc.in_cls.b && !dut.g_loc[0].u_loc.counts) ||
      (dut.g_loc[1].u_loc.inwin && dut.g_loc[1].u_loc.in_cls.b && !dut.g_loc[1].u_loc.counts) ||
      (dut.g_loc[2].u_loc.inwin && dut.g_loc[2].u_loc.in_cls.b && !dut.g_loc[2].u_loc.counts);

  ct_bench #(.IMG_W(1280), .IMG_H(1024), .TAG_W(48), .TAG_H(32), .BORDER(12), .SPEED(12), .HALF(1389 * 32), .HBLANK(16), .VBLANK(200), .START_DELAY(12), .MAX_FRAMES(150)) bench (.*);
endmodule
