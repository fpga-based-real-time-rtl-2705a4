// tb_ct_top: end-to-end run of the tracking server on a 320 x 256 image.
// The whole formation scenario of ct_bench (lock, delay, wedge drive, goal,
// halt) at a quarter of the sensor resolution, with thresholds, the start
// delay and the infrared timing shortened to match.
module tb_ct_top;
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

  ct_top #(.IMG_W(320), .IMG_H(256), .DOCK_THRESH(48), .TRACK_THRESH(48), .START_DELAY(3), .CARRIER_DIV(8), .HALF_BIT(4), .GAP_HALF(20)) dut (.*);

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

  ct_bench #(.IMG_W(320), .IMG_H(256), .TAG_W(16), .TAG_H(12), .BORDER(4), .SPEED(4), .HALF(32), .HBLANK(16), .VBLANK(100), .START_DELAY(3), .MAX_FRAMES(150)) bench (.*);
endmodule
