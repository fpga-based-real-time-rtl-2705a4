// tb_ir_remote: frames on the infrared output.
// Short timing parameters are used (4 clocks per carrier period, 3 periods per
// half-bit). A decoder in the testbench samples the envelope in the middle of
// each half-bit, rebuilds the Manchester bits, checks start/field bits, the
// toggle, the robot address and the command after removing the robot's key,
// counts the carrier periods inside every "on" half-bit, and checks the idle
// gap between frames. The requests exercise round-robin order, replacement of
// a waiting command by a newer one, and requests arriving while busy.
module tb_ir_remote;
  import ct_pkg::*;
  localparam int CDIV = 4, HB = 3, GAP = 6, HALF = CDIV * HB;
  localparam logic [4:0] A [3] = '{5'd1, 5'd2, 5'd3};
  localparam logic [5:0] K [3] = '{6'h36, 6'h1B, 6'h2D};
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [2:0] req;
  cmd_e cmd [3];
  logic ir_out, ir_env, busy, sent;
  logic [1:0] sent_robot;
  logic [13:0] sent_frame;

  ir_remote #(.CARRIER_DIV(CDIV), .HALF_BIT(HB), .GAP_HALF(GAP)) dut (.*);

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

  // Expected (robot, command) in transmission order.
  int   exp_robot [$];
  cmd_e exp_cmd [$];
  int   n_frames = 0;
  longint cyc = 0, last_start = -1000;
  always @(posedge clk) cyc++;

  // Decoder.
  initial begin
    bit exp_toggle;
    exp_toggle = 0;
    forever begin
      logic [13:0] bits;
      bit ok;
      int r, pulses;
      longint t0;
      @(posedge clk iff (rst_n && sent));
      t0 = cyc;
      check(t0 - last_start >= 28 * HALF + GAP * HALF, $sformatf("gap %0d clocks", t0 - last_start));
      last_start = t0;
      ok = 1;
      for (int h = 0; h < 28; h += 2) begin
        bit first, second;
        repeat (HALF / 2) @(posedge clk);
        #1 first = ir_env;
        repeat (HALF) @(posedge clk);
        #1 second = ir_env;
        repeat (HALF - HALF / 2) @(posedge clk);
        if (first == second) ok = 0;
        bits = {bits[12:0], second};
      end
      check(ok, "Manchester coding");
      check(bits[13:12] == 2'b11, "start and field bits");
      check(bits[11] == exp_toggle, "toggle bit");
      exp_toggle = !exp_toggle;
      r = -1;
      for (int k = 0; k < 3; k++) if (bits[10:6] == A[k]) r = k;
      if (exp_robot.size() == 0) begin
        check(0, "unexpected frame");
      end else begin
        int er; cmd_e ec;
        er = exp_robot.pop_front(); ec = exp_cmd.pop_front();
        check(r == er, $sformatf("robot %0d expected %0d", r, er));
        if (r >= 0) check((bits[5:0] ^ K[r]) == {4'b0000, ec}, $sformatf("command of robot %0d", r));
      end
      n_frames++;
    end
  end

  // Carrier: count rising edges of ir_out while the envelope is on.
  int on_clocks = 0, rises = 0;
  logic ir_q = 0;
  always @(posedge clk) begin
    if (ir_env) on_clocks++;
    if (ir_out && !ir_q) rises++;
    ir_q <= ir_out;
    if (ir_out) check(ir_env, "carrier only while on");
  end

  task automatic post(int k, cmd_e c);
    @(negedge clk); req = '0; req[k] = 1; cmd[k] = c;
    @(negedge clk); req = '0;
  endtask

  initial begin
    rst_n = 0; req = '0; cmd = '{CMD_STOP, CMD_STOP, CMD_STOP};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // All three at once: served 0, 1, 2.
    @(negedge clk); req = 3'b111; cmd = '{CMD_FWD, CMD_LEFT, CMD_RIGHT};
    @(negedge clk); req = '0;
    exp_robot = '{0, 1, 2}; exp_cmd = '{CMD_FWD, CMD_LEFT, CMD_RIGHT};
    wait (n_frames == 3 && !busy);
    // While robot 1 is being served, robot 1 posts twice (only the newer is
    // sent afterwards), then robot 2 and robot 0: order after 1 is 2, 0, 1.
    post(1, CMD_STOP);
    exp_robot.push_back(1); exp_cmd.push_back(CMD_STOP);
    repeat (5) @(negedge clk);
    post(0, CMD_LEFT);
    post(2, CMD_FWD);
    post(1, CMD_FWD);
    post(1, CMD_RIGHT);
    exp_robot.push_back(2); exp_cmd.push_back(CMD_FWD);
    exp_robot.push_back(0); exp_cmd.push_back(CMD_LEFT);
    exp_robot.push_back(1); exp_cmd.push_back(CMD_RIGHT);
    wait (n_frames == 7 && !busy);
    repeat (20) @(negedge clk);
    check(n_frames == 7 && exp_robot.size() == 0, $sformatf("frames %0d", n_frames));
    check(rises * CDIV == on_clocks, $sformatf("carrier periods %0d over %0d on-clocks", rises, on_clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
