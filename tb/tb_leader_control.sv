// tb_leader_control: the formation scenario seen from the leader core.
// Track records and frame ticks are driven directly. The test checks that the
// leader stays stopped until all three robots are locked, that a lost lock
// during the delay restarts the wait, that it drives forward exactly
// START_DELAY frames after locking, that it stops in the goal area while the
// followers stay released, that each follower is halted on reaching the goal,
// and that the run ends when both are halted. Command requests must pulse
// exactly when the command changes.
module tb_leader_control;
  import ct_pkg::*;
  localparam int DELAY = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, tick, cmd_req, go, waiting, done;
  logic [2:1] halt;
  track_t trk [NUM_ROBOTS];
  rect_t goal;
  cmd_e cmd;

  leader_control #(.START_DELAY(DELAY)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_req = 0;
  always @(posedge clk) if (rst_n && cmd_req) n_req++;

  cmd_e prev_cmd;
  task automatic frame();
    prev_cmd = cmd;
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
    check(cmd_req == (cmd != prev_cmd), "request pulses only on a change");
    repeat (2) @(negedge clk);
    check(!cmd_req, "request is one clock");
  endtask

  task automatic place(int k, bit locked, int cy);
    trk[k].locked = locked; trk[k].cx = 11'd100; trk[k].cy = coord_t'(cy);
  endtask

  initial begin
    int drive_frame;
    rst_n = 0; tick = 0;
    goal = '{x0: 11'd0, x1: 11'd500, y0: 11'd0, y1: 11'd99};
    for (int k = 0; k < 3; k++) begin trk[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    place(0, 1, 400); place(1, 1, 400); place(2, 0, 400);
    repeat (4) frame();
    check(cmd == CMD_STOP && !go, "waits while a follower is not locked");
    place(2, 1, 400);
    frame();   // all locked seen
    frame(); frame();
    place(1, 0, 400); frame();
    check(cmd == CMD_STOP, "lost lock during the delay");
    place(1, 1, 400);
    frame();   // all locked again
    drive_frame = 0;
    for (int f = 1; f <= DELAY + 2 && cmd != CMD_FWD; f++) begin
      frame(); drive_frame = f;
    end
    check(cmd == CMD_FWD && go, "leader drives forward");
    check(drive_frame == DELAY, $sformatf("drove after %0d frames, expected %0d", drive_frame, DELAY));
    for (int y = 380; y >= 100; y -= 40) begin
      place(0, 1, y); frame();
      check(cmd == CMD_FWD, "driving outside goal");
    end
    place(0, 1, 90); frame();
    frame();
    check(cmd == CMD_STOP && go && waiting && halt == 2'b00, "leader waits at the goal, followers released");
    place(1, 1, 95); frame();
    check(halt == 2'b01 && !done, "follower 1 halted at the goal");
    place(2, 1, 50); frame();
    check(halt == 2'b11, "follower 2 halted at the goal");
    frame();
    check(done && !go, "run done");
    check(n_req == 2, $sformatf("command changes %0d", n_req));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
