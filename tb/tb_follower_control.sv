// tb_follower_control: slot keeping of one follower.
// The leader's and the follower's positions are set directly; for random
// positions the command must match the steering rule worked out here: stop if
// not released, halted or not tracked, stop if ahead of the slot while the
// leader still drives, veer
// towards the slot if off by more than the tolerance, forward otherwise.
module tb_follower_control;
  import ct_pkg::*;
  localparam int DX = -200, DY = 100, TOL = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, tick, go, halt, leader_waiting, cmd_req;
  track_t own, leader;
  cmd_e cmd;

  follower_control #(.SLOT_DX(DX), .SLOT_DY(DY), .TOL(TOL)) dut (.*);

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

  int seen [4];

  initial begin
    cmd_e exp, prev;
    rst_n = 0; tick = 0; go = 0; halt = 0; leader_waiting = 0; own = '0; leader = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int lx, ly, ox, oy;
      lx = $urandom_range(300, 900); ly = $urandom_range(100, 800);
      ox = lx + DX + $urandom_range(0, 60) - 30;
      oy = ly + DY + $urandom_range(0, 60) - 30;
      leader.locked = 1; leader.cx = coord_t'(lx); leader.cy = coord_t'(ly);
      own.locked = ($urandom_range(0, 15) != 0); own.cx = coord_t'(ox); own.cy = coord_t'(oy);
      go = ($urandom_range(0, 7) != 0); halt = ($urandom_range(0, 15) == 0);
      leader_waiting = ($urandom_range(0, 3) == 0);
      if (!go || halt || !own.locked) exp = CMD_STOP;
      else if (oy < ly + DY - TOL && !leader_waiting) exp = CMD_STOP;
      else if (ox < lx + DX - TOL) exp = CMD_RIGHT;
      else if (ox > lx + DX + TOL) exp = CMD_LEFT;
      else exp = CMD_FWD;
      prev = cmd;
      @(negedge clk); tick = 1;
      @(negedge clk); tick = 0;
      check(cmd == exp, $sformatf("leader (%0d,%0d) own (%0d,%0d) go%0d halt%0d: got %s expected %s",
            lx, ly, ox, oy, go, halt, cmd.name(), exp.name()));
      check(cmd_req == (exp != prev), "request on change");
      seen[int'(exp)]++;
    end
    // Without a tick nothing changes.
    go = 0;
    repeat (3) @(negedge clk);
    check(!cmd_req, "no request without tick");
    check(seen[0] > 0 && seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "all commands exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
