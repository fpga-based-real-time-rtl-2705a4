// eyebot_model: behavioural model of one mobile robot (testbench only).
//
// Decodes the infrared envelope like a TV-remote receiver: a frame begins
// with the rising edge in the middle of the first start bit; each following
// bit is read from the middle of its two half-bits (off-on = 1, on-off = 0).
// Frames with this robot's address are accepted, and the data field with the
// key removed becomes the drive command. On every frame_tick the robot moves:
// forward is SPEED pixels towards the top of the image, veering adds SPEED/2
// sideways, stop stands still.
module eyebot_model #(
  parameter logic [4:0] ADDR  = 5'd1,
  parameter logic [5:0] KEY   = 6'h36,
  parameter int         HALF  = 44448,   // clocks per half-bit
  parameter int         SPEED = 12,
  parameter int         X0    = 0,
  parameter int         Y0    = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ir_env,
  input  logic frame_tick,
  output int   x,
  output int   y,
  output int   cmd,        // 0 stop, 1 forward, 2 left, 3 right
  output int   n_accepted,
  output int   n_bad
);

  initial begin
    cmd = 0; n_accepted = 0; n_bad = 0;
    forever begin
      logic [13:0] bits;
      bit ok;
      @(posedge ir_env);
      bits = 14'h1;
      ok = 1;
      repeat (HALF / 2) @(posedge clk);
      for (int k = 1; k < 14; k++) begin
        bit a, b;
        repeat (HALF) @(posedge clk);
        a = ir_env;
        repeat (HALF) @(posedge clk);
        b = ir_env;
        if (a == b) ok = 0;
        bits = {bits[12:0], b};
      end
      repeat (HALF + 2) @(posedge clk);
      if (!ok || bits[13:12] != 2'b11) n_bad++;
      else if (bits[10:6] == ADDR) begin
        logic [5:0] d;
        d = bits[5:0] ^ KEY;
        if (d > 6'd3) n_bad++;
        else begin
          cmd = int'(d);
          n_accepted++;
        end
      end
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= X0; y <= Y0;
    end else if (frame_tick) begin
      case (cmd)
        1: y <= y - SPEED;
        2: begin y <= y - SPEED; x <= x - SPEED / 2; end
        3: begin y <= y - SPEED; x <= x + SPEED / 2; end
        default: ;
      endcase
    end
  end

endmodule
