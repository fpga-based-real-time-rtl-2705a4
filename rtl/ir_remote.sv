// ir_remote: infrared command sender shared by the three driving controls.
//
// The robots are driven with the codes of an ordinary TV remote. Each driving
// control posts its newest command (req pulse with cmd); a posted command waits
// in a one-entry slot per robot, a newer one replacing it. When the sender is
// idle it takes the next waiting slot in round-robin order and transmits one
// frame in the RC-5 style used by TV remotes:
//
//   start bit 1, field bit 1, toggle, 5-bit robot address, 6-bit data
//
// most significant bit first, each bit Manchester-coded over two half-bits of
// HALF_BIT carrier periods ('1' = off then on, '0' = on then off). The 6-bit
// data field is the command XOR the robot's key, so a robot only obeys frames
// scrambled with its own key. While a half-bit is "on" the output carries the
// carrier, a square wave of CARRIER_DIV clocks. After each frame the line
// stays off for GAP_HALF half-bits before the next frame may start. The toggle
// bit flips from one frame to the next.
//
// Timing: with the defaults (50 MHz clock, 36 kHz carrier, 32 carrier periods
// per half-bit) a frame lasts about 24.9 ms and the gap 88.9 ms, close to the
// 113.8 ms frame period of RC-5.
//
// The document says only that encrypted commands of a TV remote are sent; the
// frame format, timing, key scrambling and round-robin sharing are this
// design's choices.
module ir_remote
  import ct_pkg::*;
#(
  parameter int unsigned CARRIER_DIV = 1389,   // clocks per carrier period
  parameter int unsigned HALF_BIT    = 32,     // carrier periods per half-bit
  parameter int unsigned GAP_HALF    = 100,    // idle half-bits after a frame
  parameter logic [NUM_ROBOTS-1:0][4:0] ADDR = {5'd3, 5'd2, 5'd1},
  parameter logic [NUM_ROBOTS-1:0][5:0] KEY  = {6'h2D, 6'h1B, 6'h36}
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NUM_ROBOTS-1:0]           req,
  input  cmd_e                            cmd [NUM_ROBOTS],
  output logic                            ir_out,   // modulated output to the emitter
  output logic                            ir_env,   // envelope: high while a half-bit is on
  output logic                            busy,
  output logic                            sent,     // pulses when a frame starts
  output logic [$clog2(NUM_ROBOTS)-1:0]   sent_robot,
  output logic [13:0]                     sent_frame
);

  localparam int unsigned RW = $clog2(NUM_ROBOTS);
  localparam int unsigned FRAME_HALF = 28;

  // ------------------------------------------------------ pending commands
  logic [NUM_ROBOTS-1:0] pend;
  cmd_e                  pend_cmd [NUM_ROBOTS];
  logic [RW-1:0]         last;      // robot served last
  logic                  pick_ok;
  logic [RW-1:0]         pick;

  // Round robin: first pending robot after the one served last.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 1; i <= NUM_ROBOTS; i++) begin
      int k;
      k = int'(last) + i;
      if (k >= NUM_ROBOTS) k -= NUM_ROBOTS;
      if (!pick_ok && pend[k]) begin
        pick_ok = 1'b1;
        pick    = RW'(k);
      end
    end
  end

  // ------------------------------------------------------------- transmitter
  typedef enum logic [1:0] {T_IDLE, T_FRAME, T_GAP} tx_e;
  tx_e                              tx;
  logic [13:0]                      shreg;
  logic                             toggle;
  logic [$clog2(FRAME_HALF + GAP_HALF)-1:0] half_idx;
  logic [$clog2(HALF_BIT)-1:0]      car_cnt;   // carrier periods in this half-bit
  logic [$clog2(CARRIER_DIV)-1:0]   div_cnt;   // clocks in this carrier period
  logic                             half_end;
  logic                             start;

  assign half_end = (32'(div_cnt) == CARRIER_DIV - 1) && (32'(car_cnt) == HALF_BIT - 1);
  assign start    = (tx == T_IDLE) && pick_ok;
  assign busy     = (tx != T_IDLE);

  function automatic logic [13:0] frame_of(logic tgl, logic [4:0] addr, logic [5:0] data);
    return {1'b1, 1'b1, tgl, addr, data};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      last       <= RW'(NUM_ROBOTS - 1);
      tx         <= T_IDLE;
      shreg      <= '0;
      toggle     <= 1'b0;
      half_idx   <= '0;
      car_cnt    <= '0;
      div_cnt    <= '0;
      sent       <= 1'b0;
      sent_robot <= '0;
      sent_frame <= '0;
      for (int k = 0; k < NUM_ROBOTS; k++) pend_cmd[k] <= CMD_STOP;
    end else begin
      sent <= 1'b0;
      if (start) begin
        pend[pick] <= 1'b0;
        last       <= pick;
        tx         <= T_FRAME;
        shreg      <= frame_of(toggle, ADDR[pick], {4'b0000, pend_cmd[pick]} ^ KEY[pick]);
        toggle     <= ~toggle;
        half_idx   <= '0;
        car_cnt    <= '0;
        div_cnt    <= '0;
        sent       <= 1'b1;
        sent_robot <= pick;
        sent_frame <= frame_of(toggle, ADDR[pick], {4'b0000, pend_cmd[pick]} ^ KEY[pick]);
      end else if (tx != T_IDLE) begin
        if (32'(div_cnt) == CARRIER_DIV - 1) begin
          div_cnt <= '0;
          car_cnt <= (32'(car_cnt) == HALF_BIT - 1) ? '0 : car_cnt + 1'b1;
        end else begin
          div_cnt <= div_cnt + 1'b1;
        end
        if (half_end) begin
          half_idx <= half_idx + 1'b1;
          if (tx == T_FRAME && half_idx[0]) shreg <= {shreg[12:0], 1'b0};
          if (tx == T_FRAME && 32'(half_idx) == FRAME_HALF - 1) begin
            tx       <= T_GAP;
            half_idx <= '0;
          end else if (tx == T_GAP && 32'(half_idx) == GAP_HALF - 1) begin
            tx <= T_IDLE;
          end
        end
      end
      // New requests are taken last so that one arriving while its slot is
      // being sent is kept for the next frame.
      for (int k = 0; k < NUM_ROBOTS; k++) begin
        if (req[k]) begin
          pend[k]     <= 1'b1;
          pend_cmd[k] <= cmd[k];
        end
      end
    end
  end

  // Manchester envelope: bit 1 is off then on, bit 0 is on then off.
  always_comb begin
    ir_env = 1'b0;
    if (tx == T_FRAME) ir_env = half_idx[0] ? shreg[13] : !shreg[13];
  end

  assign ir_out = ir_env && (32'(div_cnt) < CARRIER_DIV / 2);

// A frame only starts for a robot that has a command waiting, and the
  // completion pulse only comes with a frame being sent.
  a_pick_pending: assert property (@(posedge clk) disable iff (!rst_n) start |-> pend[pick]);
  a_sent_frame:   assert property (@(posedge clk) disable iff (!rst_n) sent |-> tx == T_FRAME);

endmodule
