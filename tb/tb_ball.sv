// Testbench for ball. The screen scan is emulated: a "frame" is the tick at
// (hcount, vcount) = (0, 0) followed either by a scan of a 512 x 400 window
// (when pixels matter) or by a few idle clocks at another position.
// Checks:
//   * reset places the ball in the middle of the play area, velocity (5, 3);
//   * is_ball matches the disc test for every scanned pixel;
//   * free flight for 400 frames follows a frame-by-frame model of the
//     bounce-before-leaving rule, with miss_left / miss_right pulses on the
//     left and right walls, and bounces on all four walls are seen;
//   * a paddle covering the ball edge in each of the eight directions gives
//     a hit with that segment and the velocity of the return rule;
//   * 25 overlapping pixels are not a hit, 26 are;
//   * after a hit the cooldown blocks new hits for COOLDOWN_FRAMES frames;
//   * stop_moving freezes the ball.
`include "tb_check.svh"
module tb_ball;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, stop_moving = 0;
  always #5 clk = !clk;
  hcount_t hcount = 5;
  vcount_t vcount = 5;
  play_area_t area = '{x_min: 11'd100, x_max: 11'd400, y_min: 10'd80, y_max: 10'd300};
  logic paddle_px;
  logic is_ball, miss_left, miss_right, hit;
  hcount_t ball_x;
  vcount_t ball_y;
  logic [2:0] hit_segment;

  ball dut (.*);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  // paddle shapes, relative to the ball centre (dx, dy)
  int pad_mode = -1;   // -1 none, 0..7 half-plane in direction k, 8/9 small squares
  function automatic bit pad_at(int dx, int dy);
    case (pad_mode)
      0: return -dx > 26;
      1: return -dx - dy > 36;
      2: return -dy > 26;
      3: return dx - dy > 36;
      4: return dx > 26;
      5: return dx + dy > 36;
      6: return dy > 26;
      7: return dy - dx > 36;
      8: return dx >= 20 && dx <= 24 && dy >= -2 && dy <= 2;                  // 25 px
      9: return (dx >= 20 && dx <= 24 && dy >= -2 && dy <= 2) || (dx == 19 && dy == 0);
      default: return 0;
    endcase
  endfunction
  assign paddle_px = pad_at(int'(hcount) - int'(ball_x) - 30, int'(vcount) - int'(ball_y) - 30);

  int hits = 0, lefts = 0, rights = 0;
  logic [2:0] last_seg;
  always @(posedge clk) begin
    #1;
    if (hit) begin hits++; last_seg = hit_segment; end
    if (miss_left) lefts++;
    if (miss_right) rights++;
  end

  int ball_mismatch = 0, ball_pixels = 0;

  // one frame: tick, then a scan or idle clocks
  task automatic frame(bit scan);
    @(negedge clk) begin hcount = 0; vcount = 0; end
    @(negedge clk) begin hcount = 600; vcount = 0; end
    repeat (2) @(negedge clk);
    if (scan) begin
      for (int v = 1; v < 400; v++)
        for (int h = 0; h < 512; h++) begin
          int dx, dy;
          @(negedge clk);
          hcount = 11'(h); vcount = 10'(v);
          dx = h - int'(ball_x) - 30; dy = v - int'(ball_y) - 30;
          #1;
          if (is_ball != (dx * dx + dy * dy <= 900)) ball_mismatch++;
          if (is_ball) ball_pixels++;
        end
      @(negedge clk) begin hcount = 600; vcount = 5; end
    end
  endtask

  task automatic do_reset();
    @(negedge clk) reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
  endtask

  initial begin
    int x, y, vx, vy;
    bit seen_top = 0, seen_bottom = 0;
    do_reset();
    `CHECK(ball_x == 11'd250 && ball_y == 10'd190, $sformatf("reset position %0d,%0d", ball_x, ball_y))
    frame(1);
    `CHECK(ball_x == 11'd255 && ball_y == 10'd193, "first move by (5,3)")
    frame(1);
    `CHECK(ball_mismatch == 0 && ball_pixels == 2 * 2821,
           $sformatf("disc test: %0d mismatches, %0d pixels", ball_mismatch, ball_pixels))
    // free flight against the model
    x = 260; y = 196; vx = 5; vy = 3;
    lefts = 0; rights = 0;
    for (int f = 0; f < 400; f++) begin
      int l0, r0;
      bit ml, mr;
      l0 = lefts; r0 = rights;
      ml = 0; mr = 0;
      if (x + vx < 100) begin vx = -vx; ml = 1; end
      else if (x + vx + 60 > 400) begin vx = -vx; mr = 1; end
      if (y + vy < 80) begin vy = -vy; seen_top = 1; end
      else if (y + vy + 60 > 300) begin vy = -vy; seen_bottom = 1; end
      x += vx; y += vy;
      frame(0);
      `CHECK(int'(ball_x) == x && int'(ball_y) == y && (lefts - l0) == ml && (rights - r0) == mr,
             $sformatf("frame %0d: ball %0d,%0d expected %0d,%0d", f, ball_x, ball_y, x, y))
    end
    `CHECK(lefts > 2 && rights > 2 && seen_top && seen_bottom && hits == 0,
           $sformatf("walls: %0d left, %0d right bounces", lefts, rights))
    // paddle in each of the eight directions
    begin
      int evx [8] = '{5, 3, -5, -3, -5, -3, -5, 3};
      int evy [8] = '{3, 5, 3, 5, 3, -5, -3, -5};
      for (int k = 0; k < 8; k++) begin
        int x0, y0;
        do_reset();
        pad_mode = k;
        hits = 0;
        frame(1);       // counts the overlap; the tick of this frame moves normally
        pad_mode = -1;
        x0 = ball_x; y0 = ball_y;
        frame(0);       // this tick uses the counts
        `CHECK(hits == 1 && last_seg == 3'(k), $sformatf("direction %0d: %0d hits, segment %0d", k, hits, last_seg))
        `CHECK(int'(ball_x) - x0 == evx[k] && int'(ball_y) - y0 == evy[k],
               $sformatf("direction %0d: velocity %0d,%0d", k, int'(ball_x) - x0, int'(ball_y) - y0))
      end
    end
    // threshold
    do_reset();
    hits = 0;
    pad_mode = 8; frame(1); pad_mode = -1; frame(0);
    `CHECK(hits == 0, "25 overlapping pixels are not a hit")
    pad_mode = 9; frame(1); pad_mode = -1; frame(0);
    `CHECK(hits == 1, "26 overlapping pixels are a hit")
    // cooldown: paddle present every frame (the overlap is counted each frame)
    begin
      int first, second;
      do_reset();
      hits = 0; first = -1; second = -1;
      pad_mode = 4;
      for (int f = 0; f < 40 && second < 0; f++) begin
        frame(1);
        if (hits == 1 && first < 0) first = f;
        if (hits == 2) second = f;
      end
      pad_mode = -1;
      `CHECK(first >= 0 && second - first == 31, $sformatf("hits at frames %0d and %0d", first, second))
    end
    // stop_moving
    begin
      hcount_t x0;
      vcount_t y0;
      x0 = ball_x; y0 = ball_y;
      stop_moving = 1;
      repeat (5) frame(0);
      `CHECK(ball_x == x0 && ball_y == y0, "stop_moving freezes the ball")
      stop_moving = 0;
      frame(0);
      `CHECK(ball_x != x0, "ball moves again")
    end
    `TB_FINISH
  end
endmodule
