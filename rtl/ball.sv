// The ball: position, wall bounces, paddle collisions and its pixel test.
//
// Pixel test: a pixel belongs to the ball when its squared distance from the
// ball centre (x + R, y + R) is at most R*R; (x, y) is the top-left corner.
//
// Collision sensing: while the frame is scanned, every pixel that is both a
// ball pixel and a paddle pixel is counted in total and in each of eight
// overlapping edge segments of the ball. Segment k is the part of the disc
// beyond 0.8 R from the centre in direction k * 45 degrees (0 left, 1 upper
// left, 2 top, 3 upper right, 4 right, 5 lower right, 6 bottom, 7 lower left;
// screen y grows downwards). Neighbouring segments overlap, so a small change
// of paddle angle cannot flip the estimate by 90 degrees. The segment with the
// most overlapping pixels (lowest index on a tie, found by combinational
// comparison) gives the contact direction to within +/- 22.5 degrees.
//
// Once per frame, at (hcount, vcount) = (0, 0) and unless reset or
// stop_moving, the counts of the frame just scanned are used:
//   * a collision is accepted when total > HIT_THRESHOLD and no cooldown is
//     running; the cooldown then blocks new collisions for COOLDOWN_FRAMES
//     frames. The new velocity always sends the ball away from the contact:
//     left/right segments reverse vx away from the paddle; top/bottom reverse
//     vy away from the paddle and also reverse vx; a diagonal segment swaps
//     the speeds |vx| and |vy| (a 45-degree mirror) and points both away from
//     the contact corner. "Massaging" the signs this way guarantees that a
//     ball that was hit is returned even when the angle estimate is noisy;
//   * without a collision, the next position is checked against the play
//     area; a component that would leave it is reversed, and leaving on the
//     left or right raises miss_left / miss_right for one clock;
//   * the position then moves by the (new) velocity and all counts restart.
// hit pulses for one clock with hit_segment when a collision is accepted.
// reset puts the ball in the middle of the play area with velocity
// (INIT_VX, INIT_VY).
//
// What follows the original: the disc test, eight overlapping 45-degree
// segments beyond 0.8 R (24 and 34 pixels for R = 30), the threshold of 25
// pixels, the 30-frame cooldown, the frame-rate update, the bounce-before-
// leaving rule and the miss pulses. The exact return rule (which components
// are reversed or swapped) is this design's reading of "massaged" physics.
module ball
  import pong_pkg::*;
#(
  parameter int signed   INIT_VX         = 5,
  parameter int signed   INIT_VY         = 3,
  parameter int unsigned R               = 30,
  parameter int unsigned HIT_THRESHOLD   = 25,
  parameter int unsigned COOLDOWN_FRAMES = 30,
  parameter int unsigned CW              = 12    // width of the pixel counters
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       stop_moving,
  input  hcount_t    hcount,
  input  vcount_t    vcount,
  input  play_area_t area,
  input  logic       paddle_px,
  output logic       is_ball,
  output hcount_t    ball_x,        // top-left corner
  output vcount_t    ball_y,
  output logic       miss_left,     // one clock: ball bounced off the left wall
  output logic       miss_right,
  output logic       hit,           // one clock: paddle collision accepted
  output logic [2:0] hit_segment
);

  localparam int signed SEG_T = (R * 4) / 5;              // 0.8 R
  localparam int signed SEG_D = (SEG_T * 181 + 64) / 128; // 0.8 R * sqrt(2)

  typedef logic signed [13:0] coord_t;
  typedef logic signed [7:0]  vel_t;

  coord_t x, y;
  vel_t   vx, vy;

  coord_t px, py, cx, cy;
  assign px = coord_t'({1'b0, hcount});
  assign py = coord_t'({1'b0, vcount});
  assign cx = px - x - coord_t'(R);
  assign cy = py - y - coord_t'(R);

  logic [27:0] dist2;
  assign dist2   = 28'(cx * cx) + 28'(cy * cy);
  assign is_ball = dist2 <= 28'(R * R);

  // segment membership of the current pixel
  logic [7:0] in_seg;
  assign in_seg[0] = cx < -coord_t'(SEG_T);
  assign in_seg[1] = cx + cy < -coord_t'(SEG_D);
  assign in_seg[2] = cy < -coord_t'(SEG_T);
  assign in_seg[3] = cx - cy > coord_t'(SEG_D);
  assign in_seg[4] = cx > coord_t'(SEG_T);
  assign in_seg[5] = cx + cy > coord_t'(SEG_D);
  assign in_seg[6] = cy > coord_t'(SEG_T);
  assign in_seg[7] = cy - cx > coord_t'(SEG_D);

  logic [CW-1:0] total;
  logic [CW-1:0] seg [8];

  // segment with the largest count, lowest index on a tie
  logic [2:0] best;
  always_comb begin
    best = 3'd0;
    for (int k = 1; k < 8; k++)
      if (seg[k] > seg[best]) best = 3'(k);
  end

  localparam int unsigned KW = $clog2(COOLDOWN_FRAMES + 1);
  logic [KW-1:0] cooldown;

  function automatic vel_t vabs(input vel_t v);
    return (v < 0) ? -v : v;
  endfunction

  wire frame_tick = (hcount == '0) && (vcount == '0);

  always_ff @(posedge clk) begin
    miss_left  <= 1'b0;
    miss_right <= 1'b0;
    hit        <= 1'b0;
    if (reset) begin
      x        <= coord_t'((32'(area.x_max) + 32'(area.x_min)) >> 1);
      y        <= coord_t'((32'(area.y_max) + 32'(area.y_min)) >> 1);
      vx       <= vel_t'(INIT_VX);
      vy       <= vel_t'(INIT_VY);
      cooldown <= '0;
      total    <= '0;
      for (int k = 0; k < 8; k++) seg[k] <= '0;
      hit_segment <= '0;
    end else if (frame_tick) begin
      vel_t   nvx, nvy;
      coord_t nx, ny;
      logic   collided;
      nvx = vx;
      nvy = vy;
      collided = 1'b0;
      if (!stop_moving) begin
        if (cooldown != 0) begin
          cooldown <= cooldown - 1'b1;
        end else if (total > CW'(HIT_THRESHOLD)) begin
          collided = 1'b1;
          cooldown <= KW'(COOLDOWN_FRAMES);
          hit      <= 1'b1;
          hit_segment <= best;
          unique case (best)
            3'd0: nvx =  vabs(vx);
            3'd4: nvx = -vabs(vx);
            3'd2: begin nvy =  vabs(vy); nvx = -vx; end
            3'd6: begin nvy = -vabs(vy); nvx = -vx; end
            3'd1: begin nvx =  vabs(vy); nvy =  vabs(vx); end
            3'd3: begin nvx = -vabs(vy); nvy =  vabs(vx); end
            3'd5: begin nvx = -vabs(vy); nvy = -vabs(vx); end
            3'd7: begin nvx =  vabs(vy); nvy = -vabs(vx); end
          endcase
        end
        if (!collided) begin
          if (x + coord_t'(vx) < coord_t'({1'b0, area.x_min})) begin
            nvx = -vx;
            miss_left <= 1'b1;
          end else if (x + coord_t'(vx) + coord_t'(2 * R) > coord_t'({1'b0, area.x_max})) begin
            nvx = -vx;
            miss_right <= 1'b1;
          end
          if (y + coord_t'(vy) < coord_t'({1'b0, area.y_min}) ||
              y + coord_t'(vy) + coord_t'(2 * R) > coord_t'({1'b0, area.y_max}))
            nvy = -vy;
        end
        nx = x + coord_t'(nvx);
        ny = y + coord_t'(nvy);
        x  <= nx;
        y  <= ny;
        vx <= nvx;
        vy <= nvy;
      end
      total <= '0;
      for (int k = 0; k < 8; k++) seg[k] <= '0;
    end else if (is_ball && paddle_px) begin
      if (total != '1) total <= total + 1'b1;
      for (int k = 0; k < 8; k++)
        if (in_seg[k] && seg[k] != '1) seg[k] <= seg[k] + 1'b1;
    end
  end

  assign ball_x = hcount_t'(x);
  assign ball_y = vcount_t'(y);

endmodule
