// Testbench for vga_select with a short countdown (5 s of 100 clocks), a
// fast ball (vx = 40) and 40 damage per miss, in a 300 x 220 play area. The
// screen scan is emulated as in the ball testbench: a tick at (0, 0) and a
// scan of a 512 x 400 window per frame. Camera, background image, green-screen
// mask and a sparse paddle dot pattern are generated from the position.
// Checks:
//   * before the first game reset the ball does not move;
//   * after a game reset the ball waits exactly SECONDS * CLKS_PER_SECOND
//     clocks, then moves;
//   * every scanned pixel (one clock late, registered output) equals the
//     priority model: grey outside the play area, ball, health bars, paddle
//     colour by half, background image on the green screen when replacing,
//     camera when shown, else black; all four show/replace combinations;
//   * every wall miss costs the missing player 40 health; when a player
//     reaches zero or less the other wins, the ball stops, and the "WIN"
//     and "LOSE" texts appear in the winner's and loser's boxes;
//   * a game reset restores full health and restarts the game.
`include "tb_check.svh"
module tb_vga_select;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  localparam int CPS = 100, SEC = 5, DMG = 40;
  logic clk = 0, rst = 1, game_reset = 0;
  always #5 clk = !clk;
  hcount_t hcount = 600;
  vcount_t vcount = 5;
  play_area_t area = '{x_min: 11'd100, x_max: 11'd400, y_min: 10'd80, y_max: 10'd300};
  logic is_background, is_paddle, show_camera = 1, replace_background = 1;
  rgb_t background, camera, pixel;
  hcount_t ball_x;
  vcount_t ball_y;
  game_state_t state;
  logic signed [7:0] health1, health2;
  logic stop_moving, miss_left, miss_right, paddle_hit;
  logic [2:0] hit_segment;

  vga_select #(.CLKS_PER_SECOND(CPS), .SECONDS(SEC), .DAMAGE(DMG), .BALL_VX(40), .BALL_VY(3)) dut (.*);

  assign is_background = ((hcount >> 4) + (vcount >> 4)) % 2 == 0;
  assign is_paddle     = hcount % 16 == 3 && vcount % 16 == 5;
  assign camera        = {hcount[7:0], vcount[7:0], 8'h55};
  assign background    = {8'h11, hcount[7:0], vcount[7:0]};

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  function automatic rgb_t model(int h, int v, int bx, int by, int h1, int h2,
                                 bit sc, bit rb, bit pad, bit bg, rgb_t cam, rgb_t bgi);
    int dx, dy;
    bit bar;
    if (h < 100 || h > 400 || v < 80 || v > 300) return 24'h0F0F0F;
    dx = h - bx - 30; dy = v - by - 30;
    if (dx * dx + dy * dy <= 900) return 24'h030F3F;
    bar = v < 280 && v > 260 &&
          ((h > 120 && h < 120 + 2 * h1) || (h < 380 && h > 380 - 2 * h2));
    if (bar) return 24'hFFB000;
    if (pad) return h < 250 ? 24'hFF0000 : 24'h00FF00;
    if (bg && rb) return bgi;
    if (sc) return cam;
    return 0;
  endfunction

  int wrong = 0, scanned = 0, win_px = 0, lose_px = 0, seen_layer [6];
  int lefts = 0, rights = 0;
  always @(posedge clk) begin
    #1;
    if (miss_left) lefts++;
    if (miss_right) rights++;
  end

  // one frame: tick, then a scan (checking every pixel) or idle clocks
  task automatic frame(bit scan);
    @(negedge clk) begin hcount = 0; vcount = 0; end
    @(negedge clk) begin hcount = 600; vcount = 0; end
    repeat (2) @(negedge clk);
    if (scan) begin
      rgb_t e;
      int ph, pv;
      bit prev = 0;
      for (int v = 1; v < 400; v++)
        for (int h = 0; h < 512; h++) begin
          @(negedge clk);
          if (prev) begin
            // pixel now shows the position set one clock earlier
            bit in_win_box, in_lose_box;
            scanned++;
            in_win_box  = pv >= 80 && pv < 280 &&
                          (state == LEFT_WINS ? (ph >= 100 && ph < 200) : (ph >= 300 && ph < 400));
            in_lose_box = pv >= 80 && pv < 280 &&
                          (state == LEFT_WINS ? (ph >= 300 && ph < 400) : (ph >= 100 && ph < 200));
            if (state != GAME_ON && in_win_box && pixel == 24'hFFD000) win_px++;
            else if (state != GAME_ON && in_lose_box && pixel == 24'hFF2020) lose_px++;
            else if (pixel != e) begin
              wrong++;
              if (wrong < 5) $display("pixel %0d,%0d = %h expected %h", ph, pv, pixel, e);
            end else begin
              case (e)
                24'h0F0F0F: seen_layer[0]++;
                24'h030F3F: seen_layer[1]++;
                24'hFFB000: seen_layer[2]++;
                24'hFF0000, 24'h00FF00: seen_layer[3]++;
                default: if (e == background) seen_layer[4]++; else if (e != 0) seen_layer[5]++;
              endcase
            end
          end
          hcount = 11'(h); vcount = 10'(v);
          #1;
          e = model(h, v, ball_x, ball_y, health1, health2, show_camera, replace_background,
                    is_paddle, is_background, camera, background);
          ph = h; pv = v; prev = 1;
        end
      @(negedge clk) begin hcount = 600; vcount = 5; end
    end
  endtask

  initial begin
    hcount_t x0;
    repeat (3) @(negedge clk);
    rst = 0;
    x0 = ball_x;
    frame(0); frame(0);
    `CHECK(ball_x == x0 && stop_moving, "ball waits for the first game reset")
    // game reset and countdown
    @(negedge clk) game_reset = 1;
    @(negedge clk) game_reset = 0;
    `CHECK(health1 == 100 && health2 == 100 && state == GAME_ON, "full health after reset")
    begin
      int waited = 0;
      while (stop_moving && waited < 10000) begin @(negedge clk); waited++; end
      `CHECK(waited == CPS * SEC, $sformatf("countdown %0d clocks", waited))
    end
    // play, scanning with all four layer switch settings
    begin
      int f = 0, l0, r0, h1, h2;
      bit over_seen = 0;
      h1 = 100; h2 = 100;
      while (state == GAME_ON && f < 60) begin
        show_camera = f[0];
        replace_background = f[1];
        l0 = lefts; r0 = rights;
        frame(1);
        h1 -= DMG * (lefts - l0);
        h2 -= DMG * (rights - r0);
        `CHECK(health1 == 8'(h1) && health2 == 8'(h2), $sformatf("frame %0d health %0d/%0d expected %0d/%0d",
               f, health1, health2, h1, h2))
        f++;
      end
      `CHECK(state == (h2 <= 0 ? LEFT_WINS : RIGHT_WINS) && (h1 <= 0 || h2 <= 0),
             $sformatf("game over: state %s, health %0d/%0d", state.name(), h1, h2))
      x0 = ball_x;
      frame(1); frame(1);
      `CHECK(ball_x == x0 && stop_moving, "ball stops at game over")
      `CHECK(win_px > 1000 && lose_px > 1000, $sformatf("texts: %0d win, %0d lose pixels", win_px, lose_px))
    end
    `CHECK(wrong == 0 && scanned > 1000000, $sformatf("%0d of %0d pixels wrong", wrong, scanned))
    foreach (seen_layer[i]) `CHECK(seen_layer[i] > 0, $sformatf("layer %0d shown", i))
    // restart
    @(negedge clk) game_reset = 1;
    @(negedge clk) game_reset = 0;
    `CHECK(health1 == 100 && health2 == 100 && state == GAME_ON && stop_moving, "game restarts")
    `TB_FINISH
  end
endmodule
