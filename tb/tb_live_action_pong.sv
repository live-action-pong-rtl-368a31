// End-to-end testbench of live_action_pong with shortened timing constants
// (debounce 8 clocks, 5 s countdown of 2000-clock seconds, button repeat
// 50/100 clocks, drift step every 100 clocks) and a fast ball (vx = 40,
// 50 damage per miss). The real display timing (1344 x 806 clocks per frame)
// is kept. A behavioural camera sends a green screen with two blue paddle
// stripes and optional sparse blue noise; a behavioural 512K x 36 memory with
// two clocks read latency stands in for the ZBT frame memory.
//
// The screen is classified pixel by pixel each frame (grey, ball, health,
// red/green paddle, text, camera green) and the following mechanisms are
// checked; a mechanism that is never exercised counts as a failure:
//   memory     camera words reach the frame memory at the mirrored positions
//   camera     the camera picture is shown when replacement is off
//   replace    the green screen is replaced by the background image
//   paddles    paddle stripes are recoloured red (left) and green (right)
//   kernel     the noise filter removes the noise dots, which show without it
//   sync       one vsync and 806 hsync pulses per frame
//   waiting    the ball does not move before the first game start
//   countdown  after button 3 the ball waits exactly 5 "seconds"
//   ball       the ball is drawn (2821-pixel disc)
//   hit        the ball bounces off a camera paddle
//   miss       wall misses cost the missing player 50 health, on both sides
//   health     the health bars shrink after a miss
//   game over  a player at zero health loses: ball stops, texts appear
//   adjust     the direction buttons move the play area edge (and the hex
//              display shows it)
//   drift      in drift mode the background scrolls, in bounce mode with a
//              frozen ball it stands still
//   enter      ENTER restores the default settings and the start state
`include "tb_check.svh"
module tb_live_action_pong;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  localparam int CPS = 2000, DEB = 8, DMG = 50;

  logic clk = 0, cam_clk = 0, rst = 1;
  always #7.69 clk = !clk;       // 65 MHz
  always #18.52 cam_clk = !cam_clk;   // 27 MHz

  logic [9:0]  tv_in_ycrcb;
  logic        button_up = 1, button_down = 1, button_left = 1, button_right = 1;
  logic        button3 = 1, button_enter = 1;
  logic [7:0]  sw = 8'b1110_0111;   // kernel, camera, replace on; bounce mode; nothing selected
  logic [18:0] vram_addr;
  logic        vram_we;
  logic [35:0] vram_write_data, vram_read_data;
  rgb_t        vga_rgb;
  logic        vga_hsync, vga_vsync, vga_blank;
  logic [63:0] dispdata;
  game_state_t game_state;
  logic signed [7:0] health1, health2;

  live_action_pong #(.CLKS_PER_SECOND(CPS), .DEBOUNCE_CYCLES(DEB), .FAST_CYCLES(50),
                     .SLOW_CYCLES(100), .DRIFT_CYCLES(100), .BALL_VX(40), .BALL_VY(3),
                     .DAMAGE(DMG)) dut (.*);

  zbt_model mem (.clk, .addr(vram_addr), .we(vram_we), .wdata(vram_write_data), .rdata(vram_read_data));

  bit paddles = 1, noise = 1;
  int cam_frames;
  ccir656_source camera (.clk(cam_clk), .paddles, .noise, .tv(tv_in_ycrcb), .frames(cam_frames));

  initial begin
    repeat (90_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    `TB_FINISH
  end

  // ---------------- per-frame screen statistics ----------------
  typedef struct {
    int gray, ball, health, red, green, text, camgreen, noise_pad, hs, vs;
    int unsigned bg_sig;
  } stats_t;
  stats_t cur, last;
  int frames = 0;
  hcount_t sh;
  vcount_t sv;
  logic hs_q = 1, vs_q = 1;

  always @(negedge clk) begin sh = dut.hcount; sv = dut.vcount; end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      rgb_t p;
      int x, y;
      p = vga_rgb; x = sh; y = sv;
      if (hs_q && !vga_hsync) cur.hs++;
      if (vs_q && !vga_vsync) cur.vs++;
      hs_q = vga_hsync; vs_q = vga_vsync;
      if (x < 1024 && y < 768) begin
        case (p)
          24'h0F0F0F: cur.gray++;
          24'h030F3F: cur.ball++;
          24'hFFB000: cur.health++;
          24'hFF0000: begin
            cur.red += (x >= 225 && x <= 275);
            cur.noise_pad += (x >= 295 && x <= 485 && y >= 255 && y <= 465);
          end
          24'h00FF00: begin
            cur.green += (x >= 535 && x <= 585);
            cur.noise_pad += (x >= 295 && x <= 485 && y >= 255 && y <= 465);
          end
          24'hFFD000, 24'hFF2020: cur.text++;
          default: begin
            if (p.g > 150 && p.r < 60 && p.b < 60) cur.camgreen++;
            // signature of the background image in a box away from the
            // texts, paddles and bars
            if (x >= 300 && x < 500 && y >= 200 && y < 240)
              cur.bg_sig = cur.bg_sig * 31 + p + x;
          end
        endcase
      end
      if (x == 1343 && y == 805) begin
        last = cur;
        cur = '{default: 0};
        frames++;
      end
    end
  end

  task automatic wait_frames(int n);
    int f0;
    f0 = frames;
    while (frames < f0 + n) @(posedge clk);
  endtask

  task automatic press(ref logic btn, input int hold);
    @(negedge clk) btn = 0;
    repeat (hold) @(negedge clk);
    btn = 1;
    repeat (DEB + 20) @(negedge clk);
  endtask

  // game events
  int hits = 0, lefts = 0, rights = 0;
  always @(posedge clk) begin
    #1;
    if (dut.paddle_hit) hits++;
    if (dut.miss_left) lefts++;
    if (dut.miss_right) rights++;
  end

  int mechanisms = 0;
  `define MECHANISM(cond, msg) begin `CHECK(cond, msg) if (cond) mechanisms++; end

  initial begin
    repeat (20) @(negedge clk);
    rst = 0;
    cur = '{default: 0};
    // let two camera frames fill both line sets of the frame memory
    while (cam_frames < 2) @(posedge clk);
    wait_frames(2);

    // memory: a green-screen word and a paddle-stripe word (row 130, even
    // lines). Camera pixel p is stored at column 800 - p, so the right
    // stripe (pixels 247..287) occupies columns 513..553; it is displayed
    // about 27 pixels further right once the keyer latency is added.
    begin
      logic [35:0] wg, wp;
      wg = mem.mem[{9'd130, 1'b0, 9'd200}];   // column 400
      wp = mem.mem[{9'd130, 1'b0, 9'd265}];   // column 530
      `MECHANISM(wg[29:24] > 40 && wg[35:30] < 8 && wg[23:18] < 8 &&
                 wp[23:18] > 40 && wp[29:24] < 20,
                 $sformatf("memory: green word %h, paddle word %h", wg, wp))
    end
    `MECHANISM(last.vs == 1 && last.hs == 806, $sformatf("sync: %0d vsync, %0d hsync", last.vs, last.hs))
    `MECHANISM(last.red > 500 && last.green > 500, $sformatf("paddles: %0d red, %0d green", last.red, last.green))
    `MECHANISM(last.camgreen < 2000 && last.gray > 500000,
               $sformatf("replace: %0d camera-green pixels, %0d grey", last.camgreen, last.gray))
    // kernel: noise dots show only without the filter
    begin
      int with_kernel;
      with_kernel = last.noise_pad;
      sw[7] = 0;
      wait_frames(2);
      `MECHANISM(with_kernel == 0 && last.noise_pad > 20,
                 $sformatf("kernel: %0d noise pixels filtered, %0d unfiltered", with_kernel, last.noise_pad))
      sw[7] = 1;
      noise = 0;
    end
    // camera picture without replacement
    sw[5] = 0;
    wait_frames(2);
    `MECHANISM(last.camgreen > 100000, $sformatf("camera: %0d camera-green pixels", last.camgreen))
    sw[5] = 1;
    // no movement before the first start
    begin
      hcount_t x0;
      x0 = dut.ball_x;
      wait_frames(1);
      `MECHANISM(dut.ball_x == x0 && x0 == 11'd403 && last.ball == 2821,
                 $sformatf("waiting: ball at %0d, %0d ball pixels", dut.ball_x, last.ball))
    end
    // start the game; count the clocks from the end of the (debounced)
    // button-3 pulse until the ball is released
    begin
      int waited;
      fork
        press(button3, 30);
        begin
          @(posedge dut.b3);
          @(negedge dut.b3);
          waited = 0;
          while (dut.stop_moving && waited < 100000) begin @(posedge clk); #1; waited++; end
        end
      join
      `MECHANISM(waited == 5 * CPS, $sformatf("countdown: ball waited %0d clocks", waited))
    end
    `CHECK(health1 == 100 && health2 == 100 && game_state == GAME_ON, "full health at start")
    // play with paddles until the ball hits one
    begin
      int f = 0, full_bars;
      full_bars = last.health;
      while (hits == 0 && f < 20) begin wait_frames(1); f++; end
      `MECHANISM(hits > 0 && dut.selector.hit_segment == 3'd4,
                 $sformatf("hit: %0d hits after %0d frames, segment %0d", hits, f, dut.selector.hit_segment))
      `MECHANISM(last.ball == 2821, $sformatf("ball: %0d pixels", last.ball))
      // then without paddles until a player has lost
      paddles = 0;
      f = 0;
      while (game_state == GAME_ON && f < 80) begin
        wait_frames(1);
        f++;
        `CHECK(health1 == 8'(100 - DMG * lefts) && health2 == 8'(100 - DMG * rights),
               $sformatf("health %0d/%0d after %0d/%0d misses", health1, health2, lefts, rights))
      end
      `MECHANISM(lefts > 0 && rights > 0 && (health1 <= 0 || health2 <= 0),
                 $sformatf("miss: %0d left, %0d right, health %0d/%0d", lefts, rights, health1, health2))
      wait_frames(1);
      `MECHANISM(full_bars > 38 * 200 - 2821 && last.health < full_bars - 38 * DMG + 100 &&
                 last.health <= 38 * ((health1 > 0 ? health1 : 0) + (health2 > 0 ? health2 : 0)),
                 $sformatf("health: %0d bar pixels at start, %0d at the end", full_bars, last.health))
    end
    begin
      hcount_t x0;
      x0 = dut.ball_x;
      wait_frames(2);
      `MECHANISM(game_state == (health1 <= 0 ? RIGHT_WINS : LEFT_WINS) && dut.ball_x == x0 &&
                 last.text > 1000, $sformatf("game over: %s, %0d text pixels", game_state.name(), last.text))
    end
    // drift against bounce mode (ball frozen)
    begin
      int unsigned s1, s2, s3, s4;
      s1 = last.bg_sig; wait_frames(1); s2 = last.bg_sig;
      sw[3] = 1;
      wait_frames(2); s3 = last.bg_sig; wait_frames(1); s4 = last.bg_sig;
      `MECHANISM(s1 == s2 && s3 != s4, "drift: background scrolls only in drift mode")
      sw[3] = 0;
    end
    // adjust the right play-area edge
    begin
      int g0;
      sw[4:0] = 5'b00100;
      wait_frames(1);
      g0 = last.gray;
      press(button_up, 20);
      wait_frames(2);
      `MECHANISM(dut.area.x_max == 11'h26A && dispdata[63:60] == 4'hE && dispdata[31:16] == 16'h026A &&
                 last.gray == g0 - 382,
                 $sformatf("adjust: x_max %h, display %h, grey %0d -> %0d", dut.area.x_max, dispdata, g0, last.gray))
    end
    // ENTER resets the settings and the game
    press(button_enter, 20);
    wait_frames(1);
    `MECHANISM(dut.area.x_max == 11'h269 && game_state == GAME_ON && health1 == 100 && dut.stop_moving,
               "enter: settings and game back to the start state")
    `CHECK(mechanisms == 16, $sformatf("%0d of 16 mechanisms exercised", mechanisms))
    $display("frames simulated: %0d", frames);
    `TB_FINISH
  end
endmodule
