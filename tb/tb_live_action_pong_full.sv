// Full-size testbench: live_action_pong with every parameter at its default
// value (60 MHz seconds, 650,000-clock debounce, ball speed (5, 3), ...),
// a behavioural camera at 27 MHz sending full 720-pixel lines of a green
// screen with two blue paddle stripes, and a behavioural 512K x 36 frame
// memory. After two camera frames have filled the memory it checks, on whole
// 1024 x 768 frames at 65 MHz:
//   * the frame memory holds the mirrored camera picture;
//   * one vsync and 806 hsync pulses per frame;
//   * grey outside the default play area (190..617 x 182..563);
//   * with the camera shown and no replacement, the green screen is visible;
//     with replacement it is gone;
//   * the paddle stripes are recoloured red (left half) and green (right);
//   * the ball waits in the middle of the play area (no game started) and is
//     drawn as a 2821-pixel disc, and both health bars are full (19 rows of
//     199 pixels each, overlapping by 12 columns in the middle).
`include "tb_check.svh"
module tb_live_action_pong_full;
  import pong_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, cam_clk = 0, rst = 1;
  always #7.69 clk = !clk;
  always #18.52 cam_clk = !cam_clk;

  logic [9:0]  tv_in_ycrcb;
  logic        button_up = 1, button_down = 1, button_left = 1, button_right = 1;
  logic        button3 = 1, button_enter = 1;
  logic [7:0]  sw = 8'b1100_0111;   // kernel and camera on, no replacement
  logic [18:0] vram_addr;
  logic        vram_we;
  logic [35:0] vram_write_data, vram_read_data;
  rgb_t        vga_rgb;
  logic        vga_hsync, vga_vsync, vga_blank;
  logic [63:0] dispdata;
  game_state_t game_state;
  logic signed [7:0] health1, health2;

  live_action_pong dut (.*);

  zbt_model mem (.clk, .addr(vram_addr), .we(vram_we), .wdata(vram_write_data), .rdata(vram_read_data));

  int cam_frames;
  ccir656_source camera (.clk(cam_clk), .paddles(1'b1), .noise(1'b0), .tv(tv_in_ycrcb), .frames(cam_frames));

  initial begin
    repeat (12_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    `TB_FINISH
  end

  typedef struct {
    int gray, ball, health, red, green, camgreen, other, hs, vs;
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
        bit in_area;
        in_area = x >= 190 && x <= 617 && y >= 182 && y <= 563;
        if (!in_area) begin
          if (p == 24'h0F0F0F) cur.gray++; else cur.other++;
        end else
          case (p)
            24'h030F3F: cur.ball++;
            24'hFFB000: cur.health++;
            24'hFF0000: cur.red += (x >= 225 && x <= 275);
            24'h00FF00: cur.green += (x >= 535 && x <= 585);
            default: if (p.g > 150 && p.r < 60 && p.b < 60) cur.camgreen++;
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

  initial begin
    repeat (20) @(negedge clk);
    rst = 0;
    cur = '{default: 0};
    while (cam_frames < 2) @(posedge clk);
    wait_frames(2);
    begin
      logic [35:0] wg, wp;
      wg = mem.mem[{9'd130, 1'b0, 9'd200}];   // column 400: green screen
      wp = mem.mem[{9'd130, 1'b1, 9'd265}];   // column 530: right stripe, odd line
      `CHECK(wg[29:24] > 40 && wg[35:30] < 8 && wg[23:18] < 8 && wp[23:18] > 40 && wp[29:24] < 20,
             $sformatf("frame memory words %h %h", wg, wp))
    end
    `CHECK(last.vs == 1 && last.hs == 806, $sformatf("%0d vsync, %0d hsync pulses", last.vs, last.hs))
    `CHECK(last.gray == 1024 * 768 - 428 * 382 && last.other == 0,
           $sformatf("%0d grey pixels outside the play area, %0d others", last.gray, last.other))
    `CHECK(last.camgreen > 100000, $sformatf("%0d camera-green pixels shown", last.camgreen))
    `CHECK(last.red > 5000 && last.green > 5000, $sformatf("paddles: %0d red, %0d green", last.red, last.green))
    `CHECK(dut.ball_x == 11'd403 && dut.ball_y == 10'd372 && last.ball == 2821,
           $sformatf("ball at %0d,%0d, %0d pixels", dut.ball_x, dut.ball_y, last.ball))
    // the two 199-pixel bars overlap by 12 columns in the 428-pixel-wide area
    `CHECK(last.health == 19 * (2 * 199 - 12) && health1 == 100 && health2 == 100 && game_state == GAME_ON,
           $sformatf("%0d health bar pixels", last.health))
    sw[5] = 1;
    wait_frames(2);
    `CHECK(last.camgreen < 2000 && last.red > 5000, $sformatf("replaced: %0d camera-green pixels left", last.camgreen))
    $display("frames simulated: %0d", frames);
    `TB_FINISH
  end
endmodule
