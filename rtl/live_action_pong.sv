// Live-action pong: a camera watches two players in front of a green screen
// holding coloured paddles; the display shows the camera picture with the
// green screen replaced by a background image, the paddles recoloured, and a
// virtual ball that bounces off the real paddles.
//
// Data flow (see the README for the full picture):
//   camera clock:  ntsc_decode -> ycrcb2rgb -> ntsc_to_zbt (capture side)
//   system clock:  ntsc_to_zbt (write side) -> external frame memory (ZBT)
//                  -> vram_display -> pixel register -> binarizer (keyer)
//                  and, in parallel, delay (camera pixel) -> vga_select
//                  xvga timing, parameter_select (switches/buttons),
//                  background_gen, vga_select (ball, health, paddles, text)
// The frame memory port is shared: on odd hcount it writes the latest camera
// word, on even hcount it reads for the display.
//
// Switches: [4,2:0] select the parameter adjusted by the direction buttons,
// [3] background drift mode, [5] background replacement on, [6] show camera
// pixels, [7] keyer noise filter on. Button 3 restarts the game, ENTER
// resets the settings as well. All buttons are active low and debounced.
//
// Timing: one pixel per system clock (65 MHz for 1024 x 768 at 60 Hz). The
// VGA colour and the registered sync/blank outputs are aligned with each
// other. The camera picture reaches the screen KEY_LATENCY + 1 clocks after it
// leaves the frame memory, with the keyer result aligned to it. The ball and
// other graphics use the current screen position, so the camera layer appears
// shifted right by that many pixels relative to them, as in the original.
module live_action_pong
  import pong_pkg::*;
#(
  parameter int unsigned CLKS_PER_SECOND = 60_000_000,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned FAST_CYCLES     = 2_375_000,
  parameter int unsigned SLOW_CYCLES     = 6_750_000,
  parameter int unsigned DRIFT_CYCLES    = 1_000_000,
  parameter int signed   BALL_VX         = 5,
  parameter int signed   BALL_VY         = 3,
  parameter int signed   DAMAGE          = 10
) (
  input  logic        clk,             // system / pixel clock
  input  logic        cam_clk,         // camera line-locked clock (27 MHz)
  input  logic        rst,             // power-on reset, active high
  // camera: CCIR656 stream from the external video decoder chip
  input  logic [9:0]  tv_in_ycrcb,
  // user controls
  input  logic        button_up,
  input  logic        button_down,
  input  logic        button_left,
  input  logic        button_right,
  input  logic        button3,
  input  logic        button_enter,
  input  logic [7:0]  sw,
  // external frame memory (512K x 36, two clocks read latency)
  output logic [18:0] vram_addr,
  output logic        vram_we,
  output logic [35:0] vram_write_data,
  input  logic [35:0] vram_read_data,
  // VGA
  output rgb_t        vga_rgb,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  // hex display data and game status
  output logic [63:0] dispdata,
  output game_state_t game_state,
  output logic signed [7:0] health1,
  output logic signed [7:0] health2
);

  // ---------------- resets and buttons ----------------
  logic user_reset, reset;
  logic u, d, l, r, b3;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_enter (.clk, .reset(rst), .noisy(!button_enter), .clean(user_reset));
  assign reset = rst || user_reset;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_up    (.clk, .reset, .noisy(button_up),    .clean(u));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_down  (.clk, .reset, .noisy(button_down),  .clean(d));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_left  (.clk, .reset, .noisy(button_left),  .clean(l));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_right (.clk, .reset, .noisy(button_right), .clean(r));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) db_b3    (.clk, .reset, .noisy(!button3),     .clean(b3));

  logic [1:0] cam_rst_sync;
  always_ff @(posedge cam_clk) cam_rst_sync <= {cam_rst_sync[0], reset};

  // ---------------- display timing ----------------
  hcount_t hcount;
  vcount_t vcount;
  logic    hsync, vsync, blank;

  xvga timing (.clk, .rst(reset), .hcount, .vcount, .hsync, .vsync, .blank);

  // ---------------- camera clock domain ----------------
  logic [29:0] ycrcb;
  logic        f, v, h, dv;
  logic [7:0]  cam_r, cam_g, cam_b;
  logic [3:0]  ctrl_d;

  ntsc_decode decoder (.clk(cam_clk), .rst(cam_rst_sync[1]), .tv_in_ycrcb,
                       .ycrcb, .f, .v, .h, .data_valid(dv));

  ycrcb2rgb converter (.clk(cam_clk), .rst(cam_rst_sync[1]),
                       .y(ycrcb[29:20]), .cr(ycrcb[19:10]), .cb(ycrcb[9:0]),
                       .r(cam_r), .g(cam_g), .b(cam_b));

  // control signals follow the colour converter (1 clock for the decoder's
  // sample register + 3 converter stages)
  delay #(.DELAY_CYCLES(4), .DATA_WIDTH(4)) ctrl_delay (.clk(cam_clk), .din({f, v, h, dv}), .dout(ctrl_d));

  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  logic        ntsc_we;

  ntsc_to_zbt writer (.clk, .vclk(cam_clk), .rst(reset), .fvh(ctrl_d[3:1]), .dv(ctrl_d[0]),
                      .din({cam_r[7:2], cam_g[7:2], cam_b[7:2]}),
                      .ntsc_addr, .ntsc_data, .ntsc_we);

  // ---------------- frame memory port ----------------
  logic [17:0] vr_pixel;
  logic [18:0] read_addr;

  vram_display reader (.clk, .rst(reset), .hcount, .vcount, .vr_pixel,
                       .vram_addr(read_addr), .vram_read_data);

  wire write_slot = hcount[0];
  assign vram_addr       = write_slot ? ntsc_addr : read_addr;
  assign vram_we         = write_slot;
  assign vram_write_data = ntsc_data;

  // ---------------- camera pixel and keying ----------------
  logic [17:0] pixel18;
  logic        blank_q, hsync_q, vsync_q;

  always_ff @(posedge clk) begin
    pixel18 <= vr_pixel;
    blank_q <= blank;
    hsync_q <= hsync;
    vsync_q <= vsync;
  end

  rgb_t cam_pixel, cam_delayed;
  assign cam_pixel = rgb18_to_24(pixel18);

  hsv_bounds_t bg_bounds, pad_bounds;
  play_area_t  area;
  hcount_t     x_offset;
  vcount_t     y_offset;

  parameter_select #(.FAST_CYCLES(FAST_CYCLES), .SLOW_CYCLES(SLOW_CYCLES)) settings (
    .clk, .reset, .sw(sw[4:0]), .u, .d, .l, .r,
    .bg(bg_bounds), .pad(pad_bounds), .area, .x_offset, .y_offset, .dispdata);

  logic is_background, is_paddle;

  binarizer keyer (.clk, .pixel(cam_pixel), .bg(bg_bounds), .pad(pad_bounds),
                   .activate_kernel(sw[7]), .is_background, .is_paddle);

  delay #(.DELAY_CYCLES(KEY_LATENCY), .DATA_WIDTH(24)) pixel_delay (
    .clk, .din(cam_pixel), .dout(cam_delayed));

  // ---------------- background ----------------
  hcount_t ball_x;
  vcount_t ball_y;
  rgb_t    background;

  background_gen #(.DRIFT_CYCLES(DRIFT_CYCLES)) bg_gen (
    .clk, .reset, .hcount, .vcount, .x_offset, .y_offset,
    .ball_x, .ball_y, .mode(sw[3]), .pixel(background));

  // ---------------- graphics and game ----------------
  logic       stop_moving, miss_left, miss_right, paddle_hit;
  logic [2:0] hit_segment;

  vga_select #(.CLKS_PER_SECOND(CLKS_PER_SECOND), .DAMAGE(DAMAGE),
               .BALL_VX(BALL_VX), .BALL_VY(BALL_VY)) selector (
    .clk, .rst(reset), .game_reset(b3), .hcount, .vcount, .area,
    .is_background, .is_paddle, .background, .camera(cam_delayed),
    .show_camera(sw[6]), .replace_background(sw[5]),
    .pixel(vga_rgb), .ball_x, .ball_y,
    .state(game_state), .health1, .health2,
    .stop_moving, .miss_left, .miss_right, .paddle_hit, .hit_segment);

  assign vga_hsync = hsync_q;
  assign vga_vsync = vsync_q;
  assign vga_blank = blank_q;

endmodule
