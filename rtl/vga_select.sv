// VGA selector: game logic and the final per-pixel choice.
//
// Game logic. After power-up the game waits for the first game reset (button
// 3). While game_reset is high the ball is re-centred, both healths return to
// FULL_HEALTH, the game-over state is cleared and a countdown is loaded with
// SECONDS * CLKS_PER_SECOND clocks; the ball stays still until it has run
// out, which gives the player who pressed the button time to walk back. Each
// time the ball bounces off the left wall player 1 (left) loses DAMAGE
// health, off the right wall player 2 loses DAMAGE. A player whose health
// reaches zero or less loses: the state becomes RIGHT_WINS or LEFT_WINS, the
// ball stops and the victory and defeat texts appear at the winner's and the
// loser's edge of the play area.
//
// Pixel choice, highest priority first:
//   outside the play area                  grey (GRAY)
//   game over and a text pixel             text colour
//   ball                                   BALL_COLOUR
//   health bar                             HEALTH_COLOUR
//   paddle (keyer)                         left/right paddle colour
//   green screen and replace_background    background image
//   anything else                          camera pixel if show_camera, else black
// The chosen colour is registered: pixel belongs to the hcount/vcount of the
// previous clock. The graphics use the current hcount/vcount; the camera,
// background and keyer inputs must already be aligned with each other.
//
// The ball, health bar, paddle and text sub-blocks are instantiated here.
// Following the original: 100 health per player, 5 s restart countdown,
// CLKS_PER_SECOND = 60,000,000, the grey and ball colours, the text
// placement. The damage per miss (10), the priority order and the health and
// black colours are this design's choices.
module vga_select
  import pong_pkg::*;
#(
  parameter int unsigned CLKS_PER_SECOND = 60_000_000,
  parameter int unsigned SECONDS         = 5,
  parameter int signed   FULL_HEALTH     = 100,
  parameter int signed   DAMAGE          = 10,
  parameter int signed   BALL_VX         = 5,
  parameter int signed   BALL_VY         = 3,
  parameter int unsigned BALL_R          = 30,
  parameter rgb_t        GRAY            = '{r: 8'h0F, g: 8'h0F, b: 8'h0F},
  parameter rgb_t        BALL_COLOUR     = '{r: 8'h03, g: 8'h0F, b: 8'h3F},
  parameter rgb_t        HEALTH_COLOUR   = '{r: 8'hFF, g: 8'hB0, b: 8'h00}
) (
  input  logic              clk,
  input  logic              rst,                 // power-up reset
  input  logic              game_reset,          // button 3, active high
  input  hcount_t           hcount,
  input  vcount_t           vcount,
  input  play_area_t        area,
  input  logic              is_background,
  input  logic              is_paddle,
  input  rgb_t              background,
  input  rgb_t              camera,
  input  logic              show_camera,
  input  logic              replace_background,
  output rgb_t              pixel,
  output hcount_t           ball_x,
  output vcount_t           ball_y,
  // status, for observation
  output game_state_t       state,
  output logic signed [7:0] health1,
  output logic signed [7:0] health2,
  output logic              stop_moving,
  output logic              miss_left,
  output logic              miss_right,
  output logic              paddle_hit,
  output logic [2:0]        hit_segment
);

  localparam longint unsigned COUNT = longint'(SECONDS) * longint'(CLKS_PER_SECOND);
  localparam int unsigned     CW    = $clog2(COUNT + 1);

  logic          started;
  logic [CW-1:0] countdown;

  assign stop_moving = (state != GAME_ON) || !started || (countdown != '0);

  // ---------------- ball ----------------
  logic       is_ball;

  ball #(.INIT_VX(BALL_VX), .INIT_VY(BALL_VY), .R(BALL_R)) the_ball (
    .clk, .reset(rst || game_reset), .stop_moving, .hcount, .vcount, .area,
    .paddle_px(is_paddle), .is_ball, .ball_x, .ball_y,
    .miss_left, .miss_right, .hit(paddle_hit), .hit_segment
  );

  // ---------------- game state ----------------
  wire signed [8:0] next1 = 9'(health1) - 9'(DAMAGE);
  wire signed [8:0] next2 = 9'(health2) - 9'(DAMAGE);

  always_ff @(posedge clk) begin
    if (rst) begin
      started   <= 1'b0;
      countdown <= '0;
      state     <= GAME_ON;
      health1   <= 8'(FULL_HEALTH);
      health2   <= 8'(FULL_HEALTH);
    end else if (game_reset) begin
      started   <= 1'b1;
      countdown <= CW'(COUNT);
      state     <= GAME_ON;
      health1   <= 8'(FULL_HEALTH);
      health2   <= 8'(FULL_HEALTH);
    end else begin
      if (countdown != '0) countdown <= countdown - 1'b1;
      if (state == GAME_ON) begin
        if (miss_left) begin
          health1 <= 8'(next1);
          if (next1 <= 0) state <= RIGHT_WINS;
        end
        if (miss_right) begin
          health2 <= 8'(next2);
          if (next2 <= 0) state <= LEFT_WINS;
        end
      end
    end
  end

  // ---------------- graphics ----------------
  logic is_health1, is_health2;
  health_bar bars (.hcount, .vcount, .area, .health1, .health2, .is_health1, .is_health2);

  rgb_t paddle_colour;
  paddle_pixel paddles (.hcount, .area, .colour(paddle_colour));

  hcount_t box_left, box_right;
  assign box_left  = area.x_min;
  assign box_right = area.x_max - hcount_t'(100);

  logic win_px, lose_px;
  rgb_t win_colour, lose_colour;
  gameover_text #(.VICTORY(1'b1), .TEXT_COLOUR('{r: 8'hFF, g: 8'hD0, b: 8'h00})) win_text (
    .hcount, .vcount, .left((state == LEFT_WINS) ? box_left : box_right), .top(area.y_min),
    .is_text(win_px), .colour(win_colour));
  gameover_text #(.VICTORY(1'b0), .TEXT_COLOUR('{r: 8'hFF, g: 8'h20, b: 8'h20})) lose_text (
    .hcount, .vcount, .left((state == LEFT_WINS) ? box_right : box_left), .top(area.y_min),
    .is_text(lose_px), .colour(lose_colour));

  wire in_area = hcount >= area.x_min && hcount <= area.x_max &&
                 vcount >= area.y_min && vcount <= area.y_max;

  rgb_t chosen;
  always_comb begin
    if (!in_area)                                 chosen = GRAY;
    else if (state != GAME_ON && (win_px || lose_px)) chosen = win_colour | lose_colour;
    else if (is_ball)                             chosen = BALL_COLOUR;
    else if (is_health1 || is_health2)            chosen = HEALTH_COLOUR;
    else if (is_paddle)                           chosen = paddle_colour;
    else if (is_background && replace_background) chosen = background;
    else if (show_camera)                         chosen = camera;
    else                                          chosen = '0;
  end

  always_ff @(posedge clk) pixel <= chosen;

endmodule
