// Shared types and constants of the live-action pong system.
//
// The display runs at 1024x768 (XGA timing, 1344 x 806 total), the camera
// frame is stored as 18-bit RGB (6 bits per channel) in a 512K x 36-bit
// frame memory, two pixels per word. Colour keying works on 8-bit HSV.
// Pipeline latencies that several modules must agree on live here so that
// the top can line up the camera pixel with its classification.
package pong_pkg;

  // display geometry
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned H_TOTAL  = 1344;
  localparam int unsigned V_ACTIVE = 768;
  localparam int unsigned V_TOTAL  = 806;

  typedef logic [10:0] hcount_t;
  typedef logic [9:0]  vcount_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // inclusive lower/upper bound of one HSV channel
  typedef struct packed {
    logic [7:0] max;
    logic [7:0] min;
  } range8_t;

  // HSV window used to recognise one colour class
  typedef struct packed {
    range8_t hue;
    range8_t sat;
    range8_t val;
  } hsv_bounds_t;

  // play area in screen coordinates (inclusive)
  typedef struct packed {
    hcount_t x_min;
    hcount_t x_max;
    vcount_t y_min;
    vcount_t y_max;
  } play_area_t;

  // rgb2hsv: input register, min/max, delta, dividend/divisor, divider, hue fix-up
  localparam int unsigned DIV_LATENCY = 18;
  localparam int unsigned HSV_LATENCY = 4 + DIV_LATENCY + 1;   // 23
  // binarizer: threshold register, erosion register, dilation register, and
  // the 4-pixel lag of the centre of the 9-pixel opening window
  localparam int unsigned KEY_LATENCY = HSV_LATENCY + 3 + 4;   // 30

  // game-over state held by the VGA selector
  typedef enum logic [1:0] {
    GAME_ON    = 2'd0,
    LEFT_WINS  = 2'd1,
    RIGHT_WINS = 2'd2
  } game_state_t;

  function automatic rgb_t rgb18_to_24(input logic [17:0] p);
    return '{r: {p[17:12], 2'b00}, g: {p[11:6], 2'b00}, b: {p[5:0], 2'b00}};
  endfunction

endpackage
