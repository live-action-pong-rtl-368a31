// Health bars of both players.
//
// Combinational: for the pixel (hcount, vcount) it tells whether the pixel
// lies on player 1's bar (left) or player 2's bar (right). Both bars occupy
// the rows strictly between BAR_NEAR and BAR_FAR lines above y_max. The left
// bar covers the columns x with 0 < x - x_min - MARGIN < SCALE * health, the
// right bar mirrors it from x_max - MARGIN leftwards, so a bar is
// SCALE * health - 1 pixels long (199 at full health). A player with
// health <= 0 shows no bar. The bars follow the play area when it is
// resized. The distances 20/40/20, SCALE = 2, the strict comparisons and the
// full health of 100 are the original's.
module health_bar
  import pong_pkg::*;
#(
  parameter int unsigned MARGIN   = 20,
  parameter int unsigned BAR_NEAR = 20,
  parameter int unsigned BAR_FAR  = 40,
  parameter int unsigned SCALE    = 2
) (
  input  hcount_t           hcount,
  input  vcount_t           vcount,
  input  play_area_t        area,
  input  logic signed [7:0] health1,
  input  logic signed [7:0] health2,
  output logic              is_health1,
  output logic              is_health2
);

  typedef logic signed [13:0] s_t;

  s_t px, py, xmin, xmax, ymax, len1, len2;
  assign px   = s_t'({1'b0, hcount});
  assign py   = s_t'({1'b0, vcount});
  assign xmin = s_t'({1'b0, area.x_min});
  assign xmax = s_t'({1'b0, area.x_max});
  assign ymax = s_t'({1'b0, area.y_max});
  assign len1 = s_t'(health1) * s_t'(SCALE);
  assign len2 = s_t'(health2) * s_t'(SCALE);

  wire in_rows = (ymax - py > s_t'(BAR_NEAR)) && (ymax - py < s_t'(BAR_FAR));

  assign is_health1 = (health1 > 0) && in_rows &&
                      (px - xmin > s_t'(MARGIN)) && (px - xmin - s_t'(MARGIN) < len1);
  assign is_health2 = (health2 > 0) && in_rows &&
                      (xmax - px > s_t'(MARGIN)) && (xmax - s_t'(MARGIN) - len2 < px);

endmodule
