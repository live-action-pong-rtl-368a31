// Paddle colouring.
//
// A pixel that the keyer classified as paddle is redrawn in a solid colour
// that depends only on which half of the play area it lies in: LEFT_COLOUR
// left of the centre line, RIGHT_COLOUR from the centre line on. No blob
// detection is needed; each player's paddle simply takes the colour of that
// player's side. Combinational. The colours (red left, green right) are this
// design's choice; the two-colour split at the centre follows the original.
module paddle_pixel
  import pong_pkg::*;
#(
  parameter rgb_t LEFT_COLOUR  = '{r: 8'hFF, g: 8'h00, b: 8'h00},
  parameter rgb_t RIGHT_COLOUR = '{r: 8'h00, g: 8'hFF, b: 8'h00}
) (
  input  hcount_t    hcount,
  input  play_area_t area,
  output rgb_t       colour
);

  hcount_t centre;
  assign centre = hcount_t'((12'(area.x_min) + 12'(area.x_max)) >> 1);
  assign colour = (hcount < centre) ? LEFT_COLOUR : RIGHT_COLOUR;

endmodule
