// Victory / defeat text shown at the end of a game.
//
// Draws the word "WIN" (VICTORY = 1) or "LOSE" (VICTORY = 0) in a
// 100 x 200 pixel box whose top-left corner is (left, top): the letters are
// 5 x 7 pixel glyphs enlarged SCALE = 6 times (30 x 42), stacked vertically
// one above the other every 48 lines and centred in the box. The caller moves
// the box, so the text follows the play area when it is resized.
// Combinational: is_text is high on a lit glyph pixel and colour is then
// TEXT_COLOUR (zero otherwise, so the two instances can be ORed). The box
// size is the original's; the original's bitmap was a large generated lookup
// table, while this design draws the words from a small built-in font.
module gameover_text
  import pong_pkg::*;
#(
  parameter bit   VICTORY     = 1'b1,
  parameter rgb_t TEXT_COLOUR = '{r: 8'hFF, g: 8'hD0, b: 8'h00}
) (
  input  hcount_t hcount,
  input  vcount_t vcount,
  input  hcount_t left,
  input  vcount_t top,
  output logic    is_text,
  output rgb_t    colour
);

  localparam int unsigned BOX_W   = 100;
  localparam int unsigned BOX_H   = 200;
  localparam int unsigned SCALE   = 6;
  localparam int unsigned GLYPH_W = 5 * SCALE;
  localparam int unsigned GLYPH_H = 7 * SCALE;
  localparam int unsigned PITCH   = GLYPH_H + SCALE;
  localparam int unsigned LETTERS = VICTORY ? 3 : 4;
  localparam int unsigned X0      = (BOX_W - GLYPH_W) / 2;
  localparam int unsigned Y0      = (BOX_H - LETTERS * PITCH + SCALE) / 2;

  typedef enum logic [2:0] {CH_W, CH_I, CH_N, CH_L, CH_O, CH_S, CH_E} glyph_t;

  // 5-pixel row of a glyph, bit 4 = leftmost
  function automatic logic [4:0] glyph_row(input glyph_t c, input logic [2:0] row);
    logic [34:0] g;
    unique case (c)
      CH_W: g = {5'b10001, 5'b10001, 5'b10001, 5'b10101, 5'b10101, 5'b10101, 5'b01010};
      CH_I: g = {5'b01110, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b01110};
      CH_N: g = {5'b10001, 5'b11001, 5'b10101, 5'b10011, 5'b10001, 5'b10001, 5'b10001};
      CH_L: g = {5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b11111};
      CH_O: g = {5'b01110, 5'b10001, 5'b10001, 5'b10001, 5'b10001, 5'b10001, 5'b01110};
      CH_S: g = {5'b01111, 5'b10000, 5'b10000, 5'b01110, 5'b00001, 5'b00001, 5'b11110};
      CH_E: g = {5'b11111, 5'b10000, 5'b10000, 5'b11110, 5'b10000, 5'b10000, 5'b11111};
      default: g = '0;
    endcase
    return g[34 - 5 * int'(row) -: 5];
  endfunction

  function automatic glyph_t letter(input logic [1:0] i);
    if (VICTORY) return (i == 0) ? CH_W : (i == 1) ? CH_I : CH_N;
    return (i == 0) ? CH_L : (i == 1) ? CH_O : (i == 2) ? CH_S : CH_E;
  endfunction

  logic signed [12:0] lx, ly;
  assign lx = $signed({2'b00, hcount}) - $signed({2'b00, left}) - 13'(X0);
  assign ly = $signed({3'b000, vcount}) - $signed({3'b000, top}) - 13'(Y0);

  logic [12:0] ux, uy, slot, offset, row, col;
  logic [4:0]  bits;

  always_comb begin
    ux     = 13'(lx);
    uy     = 13'(ly);
    slot   = uy / 13'(PITCH);
    offset = uy - slot * 13'(PITCH);
    row    = offset / 13'(SCALE);
    col    = ux / 13'(SCALE);
    bits   = glyph_row(letter(slot[1:0]), row[2:0]);
    is_text = (lx >= 0) && (lx < 13'(GLYPH_W)) && (ly >= 0) &&
              (slot < 13'(LETTERS)) && (offset < 13'(GLYPH_H)) &&
              bits[4 - int'(col[2:0])];
  end

  assign colour = is_text ? TEXT_COLOUR : '0;

endmodule
