// Background generator: the picture that replaces the green screen.
//
// The screen position is translated into image coordinates, looked up in a
// 1024 x 512 x 4-bit index memory, and the 4-bit index is turned into 24-bit
// colour by a 16-entry palette (three 8-bit lookup tables in the original,
// one 24-bit table here). Translation:
//   mode = 0 (bounce): image = screen - offset - ball_position / 2, so the
//                      picture sways with the ball;
//   mode = 1 (drift):  image x = screen x - offset x + time_delta and
//                      image y = screen y - offset y, where time_delta grows
//                      by one every DRIFT_CYCLES clocks, so the picture
//                      scrolls slowly sideways and wraps.
// The low 9 bits of y and 10 bits of x address the image, so it tiles.
//
// Timing: the colour for (hcount, vcount) appears two clocks later (index
// read, palette read). The palette formula (0 black, 1 white, 2..15 shades of
// blue-grey) and the image content are this design's; the translation rules,
// DRIFT_CYCLES = 1,000,000 and the memory shape follow the original.
module background_gen
  import pong_pkg::*;
#(
  parameter int unsigned DRIFT_CYCLES = 1_000_000
) (
  input  logic    clk,
  input  logic    reset,
  input  hcount_t hcount,
  input  vcount_t vcount,
  input  hcount_t x_offset,
  input  vcount_t y_offset,
  input  hcount_t ball_x,
  input  vcount_t ball_y,
  input  logic    mode,
  output rgb_t    pixel
);

  localparam int unsigned CW = $clog2(DRIFT_CYCLES + 1);

  logic [CW-1:0] counter;
  hcount_t       time_delta;

  always_ff @(posedge clk) begin
    if (reset) begin
      counter    <= '0;
      time_delta <= '0;
    end else if (counter == CW'(DRIFT_CYCLES - 1)) begin
      counter    <= '0;
      time_delta <= time_delta + 1'b1;
    end else begin
      counter <= counter + 1'b1;
    end
  end

  vcount_t tv;
  hcount_t th;

  always_comb begin
    if (mode) begin
      tv = vcount - y_offset;
      th = hcount - x_offset + time_delta;
    end else begin
      tv = vcount - y_offset - {1'b0, ball_y[9:1]};
      th = hcount - x_offset - {1'b0, ball_x[10:1]};
    end
  end

  logic [3:0] index;

  bg_index_rom index_rom (.clk, .addr({tv[8:0], th[9:0]}), .index);

  // 16-entry palette: 0 black, 1 white, 2..15 blue-grey shades
  function automatic rgb_t palette(input logic [3:0] i);
    if (i == 4'd0) return '0;
    if (i == 4'd1) return '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
    return '{r: 8'(i * 14), g: 8'(i * 15), b: 8'(i * 15 + 30)};
  endfunction

  always_ff @(posedge clk) pixel <= palette(index);

endmodule
