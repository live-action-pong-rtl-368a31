// Colour keyer: classifies each camera pixel as green-screen background,
// paddle, or neither.
//
// The RGB pixel goes through rgb2hsv (23 clocks). A pixel is "background"
// when hue, saturation and value all lie inside the background bounds
// (inclusive); otherwise it is "paddle" when they lie inside the paddle
// bounds. Background takes priority, so a pixel is never both.
//
// Noise is removed with a one-dimensional morphological opening along the
// line: the two class bits are shifted into 5-bit registers; erosion shifts a
// 1 into a second 5-bit register only when all five bits are 1; dilation then
// outputs 1 when any of the five eroded bits is 1. A run of fewer than five
// equal pixels is dropped, longer runs survive intact. With activate_kernel
// low the raw class bit of the same pixel is output instead, so the latency
// is the same in both modes.
//
// Timing: is_background/is_paddle belong to the pixel presented
// KEY_LATENCY = 30 clocks earlier (23 conversion + 3 registers + the 4-pixel
// lag of the centre of the 9-pixel opening window). One pixel per clock.
// The 5-pixel registers, the erosion/dilation rule and the priority follow
// the original keyer; the bypass alignment is this design's choice.
module binarizer
  import pong_pkg::*;
(
  input  logic        clk,
  input  rgb_t        pixel,
  input  hsv_bounds_t bg,              // green-screen window
  input  hsv_bounds_t pad,             // paddle window
  input  logic        activate_kernel,
  output logic        is_background,
  output logic        is_paddle
);

  logic [7:0] h, s, v;

  rgb2hsv converter (.clk, .r(pixel.r), .g(pixel.g), .b(pixel.b), .h, .s, .v);

  function automatic logic in_window(input hsv_bounds_t w, input logic [7:0] hh,
                                  input logic [7:0] ss, input logic [7:0] vv);
    return hh >= w.hue.min && hh <= w.hue.max &&
           ss >= w.sat.min && ss <= w.sat.max &&
           vv >= w.val.min && vv <= w.val.max;
  endfunction

  wire bg_hit  = in_window(bg, h, s, v);
  wire pad_hit = !bg_hit && in_window(pad, h, s, v);

  logic [4:0] initial_bg, initial_pad;   // newest pixel in bit 4
  logic [4:0] eroded_bg, eroded_pad;
  logic       raw_bg, raw_pad;           // class of the window centre

  always_ff @(posedge clk) begin
    initial_bg  <= {bg_hit,  initial_bg[4:1]};
    initial_pad <= {pad_hit, initial_pad[4:1]};
    eroded_bg   <= {&initial_bg,  eroded_bg[4:1]};
    eroded_pad  <= {&initial_pad, eroded_pad[4:1]};
    raw_bg      <= initial_bg[0];
    raw_pad     <= initial_pad[0];
    if (activate_kernel) begin
      is_background <= |eroded_bg;
      is_paddle     <= |eroded_pad;
    end else begin
      is_background <= raw_bg;
      is_paddle     <= raw_pad;
    end
  end

endmodule
