// Behavioural camera for the system testbenches: produces a CCIR656 stream
// (10-bit words on a 27 MHz clock, EAV/SAV timing codes, Cb Y Cr Y samples)
// of a synthetic scene. Each frame has BLANK_LINES vertical-blanking lines
// and ACTIVE_LINES picture lines of PIXELS pixels in field 0, followed by a
// short field 1 (F1_LINES lines) that the design ignores.
//
// Scene: a green screen (RGB 0,200,0). With `paddles` set, two blue
// (0,40,220) vertical stripes cover pixel columns LEFT_P0..LEFT_P1 and
// RIGHT_P0..RIGHT_P1 of every line. With `noise` set, sparse two-pixel blue
// dots (one chroma pair each) appear every 64 pixels between NOISE_P0 and
// NOISE_P1 on every 16th line from NOISE_L0 to NOISE_L1; a 5-pixel opening
// removes them. Colours are converted to YCrCb with the BT.601 studio-range
// equations. `frames` counts completed frames.
module ccir656_source #(
  parameter int BLANK_LINES  = 10,
  parameter int ACTIVE_LINES = 250,
  parameter int PIXELS       = 720,
  parameter int F1_LINES     = 4,
  parameter int LEFT_P0 = 557, LEFT_P1 = 597, RIGHT_P0 = 247, RIGHT_P1 = 287,
  parameter int NOISE_P0 = 347, NOISE_P1 = 527, NOISE_L0 = 100, NOISE_L1 = 200
) (
  input  logic       clk,
  input  bit         paddles,
  input  bit         noise,
  output logic [9:0] tv,
  output int         frames
);

  initial frames = 0;

  function automatic logic [9:0] xy(input bit ff, input bit vv, input bit hh);
    logic [3:0] p;
    p = {vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh};
    return {1'b1, ff, vv, hh, p, 2'b00};
  endfunction

  // studio-range YCbCr of an RGB colour, 10 bits
  function automatic logic [29:0] ycc(input int r, input int g, input int b);
    real y, cb, cr;
    y  = 16.0 + 0.257 * r + 0.504 * g + 0.098 * b;
    cb = 128.0 - 0.148 * r - 0.291 * g + 0.439 * b;
    cr = 128.0 + 0.439 * r - 0.368 * g - 0.071 * b;
    return {10'($rtoi(y * 4.0 + 0.5)), 10'($rtoi(cb * 4.0 + 0.5)), 10'($rtoi(cr * 4.0 + 0.5))};
  endfunction

  logic [29:0] green, blue;

  function automatic bit is_blue(int line, int p);
    if (paddles && ((p >= LEFT_P0 && p <= LEFT_P1) || (p >= RIGHT_P0 && p <= RIGHT_P1))) return 1;
    if (noise && line >= NOISE_L0 && line <= NOISE_L1 && line % 16 == 8 &&
        p >= NOISE_P0 && p <= NOISE_P1 && p % 64 < 2) return 1;
    return 0;
  endfunction

  task automatic put(input logic [9:0] w);
    @(negedge clk) tv = w;
  endtask

  task automatic line(input bit ff, input bit vv, input int ln, input int npix);
    put(10'h3ff); put(10'h000); put(10'h000); put(xy(ff, vv, 1'b1));   // EAV
    for (int i = 0; i < 16; i++) put((i % 2) ? 10'h040 : 10'h200);
    put(10'h3ff); put(10'h000); put(10'h000); put(xy(ff, vv, 1'b0));   // SAV
    for (int p = 0; p < npix; p += 2) begin
      logic [29:0] c0, c1;
      if (vv) begin
        c0 = {10'h040, 10'h200, 10'h200};
        c1 = c0;
      end else begin
        c0 = is_blue(ln, p) ? blue : green;
        c1 = is_blue(ln, p + 1) ? blue : green;
      end
      put(c0[19:10]); put(c0[29:20]); put(c0[9:0]); put(c1[29:20]);
    end
  endtask

  initial begin
    green = ycc(0, 200, 0);
    blue  = ycc(0, 40, 220);
    tv = 10'h200;
    forever begin
      for (int i = 0; i < BLANK_LINES; i++)  line(1'b0, 1'b1, 0, 16);
      for (int i = 0; i < ACTIVE_LINES; i++) line(1'b0, 1'b0, i, PIXELS);
      for (int i = 0; i < 2; i++)            line(1'b1, 1'b1, 0, 16);
      for (int i = 0; i < F1_LINES; i++)     line(1'b1, 1'b0, 0, 32);
      frames++;
    end
  end

endmodule
