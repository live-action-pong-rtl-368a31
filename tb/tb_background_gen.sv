// Testbench for background_gen (DRIFT_CYCLES reduced to 50): drives random
// screen positions, offsets, ball positions and both modes every clock and
// compares the colour two clocks later with a reference model of the
// translation rules, the picture formula and the palette (integer arithmetic,
// written independently of the RTL). Directed checks: the disc centre is lit,
// the far sky corner is black, the picture tiles every 1024 x 512 pixels,
// moving the ball by two pixels shifts the bounce-mode picture by one, and in
// drift mode the picture moves one pixel every DRIFT_CYCLES clocks.
`include "tb_check.svh"
module tb_background_gen;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  localparam int DRIFT = 50;
  logic clk = 0, reset = 1;
  always #5 clk = !clk;
  hcount_t hcount, x_offset, ball_x;
  vcount_t vcount, y_offset, ball_y;
  logic mode;
  rgb_t pixel;

  background_gen #(.DRIFT_CYCLES(DRIFT)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  function automatic int image(int x, int y);
    int d2, l2, shade;
    d2 = (x - 512) * (x - 512) + (y - 256) * (y - 256);
    l2 = (x - 448) * (x - 448) + (y - 192) * (y - 192);
    if (d2 < 192 * 192) begin
      shade = l2 / 8192;
      return shade > 12 ? 2 : 15 - shade;
    end
    // star hash
    begin
      int h;
      h = ((x % 8) * 8192 + (y % 64) * 128 + x / 8) ^ (y * 128 + (x % 128)) ^ 'h6A3C;
      return (h % 1024) == 'h2A5 ? 1 : 0;
    end
  endfunction

  function automatic rgb_t colour(int i);
    if (i == 0) return '0;
    if (i == 1) return 24'hFFFFFF;
    return '{r: 8'(i * 14), g: 8'(i * 15), b: 8'(i * 15 + 30)};
  endfunction

  function automatic rgb_t model(bit m, int h, int v, int ox, int oy, int bx, int by, int delta);
    int tx, ty;
    if (m) begin
      tx = h - ox + delta;
      ty = v - oy;
    end else begin
      tx = h - ox - bx / 2;
      ty = v - oy - by / 2;
    end
    tx = ((tx % 2048) + 2048) % 1024;
    ty = ((ty % 1024) + 1024) % 512;
    return colour(image(tx, ty));
  endfunction

  int n = 0;   // clocks since reset was released
  always @(posedge clk) if (!reset) n++;

  // expectation of the inputs set before the coming clock edge, and of the
  // inputs sampled by the previous edge; the result of the inputs sampled at
  // one edge is visible just after the next one
  rgb_t cur_e, p1_e, p2_e;
  bit   cur_v = 0, p1_v = 0, p2_v = 0;
  int   nonblack = 0;

  task automatic put(bit m, int h, int v, int ox, int oy, int bx, int by);
    @(negedge clk);
    mode = m; hcount = 11'(h); vcount = 10'(v); x_offset = 11'(ox); y_offset = 10'(oy);
    ball_x = 11'(bx); ball_y = 10'(by);
    cur_e = model(m, h, v, ox, oy, bx, by, n / DRIFT);
    cur_v = !reset;
  endtask

  always @(posedge clk) begin
    {p2_v, p2_e} = {p1_v, p1_e};
    {p1_v, p1_e} = {cur_v, cur_e};
    cur_v = 0;
    #1;
    if (p2_v) begin
      `CHECK(pixel == p2_e, $sformatf("pixel %h expected %h (hcount %0d, mode %0d)", pixel, p2_e, hcount, mode))
      if (p2_e != 0) nonblack++;
    end
  end

  // return the colour produced for one input set (directed checks)
  task automatic probe(bit m, int h, int v, int ox, int oy, int bx, int by, output rgb_t c);
    put(m, h, v, ox, oy, bx, by);
    repeat (2) @(negedge clk);
    #2 c = pixel;
  endtask

  initial begin
    put(0, 0, 0, 0, 0, 0, 0);
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 20000; i++)
      put($urandom_range(1), $urandom_range(1343), $urandom_range(805), $urandom_range(2047),
          $urandom_range(1023), $urandom_range(1023), $urandom_range(767));
    // a full scan line through the disc in both modes
    for (int h = 0; h < 1024; h++) put(0, h, 326, 0, 70, 0, 0);
    for (int h = 0; h < 1024; h++) put(1, h, 256, 0, 0, 0, 0);
    repeat (4) @(negedge clk);
    `CHECK(nonblack > 400, $sformatf("%0d lit pixels seen", nonblack))
    begin
      rgb_t a, b, c;
      probe(0, 512, 256, 0, 0, 0, 0, a);
      `CHECK(a.b > 8'd150, $sformatf("disc centre lit (%h)", a))
      probe(0, 10, 10, 0, 0, 0, 0, a);
      `CHECK(a == 0, "sky corner black")
      probe(0, 300, 200, 17, 5, 100, 60, a);
      probe(0, 300 + 1024, 200 - 512, 17, 5, 100, 60, b);
      `CHECK(a == b, "picture tiles")
      probe(0, 450, 300, 0, 0, 200, 100, a);
      probe(0, 451, 301, 0, 0, 202, 102, b);
      `CHECK(a == b && a != 0, "ball moves picture by half its motion")
      // drift: the same screen point shows the picture shifted by one pixel
      // after DRIFT_CYCLES clocks
      // (the disc edge on the picture's middle row is at x = 320/321)
      begin
        int h;
        while (n % DRIFT != 5) @(negedge clk);
        h = 320 - n / DRIFT;
        probe(1, h, 256, 0, 0, 0, 0, a);
        repeat (DRIFT - 3) @(negedge clk);
        probe(1, h - 1, 256, 0, 0, 0, 0, b);
        probe(1, h, 256, 0, 0, 0, 0, c);
      end
      `CHECK(a == b && a != c, "drift moves picture one pixel per period")
      end
    `TB_FINISH
  end
endmodule
