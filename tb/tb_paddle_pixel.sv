// Testbench for paddle_pixel: for several play areas sweeps hcount over the
// whole line and checks that the colour is red left of the play-area centre
// and green from the centre on, switching exactly once.
`include "tb_check.svh"
module tb_paddle_pixel;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  hcount_t hcount;
  play_area_t area;
  rgb_t colour;

  paddle_pixel dut (.*);

  initial begin
    #10_000_000;
    failures++;
    `TB_FINISH
  end

  initial begin
    int xs [4][2] = '{'{190, 617}, '{0, 1023}, '{100, 101}, '{500, 900}};
    foreach (xs[i]) begin
      int bad, switches, centre;
      rgb_t prev;
      area = '{x_min: 11'(xs[i][0]), x_max: 11'(xs[i][1]), y_min: 10'd0, y_max: 10'd700};
      centre = (xs[i][0] + xs[i][1]) / 2;
      bad = 0; switches = 0;
      for (int h = 0; h < 1344; h++) begin
        hcount = 11'(h);
        #1;
        if (colour != (h < centre ? 24'hFF0000 : 24'h00FF00)) bad++;
        if (h > 0 && colour != prev) switches++;
        prev = colour;
      end
      `CHECK(bad == 0 && switches == 1, $sformatf("area %0d..%0d: %0d wrong, %0d switches", xs[i][0], xs[i][1], bad, switches))
    end
    `TB_FINISH
  end
endmodule
