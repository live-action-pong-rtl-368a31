// Testbench for health_bar: for several play areas and health values
// (full, partial, one, zero, negative) scans the whole 1024 x 768 screen and
// checks both bar outputs pixel by pixel against the geometry: rows strictly
// between 20 and 40 lines above y_max, the left bar from x_min + 21 for
// 2 * health - 1 pixels, the right bar mirrored from x_max - 21, no bar at
// health <= 0. Also checks the number of pixels of each bar.
`include "tb_check.svh"
module tb_health_bar;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  hcount_t hcount;
  vcount_t vcount;
  play_area_t area;
  logic signed [7:0] health1, health2;
  logic is_health1, is_health2;

  health_bar dut (.*);

  initial begin
    #100_000_000;
    failures++;
    `TB_FINISH
  end

  initial begin
    play_area_t areas [2] = '{'{x_min: 11'd190, x_max: 11'd617, y_min: 10'd182, y_max: 10'd563},
                              '{x_min: 11'd0, x_max: 11'd1023, y_min: 10'd0, y_max: 10'd767}};
    int hv [5][2] = '{'{100, 100}, '{37, 80}, '{1, 0}, '{0, -10}, '{-5, 64}};
    foreach (areas[a])
      foreach (hv[t]) begin
        int bad, n1, n2;
        area = areas[a];
        health1 = 8'(hv[t][0]);
        health2 = 8'(hv[t][1]);
        bad = 0; n1 = 0; n2 = 0;
        for (int v = 0; v < 768; v++)
          for (int h = 0; h < 1024; h++) begin
            bit rows, e1, e2;
            hcount = 11'(h); vcount = 10'(v);
            #1;
            rows = (v < int'(area.y_max) - 20) && (v > int'(area.y_max) - 40);
            e1 = rows && h > int'(area.x_min) + 20 && h < int'(area.x_min) + 20 + 2 * hv[t][0];
            e2 = rows && h < int'(area.x_max) - 20 && h > int'(area.x_max) - 20 - 2 * hv[t][1];
            if (is_health1 != e1 || is_health2 != e2) bad++;
            n1 += is_health1;
            n2 += is_health2;
          end
        `CHECK(bad == 0, $sformatf("area %0d health %0d/%0d: %0d wrong pixels", a, hv[t][0], hv[t][1], bad))
        `CHECK(n1 == 19 * (hv[t][0] > 0 ? 2 * hv[t][0] - 1 : 0) && n2 == 19 * (hv[t][1] > 0 ? 2 * hv[t][1] - 1 : 0),
               $sformatf("bar sizes %0d %0d", n1, n2))
      end
    `TB_FINISH
  end
endmodule
