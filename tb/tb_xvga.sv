// Testbench for xvga: runs a little over one frame and checks the counter
// ranges, the frame length, and the position and length of blanking and of
// both sync pulses against the XGA numbers (1344 x 806 total, 1024 x 768
// visible, hsync low 1048..1183, vsync low on lines 777..782).
`include "tb_check.svh"
module tb_xvga;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  hcount_t hcount; vcount_t vcount;
  logic hsync, vsync, blank;
  always #5 clk = !clk;

  xvga dut (.*);

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

  int cycles, frame_start, hsync_low_line, vsync_low_lines, bad_blank, bad_h, bad_v;
  int max_h, max_v;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // wait for the first wrap to (0,0)
    @(posedge clk);
    while (!(hcount == 0 && vcount == 0)) @(posedge clk);
    frame_start = 0;
    cycles = 0; bad_blank = 0; bad_h = 0; bad_v = 0; hsync_low_line = 0; vsync_low_lines = 0;
    max_h = 0; max_v = 0;
    do begin
      // outputs describe the position on the counters
      if (blank != (hcount >= 1024 || vcount >= 768)) bad_blank++;
      if (hsync != !(hcount >= 1048 && hcount <= 1183)) bad_h++;
      if (vsync != !(vcount >= 777 && vcount <= 782)) bad_v++;
      if (vcount == 10 && !hsync) hsync_low_line++;
      if (hcount == 0 && !vsync) vsync_low_lines++;
      if (int'(hcount) > max_h) max_h = hcount;
      if (int'(vcount) > max_v) max_v = vcount;
      cycles++;
      @(posedge clk);
    end while (!(hcount == 0 && vcount == 0));
    `CHECK(cycles == 1344 * 806, $sformatf("frame length %0d", cycles))
    `CHECK(max_h == 1343, $sformatf("max hcount %0d", max_h))
    `CHECK(max_v == 805, $sformatf("max vcount %0d", max_v))
    `CHECK(bad_blank == 0, $sformatf("blank wrong on %0d cycles", bad_blank))
    `CHECK(bad_h == 0, $sformatf("hsync wrong on %0d cycles", bad_h))
    `CHECK(bad_v == 0, $sformatf("vsync wrong on %0d cycles", bad_v))
    `CHECK(hsync_low_line == 136, $sformatf("hsync low %0d per line", hsync_low_line))
    `CHECK(vsync_low_lines == 6, $sformatf("vsync low %0d lines", vsync_low_lines))
    `TB_FINISH
  end
endmodule
