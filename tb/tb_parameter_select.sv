// Testbench for parameter_select (incrementor cooldowns 10 / 30 clocks):
// checks the power-up defaults, then for every switch setting of the table
// taps up, down, right and left and checks that exactly the selected
// register pair moved (upper bound +1 -1, lower bound +1 -1) while all other
// settings kept their value, that bit 3 of the switches is ignored, and that
// the hex-display word names the pair. Holding a button for 200 clocks
// must step a position setting (fast) about three times as often as a colour
// bound (slow).
`include "tb_check.svh"
module tb_parameter_select;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1;
  always #5 clk = !clk;
  logic [4:0] sw;
  logic u = 1, d = 1, l = 1, r = 1;
  hsv_bounds_t bg, pad;
  play_area_t area;
  hcount_t x_offset;
  vcount_t y_offset;
  logic [63:0] dispdata;

  parameter_select #(.FAST_CYCLES(10), .SLOW_CYCLES(30)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  typedef logic [135:0] snap_t;   // every setting, flattened
  function automatic snap_t snap();
    return {bg, pad, area, x_offset, y_offset, 9'h0};
  endfunction

  task automatic tap(ref logic btn);
    @(negedge clk) btn = 0;
    repeat (2) @(negedge clk);
    btn = 1;
    repeat (3) @(negedge clk);
  endtask

  // value of the selected pair as {upper, lower}
  function automatic logic [21:0] pair(input int mode);
    case (mode)
      0: return {3'b0, bg.hue.max, 3'b0, bg.hue.min};
      1: return {3'b0, bg.sat.max, 3'b0, bg.sat.min};
      2: return {3'b0, bg.val.max, 3'b0, bg.val.min};
      3: return {1'b0, area.y_max, 1'b0, area.y_min};
      4: return {area.x_max, area.x_min};
      5: return {1'b0, y_offset, x_offset};
      6: return {3'b0, pad.hue.max, 3'b0, pad.hue.min};
      7: return {3'b0, pad.sat.max, 3'b0, pad.sat.min};
      default: return {3'b0, pad.val.max, 3'b0, pad.val.min};
    endcase
  endfunction

  // {upper, lower} reduced modulo the widths of the selected pair
  function automatic logic [21:0] wrap(input int mode, input logic [10:0] hi, lo);
    int wh, wl;
    wh = (mode == 3 || mode == 5) ? 10 : (mode == 4) ? 11 : 8;
    wl = (mode == 3) ? 10 : (mode == 4 || mode == 5) ? 11 : 8;
    return {hi & 11'((1 << wh) - 1), lo & 11'((1 << wl) - 1)};
  endfunction

  localparam logic [4:0] SW [9] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100,
                                    5'b01101, 5'b10000, 5'b11001, 5'b10010};
  localparam logic [3:0] CODE [9] = '{4'hA, 4'hB, 4'hC, 4'hD, 4'hE, 4'hF, 4'hA, 4'hB, 4'hC};

  initial begin
    sw = 5'b00111;   // no pair selected
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (2) @(negedge clk);
    `CHECK(bg.hue.max == 8'h89 && bg.hue.min == 8'h2A && bg.val.min == 8'h27 &&
           bg.sat.min == 8'h00 && bg.sat.max == 8'hFF && bg.val.max == 8'hFF, "background defaults")
    `CHECK(pad.hue.max == 8'hC2 && pad.hue.min == 8'h74 && pad.val.min == 8'h69 &&
           pad.sat.min == 8'h1B, "paddle defaults")
    `CHECK(area.x_min == 11'h0BE && area.x_max == 11'h269 && area.y_min == 10'h0B6 &&
           area.y_max == 10'h233, "play area defaults")
    `CHECK(x_offset == 11'h08F && y_offset == 10'd70, "offset defaults")
    for (int m = 0; m < 9; m++) begin
      logic [21:0] p0;
      snap_t s0;
      logic [10:0] hi0, lo0;
      sw = SW[m];
      repeat (40) @(negedge clk);   // let any cooldown expire
      p0 = pair(m);
      s0 = snap();
      hi0 = p0[21:11]; lo0 = p0[10:0];
      tap(u);
      `CHECK(pair(m) == wrap(m, hi0 + 1, lo0), $sformatf("mode %0d up", m))
      repeat (40) @(negedge clk);
      tap(r);
      `CHECK(pair(m) == wrap(m, hi0 + 1, lo0 + 1), $sformatf("mode %0d right", m))
      repeat (40) @(negedge clk);
      tap(d);
      repeat (40) @(negedge clk);
      tap(l);
      `CHECK(pair(m) == p0 && snap() == s0, $sformatf("mode %0d back to start, others untouched", m))
      `CHECK(dispdata[63:60] == CODE[m] && dispdata[56] == (m >= 6) &&
             dispdata[31:0] == {5'b0, hi0, 5'b0, lo0},
             $sformatf("mode %0d display %h", m, dispdata))
      // a different setting must not move while this one is selected
      if (m == 0) begin
        tap(u);
        `CHECK(pad.hue.max == 8'hC2 && area.x_max == 11'h269, "only the selected pair moves")
        repeat (40) @(negedge clk);
        tap(d);
      end
    end
    // repeat rate: fast (positions) against slow (colour bounds)
    begin
      int n_slow, n_fast;
      logic [7:0] h0;
      logic [10:0] x0;
      sw = 5'b00000;
      repeat (40) @(negedge clk);
      h0 = bg.hue.max;
      @(negedge clk) u = 0;
      repeat (200) @(negedge clk);
      u = 1;
      n_slow = int'(8'(bg.hue.max - h0));
      sw = 5'b00100;
      repeat (40) @(negedge clk);
      x0 = area.x_max;
      @(negedge clk) u = 0;
      repeat (200) @(negedge clk);
      u = 1;
      n_fast = int'(11'(area.x_max - x0));
      `CHECK(n_slow >= 6 && n_slow <= 7 && n_fast >= 15 && n_fast <= 16,
             $sformatf("held button: %0d slow steps, %0d fast steps", n_slow, n_fast))
    end
    `TB_FINISH
  end
endmodule
