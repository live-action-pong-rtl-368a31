// Testbench for rgb2hsv: one random or corner-case RGB pixel per clock; each
// output is compared with a behavioural HSV model (integer division, 0..255
// hue circle with sectors at 0/85/170) exactly 23 clocks after its input,
// which also checks the documented latency. Also checks a few hand-worked
// values (pure red, green, blue, grey, black, and (251,253,124)).
`include "tb_check.svh"
module tb_rgb2hsv;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  logic [7:0] r, g, b, h, s, v;

  rgb2hsv dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  `include "tb_hsv_model.svh"

  logic [23:0] hist [$];
  int corner [6][3] = '{'{255, 0, 0}, '{0, 255, 0}, '{0, 0, 255}, '{128, 128, 128},
                        '{0, 0, 0}, '{251, 253, 124}};
  logic [23:0] corner_hsv [6] = '{{8'd0, 8'd255, 8'd255}, {8'd85, 8'd255, 8'd255},
                                 {8'd170, 8'd255, 8'd255}, {8'd0, 8'd0, 8'd128},
                                 {8'd0, 8'd0, 8'd0}, {8'd44, 8'd130, 8'd253}};

  initial begin
    {r, g, b} = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (hist.size() >= 23) begin
        logic [23:0] in, e;
        in = hist[hist.size() - 23];
        e  = model(in[23:16], in[15:8], in[7:0]);
        `CHECK({h, s, v} == e, $sformatf("rgb %0d,%0d,%0d -> hsv %0d,%0d,%0d expected %0d,%0d,%0d",
               in[23:16], in[15:8], in[7:0], h, s, v, e[23:16], e[15:8], e[7:0]))
        if (hist.size() - 23 < 6)
          `CHECK({h, s, v} == corner_hsv[hist.size() - 23],
                 $sformatf("corner %0d: hsv %0d,%0d,%0d", hist.size() - 23, h, s, v))
      end
      if (t < 6) {r, g, b} = {8'(corner[t][0]), 8'(corner[t][1]), 8'(corner[t][2])};
      else {r, g, b} = {8'($urandom), 8'($urandom), 8'($urandom)};
      hist.push_back({r, g, b});
    end
    `TB_FINISH
  end
endmodule
