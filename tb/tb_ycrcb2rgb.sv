// Testbench for ycrcb2rgb: random and corner Y/Cr/Cb values, one per clock,
// compared three clocks later with the BT.601 equations evaluated in real
// arithmetic (tolerance two LSB for the rounded fixed-point coefficients), including
// clamping at 0 and 255.
`include "tb_check.svh"
module tb_ycrcb2rgb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [9:0] y, cr, cb;
  logic [7:0] r, g, b;

  ycrcb2rgb dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  function automatic int ref8(input real v);
    real q;
    q = v / 4.0;
    if (q < 0.0) return 0;
    if (q > 255.0) return 255;
    return int'($floor(q));
  endfunction

  function automatic bit near(input int a, input int e);
    return (a - e <= 2) && (e - a <= 2);
  endfunction

  logic [29:0] hist [$];
  int clamped_lo = 0, clamped_hi = 0;

  initial begin
    {y, cr, cb} = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (hist.size() >= 3) begin
        logic [29:0] s;
        real yy, rr, bb;
        int er, eg, eb;
        s  = hist[hist.size() - 3];
        yy = 1.164 * (real'(s[29:20]) - 64.0);
        rr = real'(s[19:10]) - 512.0;
        bb = real'(s[9:0]) - 512.0;
        er = ref8(yy + 1.596 * rr);
        eg = ref8(yy - 0.813 * rr - 0.392 * bb);
        eb = ref8(yy + 2.017 * bb);
        if (er == 0) clamped_lo++;
        if (eb == 255) clamped_hi++;
        `CHECK(near(r, er) && near(g, eg) && near(b, eb),
               $sformatf("YCrCb %0d %0d %0d -> %0d %0d %0d expected %0d %0d %0d",
                         s[29:20], s[19:10], s[9:0], r, g, b, er, eg, eb))
      end
      if (t < 4) {y, cr, cb} = (t == 0) ? {10'd64, 10'd512, 10'd512} :
                               (t == 1) ? {10'd940, 10'd512, 10'd512} :
                               (t == 2) ? {10'd100, 10'd64, 10'd960} :
                                          {10'd500, 10'd900, 10'd100};
      else {y, cr, cb} = {10'($urandom_range(64, 940)), 10'($urandom_range(64, 960)),
                          10'($urandom_range(64, 960))};
      hist.push_back({y, cr, cb});
    end
    `CHECK(clamped_lo > 0 && clamped_hi > 0, "clamping never exercised")
    `TB_FINISH
  end
endmodule
