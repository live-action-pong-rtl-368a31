// Testbench for ntsc_decode: sends CCIR656 lines (EAV, blanking, SAV and
// Cb Y Cr Y samples) for both fields and for blanking lines, with random
// sample values, and checks that every Y sample is flagged with data_valid
// and appears on ycrcb together with its Cr and Cb; that h pulses on each
// EAV, v on each vertical-blanking code and f follows the field bit; that no
// sample is reported on a blanking line.
`include "tb_check.svh"
module tb_ntsc_decode;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #18 clk = !clk;
  logic [9:0] tv_in_ycrcb;
  logic [29:0] ycrcb;
  logic f, v, h, data_valid;

  ntsc_decode dut (.clk, .rst, .tv_in_ycrcb, .ycrcb, .f, .v, .h, .data_valid);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  // expected samples, queued by the stimulus
  logic [29:0] exp_q [$];
  int n_dv = 0, n_h = 0, n_v = 0, exp_h = 0, exp_v = 0;
  logic dv_q;

  // checker: a sample flagged on one cycle is visible on the next
  always @(posedge clk) begin
    dv_q <= data_valid;
    if (h) n_h++;
    if (v) n_v++;
    if (dv_q) begin
      n_dv++;
      if (exp_q.size() == 0) begin
        `CHECK(0, "unexpected data_valid")
      end else begin
        logic [29:0] e;
        e = exp_q.pop_front();
        `CHECK(ycrcb == e, $sformatf("sample %h expected %h", ycrcb, e))
      end
    end
  end

  task automatic put(input logic [9:0] w);
    @(negedge clk) tv_in_ycrcb = w;
  endtask

  function automatic logic [9:0] xy(input bit ff, input bit vv, input bit hh);
    logic [3:0] p;
    p = {vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh};
    return {1'b1, ff, vv, hh, p, 2'b00};
  endfunction

  task automatic line(input bit ff, input bit vv, input int npix);
    // EAV of the previous line, blanking, SAV, samples
    put(10'h3ff); put(10'h000); put(10'h000); put(xy(ff, vv, 1'b1));
    exp_h++;
    if (vv) exp_v++;
    for (int i = 0; i < 8; i++) put((i % 2) ? 10'h040 : 10'h200);
    put(10'h3ff); put(10'h000); put(10'h000); put(xy(ff, vv, 1'b0));
    if (vv) exp_v++;
    for (int p = 0; p < npix; p += 2) begin
      logic [9:0] cb, y0, cr, y1;
      cb = 10'(64 + $urandom_range(0, 895)); y0 = 10'(64 + $urandom_range(0, 875));
      cr = 10'(64 + $urandom_range(0, 895)); y1 = 10'(64 + $urandom_range(0, 875));
      if (!vv) begin
        // on Y0 the latest Cr is still the previous pair's; track it
        exp_q.push_back({y0, last_cr, cb});
        exp_q.push_back({y1, cr, cb});
        last_cr = cr;
      end
      put(cb); put(y0); put(cr); put(y1);
    end
  endtask

  logic [9:0] last_cr;

  initial begin
    tv_in_ycrcb = 10'h200;
    repeat (4) @(posedge clk);
    rst = 0;
    last_cr = 10'd512;
    line(0, 1, 8);          // vertical blanking line, field 0
    `CHECK(f == 0, "field 0 after field-0 code")
    line(0, 0, 16);
    line(0, 0, 16);
    line(1, 0, 16);
    `CHECK(f == 1, "field 1 after field-1 code")
    line(1, 1, 8);
    line(0, 0, 16);
    `CHECK(f == 0, "field back to 0")
    put(10'h3ff); put(10'h000); put(10'h000); put(xy(0, 0, 1)); exp_h++;
    repeat (4) put(10'h200);
    repeat (3) @(posedge clk);
    `CHECK(exp_q.size() == 0, $sformatf("%0d samples never reported", exp_q.size()))
    `CHECK(n_dv == 64, $sformatf("data_valid count %0d", n_dv))
    `CHECK(n_h == exp_h, $sformatf("h pulses %0d expected %0d", n_h, exp_h))
    `CHECK(n_v == exp_v, $sformatf("v pulses %0d expected %0d", n_v, exp_v))
    `TB_FINISH
  end
endmodule
