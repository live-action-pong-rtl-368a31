// Testbench for binarizer: a line of runs of green-screen, paddle-blue and
// other colours with random run lengths (1..9 pixels) and occasional random
// pixels, one pixel per clock, with the power-up default HSV bounds. Each
// output pair is compared with a reference model exactly KEY_LATENCY = 30
// clocks after the pixel's input: HSV from a behavioural model, inclusive
// bounds, background before paddle, and with the filter on, a pixel keeps
// its class only when it lies in a run of at least five pixels of that
// class. The filter is switched off for the second half of the run (the
// switch acts on the output register, so it applies from the next output).
`include "tb_check.svh"
module tb_binarizer;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  rgb_t pixel;
  hsv_bounds_t bg, pad;
  logic activate_kernel, is_background, is_paddle;

  binarizer dut (.*);

  `include "tb_hsv_model.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  function automatic bit in_win(input hsv_bounds_t w, input logic [23:0] hsv);
    return hsv[23:16] >= w.hue.min && hsv[23:16] <= w.hue.max &&
           hsv[15:8] >= w.sat.min && hsv[15:8] <= w.sat.max &&
           hsv[7:0] >= w.val.min && hsv[7:0] <= w.val.max;
  endfunction

  localparam int N = 4000;
  bit cls_bg [N], cls_pad [N], kern [N];
  int removed = 0, n_bg = 0, n_pad = 0;

  initial begin
    int t, run, kind;
    bg  = '{hue: '{max: 8'h89, min: 8'h2A}, sat: '{max: 8'hFF, min: 8'h00}, val: '{max: 8'hFF, min: 8'h27}};
    pad = '{hue: '{max: 8'hC2, min: 8'h74}, sat: '{max: 8'hFF, min: 8'h1B}, val: '{max: 8'hFF, min: 8'h69}};
    pixel = '0;
    activate_kernel = 1;
    t = 0;
    while (t < N) begin
      run  = $urandom_range(1, 9);
      kind = $urandom_range(0, 3);
      for (int k = 0; k < run && t < N; k++) begin
        logic [23:0] hsv;
        @(negedge clk);
        case (kind)
          0: pixel = '{r: 8'd30, g: 8'd200, b: 8'd40};
          1: pixel = '{r: 8'd40, g: 8'd60, b: 8'd200};
          2: pixel = '{r: 8'd200, g: 8'd50, b: 8'd50};
          default: pixel = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
        endcase
        activate_kernel = (t < N / 2);
        hsv = model(pixel.r, pixel.g, pixel.b);
        cls_bg[t]  = in_win(bg, hsv);
        cls_pad[t] = !cls_bg[t] && in_win(pad, hsv);
        kern[t]    = activate_kernel;
        // check the pixel whose result is due now
        if (t >= 30 + 8) begin
          int c;
          bit ebg, epad;
          c = t - 30;
          if (kern[t - 1]) begin
            ebg = 0; epad = 0;
            for (int j = 0; j < 5; j++) begin
              bit allb, allp;
              allb = 1; allp = 1;
              for (int i = c - 4 + j; i <= c + j; i++) begin
                allb &= cls_bg[i];
                allp &= cls_pad[i];
              end
              ebg |= allb; epad |= allp;
            end
          end else begin
            ebg = cls_bg[c]; epad = cls_pad[c];
          end
          if (kern[t - 1] && (ebg != cls_bg[c] || epad != cls_pad[c])) removed++;
          if (ebg) n_bg++;
          if (epad) n_pad++;
          `CHECK(is_background == ebg && is_paddle == epad,
                 $sformatf("pixel %0d: bg %0d pad %0d expected %0d %0d", c, is_background, is_paddle, ebg, epad))
        end
        t++;
      end
    end
    `CHECK(removed > 20, $sformatf("filter removed only %0d pixels", removed))
    `CHECK(n_bg > 100 && n_pad > 100, "both classes seen")
    `TB_FINISH
  end
endmodule
