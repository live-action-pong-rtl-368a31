// Testbench for debounce (STABLE_CYCLES = 50): bounces shorter than the
// stable time must not reach the output; a level held long enough must,
// after exactly 52 clocks (two synchroniser stages plus 50 stable clocks);
// and both press and release are checked.
`include "tb_check.svh"
module tb_debounce;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, noisy = 1, clean;
  always #5 clk = !clk;

  debounce #(.STABLE_CYCLES(50)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic settle_and_measure(input logic level, output int latency);
    int n;
    @(negedge clk) noisy = level;
    n = 0;
    while (clean != level && n < 1000) begin
      @(negedge clk);
      n++;
    end
    latency = n;
  endtask

  initial begin
    int lat, glitches;
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);
    `CHECK(clean == 1, "output follows the idle level after reset")
    // bouncing press: pulses of 1..40 clocks never reach the output
    glitches = 0;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk) noisy = 0;
      repeat ($urandom_range(1, 40)) begin
        @(negedge clk);
        if (clean != 1) glitches++;
      end
      @(negedge clk) noisy = 1;
      repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    `CHECK(glitches == 0 && clean == 1, $sformatf("short bounces reached the output %0d times", glitches))
    settle_and_measure(0, lat);
    `CHECK(lat == 52, $sformatf("press latency %0d", lat))
    settle_and_measure(1, lat);
    `CHECK(lat == 52, $sformatf("release latency %0d", lat))
    `TB_FINISH
  end
endmodule
