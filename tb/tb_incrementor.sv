// Testbench for incrementor (FAST_CYCLES = 20, SLOW_CYCLES = 60): a tap gives
// exactly one one-clock pulse; a held button repeats at the fast or slow
// rate (a pulse every limit + 3 clocks); releasing and pressing again gives
// an immediate pulse.
`include "tb_check.svh"
module tb_incrementor;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, trigger = 1, fast = 0, action;
  always #5 clk = !clk;

  incrementor #(.FAST_CYCLES(20), .SLOW_CYCLES(60)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  int pulses = 0, width_bad = 0;
  int times [$];
  int cyc = 0;
  logic act_q = 0;
  always @(posedge clk) begin
    cyc++;
    act_q <= action;
    if (!reset && action && act_q) width_bad++;
    if (!reset && action) begin
      pulses++;
      times.push_back(cyc);
    end
  end

  task automatic hold(input int n, input logic f);
    @(negedge clk) begin trigger = 0; fast = f; end
    repeat (n) @(negedge clk);
    trigger = 1;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 0;
    repeat (4) @(negedge clk);
    hold(3, 0);
    `CHECK(pulses == 1, $sformatf("tap gave %0d pulses", pulses))
    times.delete(); pulses = 0;
    hold(23 * 5, 1);
    `CHECK(pulses == 5 || pulses == 6, $sformatf("fast hold gave %0d pulses", pulses))
    `CHECK(times.size() > 1 && times[1] - times[0] == 23, $sformatf("fast period %0d", times[1] - times[0]))
    times.delete(); pulses = 0;
    hold(63 * 3, 0);
    `CHECK(pulses == 3 || pulses == 4, $sformatf("slow hold gave %0d pulses", pulses))
    `CHECK(times.size() > 1 && times[1] - times[0] == 63, $sformatf("slow period %0d", times[1] - times[0]))
    `CHECK(width_bad == 0, "pulses are one clock wide")
    `TB_FINISH
  end
endmodule
