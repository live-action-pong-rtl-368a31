// Testbench for delay: feeds a random stream and checks that every output
// equals the input DELAY_CYCLES clocks earlier, for the default length 28
// and for a one-stage delay.
`include "tb_check.svh"
module tb_delay;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  logic [7:0] din, dout28, dout1;
  logic [7:0] hist [$];

  delay dut28 (.clk, .din, .dout(dout28));
  delay #(.DELAY_CYCLES(1), .DATA_WIDTH(8)) dut1 (.clk, .din, .dout(dout1));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    din = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (t >= 29) begin
        `CHECK(dout28 == hist[hist.size() - 28], $sformatf("delay 28 at %0d", t))
        `CHECK(dout1 == hist[hist.size() - 1], $sformatf("delay 1 at %0d", t))
      end
      din = 8'($urandom);
      hist.push_back(din);
    end
    `TB_FINISH
  end
endmodule
