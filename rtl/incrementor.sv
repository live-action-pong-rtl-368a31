// Auto-repeat for a held push button.
//
// The button is active low. When it is pressed while the module is armed,
// action pulses high for exactly one clock and the module enters a cooldown.
// It re-arms either when the button is released or when the cooldown has run
// for more than FAST_CYCLES (fast = 1) or SLOW_CYCLES (fast = 0) clocks, so a
// held button repeats the pulse at a bounded rate: about 27 per second (fast)
// or 10 per second (slow) at 65 MHz. The two cooldown lengths and the
// arm/cooldown behaviour follow the original; reset is this design's addition.
module incrementor #(
  parameter int unsigned FAST_CYCLES = 2_375_000,
  parameter int unsigned SLOW_CYCLES = 6_750_000
) (
  input  logic clk,
  input  logic reset,
  input  logic trigger,   // button, active low
  input  logic fast,
  output logic action
);

  localparam int unsigned MAXC = (FAST_CYCLES > SLOW_CYCLES) ? FAST_CYCLES : SLOW_CYCLES;
  localparam int unsigned CW   = $clog2(MAXC + 2);

  logic          cooling;
  logic [CW-1:0] cooldown;

  wire [CW-1:0] limit = fast ? CW'(FAST_CYCLES) : CW'(SLOW_CYCLES);

  always_ff @(posedge clk) begin
    if (reset) begin
      cooling  <= 1'b0;
      cooldown <= '0;
      action   <= 1'b0;
    end else if (!cooling) begin
      action   <= !trigger;
      cooling  <= !trigger;
      cooldown <= '0;
    end else begin
      action <= 1'b0;
      if (trigger || cooldown > limit) begin
        cooling  <= 1'b0;
        cooldown <= '0;
      end else begin
        cooldown <= cooldown + 1'b1;
      end
    end
  end

endmodule
