// Fixed delay line: dout is din delayed by DELAY_CYCLES clocks
// (DELAY_CYCLES >= 1). Used to hold the camera pixel back until its colour
// class comes out of the keyer. Plain shift register without reset; the
// default of 28 cycles is the original's.
module delay #(
  parameter int unsigned DELAY_CYCLES = 28,
  parameter int unsigned DATA_WIDTH   = 8
) (
  input  logic                  clk,
  input  logic [DATA_WIDTH-1:0] din,
  output logic [DATA_WIDTH-1:0] dout
);

  logic [DATA_WIDTH-1:0] stage [DELAY_CYCLES];

  always_ff @(posedge clk) begin
    stage[0] <= din;
    for (int i = 1; i < DELAY_CYCLES; i++) stage[i] <= stage[i-1];
  end

  assign dout = stage[DELAY_CYCLES-1];

endmodule
