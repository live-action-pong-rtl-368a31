// Fully pipelined unsigned integer divider.
//
// Restoring division, one quotient bit per pipeline stage, MSB first: stage i
// shifts the next dividend bit into the partial remainder and subtracts the
// divisor when it fits. With an input register and an output register the
// latency is W + 2 clocks (18 for W = 16), and a new division can start on
// every clock. A zero divisor gives an all-ones quotient (callers avoid it).
// It stands in for the 16-bit divider cores of the original converter, whose
// latency it matches.
module pipe_divider #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0] num [W+1];   // dividend bits not yet consumed (shifted left)
  logic [W-1:0] den [W+1];
  logic [W:0]   rem [W+1];   // partial remainder
  logic [W-1:0] quo [W+1];

  always_ff @(posedge clk) begin
    num[0] <= dividend;
    den[0] <= divisor;
    rem[0] <= '0;
    quo[0] <= '0;
    for (int i = 0; i < W; i++) begin
      logic [W:0] trial;
      trial = {rem[i][W-1:0], num[i][W-1]};
      num[i+1] <= num[i] << 1;
      den[i+1] <= den[i];
      if (trial >= {1'b0, den[i]}) begin
        rem[i+1] <= trial - {1'b0, den[i]};
        quo[i+1] <= {quo[i][W-2:0], 1'b1};
      end else begin
        rem[i+1] <= trial;
        quo[i+1] <= {quo[i][W-2:0], 1'b0};
      end
    end
    quotient  <= quo[W];
    remainder <= rem[W][W-1:0];
  end

endmodule
