// Push-button debouncer.
//
// The noisy input is first synchronised with two flip-flops. The clean output
// follows it only after the synchronised input has differed from the output
// for STABLE_CYCLES consecutive clocks; any bounce restarts the count. reset
// loads the output with the current synchronised input level. The counter
// length is this design's choice (650,000 clocks, 10 ms at 65 MHz); the
// original only names the module.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 650_000
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [1:0]    sync;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    sync <= {sync[0], noisy};
    if (reset) begin
      clean <= sync[1];
      count <= '0;
    end else if (sync[1] == clean) begin
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES - 1)) begin
      clean <= sync[1];
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
