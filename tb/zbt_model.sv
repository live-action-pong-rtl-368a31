// Behavioural model of the external frame memory: a 512K x 36-bit ZBT
// synchronous SRAM behind its controller, as seen from the FPGA logic.
// A write (we = 1) stores wdata at addr on the clock edge. A read returns the
// word at the address presented two clocks earlier (two clocks of read
// latency); the word reflects writes made up to the edge that samples the
// read address. Not synthesizable intent: testbench use only.
module zbt_model #(
  parameter int unsigned AW = 19
) (
  input  logic        clk,
  input  logic [AW-1:0] addr,
  input  logic        we,
  input  logic [35:0] wdata,
  output logic [35:0] rdata
);
  logic [35:0] mem [1 << AW];
  logic [35:0] rd1;

  initial for (int i = 0; i < (1 << AW); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rd1   <= mem[addr];
    rdata <= rd1;
  end
endmodule
