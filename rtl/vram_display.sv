// Frame-memory reader for the display ("memory access").
//
// Each 36-bit frame-memory word holds two 18-bit pixels: bits [35:18] the
// even column, bits [17:0] the odd column. The display position is forecast
// FORECAST clocks ahead (wrapping into the next line and frame) and the read
// address is {vcount_f, hcount_f[9:1]}. Reads are only honoured on even
// hcount, because the top gives the odd cycles to camera writes. The word
// returned two clocks later is latched on the next even cycle, moved to an
// output register on the odd cycle after that, and its two halves are put
// on vr_pixel on the following even and odd cycles.
//
// Timing, with a memory of two clocks read latency: vr_pixel during hcount k
// is the stored pixel of column k + FORECAST - 4 of line vcount (of the next
// line once the forecast wraps). vr_pixel is combinational from a register and
// hcount[0]. FORECAST = 8 and the latch/hold/select scheme follow the original
// design; the wrap at the true line length of 1344 is this design's choice.
module vram_display
  import pong_pkg::*;
#(
  parameter int unsigned FORECAST = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  hcount_t     hcount,
  input  vcount_t     vcount,
  output logic [17:0] vr_pixel,
  output logic [18:0] vram_addr,
  input  logic [35:0] vram_read_data
);

  hcount_t hcount_f;
  vcount_t vcount_f;

  always_comb begin
    if (hcount >= hcount_t'(H_TOTAL - FORECAST)) begin
      hcount_f = hcount - hcount_t'(H_TOTAL - FORECAST);
      vcount_f = (vcount == vcount_t'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount_f = hcount + hcount_t'(FORECAST);
      vcount_f = vcount;
    end
  end

  assign vram_addr = {vcount_f, hcount_f[9:1]};

  logic [35:0] vr_data_latched, last_vr_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      vr_data_latched <= '0;
      last_vr_data    <= '0;
    end else begin
      if (!hcount[0]) vr_data_latched <= vram_read_data;
      if (hcount[0])  last_vr_data    <= vr_data_latched;
    end
  end

  assign vr_pixel = hcount[0] ? last_vr_data[17:0] : last_vr_data[35:18];

endmodule
