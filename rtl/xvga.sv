// XGA video timing generator (1024 x 768 at 60 Hz with a 65 MHz pixel clock).
//
// hcount runs 0..1343 and vcount 0..805. Pixels 0..1023 of lines 0..767 are
// visible; blank is high elsewhere. Horizontal sync is low for hcount
// 1048..1183 and vertical sync low for lines 777..782 (both active low).
// All outputs are registered and change together on the rising clock edge, so
// blank/hsync/vsync describe the same (hcount, vcount) that is on the counters.
// The totals and sync positions are the standard XGA numbers used by the
// original system; the synchronous reset is this design's addition.
module xvga
  import pong_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  output hcount_t hcount,
  output vcount_t vcount,
  output logic    hsync,    // active low
  output logic    vsync,    // active low
  output logic    blank
);

  localparam int unsigned H_SYNC_START = 1048;
  localparam int unsigned H_SYNC_END   = 1184;
  localparam int unsigned V_SYNC_START = 777;
  localparam int unsigned V_SYNC_END   = 783;

  hcount_t h_next;
  vcount_t v_next;

  always_comb begin
    if (hcount == hcount_t'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == vcount_t'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      h_next = hcount + 1'b1;
      v_next = vcount;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= hcount_t'(H_SYNC_START) && h_next < hcount_t'(H_SYNC_END));
      vsync  <= !(v_next >= vcount_t'(V_SYNC_START) && v_next < vcount_t'(V_SYNC_END));
      blank  <= (h_next >= hcount_t'(H_ACTIVE)) || (v_next >= vcount_t'(V_ACTIVE));
    end
  end

endmodule
