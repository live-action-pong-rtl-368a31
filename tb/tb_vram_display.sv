// Testbench for vram_display: the testbench scans the screen positions like
// the display timing and plays a frame memory with two clocks of read
// latency whose word at address a is a known function of a. On odd hcount it
// presents an unrelated address to the memory (the camera's write slot), as
// the top does. Checks that the pixel shown at hcount k of line y is the
// stored pixel of column k + 4 of line y (FORECAST = 8 minus the 4-clock read
// path), from the correct half of the word, across several lines including
// the wrap from the end of one line into the next.
`include "tb_check.svh"
module tb_vram_display;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  hcount_t hcount;
  vcount_t vcount;
  logic [17:0] vr_pixel;
  logic [18:0] vram_addr;
  logic [35:0] vram_read_data;

  vram_display dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  function automatic logic [35:0] word(input logic [18:0] a);
    return {a[17:0] ^ 18'h2A5A5, a[17:0]};
  endfunction

  // stored pixel of (column, line)
  function automatic logic [17:0] pix(input int col, input int line);
    logic [35:0] w;
    w = word({10'(line), 9'(col >> 1)});
    return (col % 2 == 0) ? w[35:18] : w[17:0];
  endfunction

  logic [18:0] mem_addr;
  logic [35:0] d1;
  assign mem_addr = hcount[0] ? 19'($urandom) : vram_addr;
  always_ff @(posedge clk) begin
    d1 <= word(mem_addr);
    vram_read_data <= d1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= 10'd100;
    end else if (hcount == hcount_t'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    while (vcount < 104) begin
      @(negedge clk);
      if (hcount < 1020 && !(vcount == 100 && hcount < 20)) begin
        `CHECK(vr_pixel == pix(hcount + 4, vcount),
               $sformatf("(%0d,%0d): %h expected %h", hcount, vcount, vr_pixel, pix(hcount + 4, vcount)))
      end
    end
    `TB_FINISH
  end
endmodule
