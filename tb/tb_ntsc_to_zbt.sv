// Testbench for ntsc_to_zbt: a 27 MHz camera side and a 65 MHz system side.
// The camera side sends two frames of NPIX-pixel lines (a field-0 part, then
// a field-1 part that must not be stored). Every word written is compared
// with the expected packing: the columns count down from 800, the row
// counts up from 30, two pixels {column x (even), column x+1} per word at
// address {row, even_odd, x/2}; the even/odd bit flips for the second frame.
// Also checks that the number of words written equals the number of pairs.
`include "tb_check.svh"
module tb_ntsc_to_zbt;
  int checks = 0, failures = 0;
  logic clk = 0, vclk = 0, rst = 1;
  always #7.7 clk = !clk;
  always #18.5 vclk = !vclk;
  logic [2:0] fvh;
  logic dv;
  logic [17:0] din;
  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  logic ntsc_we;

  ntsc_to_zbt dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  localparam int NPIX = 40, NLINES = 6;
  logic [35:0] written [logic [18:0]];
  int n_writes = 0;

  always @(posedge clk) if (ntsc_we) begin
    written[ntsc_addr] = ntsc_data;
    n_writes++;
  end

  logic [17:0] pix [2][NLINES][NPIX];

  task automatic vtick(input logic [2:0] f_v_h, input logic d, input logic [17:0] x);
    @(negedge vclk);
    fvh = f_v_h; dv = d; din = x;
  endtask

  task automatic frame(input int fr);
    // vertical blanking with a line end
    vtick(3'b011, 0, '0);
    vtick(3'b010, 0, '0);
    vtick(3'b000, 0, '0);
    for (int ln = 0; ln < NLINES; ln++) begin
      for (int k = 0; k < NPIX; k++) begin
        pix[fr][ln][k] = 18'($urandom);
        vtick(3'b000, 1, pix[fr][ln][k]);
        vtick(3'b000, 0, pix[fr][ln][k]);
      end
      vtick(3'b001, 0, '0);   // EAV: end of line
      repeat (6) vtick(3'b000, 0, '0);
    end
    // field 1: must not be stored
    vtick(3'b100, 0, '0);
    for (int k = 0; k < NPIX; k++) begin
      vtick(3'b100, 1, 18'h3ffff);
      vtick(3'b100, 0, 18'h3ffff);
    end
    vtick(3'b101, 0, '0);
    repeat (4) vtick(3'b100, 0, '0);
  endtask

  initial begin
    fvh = 0; dv = 0; din = 0;
    repeat (5) @(posedge vclk);
    rst = 0;
    repeat (5) @(posedge vclk);
    frame(0);
    frame(1);
    repeat (10) @(posedge clk);
    for (int fr = 0; fr < 2; fr++)
      for (int ln = 0; ln < NLINES; ln++)
        for (int k = 1; k < NPIX; k++) begin
          int col, row;
          logic [18:0] a;
          col = 800 - k;
          row = 30 + ln;
          if (col % 2 == 0) begin
            a = {9'(row), 1'(fr), 9'(col / 2)};
            `CHECK(written.exists(a) && written[a] == {pix[fr][ln][k], pix[fr][ln][k - 1]},
                   $sformatf("frame %0d line %0d col %0d", fr, ln, col))
          end
        end
    `CHECK(n_writes == 2 * NLINES * (NPIX / 2), $sformatf("%0d words written", n_writes))
    `TB_FINISH
  end
endmodule
