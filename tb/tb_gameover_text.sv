// Testbench for gameover_text: renders the "WIN" and "LOSE" instances at two
// box positions over the whole screen and checks that
//   * every lit pixel lies inside the 100 x 200 box and has the text colour,
//     and the output colour is zero elsewhere;
//   * the number of lit pixels is 36 (6 x 6 scaling) times the number of lit
//     font pixels of the word;
//   * moving the box moves the picture unchanged;
//   * the letters are stacked: each is 30 pixels wide and separated from the
//     next by blank lines;
//   * the left column of "L" is lit over its whole height and "W" differs
//     from "L" (the two words are really different).
`include "tb_check.svh"
module tb_gameover_text;
  import pong_pkg::*;
  int checks = 0, failures = 0;
  hcount_t hcount, box_x;
  vcount_t vcount, box_y;
  logic is_win, is_lose;
  rgb_t c_win, c_lose;

  gameover_text #(.VICTORY(1)) win  (.hcount, .vcount, .left(box_x), .top(box_y), .is_text(is_win), .colour(c_win));
  gameover_text #(.VICTORY(0)) lose (.hcount, .vcount, .left(box_x), .top(box_y), .is_text(is_lose), .colour(c_lose));

  initial begin
    #100_000_000;
    failures++;
    `TB_FINISH
  end

  // lit font pixels: W 17, I 11, N 17; L 11, O 16, S 15, E 18
  localparam int WIN_PIXELS  = 36 * (17 + 11 + 17);
  localparam int LOSE_PIXELS = 36 * (11 + 16 + 15 + 18);

  bit pic_win [100][200], pic_lose [100][200];

  int nw, nl, outside, wrong_colour, moved;
  bit inbox;

  task render(input int l, input int t);
    nw = 0; nl = 0; outside = 0; wrong_colour = 0; moved = 0;
    box_x = 11'(l); box_y = 10'(t);
    for (int v = 0; v < 768; v++)
      for (int h = 0; h < 1024; h++) begin
        hcount = 11'(h); vcount = 10'(v);
        #1;
        inbox = h >= l && h < l + 100 && v >= t && v < t + 200;
        nw += is_win; nl += is_lose;
        if ((is_win || is_lose) && !inbox) outside++;
        if (c_win != (is_win ? 24'hFFD000 : 24'h0) || c_lose != (is_lose ? 24'hFFD000 : 24'h0))
          wrong_colour++;
        if (inbox) begin
          if (l == 200) begin
            pic_win[h - l][v - t] = is_win;
            pic_lose[h - l][v - t] = is_lose;
          end else if (pic_win[h - l][v - t] != is_win || pic_lose[h - l][v - t] != is_lose)
            moved++;
        end
      end
  endtask

  initial begin
    #10;
    render(200, 150);
    `CHECK(nw == WIN_PIXELS && nl == LOSE_PIXELS, $sformatf("lit pixels %0d / %0d", nw, nl))
    `CHECK(outside == 0 && wrong_colour == 0, $sformatf("%0d outside box, %0d wrong colours", outside, wrong_colour))
    render(617, 400);
    `CHECK(moved == 0 && outside == 0 && nw == WIN_PIXELS, $sformatf("moved box: %0d differences", moved))
    // stacked letters: per-row widths never exceed 30 pixels and blank rows
    // separate the letters
    begin
      int gaps, widest;
      bit was_blank;
      gaps = 0; widest = 0; was_blank = 1;
      for (int y = 0; y < 200; y++) begin
        int first, last;
        first = -1; last = -1;
        for (int x = 0; x < 100; x++)
          if (pic_lose[x][y]) begin
            if (first < 0) first = x;
            last = x;
          end
        if (first >= 0 && last - first + 1 > widest) widest = last - first + 1;
        if (first >= 0 && was_blank) gaps++;
        was_blank = first < 0;
      end
      `CHECK(widest == 30 && gaps == 4, $sformatf("LOSE: %0d letter blocks, widest row %0d", gaps, widest))
    end
    begin
      int top_row, lit;
      top_row = -1; lit = 0;
      for (int y = 0; y < 200 && top_row < 0; y++)
        for (int x = 0; x < 100; x++) if (pic_lose[x][y] && top_row < 0) top_row = y;
      for (int y = top_row; y < top_row + 42; y++) lit += pic_lose[35][y];
      `CHECK(lit == 42, $sformatf("L stem lit on %0d of 42 rows", lit))
      lit = 0;
      for (int y = 0; y < 200; y++)
        for (int x = 0; x < 100; x++) lit += pic_win[x][y] != pic_lose[x][y];
      `CHECK(lit > 500, "WIN and LOSE differ")
    end
    `TB_FINISH
  end
endmodule
