// Camera-to-frame-memory writer.
//
// Camera clock side: counts the column and row of each decoded pixel. The
// column is loaded with COL_START at the end of each line (h) and counts DOWN
// once per pixel, which mirrors the picture left-right so that players see
// themselves as in a mirror. The row is loaded with ROW_START during vertical
// blanking (v) and counts up at each line end. Only field F = 0 is stored; an
// even/odd bit toggles at every start of field 1, so alternate frames fill
// alternate display lines. Each new pixel (rising edge of dv while F = 0)
// is captured together with its column, row and even/odd bit, and a toggle
// flag announces it.
//
// System clock side: the toggle passes through a two-flop synchroniser; on
// each change the captured pixel is taken over (it stays stable for at least
// two camera clocks, longer than the synchroniser needs at a system clock
// above 2x the camera clock). Two 18-bit pixels share one 36-bit word: when a
// pixel with an even column arrives, the word {this pixel, previous pixel}
// - i.e. {column x, column x+1}, since columns count down - is presented with
// address {row[8:0], even_odd, column[9:1]} and ntsc_we pulses for one
// system clock. ntsc_addr/ntsc_data hold their value until the next pair.
//
// Follows the original design in the mirrored column count, COL_START = 800,
// ROW_START = 30, two pixels per word and the address layout. The toggle
// handshake across the clock boundary and the reset synchroniser are this
// design's choices.
module ntsc_to_zbt #(
  parameter logic [9:0] COL_START = 10'd800,
  parameter logic [9:0] ROW_START = 10'd30,
  parameter logic [9:0] ROW_LIMIT = 10'd768
) (
  input  logic        clk,        // system clock
  input  logic        vclk,       // camera clock
  input  logic        rst,        // system-clock reset
  input  logic [2:0]  fvh,        // {field, vertical, horizontal} from the decoder
  input  logic        dv,         // a new pixel is on din
  input  logic [17:0] din,        // {R[5:0], G[5:0], B[5:0]}
  output logic [18:0] ntsc_addr,
  output logic [35:0] ntsc_data,
  output logic        ntsc_we
);

  // ---------------- camera clock domain ----------------
  logic [1:0]  vrst_sync;
  logic        vrst;
  logic [9:0]  col, row;
  logic        old_dv, old_f, even_odd;
  logic        tog;

  typedef struct packed {
    logic        eo;
    logic [9:0]  row;
    logic [9:0]  col;
    logic [17:0] pix;
  } capture_t;

  capture_t hold;

  wire f = fvh[2];
  wire v = fvh[1];
  wire h = fvh[0];

  always_ff @(posedge vclk) vrst_sync <= {vrst_sync[0], rst};
  assign vrst = vrst_sync[1];

  always_ff @(posedge vclk) begin
    if (vrst) begin
      col      <= COL_START;
      row      <= ROW_START;
      old_dv   <= 1'b0;
      old_f    <= 1'b0;
      even_odd <= 1'b0;
      tog      <= 1'b0;
      hold     <= '0;
    end else begin
      old_dv <= dv;
      old_f  <= f;
      if (f && !old_f) even_odd <= !even_odd;
      if (!f) begin
        if (h)                      col <= COL_START;
        else if (dv && !v && col != 0) col <= col - 1'b1;
        if (v)                      row <= ROW_START;
        else if (h && row < ROW_LIMIT) row <= row + 1'b1;
        if (dv && !old_dv && !v) begin
          hold <= '{eo: even_odd, row: row, col: col, pix: din};
          tog  <= !tog;
        end
      end
    end
  end

  // ---------------- system clock domain ----------------
  logic [2:0]  tog_sync;
  logic [17:0] prev_pix;

  always_ff @(posedge clk) begin
    if (rst) begin
      tog_sync  <= '0;
      prev_pix  <= '0;
      ntsc_addr <= '0;
      ntsc_data <= '0;
      ntsc_we   <= 1'b0;
    end else begin
      tog_sync <= {tog_sync[1:0], tog};
      ntsc_we  <= 1'b0;
      if (tog_sync[2] != tog_sync[1]) begin
        prev_pix <= hold.pix;
        if (!hold.col[0]) begin
          ntsc_addr <= {hold.row[8:0], hold.eo, hold.col[9:1]};
          ntsc_data <= {hold.pix, prev_pix};
          ntsc_we   <= 1'b1;
        end
      end
    end
  end

endmodule
