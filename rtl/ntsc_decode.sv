// CCIR656 (ITU-R BT.656) stream decoder for the camera input.
//
// The external video decoder chip sends 10-bit words at 27 MHz:
// 3FF 000 000 XY introduces each line's start (SAV) and end (EAV) of active
// video, and between SAV and EAV the samples come as Cb Y Cr Y ... . The XY
// word carries the field (F, bit 8), vertical blanking (V, bit 7) and
// SAV/EAV (H, bit 6) flags. A state machine locks onto the 3FF 000 000
// preamble, then walks the Cb/Y/Cr/Y sample order and loads the matching
// component register, so ycrcb always holds the latest complete sample.
//
// Timing: data_valid is high on the cycle a Y sample arrives (once per pixel,
// every other clock); ycrcb shows that sample from the next cycle on, together
// with the latest Cr and Cb. v and h are high only on the cycle an XY word is
// accepted and echo its V and H bits; f is registered from the last XY word.
// Any word 3FF inside active video sends the machine back to look for a
// preamble. Only active-video codes (V = 0) start sample decoding; blanking
// lines are skipped. The XY values accepted are the eight standard protected
// codes, the same set the original decoder used.
module ntsc_decode (
  input  logic        clk,          // camera line-locked clock
  input  logic        rst,
  input  logic [9:0]  tv_in_ycrcb,  // 10-bit CCIR656 word
  output logic [29:0] ycrcb,        // {Y, Cr, Cb}, 10 bits each
  output logic        f,
  output logic        v,
  output logic        h,
  output logic        data_valid
);

  typedef enum logic [2:0] {
    SYNC_1,     // waiting for the first 000 of a preamble
    SYNC_2,     // one 000 seen
    SYNC_3,     // two 000 seen, next word is XY
    ACT_CB,     // active video: expecting Cb
    ACT_Y0,
    ACT_CR,
    ACT_Y1
  } state_t;

  state_t     state;
  logic [9:0] y, cr, cb;

  // XY code: 1 F V H P3 P2 P1 P0 (upper 8 bits of the 10-bit word)
  function automatic logic known_xy(input logic [9:0] w);
    case (w)
      10'h200, 10'h274, 10'h2ac, 10'h2d8,
      10'h31c, 10'h368, 10'h3b0, 10'h3c4: return 1'b1;
      default:                            return 1'b0;
    endcase
  endfunction

  // a code that opens a line of active video: H = 0 and V = 0
  wire xy_ok    = known_xy(tv_in_ycrcb);
  wire sav_code = xy_ok && !tv_in_ycrcb[7] && !tv_in_ycrcb[6];
  wire preamble = (tv_in_ycrcb == 10'h3ff);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SYNC_1;
    end else begin
      unique case (state)
        SYNC_1: state <= (tv_in_ycrcb == 10'h000) ? SYNC_2 : SYNC_1;
        SYNC_2: state <= (tv_in_ycrcb == 10'h000) ? SYNC_3 : SYNC_1;
        SYNC_3: state <= sav_code ? ACT_CB : SYNC_1;
        ACT_CB: state <= preamble ? SYNC_1 : ACT_Y0;
        ACT_Y0: state <= preamble ? SYNC_1 : ACT_CR;
        ACT_CR: state <= preamble ? SYNC_1 : ACT_Y1;
        ACT_Y1: state <= preamble ? SYNC_1 : ACT_CB;
        default: state <= SYNC_1;
      endcase
    end
  end

  wire y_en  = (state == ACT_Y0 || state == ACT_Y1) && !preamble;
  wire cr_en = (state == ACT_CR) && !preamble;
  wire cb_en = (state == ACT_CB) && !preamble;

  always_ff @(posedge clk) begin
    if (rst) begin
      y  <= 10'd64;
      cr <= 10'd512;
      cb <= 10'd512;
      f  <= 1'b0;
    end else begin
      if (y_en)  y  <= tv_in_ycrcb;
      if (cr_en) cr <= tv_in_ycrcb;
      if (cb_en) cb <= tv_in_ycrcb;
      if (state == SYNC_3 && xy_ok) f <= tv_in_ycrcb[8];
    end
  end

  assign v          = (state == SYNC_3) && xy_ok && tv_in_ycrcb[7];
  assign h          = (state == SYNC_3) && xy_ok && tv_in_ycrcb[6];
  assign data_valid = y_en;
  assign ycrcb      = {y, cr, cb};

endmodule
