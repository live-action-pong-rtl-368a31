// YCrCb (ITU-R BT.601, 10-bit studio range) to 8-bit RGB converter.
//
//   R = 1.164 (Y - 64) + 1.596 (Cr - 512)
//   G = 1.164 (Y - 64) - 0.813 (Cr - 512) - 0.392 (Cb - 512)
//   B = 1.164 (Y - 64) + 2.017 (Cb - 512)
//
// The coefficients are 10-bit fixed point with 8 fraction bits (1.164 =
// 298/256, 1.596 = 408/256, 0.813 = 208/256, 0.392 = 100/256, 2.017 =
// 516/256), the values the original converter used. Each sum is a 10-bit
// result with 8 fraction bits; its top 8 integer bits are the 8-bit colour,
// clamped to 0 below zero and to 255 above range.
//
// Three pipeline stages: register the inputs, form the five products, form
// the three sums. R, G and B are valid three clocks after Y/Cr/Cb were
// presented. rst clears the pipeline.
module ycrcb2rgb (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] y,
  input  logic [9:0] cr,
  input  logic [9:0] cb,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);

  localparam logic signed [11:0] K_Y   = 12'sd298;
  localparam logic signed [11:0] K_RCR = 12'sd408;
  localparam logic signed [11:0] K_GCR = 12'sd208;
  localparam logic signed [11:0] K_GCB = 12'sd100;
  localparam logic signed [11:0] K_BCB = 12'sd516;

  logic signed [11:0] y_s, cr_s, cb_s;                // offsets removed
  logic signed [23:0] p_y, p_rcr, p_gcr, p_gcb, p_bcb; // products
  logic signed [23:0] s_r, s_g, s_b;                   // sums

  always_ff @(posedge clk) begin
    if (rst) begin
      {y_s, cr_s, cb_s} <= '0;
      {p_y, p_rcr, p_gcr, p_gcb, p_bcb} <= '0;
      {s_r, s_g, s_b} <= '0;
    end else begin
      y_s   <= $signed({2'b00, y})  - 12'sd64;
      cr_s  <= $signed({2'b00, cr}) - 12'sd512;
      cb_s  <= $signed({2'b00, cb}) - 12'sd512;
      p_y   <= K_Y   * y_s;
      p_rcr <= K_RCR * cr_s;
      p_gcr <= K_GCR * cr_s;
      p_gcb <= K_GCB * cb_s;
      p_bcb <= K_BCB * cb_s;
      s_r   <= p_y + p_rcr;
      s_g   <= p_y - p_gcr - p_gcb;
      s_b   <= p_y + p_bcb;
    end
  end

  // value/1024 (8 fraction bits, then 10-bit to 8-bit), saturated to 0..255
  function automatic logic [7:0] clamp(input logic signed [23:0] s);
    if (s < 0)                 return 8'd0;
    else if (s >= 24'sd262144) return 8'd255;
    else                       return s[17:10];
  endfunction

  assign r = clamp(s_r);
  assign g = clamp(s_g);
  assign b = clamp(s_b);

endmodule
