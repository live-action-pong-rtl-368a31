// Pipelined RGB to HSV converter (8 bits per channel in and out).
//
// V = max(R,G,B); S = 255 * (max - min) / max; H is the hue on a 0..255
// circle: 255 * (difference of the other two channels) / (6 * delta) added to
// 0, 85 or 170 depending on whether red, green or blue is the largest, with a
// wrap past 255 when the difference is negative. Grey pixels (delta = 0) get
// H = the sector offset and S = 0; black gets S = 0.
//
// Stages: 1 register inputs, 2 min/max, 3 delta, 4 dividends and divisors,
// then two pipe_divider instances (18 clocks), then one register for the hue
// fix-up. Latency is HSV_LATENCY = 23 clocks and a new pixel is accepted
// every clock. The structure, the 0/85/170 sector offsets and the use of two
// 16-bit dividers follow the original converter; the divider is written here.
module rgb2hsv
  import pong_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic [7:0] h,
  output logic [7:0] s,
  output logic [7:0] v
);

  logic [7:0]  r1, g1, b1;          // stage 1
  logic [7:0]  r2, g2, b2, mx2, mn2; // stage 2
  logic [7:0]  r3, g3, b3, mx3, dl3; // stage 3
  logic [15:0] s_top, s_bot, h_top, h_bot; // stage 4
  logic        neg4;
  logic [7:0]  add4, v4;

  always_ff @(posedge clk) begin
    // 1: latch
    {r1, g1, b1} <= {r, g, b};
    // 2: extremes
    {r2, g2, b2} <= {r1, g1, b1};
    mx2 <= (r1 >= g1 && r1 >= b1) ? r1 : (g1 >= b1) ? g1 : b1;
    mn2 <= (r1 <= g1 && r1 <= b1) ? r1 : (g1 <= b1) ? g1 : b1;
    // 3: spread
    {r3, g3, b3} <= {r2, g2, b2};
    mx3 <= mx2;
    dl3 <= mx2 - mn2;
    // 4: operands of the two divisions
    v4    <= mx3;
    s_top <= 16'(dl3) * 16'd255;
    s_bot <= (mx3 != 0) ? 16'(mx3) : 16'd1;
    h_bot <= (dl3 != 0) ? 16'(dl3) * 16'd6 : 16'd6;
    if (r3 == mx3) begin
      h_top <= (g3 >= b3) ? 16'(g3 - b3) * 16'd255 : 16'(b3 - g3) * 16'd255;
      neg4  <= (g3 < b3);
      add4  <= 8'd0;
    end else if (g3 == mx3) begin
      h_top <= (b3 >= r3) ? 16'(b3 - r3) * 16'd255 : 16'(r3 - b3) * 16'd255;
      neg4  <= (b3 < r3);
      add4  <= 8'd85;
    end else begin
      h_top <= (r3 >= g3) ? 16'(r3 - g3) * 16'd255 : 16'(g3 - r3) * 16'd255;
      neg4  <= (r3 < g3);
      add4  <= 8'd170;
    end
  end

  logic [15:0] s_q, h_q;
  logic [15:0] s_rem_unused, h_rem_unused;

  pipe_divider #(.W(16)) s_div (.clk, .dividend(s_top), .divisor(s_bot),
                                .quotient(s_q), .remainder(s_rem_unused));
  pipe_divider #(.W(16)) h_div (.clk, .dividend(h_top), .divisor(h_bot),
                                .quotient(h_q), .remainder(h_rem_unused));

  // side information travels alongside the divisions
  logic        neg_d [DIV_LATENCY];
  logic [7:0]  add_d [DIV_LATENCY];
  logic [7:0]  v_d   [DIV_LATENCY];

  always_ff @(posedge clk) begin
    neg_d[0] <= neg4;
    add_d[0] <= add4;
    v_d[0]   <= v4;
    for (int i = 1; i < DIV_LATENCY; i++) begin
      neg_d[i] <= neg_d[i-1];
      add_d[i] <= add_d[i-1];
      v_d[i]   <= v_d[i-1];
    end
  end

  // final: hue offset and wrap-around, saturation and value registered
  wire [7:0] q   = h_q[7:0];
  wire [7:0] off = add_d[DIV_LATENCY-1];

  always_ff @(posedge clk) begin
    if (neg_d[DIV_LATENCY-1] && q > off) h <= 8'd255 - (q - off);
    else if (neg_d[DIV_LATENCY-1])       h <= off - q;
    else                                 h <= off + q;
    s <= s_q[7:0];
    v <= v_d[DIV_LATENCY-1];
  end

endmodule
