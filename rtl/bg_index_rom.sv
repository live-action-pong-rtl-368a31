// Background image index ROM: 1024 x 512 pixels, 4 bits each, read
// synchronously (one clock).
//
// The address is {y[8:0], x[9:0]}. The picture is defined by a formula rather
// than stored data, so the ROM is plain logic: a shaded disc (a "planet",
// indices 2..15 falling off with the distance from a light point up and to the
// left of its centre) on a black sky (index 0) with sparse stars (index 1)
// placed by a hash of the coordinates. The 2^19 x 4 shape and the one-clock
// read are the original's; to show a real picture, replace this module by a
// memory of that shape loaded with a 4-bit indexed image.
module bg_index_rom (
  input  logic        clk,
  input  logic [18:0] addr,
  output logic [3:0]  index
);

  localparam int signed CX = 512, CY = 256;   // disc centre
  localparam int signed RAD = 192;            // disc radius
  localparam int signed LX = CX - 64, LY = CY - 64;  // light point

  function automatic logic [3:0] image_index(input logic [9:0] x, input logic [8:0] y);
    logic signed [11:0] dx, dy, lx, ly;
    logic [23:0] d2, l2;
    logic [15:0] hash;
    dx = $signed({2'b00, x}) - 12'(CX);
    dy = $signed({3'b000, y}) - 12'(CY);
    lx = $signed({2'b00, x}) - 12'(LX);
    ly = $signed({3'b000, y}) - 12'(LY);
    d2 = 24'(dx * dx) + 24'(dy * dy);
    l2 = 24'(lx * lx) + 24'(ly * ly);
    hash = {x[2:0], y[5:0], x[9:3]} ^ {y[8:0], x[6:0]} ^ 16'h6A3C;
    if (d2 < 24'(RAD * RAD)) begin
      // 13 shades over a distance of up to 2*RAD from the light point
      if (l2[23:13] > 11'd12) return 4'd2;
      return 4'd15 - 4'(l2[16:13]);
    end
    return (hash[9:0] == 10'h2A5) ? 4'd1 : 4'd0;
  endfunction

  always_ff @(posedge clk) index <= image_index(addr[9:0], addr[18:10]);

endmodule
