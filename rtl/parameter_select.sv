// Settings select: live adjustment of the keying and game parameters.
//
// sw[4,2:0] picks the parameter pair that the four direction buttons
// (debounced, active low) adjust; sw[3] is used elsewhere and ignored
// here. Up/down raise/lower the upper bound, right/left raise/lower the
// lower bound:
//
//   sw[4:0]      pair                         rate
//   0?000        background hue max/min       slow
//   0?001        background saturation        slow
//   0?010        background value             slow
//   1?000        paddle hue max/min           slow
//   1?001        paddle saturation            slow
//   1?010        paddle value                 slow
//   0?011        play area y_max/y_min        fast
//   0?100        play area x_max/x_min        fast
//   0?101        background image offset      fast (up/down: y, right/left: x)
//
// Each button drives an incrementor, so holding it steps the value at a
// bounded rate (fast for positions, slow for colour bounds, which need finer
// control). dispdata shows the selected pair for a 16-digit hex display:
// digit 15 names the pair (A/B/C hue/sat/val, D y-limits, E x-limits,
// F offset), digit 14 is 1 for the paddle set, digits 7..4 show the upper
// bound and digits 3..0 the lower bound. Values wrap around modulo their
// width. Everything is registered; reset loads the power-up defaults, which
// are the original system's tuned values.
module parameter_select
  import pong_pkg::*;
#(
  parameter int unsigned FAST_CYCLES = 2_375_000,
  parameter int unsigned SLOW_CYCLES = 6_750_000
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [4:0]  sw,
  input  logic        u, d, l, r,      // debounced buttons, active low
  output hsv_bounds_t bg,
  output hsv_bounds_t pad,
  output play_area_t  area,
  output hcount_t     x_offset,
  output vcount_t     y_offset,
  output logic [63:0] dispdata
);

  logic fast;
  logic inc_u, inc_d, inc_l, inc_r;

  incrementor #(.FAST_CYCLES(FAST_CYCLES), .SLOW_CYCLES(SLOW_CYCLES))
    i_up    (.clk, .reset, .trigger(u), .fast, .action(inc_u)),
    i_down  (.clk, .reset, .trigger(d), .fast, .action(inc_d)),
    i_left  (.clk, .reset, .trigger(l), .fast, .action(inc_l)),
    i_right (.clk, .reset, .trigger(r), .fast, .action(inc_r));

  // one step of a max/min pair
  function automatic range8_t step8(input range8_t x, input logic iu, id, il, ir);
    range8_t y = x;
    if (iu) y.max = x.max + 1'b1;
    if (id) y.max = x.max - 1'b1;
    if (il) y.min = x.min - 1'b1;
    if (ir) y.min = x.min + 1'b1;
    return y;
  endfunction

  function automatic logic [63:0] show(input logic [3:0] code, input logic paddle,
                                       input logic [15:0] hi, input logic [15:0] lo);
    return {code, 3'b000, paddle, 24'h0, hi, lo};
  endfunction

  localparam hsv_bounds_t BG_DEFAULT  = '{hue: '{max: 8'h89, min: 8'h2A},
                                         sat: '{max: 8'hFF, min: 8'h00},
                                         val: '{max: 8'hFF, min: 8'h27}};
  localparam hsv_bounds_t PAD_DEFAULT = '{hue: '{max: 8'hC2, min: 8'h74},
                                         sat: '{max: 8'hFF, min: 8'h1B},
                                         val: '{max: 8'hFF, min: 8'h69}};
  localparam play_area_t  AREA_DEFAULT = '{x_min: 11'h0BE, x_max: 11'h269,
                                          y_min: 10'h0B6, y_max: 10'h233};

  always_ff @(posedge clk) begin
    if (reset) begin
      bg       <= BG_DEFAULT;
      pad      <= PAD_DEFAULT;
      area     <= AREA_DEFAULT;
      x_offset <= 11'h08F;
      y_offset <= 10'd70;
      fast     <= 1'b0;
      dispdata <= '0;
    end else begin
      casez (sw)
        5'b0?000: begin
          fast <= 1'b0;
          bg.hue <= step8(bg.hue, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hA, 1'b0, 16'(bg.hue.max), 16'(bg.hue.min));
        end
        5'b0?001: begin
          fast <= 1'b0;
          bg.sat <= step8(bg.sat, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hB, 1'b0, 16'(bg.sat.max), 16'(bg.sat.min));
        end
        5'b0?010: begin
          fast <= 1'b0;
          bg.val <= step8(bg.val, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hC, 1'b0, 16'(bg.val.max), 16'(bg.val.min));
        end
        5'b1?000: begin
          fast <= 1'b0;
          pad.hue <= step8(pad.hue, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hA, 1'b1, 16'(pad.hue.max), 16'(pad.hue.min));
        end
        5'b1?001: begin
          fast <= 1'b0;
          pad.sat <= step8(pad.sat, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hB, 1'b1, 16'(pad.sat.max), 16'(pad.sat.min));
        end
        5'b1?010: begin
          fast <= 1'b0;
          pad.val <= step8(pad.val, inc_u, inc_d, inc_l, inc_r);
          dispdata <= show(4'hC, 1'b1, 16'(pad.val.max), 16'(pad.val.min));
        end
        5'b0?011: begin
          fast <= 1'b1;
          if (inc_u) area.y_max <= area.y_max + 1'b1;
          if (inc_d) area.y_max <= area.y_max - 1'b1;
          if (inc_l) area.y_min <= area.y_min - 1'b1;
          if (inc_r) area.y_min <= area.y_min + 1'b1;
          dispdata <= show(4'hD, 1'b0, 16'(area.y_max), 16'(area.y_min));
        end
        5'b0?100: begin
          fast <= 1'b1;
          if (inc_u) area.x_max <= area.x_max + 1'b1;
          if (inc_d) area.x_max <= area.x_max - 1'b1;
          if (inc_l) area.x_min <= area.x_min - 1'b1;
          if (inc_r) area.x_min <= area.x_min + 1'b1;
          dispdata <= show(4'hE, 1'b0, 16'(area.x_max), 16'(area.x_min));
        end
        5'b0?101: begin
          fast <= 1'b1;
          if (inc_u) y_offset <= y_offset + 1'b1;
          if (inc_d) y_offset <= y_offset - 1'b1;
          if (inc_l) x_offset <= x_offset - 1'b1;
          if (inc_r) x_offset <= x_offset + 1'b1;
          dispdata <= show(4'hF, 1'b0, 16'(y_offset), 16'(x_offset));
        end
        default: ;
      endcase
    end
  end

endmodule
