# Live-action pong

Two players stand in front of a green screen, each holding a coloured paddle
(a tube of blue card). A camera films them. On the VGA monitor they see
themselves, mirrored. The green screen is replaced by a background picture,
and the paddles are redrawn in solid red and green. A virtual ball flies
around the play area and bounces off the *real* paddles wherever the camera
sees them. The return angle depends on which part of the ball's edge the
paddle touched. If the ball reaches a player's wall, that player loses health.
When a player's health runs out, the other player wins.

Everything happens in one FPGA pipeline. The pipeline handles one display
pixel per 65 MHz clock and keeps no per-object state apart from the ball. The
paddles are never found as objects. The keyer labels each camera pixel as it
is displayed, and the ball counts the paddle pixels that fall under its own
outline.

The RTL is SystemVerilog (IEEE 1800-2017). It reimplements a student FPGA
project (6.111, MIT). Where this design follows that project and where it
departs from it is listed in [Departures from the original](#departures-from-the-original).

## Signal path

```
 camera domain (27 MHz)                 system / pixel domain (65 MHz)
 ----------------------                 ------------------------------------------------
 CCIR656 words                          xvga: hcount, vcount, syncs
   -> ntsc_decode (Y Cr Cb + F V H)
   -> ycrcb2rgb (3 stages)              frame memory (external 512K x 36 ZBT)
   -> ntsc_to_zbt capture  ==toggle==>  ntsc_to_zbt write side --(odd hcount: write)--+
                                        vram_display ---------(even hcount: read)-----+
                                          -> 18-bit camera pixel
                                             -> binarizer (rgb2hsv + windows + filter)  -> is_background, is_paddle
                                             -> delay (30 clocks)                       -> camera colour
                                        parameter_select (switches, buttons) -> HSV windows, play area, offsets
                                        background_gen (index ROM + palette)  -> background colour
                                        vga_select: ball, health bars, paddles, texts, game state -> VGA colour
```

`live_action_pong` is the top module. It holds no logic of its own beyond
these parts:

* the switch decoding;
* the reset combination (power-on reset or the debounced ENTER button);
* the multiplexer that shares the frame-memory port;
* one register that aligns the camera pixel and the sync signals.

The following parts are outside the design and appear as ports:

* the external frame memory;
* the video decoder chip that produces the CCIR656 stream, and its I2C set-up;
* the board's clock generation;
* the hex-display driver.

## Frame memory: mirroring, packing and port sharing

The camera writes into the frame memory at 27 MHz, while the display reads it
at 65 MHz. Both sides share one single-ported synchronous SRAM, which has two
clocks of read latency.

**Writing (`ntsc_to_zbt`).** In the camera domain, a column counter is loaded
with 800 at every line end. It counts *down* once per pixel, so the stored
picture is a mirror image and the players see themselves as in a mirror. A row
counter starts at 30 in vertical blanking and counts lines. Only field 0 is
stored. An even/odd bit flips at every start of field 1, so successive frames
fill alternating display lines. Each new pixel (6 bits per colour, 18 bits in
all) is captured together with its column, row and even/odd bit. A toggle flag
announces it. The flag crosses into the system domain through two flip-flops.
The capture register stays stable long enough for the system side to copy it.

The system side packs two pixels per 36-bit word: `{column x, column x+1}`,
with x even. The word goes to address `{row[8:0], even_odd, column[9:1]}`.
The memory address therefore *is* the display position: display line
`2*row + even_odd`, display column `column`.

**Sharing the port.** The top gives every odd `hcount` to the writer and every
even `hcount` to the reader (`vram_we = hcount[0]`). The writer's address and
data stay on its outputs until the next pair, so a word may be written several
times, which is harmless.

**Reading (`vram_display`).** The reader looks 8 pixels ahead. It wraps into
the next line and the next frame where necessary. It reads one word per two
pixels, on the even slots only. The word arrives two clocks later. It is
latched, then moved to a hold register, and its halves are shown on the next
even and odd clock. As a result, the pixel delivered at `hcount = k` is
column `k + 4` of the current line.

## Colour keying

`binarizer` decides, for every camera pixel, whether it belongs to the green
screen, to a paddle, or to neither. It works in HSV colour space rather than
RGB. A colour is then a hue range, with saturation and value limits that
tolerate shadows and wrinkles. Re-keying to another colour is mostly a matter
of moving the two hue bounds.

1. **`rgb2hsv`** converts each pixel in a fully pipelined way (one pixel per
   clock, 23 clocks latency):
   * V = max(R, G, B);
   * S = 255 * (max - min) / max;
   * H is 0..255, split into three 85-wide sectors chosen by which channel is
     largest (offsets 0, 85, 170), plus or minus 42.5 * (difference of the
     other two) / (max - min).

   The two divisions use `pipe_divider`, a restoring divider with one quotient
   bit per stage and 18 clocks latency.
2. **Windows.** A pixel is *background* when H, S and V all lie inside the
   background window (bounds included). Otherwise it is *paddle* when it lies
   inside the paddle window. The background label takes priority, so a pixel
   never carries both labels. Hue is not treated as circular, so a window
   cannot straddle red (0/255).
3. **Noise filter** (switch 7). This is a one-dimensional opening along the
   scan line. The erosion output is 1 only when the last 5 raw labels are all
   1. The dilation output is 1 when any of the last 5 erosion outputs is 1.
   Runs shorter than 5 pixels vanish, and longer runs keep their exact extent.
   The output is centred on the pixel it belongs to, with 4 pixels of lag.
   With the filter off, the raw label is delayed by the same amount, so
   switching the filter never misaligns the picture.

The keyer result comes `KEY_LATENCY = 30` clocks after its pixel (see
`pong_pkg`). The camera colour is delayed by the same 30 clocks (`delay`), so
`vga_select` receives colour and label together.

## Ball physics

`ball` keeps the ball's top-left corner (x, y) and its velocity (vx, vy). The
radius R is 30. A pixel is on the ball when its squared distance to
(x + R, y + R) is at most R squared.

**Sensing a hit.** While a frame is scanned, every pixel that is both on the
ball and a paddle pixel is counted. Each such pixel adds to a total and to
each of eight overlapping *edge segments* that contain it. Segment k is the
part of the disc farther than 0.8 R from the centre in direction k * 45°:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| side | left | upper left | top | upper right | right | lower right | bottom | lower left |

Neighbouring segments overlap, so a slightly tilted paddle cannot make the
estimate jump by 90°. The segment with the most overlapping pixels gives the
contact direction to within ±22.5°. This arg-max is found combinationally,
with the lowest index winning ties.

**Once per frame** (at hcount = vcount = 0), the ball does the following:

* If the total exceeds 25 pixels and no cooldown is running, the contact is a
  hit. A 30-frame cooldown then starts, so the ball cannot stick to a paddle.
  The new velocity always sends the ball *away* from the contact:
  * a left or right contact points vx away from the paddle;
  * a top or bottom contact points vy away from the paddle and reverses vx;
  * a diagonal contact swaps |vx| and |vy| (a 45° mirror) and points both
    away from the corner.

  With this rule, a player who touches the ball always returns it, even when
  the angle estimate is noisy.
* Without a hit, the next position is checked against the play area. A
  component that would leave the area is reversed *before* the ball moves, so
  the ball never enters the border. Leaving on the left or right raises
  `miss_left` or `miss_right` for one clock.
* The ball moves by the new velocity, and all counters restart.

## Game and screen composition

`vga_select` holds the game state:

* two healths of 100;
* a game-over state;
* a restart countdown.

Button 3 restarts a game. The ball is re-centred, both healths return to 100,
and the ball waits for 5 × `CLKS_PER_SECOND` clocks, which gives the player
who pressed the button time to walk back. After power-up, the ball waits for
the first press. Each `miss_left` costs the left player `DAMAGE` (10), and
each `miss_right` costs the right player the same. A player at zero or below
loses: the ball stops, and "WIN" and "LOSE" appear at the winner's and the
loser's edge of the play area.

Each pixel gets one colour. The first rule that applies, from the top of this
table, sets it:

| condition | colour |
|---|---|
| outside the play area | grey 0F0F0F |
| game over and on a text glyph | text colour |
| on the ball | 030F3F |
| on a health bar | FFB000 |
| keyer says paddle | red left of the play-area centre, green right of it |
| keyer says green screen and switch 5 on | background picture |
| switch 6 on | camera pixel |
| otherwise | black |

The output is registered. The sync and blank outputs are delayed by one clock
to match.

Health bars (`health_bar`) run 20 to 40 lines above the bottom edge of the
play area. Each starts 20 pixels in from its side and is 2 × health − 1
pixels long. They follow the play area when it is resized.

The texts (`gameover_text`) are drawn in a 100 × 200 pixel box from a 5 × 7
font, scaled six times, with the letters stacked vertically.

## Background picture

`background_gen` translates the screen position into image coordinates. It
works in one of two modes:

* **Bounce mode** (switch 3 off): image = screen − offset − ball position / 2.
  The picture sways with the ball.
* **Drift mode** (switch 3 on): image x = screen x − offset x + t, and image
  y = screen y − offset y. The value t grows by one every `DRIFT_CYCLES`
  (1,000,000) clocks, so the picture scrolls slowly sideways.

The image is 1024 × 512 pixels with a 4-bit colour index and tiles in both
directions. A 16-entry palette turns the index into 24-bit colour. The colour
is ready two clocks after the position.

The index source, `bg_index_rom`, computes a picture (a shaded planet and
stars) from the address, instead of storing one. To show a real picture,
replace `bg_index_rom` by a 2^19 × 4-bit ROM, keeping the same one-clock read,
and change the palette function.

## Controls

All buttons are active low and debounced (`debounce`, 650,000 clocks ≈ 10 ms).
The direction buttons adjust the pair of settings selected by switches
`[4, 2:0]`:

* up and down raise and lower the upper bound;
* right and left raise and lower the lower bound.

A held button repeats through `incrementor`. Position settings repeat fast
(every 2,375,000 clocks). Colour bounds repeat slowly (every 6,750,000 clocks)
for finer control.

| sw[4:0] | adjusts | default (max / min) |
|---|---|---|
| 0?000 | green-screen hue | 89 / 2A |
| 0?001 | green-screen saturation | FF / 00 |
| 0?010 | green-screen value | FF / 27 |
| 1?000 | paddle hue | C2 / 74 |
| 1?001 | paddle saturation | FF / 1B |
| 1?010 | paddle value | FF / 69 |
| 0?011 | play area y_max / y_min | 233 / B6 |
| 0?100 | play area x_max / x_min | 269 / BE |
| 0?101 | background offset: up/down y, right/left x | 70 / 8F |

The remaining switches work as follows:

* sw[3]: background mode;
* sw[5]: replace the green screen;
* sw[6]: show camera pixels;
* sw[7]: keyer noise filter.

`dispdata` (64 bits, for a 16-digit hex display) shows the following:

* digit 15: the selected pair (A hue, B saturation, C value, D y-limits,
  E x-limits, F offset);
* digit 14: 1 for the paddle set;
* digits 7..4: the upper bound;
* digits 3..0: the lower bound.

ENTER restores all defaults and restarts everything.

## Latencies

| path | clocks |
|---|---|
| camera word → decoder sample register | 1 |
| YCrCb → RGB | 3 (camera clock) |
| display position → frame-memory pixel | pixel at hcount k is column k + 4 |
| pixel register in the top | 1 |
| rgb2hsv | 23 |
| keyer windows + opening filter | 7 (total `KEY_LATENCY` = 30) |
| vga_select output register | 1 |
| background_gen | 2 |

The ball, bars, texts and background are drawn from the current
hcount/vcount. The camera layer and the keyer labels lag them by about 31
pixels, so the paddle colours and the camera picture appear shifted right by
that amount relative to the ball. The hit test uses the same shifted labels,
so what the ball reacts to is exactly what is drawn.

## Departures from the original

These follow the original project: the block structure and data path, the
numbers, the rules, and the game behaviour. In detail:

* **Block structure and data path**, including the mirrored, two-pixel frame
  memory and the interleaved read/write port.
* **Numbers:** 800/30 start values, 8-pixel read-ahead, 23-clock HSV latency,
  0/85/170 hue sectors, 5-pixel erosion and dilation, R = 30, 25-pixel hit
  threshold, 30-frame cooldown, health 100 with 2 pixels per point, grey and
  ball colours, 60,000,000 clocks per "second", 5-second restart delay,
  repeat periods 2,375,000 / 6,750,000, drift step 1,000,000, default
  settings.
* **Rules:** background priority over paddle, eight overlapping 45° segments,
  collision checked before the walls, bounce-before-leaving walls.

This design's own choices, or readings where the original says little:

* **Return rule after a hit.** The original only says the physics was
  "massaged" so that a hit ball is returned; the rule above is this design's.
* **Segment geometry.** The 0.8 R depth of the segments is read from a
  drawing, not from stated numbers.
* **Switch table.** The original's listing and its switch table disagree on
  which of 0?011 / 0?100 is x and which is y. The table was followed (0?011 =
  y limits).
* **Window bounds.** The original's text describes strict bounds and its code
  inclusive ones; inclusive bounds are used.
* **Game rules:** damage per miss (10), the priority order of the screen
  layers, the "wait for first start" state, the health-bar and text colours,
  which side is red, ENTER as settings reset, and the 10 ms debouncer.
* **Divider.** The HSV divider is a written pipelined divider instead of a
  vendor core; its latency is chosen so that the total is the original's 23
  clocks.
* **Background and texts.** The background picture and the victory/defeat
  texts are generated, because the original bitmaps are not available. The
  text box size (100 × 200) and its placement at the play-area edges follow
  the original.
* **Decoder and converter.** The CCIR656 decoder and YCrCb converter are
  written from the standards. The clock-domain crossing of the camera pixels
  uses a toggle handshake.
* **Countdown length.** `CLKS_PER_SECOND` is 60,000,000 as in the original,
  although the pixel clock is 65 MHz, so the restart delay is about 4.6 s.

Not built:

* the I2C set-up of the video decoder chip;
* the frame-memory controller;
* clock generation;
* the hex-display driver.

These are board- or vendor-specific parts and appear as ports of the top.

## Files

`rtl/`:

* `pong_pkg.sv` holds the shared types (`rgb_t`, `hsv_bounds_t`,
  `play_area_t`, `game_state_t`) and latencies.
* `live_action_pong.sv` is the top.
* `xvga`, `ntsc_decode`, `ycrcb2rgb`, `ntsc_to_zbt` and `vram_display` form
  the video path.
* `rgb2hsv`, `pipe_divider` and `binarizer` form the keyer.
* `debounce`, `incrementor` and `parameter_select` handle the controls.
* `background_gen` and `bg_index_rom` produce the background.
* `ball`, `health_bar`, `paddle_pixel`, `gameover_text` and `vga_select`
  implement the game and drawing.
* `delay` aligns the camera pixel with its keyer result.

Every file starts with a comment on its function, interface and timing.

`tb/`:

* One self-checking testbench per module, `tb_<module>.sv`. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
* `tb_live_action_pong.sv` is the end-to-end test at shortened timing
  constants:
  * debounce 8 clocks;
  * a 2000-clock "second";
  * fast repeat periods;
  * a ball at vx = 40;
  * 50 damage per miss.

  It uses the real display timing. It runs about 46 frames and counts 16
  mechanisms, from memory writes to game over and the ENTER reset. A
  mechanism that never happens counts as a failure.
* `tb_live_action_pong_full.sv` runs the top with all parameters at their
  defaults for five display frames, with a full-width camera picture.
* `ccir656_source.sv` is a behavioural camera that generates a green screen,
  paddle stripes and optional noise dots as CCIR656.
* `zbt_model.sv` is a behavioural 512K × 36 frame memory with two clocks of
  read latency.
* `tb_check.svh` holds the check macros, and `tb_hsv_model.svh` a reference
  HSV model.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_ball \
    rtl/pong_pkg.sv tb/tb_ball.sv -y rtl -y tb
./obj_dir/Vtb_ball
```

Replace `tb_ball` by any testbench. The simulator starts variables at random
values (`+verilator+rand+reset+2`), and the design does not depend on their
initial state. Run times:

* unit testbenches: seconds each;
* the end-to-end test: about a minute;
* the full-size test: about ten seconds.

## How far to trust it

* Every module has been linted and elaborated with Verilator and with Yosys
  (slang front end), and every testbench passes. For every module, a copy
  with one deliberate defect was made, and its testbench fails on that copy.
* The camera and frame memory are behavioural models. Real CCIR656 timing
  (blanking lengths, the exact line counts per field) and the real SRAM
  controller have not been exercised. Timing closure at 65 MHz has not been
  checked. The main paths that need checking are the 28-bit distance
  computation in `ball`, the paddle-overlap counters, and the font arithmetic
  in `gameover_text`; each could be pipelined by a clock if needed.
* The keyer has been tested on synthetic colours only, not on camera footage.
  The default HSV windows are the original's tuned values for its lighting.
