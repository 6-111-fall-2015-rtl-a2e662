# Snappa referee: camera-based judging of a thrown ball

Snappa is a table game in which a thrown die (here: a coloured ball) must
rise above an agreed low line before it comes down on the far side of the
table. This design watches the throw with an NTSC camera and decides the
question in hardware. It tracks the ball by its colour and follows its
height frame by frame. It records the shot so it can be replayed at full or
half speed. It keeps the score and declares the winner. Everything is drawn
over the live camera picture on a 1024x768 monitor. That picture shows:

- the tracked ball;
- a red low line and a green table line, both adjustable;
- a green check mark or red X for the last shot;
- a scoreboard;
- at the end of the game, a "BLUE WON" or "RED WON" banner.

The RTL is synthesizable SystemVerilog written for a 65 MHz pixel clock and a
27 MHz camera clock. The board's external parts are not included:

- the video decoder chip and its set-up;
- the ZBT frame-buffer SRAM;
- the clock generator;
- the hex display driver.

Their signals are ports of the top level, `snappa_top`.

## Signal flow

```
camera (27 MHz) -> ycrcb2rgb -> ntsc_to_zbt --write-->  frame buffer (external)
                                                            |
xvga raster (65 MHz) -> vram_display --read-----------------+
        -> rgb2hsv (23 clk) -> hue_detector (2 clk) -> center_of_mass (once per frame)
                                                 |              |
                                                 |        referee_fsm <- buttons (debounce)
                                                 |              |
                                                 |        shot_memory (replay)
                                                 v              v
        ball_marker -> line_sprite x2 -> low_indicator -> scoreboard -> game_over_text -> VGA
```

### Camera to frame buffer

The decoder delivers 10-bit Y, Cr and Cb samples with field, vertical-blank
and horizontal-sync flags (`fvh`) and a data-valid strobe (`dv`).

- `ycrcb2rgb` converts each sample to 8-bit RGB in three pipeline stages. It
  uses the usual BT.601 coefficients in fixed point, scaled by 256.
- The top delays the flags by the same three clocks.
- `ntsc_to_zbt` counts columns and rows. It keeps only the even field.
- A flag that flips every frame chooses which of each pair of interleaved
  display lines the field lands on.
- Pixels cross into the 65 MHz domain through two-flop synchronisers. Each
  pixel carries its own column and row, so data and address cannot drift
  apart.
- Two 18-bit pixels (6 bits per colour) are packed per 36-bit word, with the
  even pixel in bits 35:18.
- A camera pixel at column c, row r lands at raster position
  (150 + c, 250 + 2r + field).

### Frame buffer bus

`snappa_top` drives `vram_addr`, `vram_we` and `vram_write_data`. It expects
`vram_read_data` to hold the word addressed two clocks earlier, which is what
a pipelined ZBT SRAM returns.

- Even pixel clocks are display reads.
- Odd pixel clocks are free for a pending camera word.
- With `switch[7]` set, the camera is ignored and blanking time is used
  instead to fill the buffer with blue bars. After switching back, the
  camera overwrites only its own area, so the bars stay as the background
  around the camera image.

### Frame buffer to screen

`xvga` generates the XGA raster: 1344 clocks per line, 806 lines per frame,
and active-low syncs. `vram_display` asks for each word eight pixels ahead
of the raster. It latches the word on even clocks and shows its two halves
in turn.

One consequence of the two-clock memory latency: a stored pixel appears
four columns left of the column it was stored for. The tracker and every
overlay work in displayed coordinates, so the whole picture is consistent.
It is simply shifted by four pixels relative to the camera.

## Finding the ball

This part needs the most care. Everything downstream relies on the pixel,
its raster position and the sync signals staying in step through a long
pipeline.

1. **Colour space.** `rgb2hsv` turns every displayed pixel into hue,
   saturation and value, each 0..255.
   - Hue puts red at 0, green at 85 and blue at 170.
   - The two divisions (saturation and hue fraction) use an 18-stage
     pipelined restoring divider (`pipe_divider`).
   - The module's total latency is 23 clocks.
   - The top delays the raster position, the pixel and the syncs by exactly
     these 23 clocks with `delay_line` instances, and by 2 more for the
     detector. Nothing is tuned by hand.

2. **Matching.** `hue_detector` selects one of four colours with
   `switch[1:0]`: red, blue, green or yellow, each a hue band. A pixel
   matches only if all of these hold:
   - its hue is inside the band;
   - saturation is within 0x30..0xB0 and value within 0x30..0xF0, which
     rejects glare and shadows;
   - it lies inside a window.

   The window is ±50 pixels around the last center. Its clipping area is
   columns 150..850 and lines 260..750. Holding `button3` passes a center
   of (0,0), which opens the window to that whole area so a lost ball can
   be found again. The window is what makes tracking robust: most of the
   picture, and its noise, is never looked at.

   With `switch[2]` set, the picture turns into a diagnostic view:
   - magenta where hue, saturation and value all match;
   - blue where hue and saturation match;
   - green where only the hue matches;
   - black elsewhere.

3. **Center of mass.** `center_of_mass` sums the x and y of matching pixels
   and counts them, over one frame.
   - After the last tracked line it divides the sums by the count, using
     two 32-bit pipelined dividers (34 clocks).
   - The new center appears together with a one-clock `done` pulse, about
     37 clocks after the end of the window. That pulse is the "frame tick"
     for the rest of the design.
   - A frame with no matches keeps the previous center.
   - An optional smoothing input (unused in the top) averages the last four
     centers.

## Referee state machine (`referee_fsm`)

The `state` output numbers the states 1 to 7:

| # | state | behaviour |
|---|-------|-----------|
| 1 | idle | Up/down buttons move the low line (or, with `switch[6]`, the table line) by 5 lines. The point button adds a point to player 1 (or, with `switch[4]`, player 2). `switch[5]` enters replay; the throw button starts a shot. |
| 2 | replay | Held while `switch[5]` is on. |
| 3 | low-before | The ball has not yet been above the low line. Rising 10 lines above it goes to high and marks the shot good. Falling 10 lines below the table line ends the play. |
| 4 | high | Coming back 10 lines below the low line goes to low-after. 300,000,000 clocks (4.6 s) without that ends the play. |
| 5 | low-after | Reaching the table, or the same time-out, ends the play. |
| 6 | end-of-play | Recording continues for 100,000,000 clocks (1.54 s), then the machine returns to idle. |
| 7 | game-over | A side has at least 7 points and leads by 2. Only reset leaves this state. |

Line heights count lines below the top of the camera image, which is
raster line 250. They start at 75 (low line) and 400 (table line). Each
button press acts once; buttons are debounced for 10 ms.

## Shot memory and replay (`shot_memory`)

- While `record` is high, every frame tick stores the center
  ({x 13 bits, y 12 bits}) into a 512 x 25-bit memory.
- A recording restarts at address 0. If a shot is longer than 512 frames,
  the oldest entries are overwritten.
- When recording stops, the clip length is fixed.
- In replay the memory steps through the clip once per frame and loops.
  `button_right` toggles half speed, one step every second frame.
- The top shows the replayed center with a larger blue square (half-size
  20) instead of the live green one (half-size 7).

## Overlays

The overlays are combinational sprites chained one after another. Each
draws its shape over the pixel it is given.

| module | what it draws |
|--------|---------------|
| `ball_marker` | The tracked or replayed center. |
| `line_sprite` | The red low line and the green table line, 5 lines thick, columns 151..869. |
| `low_indicator` | A red X or a green check mark in a 170-pixel box at (30,30). Strokes are 15-pixel bands around straight lines. |
| `seg_digit` | A seven-segment digit, 100x200 pixels. |
| `scoreboard` | Three digits at (300,20), 150 pixels apart: player 2 in red, a white dash, player 1 in blue. |
| `glyph` | One of the letters B D E L N O R U W. |
| `game_over_text` | "WON" in green, plus the winner's colour word. It is shown only in game-over. |

## Status outputs

`led` shows, active low:

- the state;
- the window-release button;
- half-speed replay;
- reset.

`dispdata` is a 64-bit word for an 8-digit hex display. It holds the HSV of
the pixel at raster (500,500), to help calibrate the colour bands, and the
state number. It is refreshed every 27,000,000 clocks.

## Parameters

All defaults are the design's real operating values.

| parameter (top) | default | meaning |
|-----------------|---------|---------|
| `DEBOUNCE_DELAY` | 650,000 | button debounce, clocks |
| `POINT_TO_END` | 100,000,000 | end-of-play recording time, clocks |
| `TIME_OUT` | 300,000,000 | time-out while high or low-after |
| `DISP_PERIOD` | 27,000,000 | status word refresh |
| `HSV_DIV_LATENCY` | 18 | HSV divider stages (HSV latency = this + 5) |
| `COM_DIV_LATENCY` | 34 | center-of-mass divider stages |
| `REPLAY_LOGSIZE` | 9 | log2 of the replay depth (512 frames) |

The other sizes are parameters of the individual modules. Examples are the
hue bands, the window size, the line step, the winning score and the sprite
positions.

## Differences from the original description and own choices

- **Replay depth.** The original prose speaks of 2^7 (about 130) entries,
  6.5 s at 20 frames/s. Its code uses 2^9. This design uses 2^9. A center
  is produced every display frame (60 per second), so 512 entries hold
  8.5 s.
- **End-of-play time.** The prose says "2 more seconds". This design uses
  100,000,000 clocks (1.54 s at 65 MHz), the value in the original code.
- **Replay marker size.** The prose calls it twice as large. This design
  uses half-sizes 7 and 20, taken from the original code.
- **Signal alignment.** The original aligns signals with a fixed 56- or
  60-clock delay. Here every delay is exactly the pipeline latency.
- **Red hue band.** It is 0x00..0x18, following the original code, not its
  comment (0x20).
- **Own choices:**
  - the dividers (the original used vendor cores);
  - the debouncer;
  - the frame-buffer arbitration;
  - the test-pattern bars;
  - the 10-line hysteresis and 5-line step;
  - the segment, letter and check-mark geometry;
  - the scoreboard position;
  - the standard seven-segment patterns.
- **Replay looping.** Replay loops over the recorded clip rather than
  over the whole memory.
- **Forecast column wrap.** The read-ahead column wraps at the true line
  length of 1344. The original wrapped at 1048.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. Build and run one with plain
verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -I. -y rtl -y tb +libext+.sv \
    rtl/snappa_pkg.sv tb/tb_referee_fsm.sv --top-module tb_referee_fsm -o sim
./obj_dir/sim
```

**`tb_snappa_top`** is the end-to-end test, about a minute of simulation.
It shortens only the timers; all datapath sizes are at their defaults.

- A model of the frame buffer has the two-clock read latency.
- A camera model sends a short interlaced frame. The test checks the words
  written to the frame buffer and the same pixels on the screen.
- The ball is painted directly into the frame-buffer model and moved from
  frame to frame.
- The test then exercises, in order:
  - line adjustment;
  - the tracking window losing a ball that jumped, and the release button
    finding it again;
  - a high shot through all recording states, with its check mark;
  - a low shot, with its X;
  - a time-out while high;
  - replay and half-speed replay;
  - the diagnostic colour view;
  - the status word;
  - score entry up to game over, with its banner;
  - the test-pattern mode.
- It counts each of these mechanisms and fails if one never happened.

**`tb_snappa_top_full`** runs the top with every parameter at its default.
It takes a high shot through to the return to idle, including the full
100,000,000-clock end-of-play, and takes about 3 minutes.

Both use the shared harness `tb/snappa_harness.svh`.

## Limits

- The camera image on screen is shifted 4 pixels left (see above). Tracking
  and overlays are unaffected.
- The tracker finds one blob per frame. Two objects of the chosen colour
  inside the window give their common center.
- The camera and frame-buffer models in the testbenches are simple
  behavioural models, not models of the real decoder and SRAM timing.
