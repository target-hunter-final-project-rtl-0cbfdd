# Target Hunter: an FPGA shooting gallery

A player holds a plastic rifle in front of a camera and a VGA screen. A
green ping-pong ball sits on the muzzle. The hardware finds the ball in
every camera frame and turns its position into a point on the screen,
where it draws a sight. The rifle's trigger fires, and a switch on the
rifle pauses the game. A gyro board on the stock can add a small
angle-based correction to the aim. Animals (a deer, then two turkeys, then
two ducks) bounce around a forest picture. Each round lasts ten seconds.
A hit shows a "Hit!" screen; the next trigger pull returns to the level at
a higher speed. After the fastest speed, the game moves to the next,
smaller animal.

Everything is one synchronous design clocked by the 25 MHz pixel clock of a
640x480, 60 Hz VGA screen. The top module is `target_hunter_top`.

## Signal flow

```
camera pixel ─► rgb2hsv ─► color_tracker ─► seq_divider x2 ─► ball centre ─┐
                                                                          ├─► aim_combiner ─► aim (x,y)
gyro serial x2 ─► pulse_receiver ─► angle_integrator ─► aim_calc ─► offset┘        │
                                                                                   ▼
trigger ─► debounce ─► game_fsm ◄── hit test (sight pixel AND target pixel) ◄── sight
               │  │  └─► countdown_timer (start / expire)
               │  └────► target_mover x2 ─► image_sprite (animals)
               └───────► sound_player            │
vga_timing ─► hcount/vcount ─► all sprites ─► display_compositor ─► VGA
```

## Finding the ball

The camera picture comes in at the same scan position as the VGA output
(`cam_rgb` belongs to the `hcount`/`vcount` the top puts out on that clock).
The frame grabber that provides it is outside this design.

1. **`rgb2hsv`** converts each pixel to 8-bit hue, saturation and value.
   Hue runs once round the circle in 256 steps: red 0, green about 85,
   blue about 171. It takes two pipeline stages.
2. **`color_tracker`** accepts a pixel when 0x25 < H < 0x40,
   0x51 < S < 0x7A and V > 110.
   - A pixel is counted only if the pixel before it was also accepted. A
     lone noisy pixel therefore never counts; the ball, which covers
     several pixels on a line, always does.
   - It keeps sums of the x and y positions of the counted pixels, and
     their number.
   - The number starts at 1, not 0, so the division that follows is always
     defined. The cost is a small pull of the centre towards (0,0) for a
     very small ball.
   - When the scan passes the end of the visible frame, the three totals
     are latched and `frame_done` pulses.
3. **`seq_divider`** (two of them) divides the sums by the count, one
   quotient bit per clock. Each takes 31 clocks, well inside the vertical
   blanking. The result is the ball's centre in camera coordinates.
4. **`track_overlay`** gives a check view when `show_camera` is high: the
   camera picture, with matched pixels in yellow and yellow lines through
   the centre.

## Turning ball position into a sight position

**`aim_combiner`** maps camera coordinates to screen coordinates:

    screen_x = 640 - ((cam_x + dx - 20) * 1084 >> 10)
    screen_y = (cam_y + dy - 40) * 1170 >> 10

- x is mirrored because the camera faces the player.
- The gains (about 1.06 and 1.14) stretch the part of the camera picture
  that the ball can reach over the whole screen.
- `dx`/`dy` are the gyro offsets, added only while `gyro_en` is high.
- The result is clamped to the screen, and it holds while the game is
  paused.

### The gyro path

The rifle's gyro is read by a small microcontroller board. It sends each
axis's rate of turn as one byte on its own wire, in a pulse-width code:

| element  | line high | then low |
|----------|-----------|----------|
| start    | 2 ms      | 200 µs   |
| bit = 1  | 600 µs    | 200 µs   |
| bit = 0  | 300 µs    | 200 µs   |

Bits go least significant first, with 10 ms between readings.

**`pulse_receiver`** samples the line every 75 µs (`GYRO_TICK` = 1875
clocks) and measures each high pulse:
- 7..12 samples is a one;
- 3..5 samples is a zero;
- a pulse of any other length, the start pulse among them, is ignored.

Eight accepted bit pulses make a byte, a two's-complement rate.

It keeps the last 16 bytes. Its output is bits 12:5 of their signed sum: half the
average, which smooths the jittery gyro.

**`angle_integrator`** adds each new reading to a running angle. It skips a
reading equal to the one before, because the sender repeats itself. The
angle stays within ±30 degrees.

**`tan_lut`** gives round(10000·tan θ) for whole degrees. **`aim_calc`**
multiplies that by 100 and shifts right by 13, so one degree is about two
pixels.

Because the angle is a running sum of rates, it drifts. That is why the
correction can be switched off: the camera alone is a usable aim.

## The game controller (`game_fsm`)

| state | screen       | what a trigger pull does |
|-------|--------------|--------------------------|
| 0     | title        | Chooses a level by where the sight is: x 240..440 and y 200..280 is beginner, 300..380 intermediate, 400..480 expert. |
| 1     | beginner     | If the sight covers a deer pixel: go to Hit!. |
| 2     | intermediate | The first turkey hit is marked down and disappears; hitting the second ends the round. |
| 3     | expert       | The same as intermediate, with ducks. |
| 4     | Hit!         | Back to the same level with speed + 2. Once the speed has passed 27, go to the next level at speed 1 instead (after expert: the title). |

Details:

- **The hit test is per pixel.** The top compares the sight layer and the
  current target layer on the same clock. A shot hits if, while the
  trigger is held, the scan reaches any pixel where the sight is drawn
  and the target shows a visible (non-white) pixel.
- **Re-fire hold-off.** On the title and Hit! screens a pull is only taken
  24,000,000 clocks (about one second) after the last accepted pull. The
  count restarts whenever the game leaves a level. Without this, one long
  pull would skip the Hit! screen or pick a level twice.
- **Round timer.** Entering a level pulses `start_on`, which restarts
  `countdown_timer`. When it runs out, `expire` sends the game back to the
  title. `expire` stays high until the next start, so the controller
  ignores it on the one clock where it is itself restarting the timer.
- **Pause.** Pause stops the timer and the targets and makes the trigger do
  nothing.
- **Sound requests.**
  - The gun request stays up for 17.5M clocks after any title pull or any
    hit.
  - The gobble request is up during the intermediate level.
  - The background request is up at all other times.

## Drawing the screen

**`vga_timing`** produces the 640x480 scan: 800 clocks per line, 524 lines
per frame, active-low syncs. All its outputs are registered together.

Each picture is an **`image_sprite`**: a memory of 4-bit colour indexes plus
a 16-entry 24-bit colour table, drawn with its top-left corner at (x,y).
It outputs 0 outside its rectangle.

| picture                           | size    | position           |
|-----------------------------------|---------|--------------------|
| forest background                 | 640x480 | 0,0                |
| title                             | 500x100 | 70,50              |
| three level buttons               | 200x75  | 210,200 / 300 / 400 |
| deer                              | 100x100 | moving             |
| turkey (two copies)               | 50x50   | moving             |
| duck (two copies)                 | 25x25   | moving             |
| "Hit!"                            | 100x50  | 270,200            |

**`sight`** draws the sight from arithmetic instead of memory: an orange
ring of radius 8..10 with a cross 4 pixels wide.

**`target_mover`** moves each animal diagonally by `speed` pixels once per
frame. It turns round at x = 70/560 and y = 70/410, like a Pong ball.

**`display_compositor`** picks, per state, the first layer that draws
something:

| state                  | layer order                                            |
|------------------------|--------------------------------------------------------|
| title                  | sight, then the title and level buttons (they do not overlap), then background |
| levels                 | sight, then the targets not yet hit, then background   |
| Hit!                   | sight, then the Hit! block, then background            |

Transparency: a white (FFFFFF) pixel in a picture shows the background.
The Hit! block uses the near-white FCFBFB as its transparent colour.

**Alignment.** Every sprite and the sight have exactly two clocks of
latency, so all layers line up. The compositor adds one more, and
sync/blank are delayed to match: VGA outputs are three clocks behind
`hcount`.

### Loading pictures and sounds

The picture and sound memories have write ports and start empty. After
reset, fill them through the top:
- pictures: `img_we/img_sel/img_addr/img_index` and
  `pal_we/pal_addr/pal_rgb`, with `img_sel` from `th_pkg::image_id_t`;
- sounds: `snd_we/snd_sel/snd_addr/snd_data`.

A product built on this would replace the write ports with ROM
initialisation from its image and sound data.

## Sound (`sound_player`)

There are three clips of 16-bit samples:
- background music, 110,000 samples;
- turkey gobble, 110,000 samples;
- gunshot, 22,000 samples.

A clip plays in a loop while its request is high. Its address advances on
every second pulse of the audio codec's 48 kHz `codec_ready`, so playback
runs at 24 kHz. When more than one clip is requested, the order is
gunshot, then background music, then gobble. The output is the top byte of
the chosen sample, as the codec interface takes 8 bits.

## Parameters of the top

| parameter         | default    | meaning |
|-------------------|------------|---------|
| `CLK_HZ`          | 25,000,000 | Clocks per second of the round timer. |
| `ROUND_SECONDS`   | 10         | Length of a round. |
| `DEBOUNCE_CYCLES` | 650,000    | Trigger must be stable this long (26 ms). |
| `FIRE_HOLDOFF`    | 24,000,000 | Re-fire hold-off on the title and Hit! screens. |
| `GUN_CYCLES`      | 17,500,000 | Length of the gunshot sound request. |
| `GYRO_TICK`       | 1875       | Clocks per 75 µs gyro sample. |
| `SPEED_STEP`, `SPEED_MAX` | 2, 27 | Speed step per round, and the speed after which the level changes. |
| `BG_LEN`, `GOBBLE_LEN`, `GUN_LEN` | 110,000, 110,000, 22,000 | Clip lengths in samples. |

The inputs and outputs:

- **Rifle inputs:** `fire_n` (low while the trigger is pulled), `pause`,
  `gyro_ser[1:0]` (x axis on bit 0), `gyro_en`.
- **Camera and view inputs:** `cam_rgb`, `show_camera`.
- **Status outputs**, useful for a display or for tests: `state`, `speed`,
  `seconds_left`, `aim_x/aim_y`, `ball_x/ball_y`, `targets_down`, and
  `events`. The `events` bits pulse one clock each for:
  - bit 0: level selected;
  - bit 1: round won;
  - bit 2: first of two targets hit;
  - bit 3: speed-up;
  - bit 4: level advance;
  - bit 5: time-out;
  - bit 6: target bounce.

## Where this departs from the original game

- **Sound on the same chip.** The original played sound on a second board,
  fed by wires from the game board. Here the sound player sits in the same
  top, driven directly by the controller.
- **Gyro correction behind a switch.** The original's gyro correction was
  unreliable in play. Here it is optional behind `gyro_en`.
- **Tangent table recomputed.** The table's entries are computed from
  round(10000·tan θ). Four of them differ from the original's table by one
  unit or more.
- **Trigger polarity.** The trigger is taken as active low: a pull-up to
  the supply, with the switch closing to ground.
- **Start positions.** Both movers start at (320,240). They leave in
  different directions, so two targets separate at once.
- **Memories are loaded, not pre-filled.** The picture and sound memories
  are written through ports instead of holding the original artwork.
- **Hold-off restart.** The hold-off now also restarts when a level is
  left, and a stale time-out is ignored on level entry. Both fix cases
  where one trigger pull could otherwise pass two screens, or a new level
  could end at once.
- **Not in this design:** the analogue camera front end (video decoder,
  colour conversion, frame buffer), the gyro's microcontroller, the audio
  codec's serial interface, clock synthesis, and the rifle's switch
  wiring. The top brings out the signals where they connect.

### Memory

The pictures need 1.69 Mbit of 4-bit indexes, about 109 of the 144 18-kbit
block RAMs of the original's FPGA. That fits, but leaves no room for
anything else large, which is why the original dropped an on-screen
countdown.

The three sound clips at 16 bits need another 3.87 Mbit. That is more than
such a device holds, so a single-chip build must use 8-bit samples (only
the top byte is played) or put the sound elsewhere, as the original did.

## Testbenches

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_target_hunter_top` | Plays a whole game with shortened timing: a round "second" is one frame, the hold-off three frames, speed steps of 8. A model player moves a simulated ball in the camera picture until the sight is where it wants it. |
| `tb_target_hunter_top_full` | Runs with every default: checks the VGA line and frame timing, selects the beginner level after the real one-second hold-off, hits the deer, resumes at a higher speed, waits for a bounce and applies a real-timing gyro reading. About 62 million clocks. |

Both top-level testbenches count each mechanism: selection, hit, first of
two, speed-up, advance, time-out, bounce, pause, gyro correction, camera
view, each sound clip, and picture pixels. A mechanism that never
happened counts as a failure.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/th_pkg.sv \
        tb/tb_target_hunter_top.sv --top-module tb_target_hunter_top
    ./obj_dir/Vtb_target_hunter_top

The other blocks' testbenches run the same way with their own names.
