# Soil-water characterization unit

A hand-held instrument for surveying lawn irrigation. A probe with seven pairs of
electrodes is pushed about 3.5 inches into the soil. The controller applies a voltage
to one pair at a time and digitizes the result, giving a moisture profile at half-inch
steps. Next to the profile it records where and when the reading was taken, using a GPS
receiver's serial output. Everything is shown on a 640x480 LCD: position, date and time,
settings, and a seven-bar graph of the current reading. There are 32 numbered sample
slots, so a user can walk a lawn, store a profile at each spot and page back through
the stored profiles.

This repository has the controller logic in synthesizable SystemVerilog. It is a
single 25 MHz clock domain, and it has self-checking testbenches for every block and
for the whole unit. The analog parts sit outside the logic and are driven through
ports:

- the switch array that routes the probe voltage (16 control lines)
- an ADC0841-style 8-bit converter
- the GPS receiver
- the LCD panel

## How a measurement is made

Two buttons start a measurement:

- **zero** (btn0) while the probe is in dry soil
- **sample** (btn1) at a survey point

Both buttons run the same *burst*. A zero burst stores its result as the dry
reference. A sample burst subtracts that reference from its result and shows the
difference.

A burst is built from three nested loops:

1. **One conversion** (`sensor_control`) is a write–convert–read handshake with the
   ADC, paced by a 50 kHz step enable from `sensor_clock` (500 clocks).
   - Each step moves the FSM forward by one action:
     - assert CS
     - pulse WR
     - release both
     - wait for INTR to fall (conversion done)
     - assert CS and then RD
     - capture the data bus once INTR has gone high again (the ADC's acknowledgement)
     - release RD and CS
   - All three strobes and INTR are active low.
   - Assertions check that WR and RD are only low while CS is low, and never together.
   - A conversion takes eight steps plus the converter's own conversion time, about
     180 µs with a 40 µs converter.
2. **One sweep** (`sensor_decoder`) selects each depth in turn and runs one conversion
   per depth.
   - Depth *k* closes switches *k* and *k+9* of the 16 control lines, which connects the
     drive and sense lines to the *k*-th electrode pair.
   - The seven bytes are packed into a 56-bit word, depth *k* in bits `8k+7:8k`.
   - All switches are opened at the end.
3. **One burst** (`sensor_communicator`) runs eight sweeps and averages them.
   - Every depth has its own 11-bit running sum.
   - The average is the top eight bits of each sum.
   - A burst is 56 conversions, about 10 ms.
   - Requests that arrive while a burst is running are ignored.

`sensor_config` holds the dry reference (`zero_offset`). After a sample burst it
subtracts the reference depth by depth and clamps at zero, so soil drier than the
reference shows an empty bar. It then pulses `display_ready`, and the record store
uses that pulse to save the result.

`sensor_module` turns a held button into a single request on the press edge and wires
the chain above together. A zero press both starts a burst and marks its result as the
new reference.

## How the GPS is read

The receiver sends NMEA sentences at 4800 bit/s, 8N1, and repeats them about every
two seconds. The line enters inverted (`gps_rx_n`) and passes through a synchronizer.

- **`gps_decoder`** receives bytes.
  - It first requires the line to stay high for eight bit periods, so that it never
    starts inside a byte.
  - It then waits for a falling edge and starts `gps_clock`. That clock gives a pulse
    in the middle of each bit (5207 clocks per bit).
  - It checks the start bit, shifts in eight bits LSB first and checks the stop bit.
  - A byte with a bad stop bit is dropped and the idle check starts again.
- **`gps_communicator`** parses `$GPRMC` sentences.
  - `$` restarts the header match in any state, and any other sentence type is
    abandoned at its first wrong letter.
  - The fields are walked in RMC order (time, status, latitude, N/S, longitude, E/W,
    speed, course, date, variation, E/W). The variation field is only skipped over.
  - Digits go into BCD registers: time, date, latitude degrees and minutes, and
    longitude degrees and minutes. The status letter `A` sets `fix`.
  - Nothing becomes visible until the sentence ends (`*`, CR or LF after the last
    field). At that point all fields are updated together and `pos_ready` pulses. A
    sentence cut short by a new `$` or an early `*` changes nothing.
  - The whole minutes of latitude and longitude are also given in binary (`lat`, `lon`).
- **`gps_module`** holds the last complete fix for the display and the record store.
  - It also exports the parser state.
  - The display uses that state to animate a "GPS Com" arrow row, and the LEDs show it.

## How the picture is drawn

The panel is interlaced: one frame writes all even lines and then all odd lines.
`vga_module` divides the 25 MHz clock by two to get a 12.5 MHz pixel rate.

- Each line is 803 pixel clocks:
  - 640 visible pixels
  - hsync low from 666 to 733
  - the line restarts at 802
- `vcount` steps by two: first through the even lines, then through the odd ones.
- vsync is low for lines 486–494.
- `vreset` marks the end of a frame.
- The `vertical` input (a board switch) adds one line pair to the even field, to
  adjust the picture.
- `csync` is the AND of the two active-low syncs.

The picture is a painter's stack, evaluated for every pixel from the current
`hcount`/`vcount`:

- **`rectangle_generation`**
  - draws the teal boxes and white panels of the layout
  - draws the seven blue bars, each 90 pixels wide, growing up from a 6-line base at
    line 474 by the 8-bit value of its depth; the shallowest depth is the left bar
  - gives priority to teal, then bars, then white; anything else is black
- **`char_string_display`** (14 instances)
  - draws a string at (`cx`,`cy`), each character an 8x12 font cell drawn at twice its
    size (16x24 pixels)
  - reads `font_rom` (1536 bytes: 128 codes x 12 rows, one clock of latency), so the
    in-box and column signals are delayed by one clock to match
  - draws characters with bit 7 set in reverse video
- **`video_module`**
  - builds the strings from live data:
    - title
    - "Location" box with Date, Time, Latitude and Longitude, from BCD
    - "Settings" box
    - "GPS Com" arrows
    - zero state: "Insert 0" until a reference exists, then "Set"
    - "Sample: NN Stored/Empty"
    - "Results"
  - ORs all sources into a registered 3-bit colour

## Sample records

`sample_store` keeps the active sample number, 1–32 on screen. btn2 advances it, and
it wraps from 32 to 1.

- It has a 32-entry record file. Each entry holds a measurement and the GPS
  information current when that measurement completed.
- A finished sample burst writes the entry of the active number and marks it valid.
  Pressing sample on an entry that is already stored replaces it.
- While a number is valid, the screen shows its stored position, time and bars. An
  empty number shows flat bars, and its position box follows the live GPS data until a
  sample is taken.
- Records are cleared by reset. There is no non-volatile storage.

## The font table

`rtl/font_rom.hex` holds one byte per line, 1536 lines. Line `12*c + r` is row `r` of
character code `c`. Bit 7 is the leftmost pixel. The glyphs are a 5x7 dot font. Row `j`
(0–6) of a glyph goes to cell row `j+2`, and column `i` (0–4) goes to bit `6-i`. That
leaves one blank column on the left and two on the right, and two blank rows above and
three below. Codes below 0x20 and code 0x7F are blank. To change the font, regenerate
the file with the same layout.

## Top level (`soil_water_unit`)

| Port | Dir | Meaning |
|------|-----|---------|
| `clk` | in | 25 MHz |
| `btn[3:0]` | in | 0 zero, 1 sample, 2 next sample, 3 reset (each synchronized) |
| `sw_vertical` | in | extra even line pair |
| `gps_rx_n` | in | GPS serial line, inverted |
| `adc_db[7:0]`, `adc_intr` | in | ADC data bus, end of conversion (active low) |
| `adc_cs_n`, `adc_wr_n`, `adc_rd_n` | out | ADC strobes, held high in reset |
| `sensor_sel[15:0]` | out | switch controls, all open in reset |
| `lcd_rgb[2:0]`, `lcd_hsync`, `lcd_vsync`, `lcd_csync` | out | panel |
| `led[7:0]` | out | reset, sample button, zero button, GPS parser in date / latitude degrees / header letter 2 / header letter 1, serial line low |

Reset is a 16-clock power-on pulse (a shift register that starts at all ones) ORed
with btn3.

Parameters and their defaults:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `SENSOR_CLOCKS_PER_SAMPLE` | 500 | ADC step (50 kHz) |
| `GPS_CLOCKS_PER_BIT` | 5207 | 4800 bit/s |
| `SWEEPS` | 8 | sweeps averaged per burst (a power of two) |
| `NUM_SAMPLES` | 32 | record slots |

The display geometry is set by `vga_module`'s HSBEG/HSEND/HSRES (666/733/802) and
VSBEG/VSEND/VSRES (486/494/524), and `rectangle_generation`'s BARWIDTH (90).

## Where this departs from the original design

The original implementation was for a Spartan-3 board. These are the places where this
design differs from it, or fills in what it left open:

- **Averaging.** The original adds the eight 56-bit sweeps as single 56-bit numbers and
  keeps the top 56 bits of the 59-bit sum. That lets carries spill from one depth into
  the next. Here every depth is averaged on its own. The zero subtraction is also done
  per depth, and it clamps at zero.
- **Strobe polarity.** The original text says CS and WR are "reset to zero" at the
  start of a conversion. Its timing diagram and the ADC0841 both use active-low
  strobes, and this design follows them.
- **GPS bit timing.** The original text describes counting from 0 to 5207 inclusive.
  Here the counter wraps after 5207 clocks, which is closer to 4800 bit/s.
- **GPS fields.**
  - The original names the time as the data after the sixth comma, which does not
    match `$GPRMC`. This design uses the standard RMC field order.
  - The original converts latitude and longitude to pixel offsets with constants for
    one particular lawn. This design keeps the minutes instead.
- **GPS commit.** The original latches position on a falling edge of a ready signal.
  Here everything stays in one clock domain, and a whole sentence is committed at once.
- **Sample numbers.** The original listing has a 3-bit sample number, while its text
  promises 32 slots. This design has 32 slots. The record store itself (what is kept,
  recall, replace) is this design's own, written to the behaviour the original
  describes.
- **Depth order.** The original says the soil is sampled from the bottom of the probe
  upward, and also that the left bar is the shallowest reading. Here byte 0 is the
  left bar. Which end of the probe that is depends on how `sensor_sel` is wired.
- **Display.**
  - The panel is driven with 3-bit colour rather than 24-bit.
  - The title text is generic.
  - The font is an original 5x7 design placed in 8x12 cells, in `rtl/font_rom.hex`.
- **Clock.** The 25 MHz clock is an input. The original derives it from a 50 MHz
  board clock with a vendor clock manager.
- **Not included.** The switch array, ADC, GPS receiver, panel, probe and power supply
  are hardware outside the logic. `tb/` has behavioural stand-ins for the ADC
  (`adc0841_model`) and the GPS serial output (`uart_source`).

## Simulating

Run all commands from the repository root: `font_rom` loads `rtl/font_rom.hex` by that
relative path. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module soil_water_unit_tb \
    rtl/soil_pkg.sv tb/soil_water_unit_tb.sv
./obj_dir/Vsoil_water_unit_tb
```

Swap in any `tb/<block>_tb.sv` to test one block. Every testbench checks its own
results, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

`soil_water_unit_tb` runs the whole unit at its default parameters. The simulation
covers about 0.6 s of real time and takes roughly 15 s to run. The run goes like this:

1. Power-on reset.
2. A `$GPGGA` sentence, which must be ignored, then a `$GPRMC` sentence.
3. A zero over "dry" soil.
4. A sample over "wet" soil in which some depths are drier than the reference. These
   depths check the clamp.
5. An empty slot.
6. A second sample.
7. 31 presses of next-sample, which wrap back to slot 1 and recall its record.
8. A replacing sample.
9. A reset in the middle of a burst.

Throughout the run, the testbench captures whole LCD frames and checks the bar heights
in the picture. It also counts each mechanism (sentence accepted, sentence rejected,
zero, clamp, store, recall, replace, wrap, both interlace fields, reset during a
burst). A mechanism that never occurs counts as a failure.

The burst-level tests `sensor_module_tb` and `gps_module_tb` also run at the default
timing. `video_module_tb` decodes the captured picture text against the font
file.

To change the number of sweeps, keep `SWEEPS` a power of two. The average is taken by
dropping the low `log2(SWEEPS)` bits of the sum.
