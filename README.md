# Dual-channel FPGA function generator with a VGA scope view

This is a two-channel digital function generator. Each channel makes a square, triangle or sine
wave in real time, one sample per 100 MHz clock. The frequency runs from 1 kHz to 1 MHz, and
amplitude, duty cycle and wave type are set from push buttons. Channel B can be shifted in phase
against channel A in 10 ns steps. Both channels go to a dual 8-bit parallel DAC.

The generator also shows what it produces. A sampling window catches 1024 samples of the selected
channel, always starting on a rising edge, and stores them in a shared buffer. The display then
draws them on a 1024x768 VGA monitor as connected line segments. Text readouts of frequency,
amplitude and duty cycle sit on top of the trace. The same 1024 samples, reduced to 100 points and
converted to mirror angles, are sent over SPI to an MCP4822 dual 12-bit DAC. That output is meant
to steer the two mirrors of a laser galvanometer, which traces the wave on a wall.

The design follows the block structure and the main numbers of a published FPGA class project.
Where that source is silent or contradicts itself, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## Structure and clock domains

```
                 100 MHz (clk)                           |          65 MHz (vclk)
                                                         |
 buttons/switches -> debounce -> routing                 |
                         |                               |
            +------------+-------------+                 |
            v            v             v                 |
       phase_ctrl   waveform_gen A  waveform_gen B       |
        stall_a --->    |   ^sine_lut   |                |
        stall_b ------------------------>                |
                        |               |                |
                        +--> dac_parallel (8-bit x 2) ---+--> DAC pins
                        |               |                |
                   channel select ------+                |
                        |                                |
                   buffer_fill: capture ==handshake==> copy ----> waveform_buffer (1024 x 10)
                                                         |              |            |
   readouts (freq, amp, duty) ---- two registers ------> |          display      galvo_scan
                                                         |   xvga, display_fsm,      |
                                                         |   bresenham,          galvo_map
                                                         |   frame_buffer, gui       |
                                                         |   (text_sprite, bcd,  dac_mcp4822
                                                         |   freq_logic,             |
                                                         |   amp_logic)          SPI pins
                                                         |          |
                                                         |     VGA pins
```

There are two clocks, and both come from outside the design:
- `clk`, 100 MHz, runs the generators, phase control, parallel DAC and debouncers.
- `vclk`, 65 MHz (the XGA pixel clock), runs the display, the shared waveform buffer, the
  galvanometer path and the SPI DAC.

Data crosses between the domains in three places:
- **Sampling window** (`buffer_fill`). It captures in the 100 MHz domain and copies out in the
  65 MHz domain. The two state machines exchange two level signals, each through a two-flop
  synchroniser, as a four-phase handshake (see below).
- **Readout values** (frequency, amplitude, duty cycle). They pass through two registers in
  `vclk`. They change only when a button is pressed, so the worst case is one readout digit
  wrong for one frame.
- **Scale buttons.** They pass through two-flop synchronisers.

`rst` is active high. It is synchronised into each domain, and every block resets
synchronously.

## Waveform generation (`waveform_gen`, `sine_lut`)

The wave period is stored as a **period multiplier** P: the number of 100 MHz clocks in one
period.
- P = 100 is 1 MHz and P = 100,000 is 1 kHz; the reset value is P = 1000 (100 kHz).
- A counter runs from 0 to P-1.
- The square wave's high time is D = P·duty/100, with duty in percent (1..100).

Each wave type works as follows:

| wave | how a sample is made |
|---|---|
| square | `height` while count < D, else 0 |
| triangle | Fixed-point accumulator with 8 fractional bits. It rises by `(height<<8)/D` per clock up to the peak at count D, then falls by `(height<<8)/(P-D)`. The fraction is dropped on output, so the slope stays accurate even when the step is below one LSB. |
| sine | A 1024-entry table of `min(255, round(128 + 128·sin(2πi/1024)))`. It is indexed by a phase accumulator with 14 fractional bits that advances by `skip = (1024<<14)/P` per clock. The table value is scaled by `height/255`. |

D, the two triangle steps and the sine skip are recomputed in the clock after any change of
frequency, amplitude or duty cycle. The period then restarts. All arithmetic is 32-bit and is
done in one clock. These are wide dividers. On a real FPGA they would need multicycle
constraints, or the computation would have to be spread over several clocks.

**Controls.** Each button acts once per press, on its rising edge. When several buttons rise in
the same clock, the priority is up, down, left, right. The step size comes from `incr_res`:
- Frequency: ±1 Hz, 10 Hz, 100 Hz, 1 kHz, 10 kHz or 100 kHz (`incr_res` 0..5).
  - The step converts P to a frequency f = 100 MHz / P.
  - It counts whole steps, n = f / step, and moves to (n±1)·step.
  - It converts back to P and clamps P to 100..100,000.
  - The frequency shown is then 100 MHz / P. For example, 110 kHz becomes P = 909, shown as
    110,011 Hz.
- Amplitude: 4 %, 20 %, 30 % or 50 % of full scale. Of a 5 V output these are about 0.2 V, 1 V,
  1.5 V and 2.5 V. The amplitude saturates at 0 and 255.
- Duty cycle: 5, 10, 20 or 50 percentage points, clamped to 1..100.

The amplitude readout is `height << 1`, in units of about 10 mV.

**Stall and phase shift** (`phase_ctrl`). `stall = 1` freezes a generator for that clock:
nothing advances and no control is handled. Both channels start together from reset.
- While "phase up" is held, `phase_ctrl` stalls channel A one clock at a time.
- While "phase down" is held, it stalls channel B.
- `phase_mult` counts the net number of stalled clocks. Channel B leads channel A by
  `phase_mult` × 10 ns.
- An assertion checks that the two stalls are never high together.

## The sampling window (`buffer_fill`)

This is the part with the most timing subtlety. It must give the display a stable picture of a
continuously running wave.

**Capture** runs in the 100 MHz domain. Its states are WAIT_ZERO, CHECK_RISE, COLLECT and FULL.
1. It waits for a zero sample, then for the first non-zero sample after it. The window therefore
   always starts on a rising edge, so successive pictures line up.
2. From there it stores 1024 consecutive samples in an internal dual-clock RAM. Element 0 is the
   last zero sample before the rise.
3. It then raises `full` and waits.

**Copy** runs in the 65 MHz domain. Its states are IDLE, WAIT_READY, COPY, ANNOUNCE, HOLD and
RELEASE.
1. When it sees the synchronised `full` and the display reports `ready` (its drawing machine is
   idle), it copies the 1024 samples into the shared waveform buffer, one per clock.
2. It pulses `wr_ready` for one clock. This pulse is the display's draw request.
3. It holds for 200 clocks.
4. It raises `copied`. The capture side sees this and drops `full`, and the copy side then drops
   `copied`.

Only these two levels cross between the clocks, so a window can never be copied while it is
being written. Note that a wave that never returns to zero (for example amplitude 0, or a
100 % square wave) has no rising edge, and no new windows are taken. The last picture then stays
on the screen.

## Display (`display` and its parts)

The picture has two layers that are ORed together:
- **Lower layer:** a 1-bit-per-pixel frame buffer of 1024 × 768 = 786,432 bits (`frame_buffer`),
  read in raster order.
- **Upper layer:** the overlay (`gui`), computed on the fly from the raster position. It holds
  the readouts "F:", "A:" and "D:" at y = 10, 22 and 34, a one-pixel border, and a dotted
  background grid of 8 × 8 divisions. The grid has a vertical line every 128 columns and a
  horizontal line every 96 rows, lit on every fourth pixel so the trace stays readable.

Each character is its own `text_sprite`: an 8 × 11 box with a 5 × 7 glyph. The characters are
spaced 10 pixels apart.

**One memory port, three users.** The frame buffer has a single port, so it is shared in this
order of priority:
1. The clearing sweep of the drawing machine.
2. The line drawer. It may write only while `vsync` is low, when the monitor is not being
   drawn, so the picture never tears.
3. The raster read of pixel `vcount·1024 + hcount`.

While the buffer is being cleared, the wave layer is shown dark. The read takes one clock, so
the overlay, blank and both syncs are delayed by one register to stay aligned with it.

**Drawing machine** (`display_fsm`).
- After reset, and after each draw request, it clears all 786,432 pixels, one per clock
  (12 ms).
- It then reads the waveform buffer and sends 1023 segments to the line drawer.
- Point k has x = k and y = 384 − sample[k·2^xscale] / yscale, clamped at 0. The trace therefore
  rises upward from the screen's centre line.
- For each segment it loads the two end points, pulses `draw_line`, waits until the drawer is
  ready again, then moves the end point to the start point and fetches the next sample.
- While idle, the scale buttons change `xscale` (0..9, how much of the window is shown) and
  `yscale` (1..63, the vertical divisor).

**Line drawer** (`bresenham`). An integer Bresenham rasteriser for all octants. It emits one
pixel per clock in which `step_en` (vsync low) is high. In simulation, a full-screen trace takes
one to two frames.

**Readouts** (`bcd`, `freq_logic`, `amp_logic`).
- `bcd` converts a value to decimal digits with the double-dabble method (shift, and add 3 to
  every digit that is 5 or more).
- `freq_logic` picks three significant digits with a unit: 1000 Hz shows as `1.00KHz`,
  12,345 Hz as `12.3KHz`, 1 MHz as `1.00MHz`.
- `amp_logic` shows 10 mV units as volts: 123 → `1.23V`.
- Digits are truncated, not rounded.

`xvga` makes the XGA timing:
- 1344 clocks per line, with hsync low for pixels 1048..1183.
- 806 lines per frame, with vsync low on lines 777..782.
- Both syncs are active low.

## Output drivers

**`dac_parallel`** drives a dual 8-bit parallel DAC with a shared data bus, a channel select and
an active-low write strobe.
- It alternates between the channels with a 6-clock write cycle. The data and select are set in
  the first clock, `wr_n` is low for three clocks, and the DAC latches on the rising edge of
  `wr_n`.
- Each channel is therefore refreshed at 8.3 MHz. This is well above the 1 MHz needed for 100
  samples per period of a 10 kHz sine.
- It passes the low 8 bits of each sample.

**`galvo_scan`, `galvo_map` and `dac_mcp4822`** drive the galvanometer.
- `galvo_scan` watches the writes into the waveform buffer. It keeps samples number
  floor(i·1024/100), for i = 0..99.
- It then sends the points in order, forever. For each point it sends x = i·4095/99 to DAC
  channel A and y = sample·16 to channel B. It starts a new point every 2167 pixel clocks, which
  is 30 kHz, about what the mirrors can follow.
- `galvo_map` turns each wall position into a mirror angle (see below). It adds one clock of
  latency and holds busy high during that clock.
- `dac_mcp4822` shifts each 16-bit word MSB first, with SCK = 65 MHz / 4 = 16.25 MHz (the part
  allows 20 MHz). The word is `{channel, 0, gain = 1×, active, 12-bit value}`.
- After chip select rises, the driver pulses LDAC low to move the value to the output.

**Angle mapping** (`galvo_map`). The mirrors are treated as one point source at distance L = 10
from the wall. The picture reaches H = 3 either side of its centre (the units cancel; think of
feet). A spot at offset d needs a beam angle of arctan(d / L). The table stores, for every 12-bit
position code c:

```
d(c)     = (c - 2047.5) / 2047.5 * H
entry(c) = round(2047.5 + 2047.5 * arctan(d / L) / arctan(H / L))
```

The picture's edges (c = 0 and 4095) therefore map to full deflection, which is about ±16.7°.
Equal steps on the wall need about 8 % less angle at the edges than at the centre. The table is
computed at elaboration time and read like a block RAM. One table serves both mirrors, because x
and y are sent one after the other. Full deflection is assumed to be the edge angle. A real
installation needs H/L to match its own geometry, and the galvanometer's own volts per degree
matched to the DAC range.

## Using the controls

All buttons and switches pass through `debounce`: a two-flop synchroniser followed by a counter
that accepts a new level after 10 ms (1,000,000 clocks) of stability.

| input | effect |
|---|---|
| `btn_center` | cycle the wave type of the selected channel: square → triangle → sine |
| `btn_up` / `btn_down` | frequency (`sw_param`=0) or amplitude (`sw_param`=1) of the selected channel |
| `btn_left` / `btn_right` | duty cycle down / up; with `sw_phase`=1: phase shift down / up, for as long as held |
| `sw_incr_res[2:0]` | step size (frequency 0..5, amplitude and duty 0..3) |
| `sw_channel` | 0: buttons, window and readouts on channel A; 1: channel B |
| `sw_scope` | 1: the arrow buttons scale the display instead (right/left: xscale ±1, down/up: yscale ±1) |

At reset both channels are sine, 100 kHz, half amplitude, 50 % duty, in phase.

## Parameters

The defaults are the full-size design. Only the top's debounce time and raster are exposed.

| module | parameter | default | meaning |
|---|---|---|---|
| `function_generator` | `DEBOUNCE_CYCLES` | 1,000,000 | debounce time in 100 MHz clocks |
| | `H_ACTIVE`, `H_SYNC_START`, `H_SYNC_END`, `H_TOTAL` | 1024, 1048, 1184, 1344 | line timing |
| | `V_ACTIVE`, `V_SYNC_START`, `V_SYNC_END`, `V_TOTAL` | 768, 777, 783, 806 | frame timing |
| `waveform_gen` | `MIN_PERIOD`, `MAX_PERIOD`, `INIT_PERIOD` | 100, 100,000, 1000 | period multiplier limits and reset value |
| `buffer_fill` | `ADDR_W`, `HOLD_CYCLES` | 10, 200 | window of 1024 samples; pause after a copy |
| `frame_buffer` | `DEPTH` | 786,432 | pixels |
| `galvo_scan` | `POINTS`, `POINT_CYCLES` | 100, 2167 | galvanometer points and pacing |
| `galvo_map` | `CODE_W`, `DISTANCE`, `HALF_SPAN` | 12, 10.0, 3.0 | table size; wall distance and picture half-width (same unit) |
| `dac_mcp4822` | `SCK_HALF`, `LDAC_CYCLES` | 3 (2 in the top), 5 | SPI clock half period, LDAC pulse width |
| `dac_parallel` | `WRITE_CYCLES`, `WR_LOW` | 6, 3 | write cycle and strobe width |

Synthesis of the top gives about 3,100 generic cells, 1,463 flip-flop bits and 906,848 memory
bits. The memory holds the frame buffer, two 1024 × 10 window RAMs, the sine table, the
galvanometer points and the 4096 × 12 angle table.

## Departures and own choices

The points below are either undocumented in the source design or resolve a conflict in it.
- **Stall polarity.** One sentence of the source has the generator compute while stall is high.
  Its phase-shift description, and the single-generator case, need stall high to mean "hold".
  This design follows the latter.
- **Frequency range.** The range is 1 kHz to 1 MHz (P up to 100,000), as the text states. A
  constant in the source's code would allow periods up to 1 s.
- **Frequency stepping.** The full-resolution scheme (steps of 1 Hz to 100 kHz) is built. The
  source reports that this scheme met timing problems on the board and that a simpler one was
  kept, but it does not describe the simpler one.
- **Amplitude steps.** They are derived from the stated voltages (0.2/1/1.5/2.5 V of 5 V). The
  source's code uses smaller steps.
- **Amplitude readout units.** The readout uses 10 mV units. The source calls the unit both
  "approximate millivolts" and "10 mV".
- **Parallel DAC.** The driver is for a dual 8-bit DAC, matching the 8-bit samples. The source
  also names a 12-bit high-speed DAC that it did not end up using.
- **Sprite box.** The box is 8 × 11, as the text states. The glyph bitmaps are new.
- **Sampling window clock crossing.** A synchronised four-phase handshake replaces the source's
  direct switching between clocks. The window holds consecutive samples; the source does not
  say how its 1024 samples are chosen.
- **Frame buffer clear.** The clear covers exactly the 786,432 visible pixels.
- **GUI layout.** The layout, the border, the grid spacing and dotting, and the '%' readout for
  the duty cycle are this design's own. The source names a background grid but does not
  describe it.
- **Galvanometer.**
  - The path is built as the source proposes (100 points, MCP4822, about 30 kHz).
  - The source does not report it working.
  - The point choice is uniform.
  - The angle table scales the picture's edge to full DAC range. The source gives the geometry
    only as an example (10 ft away, 3 ft to the side).
  - The SPI clock is derived from the 65 MHz pixel clock instead of from a separate clock.
- **Switch assignment and channel selection.** Which switch does what, and channel selection for
  the controls and the display, are this design's choices.
- **Reset.** The reset is active high and synchronous, and the reset input is not debounced.
- **Not included.** The FPGA clock generator that makes 65 MHz, the DAC chips, the monitor, and
  the galvanometers and laser are outside the logic. The top brings out their pins.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are computed independently
in each bench:
- **`tb_waveform_gen`**: periods, levels, duty cycles, step sizes, clamping and stall.
- **`tb_sine_lut`**: all 1024 entries.
- **`tb_galvo_map`**: all 4096 angle-table entries against an arctangent model, and the
  one-clock pass-through of the DAC handshake.
- **`tb_bresenham`**:
  - pixel count, end points and 8-connectivity;
  - distance from the ideal line of at most half a pixel, in all octants;
  - writes only when enabled.
- **`tb_buffer_fill`**: the window's start and content across the two clocks.
- **`tb_display_fsm`** and **`tb_display`**: the clear, the segment list, scaling, and video
  that matches the frame buffer.
- **Formatter and other benches**: the readout formatters against decimal strings, the SPI
  words bit by bit, the parallel-DAC strobe timing, the XGA timing over two full frames, and the
  memories against models.

Two benches cover the whole design:
- **`tb_function_generator`** runs with an 8-clock debounce and a 256 × 128 raster, which are the
  only reductions. It drives only buttons and switches, and models both DACs at their pins.
  - It measures periods, duty cycle, amplitude and the phase lag between channels on the DAC
    outputs.
  - After every redraw it checks that the frame buffer holds exactly the trace of the window
    last copied.
  - It decodes the SPI words and checks their x/y values against an arctangent model.
  - It compares one frame of video with the frame buffer plus the grid.
  - It counts every mechanism: stall A and B, phase up and down, frequency, wave type, duty,
    amplitude, window capture, draw request, clear, redraw, vsync-gated line writes, scaling,
    channel switch, DAC writes, SPI words and LDAC pulses, syncs, and the readouts. A mechanism
    that never occurs is a failure.
- **`tb_function_generator_full`** runs the top with all parameters at their defaults: the
  1024 × 768 raster and the 10 ms debounce. It checks the XGA timing, the full reset clear, a
  full-size capture and redraw, one real 12 ms button press that changes the frequency (measured
  on the DAC), and the SPI words. It simulates 56 ms in a few seconds of verilator time.

To run a bench with verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_function_generator \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fg_pkg.sv tb/tb_function_generator.sv
./obj_dir/Vtb_function_generator
```

Replace the bench name to run any other bench. The benches use only two-state values and
`$urandom`.

## Files

- **`rtl/fg_pkg.sv`**: shared types (wave type, character codes) and constants.
- **Top:** `rtl/function_generator.sv`.
- **Generation:** `waveform_gen`, `sine_lut`, `phase_ctrl`.
- **Sampling:** `buffer_fill`, `waveform_buffer`.
- **Display:** `display`, `xvga`, `display_fsm`, `bresenham`, `frame_buffer`, `gui`,
  `text_sprite`, `bcd`, `freq_logic`, `amp_logic`.
- **Outputs:** `dac_parallel`, `dac_mcp4822`, `galvo_scan`, `galvo_map`.
- **Inputs:** `debounce`.
- **`tb/`**: one bench per module, the two top-level benches, and `tb_readout_util.svh` (string
  helpers for the readout benches).
