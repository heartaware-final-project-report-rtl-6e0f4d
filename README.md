# HeartAware: an FPGA pulse oximeter with spoken heart rate

HeartAware turns the signal of a finger-clip pulse oximeter into a heart rate. The signal
passes through an analog front end and an 8-bit ADC0804, and the FPGA takes it from there.
It shows the rate with a live waveform on a 1024x768 VGA screen. It beeps at every heartbeat
and says the rate aloud ("eighty three beats per minute") from recordings stored on a
microSD card. The user controls it with three buttons and two switches. The target is a
Nexys 4 board (Artix-7). This repository holds the digital part as synthesizable
SystemVerilog, plus testbenches for every block and for the whole system.

The design follows a 2015 MIT 6.111 final project report of the same name. Where the report
gives a number, such as a filter length, a buffer size, a rate or a memory depth, the RTL
uses it as the parameter default. Where the report is silent, the choice made here is
described below and in the opening comment of each file.

## How a heartbeat becomes a number

This is the part worth reading closely. Everything else shows its result.

```
adc_data ─► adc_sampler ─► fir31_lp ─┬──────────────► waveform display
  (8 bit)    100 Hz strobe  31 taps  │
                                     ├─► fir128_match ─┐ (template recorded on switch 13)
                                     │                  ├─► mux ─► hr_calculator ─► hr_moving_average ─► avg_hr
                                     └──────────────────┘  (sw_lp_direct)  (peak_detector + 6000/n)   (16 values)
```

All of this runs on the 65 MHz pixel clock. The 100 Hz sample rate is a one-cycle enable
made by a counter (`strobe_gen`, divide by 650,000), not a separate clock. Every stage has
the same handshake: a sample and a one-cycle `valid`. Each stage has finished its work long
before the next sample comes, 650,000 clocks later. Assertions check that no stage receives
a new sample while it is still busy.

**Sampling (`adc_sampler`).** The ADC bus is asynchronous to the FPGA, so it first passes
through two flip-flops. On each 100 Hz strobe the synchronised value is latched, and
`sample_valid` pulses one cycle later.

**Low-pass filter (`fir31_lp`).** This is a 31-tap FIR with one multiply-accumulate per
clock, so the output is ready 33 clocks after the input. The original design used the
coefficients of a course lab that are not published. This design uses a triangular window
instead: c[k] = 16 − |k − 15|, k = 0..30. The coefficients sum to 256, so the output is the
sum shifted right by 8 and the gain at DC is exactly one. At 100 Hz the filter smooths over
about 0.3 s. That removes noise but keeps the sharp upstroke of each pulse. To use other
coefficients, change the `coeff` function and the final shift.

**Matched filter (`fir128_match`).** Pulse shapes differ a great deal between people. The
detector therefore does not look for peaks in the raw shape. It correlates the signal with
a recorded example of the user's own pulse:

- Turning on switch 13 records a template: the 128 most recent low-pass samples (1.28 s,
  enough for at least one beat at normal rates).
- Template tap k holds the sample that was k samples old at capture.
- For every new sample, the filter sums x[n−k]·h[k] over the 128 taps, one product per
  clock. The full 23-bit sum (8 × 8 bits × 128) is kept.
- The sum peaks once per beat, where the current window lines up with the template.
- The template is copied during the correlation pass of the sample that follows the switch.
  That pass reads the history in the same order, so the template costs no extra clocks.
- The output comes 130 clocks after its input. It is zero until a template exists.

**Bypass.** For some people the low-pass signal already has clean peaks. With `sw_lp_direct`
on, the peak detector takes the low-pass output directly, widened to 23 bits.

**Peak detector (`peak_detector`, inside `hr_calculator`).** The last 50 samples are held in
a shift register. The middle sample (index 25, so the decision lags by 25 samples, 0.25 s)
is a peak when:

- no sample in the window is larger, and
- it is strictly larger than the next newer sample.

The second condition handles flat tops. A maximum that holds for several samples is reported
exactly once, on its last sample. A separate `plateau` output marks such a peak.

**Rate (`hr_calculator`).** A counter counts samples since the last peak. At each peak, a
13-bit restoring divider works out 6000 / count, one quotient bit per clock. There are 6,000
samples in a minute at 100 Hz. Details:

- The result appears 16 clocks after the peak.
- The first peak only starts the counter.
- Results above 199 are clamped to 199, the largest value the display and the voice can
  give.
- A count that overflows (no beat for 82 s) gives 0.

**Average (`hr_moving_average`).** The last 16 rates are kept in registers with a running
sum. The output is the sum divided by 16. This evens out a missed or doubled beat. It starts
from zeros, so after reset it ramps up over 16 beats.

## The controller

`system_fsm` has four states, as the original state diagram shows:

```
BOOT ──SD ready──► CAPTURING ──left──► PAUSED ──down──► CAPTURING
                   CAPTURING ──up────► ERROR  ──down──► CAPTURING
```

**Boot.** BOOT waits for the SD card reader to report ready. That takes seconds on a real
card, which is why the state exists. While it waits, a progress bar grows by 4 pixels every
10 ms (`PROGRESS_DIV`). The bar shows that the system is alive; it does not measure real
progress.

**Error.** ERROR can only be entered by the up button. The report planned to enter it
automatically when the sensor is unplugged, but that needs hardware that was never built.

**Buttons and switches.** These pass through `sync_debounce`: two synchronising flip-flops,
then a new level is accepted only after it has held for 10 ms. The state machine acts on
the rising edge of a button.

## The screen

`xvga` generates standard VESA 1024x768 at 60 Hz from the 65 MHz clock (1344 × 806 clocks per
frame, negative syncs). Three kinds of display elements all see the same `hcount`/`vcount`
and each produces a 12-bit color, or zero where it draws nothing. `main_display` ORs all the
outputs together, so there is no transparency and no priority between element types. It
then registers the result onto the 4-bit-per-channel VGA pins.

Every element has a latency of exactly three clocks, and the mix adds one more. The syncs
and blanking are delayed by four clocks to match. This alignment is the usual source of
trouble with sprite displays: a misalignment shows up as sheared sprites. The testbenches
check it pixel by pixel.

- **`waveform`**: a rolling plot of the last 1,024 low-pass samples.
  - Each new sample is written over the oldest one in a 1024 × 8 RAM.
  - The scan reads address `hcount + write_pointer`, so column 0 shows the oldest sample. The
    trace moves one pixel left per sample.
  - A sample value d is drawn at row 575 − 1.5·d, which spreads 0..255 over rows 575..193,
    the middle half of the screen.
  - Two instances, one row apart, draw a two-pixel-thick line.
  - The waveform is frozen while paused: no new samples are written.
- **`blob`**: a filled rectangle with enable, position, width, height and color inputs. Five
  are used:
  - the boot bar and its track;
  - the heart-rate box, red while capturing and grey otherwise;
  - the status bar, blue or grey;
  - the error box.
- **Sprites** (`sprite_scanner`, `sprite_brom`): icons and text come from one monochrome
  bitmap in a 1-bit ROM of 217,514 entries (18-bit address).
  - Ten rectangular areas are defined, each with an enable, a screen position, a size, a
    start address in the bitmap and a color.
  - The bitmap is 609 pixels wide, so the pixel at (dx, dy) inside an area is read at
    `base + dy·609 + dx`.
  - If areas overlap, the lowest-numbered one wins. A set bit is shown in the area's color.
  - The ROM has one clock of read latency, which the scanner's pipeline allows for.
- **Digits.** The heart rate goes through `bin_to_bcd`, a combinational double-dabble
  converter. `display_sprite_map` then gives each digit's start address in the bitmap.
  - The digits sit in one row of the bitmap, in the order 1–9 then 0, each 40 × 56 pixels.
  - A leading zero in the hundreds place is hidden.
  - The shown rate is held while paused.

The bitmap's contents are artwork and are not part of this RTL. The ROM starts cleared and
has a write port (`sprite_load_*` on the top) to fill it after configuration. To build it
into the bitstream instead, add an initialisation file to `sprite_brom`. The screen positions
of the areas follow the layout of the original screens. They are constants in `main_display`
and must match wherever the artwork places each icon in the bitmap.

## Sound

```
SD card reader ◄─► audio_controller ──► audio_fifo (4096 B) ──► audio_playback ──► pwm_audio ──► aud_pwm
   (25 MHz)         (25 MHz)             dual clock             (100 MHz, 32 kHz pops)
```

All sounds live in a single unsigned 8-bit, 32 kHz mono recording written raw to the card
from byte 0. Every clip is 0.8 s long (25,600 bytes, 50 blocks of 512 bytes), so clip n
starts at byte n × 25,600. The slot numbers are in `heartaware_pkg`:

| slots | sound |
|---|---|
| 0–1 | "one hundred" |
| 2–10 | "ten", "twenty" … "ninety" |
| 11–19 | "eleven" … "nineteen" |
| 20–29 | "zero" … "nine" |
| 30–31 | "beats per minute" |
| 32–33 | "system error" |
| 34–40 | start-up jingle |
| 41 | beep |

With this layout "fifty" is slot 6, from 'h25800 to 'h2BC00, which matches the original
recording. The rest of the layout is this design's. To use another recording, change the
slot constants.

**Saying a number (`audio_number_map`).** Given the number still to say, it returns the
address range of the next word and what remains:

- 183 → "one hundred", leaving 83;
- 83 → "eighty", leaving 3;
- 3 → "three", leaving 0;
- 0 → "beats per minute", the last clip.

The teens and exact tens are single words.

**Fetching (`audio_controller`, 25 MHz).** It reads a clip block by block through the SD
reader's interface:

1. When `ready` is high, a one-cycle `rd` with a 512-aligned `address` starts a read.
2. `ready` falls while the reader is busy.
3. 512 bytes then arrive, each with a one-cycle `byte_available`.

The controller requests a block only when `fifo_count` ≤ 3584, so a whole block always fits.
It writes every byte into the FIFO.

Requests for sounds:
- Jingle, beep and error sound requests wait in a one-deep slot.
- An announcement request has its own slot and goes first.
- While an announcement is waiting or being read, beep requests are dropped (`beep_dropped`
  pulses), so a beep never cuts into the spoken rate.

**Buffering (`audio_fifo`).** A 4096-byte dual-clock FIFO with Gray-coded pointers. The write
side reports a 12-bit `fifo_count` that saturates at 4095. The read side reports its own
13-bit count.

**Playback (`audio_playback`, 100 MHz).**
- Once 512 bytes are buffered, one byte is popped every 3,125 clocks (32 kHz).
- Popping continues until the FIFO is empty.
- The 512-byte lead hides the card's access time.
- While not playing, the output rests at 128, which is silence for unsigned audio.

**PWM (`pwm_audio`).** An 8-bit counter runs freely at 100 MHz. The output is high while the
count is below the sample, which gives 390.6 kHz PWM. An external RC filter produces the
analog audio.

The top requests a sound in these cases:
- the jingle when boot ends;
- the error sound on entering ERROR;
- a beep at every detected peak while capturing;
- an announcement of the averaged rate every 1,000 samples (10 s) while capturing
  (`ANNOUNCE_SAMPLES`).

These events are made on the 65 MHz clock and cross to the 25 MHz side through `event_sync`,
a toggle passed through three flip-flops. The rate to announce is latched before its event
crosses and stays stable while it does.

## Top level (`heartaware`)

| port | meaning |
|---|---|
| `clk_65mhz`, `clk_25mhz`, `clk_100mhz`, `rst` | the three clocks; `rst` may be asynchronous, each domain has a `reset_sync` |
| `adc_data[7:0]` | ADC0804 output |
| `btn_left`, `btn_up`, `btn_down` | pause, error, resume |
| `sw_template`, `sw_lp_direct` | record a template (switch 13); bypass the matched filter |
| `vga_r/g/b[3:0]`, `vga_hs`, `vga_vs` | VGA |
| `aud_pwm` | PWM audio |
| `sd_ready`, `sd_rd`, `sd_address[31:0]`, `sd_dout[7:0]`, `sd_byte_available` | SD block reader, 25 MHz side |
| `sprite_load_en/addr/data` | filling the sprite bitmap |
| `status`, `avg_hr[7:0]` | state and rate, e.g. for LEDs |

Parameters: `SAMPLE_DIV` (650,000), `DEBOUNCE` (650,000), `PROGRESS_DIV` (650,000),
`ANNOUNCE_SAMPLES` (1,000), `AUDIO_DIV` (3,125), `PEAK_DEPTH` (50). Lower values only speed up
simulation. The signal chain needs about 180 clocks per sample, so `SAMPLE_DIV` must stay
above that.

## Not included, and where this design departs from the original

- **Off-chip parts.** The finger clip, the LED driver and amplifiers, the ADC0804 and the SD
  card SPI reader are not included. The reader came from a third party in the original. Its
  user-side interface is brought out of the top, and `tb/sd_reader_model.sv` models it for
  simulation.
- **Low-pass coefficients.** These are a triangular window, not the original lab filter's.
  The tap count (31) is the original's.
- **Sprite bitmap.** The artwork is not included. The ROM is loaded through a port, and the
  screen coordinates are estimates from the original screenshots.
- **Bitmap size.** The original quotes both a 609 × 356 bitmap (216,804 bits) and a
  217,514-bit ROM. The ROM uses the larger figure and a 609-pixel row pitch.
- **Matched-filter input.** The original block diagram also draws the raw input going into
  the matched filter. Its text says the filter and its template both use the low-pass
  signal, and this design follows the text.
- **Averaging memory.** The 16-value average uses registers, not block RAM, so it can be
  reset.
- **Not described in the original, chosen here:** the recording layout, the error sound, the
  announcement period, the sound priorities (jingle, then error sound, then beep), the
  debounce time and the progress-bar rate.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/heartaware_pkg.sv tb/tb_fir128_match.sv \
          --top-module tb_fir128_match -Mdir obj_fir128 && obj_fir128/Vtb_fir128_match
```

Replace `fir128_match` with any block name. The testbenches compare against models written
independently of the RTL, and they check the latencies given above. The larger ones are:

- **`tb_signal_processing`.** The whole heart-rate chain on a synthetic pulse with noise:
  80 beats per minute on the bypass path, then a template is recorded, then 80 and 100
  beats per minute through the matched filter. Every rate must be within 3 of the truth and
  the average within 2.
- **`tb_heartaware`.** The whole system with shortened rates. It drives the sprite load, the
  SD model, the buttons and a synthetic pulse. It counts each mechanism and fails any that
  never happens:
  - boot bar, jingle, pause, error with its sound, resume;
  - plateau peaks, template capture, the correct average on both paths;
  - beeps, beeps dropped during an announcement, an announcement starting with the right
    word;
  - FIFO data integrity, priming, PWM activity, VGA syncs, waveform pixels and sprite
    pixels.
- **`tb_heartaware_full`.** The system with every parameter at its default: 65 MHz, 100 Hz
  sampling, 32 kHz audio. It covers about 1.8 s of real time and takes about four minutes
  in Verilator. It checks:
  - the 650,000-clock sample spacing and the boot bar steps;
  - exactly 187 beats per minute for a pulse every 32 samples;
  - 3,125-clock audio spacing with the right bytes;
  - VGA line and frame lengths;
  - that a 3 ms button press is ignored while a 15 ms press pauses.

Verilator starts uninitialised variables at random values when run with
`+verilator+rand+reset+2`. The design resets everything it reads, so results do not depend
on those values.
