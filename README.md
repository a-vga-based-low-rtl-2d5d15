# VGA student oscilloscope controller

A low-cost oscilloscope can be built from three cheap parts: an 8-bit
flash ADC, one programmable logic device and a surplus VGA monitor. This
repository holds the logic for the programmable device. It takes a frame of 640
samples each time an external trigger fires, keeps them in a small RAM and
draws them continuously on a 640 x 480, 60 Hz VGA screen. There is one sample per screen
column. The height of the lit pixel gives the sample's value. A green
graticule lies over the trace.

The architecture follows a 2004 student oscilloscope design that ran on a FLEX10K
development board. Where that design left a detail open, this RTL makes its
own choice; the section *Choices made here* lists each one.

## The three concurrent parts

```
             trigger  time_div[5:0]
                |         |
 ADC notWE <--+ v         v
              sampler -----------+ addr_mux_sel (= busy)
 ADC notINT ->  |  addr, data, we|
 ADC data[7:0]->|                v
                +---------> memory (1024 x 8) <--- column address ---+
                                  | read data                         |
                                  v                                   |
                              displayer --> VGA R G B, HSYNC, VSYNC --+
```

Everything runs from one 25 MHz clock, which is also the VGA pixel clock.

* **sampler** (`sampler` = `control_adc` + `data2mem`) works only after a
  trigger. It starts one ADC conversion per sampling period and writes each
  result to the RAM at its sample index.
* **memory** (`memory` = `address_mux` + `ram`) is passive. Its address bus
  normally follows the display column. The sampler takes the bus for each
  write.
* **displayer** (`displayer` = `vga_sync` + `trace_pixel` +
  `grid_generator`) runs all the time. At each pixel it reads the sample for
  the current column and lights the pixel if the current row matches.

## Taking a frame: control_adc

`control_adc` is built from six small blocks:

| block | job |
|---|---|
| `sampler10b` | frame controller: IDLE, then RUN, then FLUSH |
| `clk_generator` | six square-wave sampling clocks, made by divider counters |
| `encoder` | turns six one-hot time/div switches into a 3-bit select |
| `mux8in` | picks one sampling clock |
| `monostable` | turns each rising sampling edge into a 1 us low pulse on notWE |
| `sample_counter` | `sampleNo`, the index of the conversion in progress |

A rising edge on `trigger` moves `sampler10b` from IDLE to RUN. RUN enables
the dividers. The chosen sampling clock rises one clock later, so the first
notWE pulse starts 4 clocks after the trigger edge. Each later pulse comes one
sampling period after the one before. The counter is held at all ones while
idle, so the first sampling edge makes it 0. When it reaches 639, the
controller stops the clocks. It then waits 100 clocks (FLUSH, 4 us) so the last
conversion can finish and be written at address 639. After that it clears the
counter and returns to IDLE. Trigger edges during RUN or FLUSH are ignored.

All "clocks" inside the sampler are ordinary signals in the 25 MHz domain.
Their rising edges are found by comparing each signal with a one-clock-delayed
copy, so the design has only one clock domain.

Sampling rates (period in 25 MHz clocks):

| `time_div` bit | rate | period | one frame (640 samples) |
|---|---|---|---|
| 0 (or none set) | 500 kHz | 50 | 1.28 ms |
| 1 | 200 kHz | 125 | 3.2 ms |
| 2 | 100 kHz | 250 | 6.4 ms |
| 3 | 50 kHz | 500 | 12.8 ms |
| 4 | 20 kHz | 1250 | 32 ms |
| 5 | 10 kHz | 2500 | 64 ms |

If several switches are on, the lowest-numbered one wins.

## Writing a sample while the screen is being drawn: data2mem and memory

The hardest part of the design is sharing the RAM. The display reads a new
address on every pixel clock (every 40 ns). The sampler writes at most once
every 2 us. The write must not be lost, so the sampler has priority. The
display simply gives up the pixels it loses.

The ADC pulls `notINT` low when a conversion is done. The signal is not
synchronous to the clock, so `data2mem` first passes it through two
flip-flops. A falling edge then starts a fixed three-cycle write:

| cycle | `addr_mux_sel` | `mem_we` | what happens |
|---|---|---|---|
| 1 | 1 | 0 | sampleNo and ADC data latched; RAM address switched to the sampler |
| 2 | 1 | 1 | RAM writes at the end of this cycle |
| 3 | 0 | 0 | address back to the display column, RAM back to read |

Address and data are stable for a whole cycle before the write enable and
during it. `addr_mux_sel` also goes to the display as `busy`. While it is
high, the RAM data belongs to the sampler's address, not to the column being
drawn. The trace pixel is therefore forced off for those two pixel times. The
grid is not affected. A frame taken during the visible scan thus leaves small
gaps in the trace, at most two pixels per sample. Once the frame is complete,
the whole trace is drawn again on the next screen refresh.

The RAM writes synchronously. It reads asynchronously, so the display sees
the word for the current column in the same clock.

## From sample to pixel: trace_pixel

The row counter runs top to bottom, 0 to 479. A sample `d` (0 to 255) has to
be placed with large values at the top:

1. Widen it to 10 bits with a 0 on top and a 1 at the bottom:
   `word = 2*d + 1`.
2. Flip the nine significant bits: `target = 511 - word = 510 - 2*d`.
3. Clamp: `target = min(target, 479)`.
4. `blue = !busy && (row == target)`.

So d = 255 draws on row 0 and d = 16 on row 478. Every d of 15 or less sits on
the bottom row, 479. This is deliberate: the flat line along the bottom shows
that the input is below the visible range and the volts/div setting should be
changed. Each step of the ADC moves the trace by 2 rows, so only every other
row can hold the trace.

## Screen: vga_sync and grid_generator

`vga_sync` uses the standard 640 x 480 timing:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal, clocks | 640 | 16 | 96 | 48 | 800 |
| vertical, lines | 480 | 10 | 2 | 33 | 525 |

Both syncs are active low. At 25 MHz this gives 59.5 Hz. Colours and syncs
are registered together, so every VGA output lags the column address sent to
the RAM by exactly one clock. `grid_generator` lights green on columns that
are multiples of 64 and on rows that are multiples of 60. It also lights the
last column (639) and the last row (479). This gives 10 x 8 divisions. Red is
not used and is driven low.

## Top level: osc_top

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 25 MHz system and pixel clock |
| `rst_n` | in | 1 | synchronous active-low reset |
| `trigger` | in | 1 | trigger pulse from the external comparator and one-shot; only its rising edge counts |
| `time_div` | in | 6 | one-hot time/div switches |
| `adc_data` | in | 8 | ADC data bus |
| `adc_not_int` | in | 1 | ADC conversion-done, active low |
| `adc_not_we` | out | 1 | ADC start pulse, active low, 1 us |
| `vga_red/green/blue` | out | 1 each | colour; blue is the trace, green the grid |
| `vga_hsync/vsync` | out | 1 each | active-low syncs |
| `sampling` | out | 1 | high while a frame is being taken |

The ADC runs stand-alone: its notRD pin is tied low on the board and is not a
port here. The ADC (an ADC0820-type part), the trigger comparator and its
one-shot, the input attenuator and the VGA level shifting are outside the
logic. `tb/adc0820_model.sv` is a behavioural model of the ADC for
simulation. Each notWE pulse makes it sample `vin`. 600 ns after notWE rises,
it puts the code on its data bus and pulls notINT low.

## Choices made here

The original design gives the block structure, the widths, the 640-sample
frame, the 1024 x 8 RAM, the 1 us notWE pulse, the 500 kHz maximum rate, the
three-cycle write and the trace mapping. The following are this
implementation's own choices:

* **Sampling rates.** Only 500 kHz is given; the other five are chosen.
* **Encoder priority.** The lowest switch wins, and no switch means 500 kHz.
* **Edge detection.** The sampling clocks and the trigger are handled as
  signals with synchronous edge detection, not as separate clock nets.
* **Counter clear value and flush wait.** These ensure that sample *k* lands at
  address *k* and that the last sample is not cut off.
* **Retriggering.** A trigger during a frame is ignored.
* **notINT synchroniser.** Two flip-flops.
* **RAM read port.** The read is asynchronous.
* **VGA timing and grid spacing.** Both are chosen here.
* **Saturation clamp.** It is set to row 479. The original value, 480, lies
  just below the visible area, so saturated samples would not be drawn at all.
* **Word extension.** The widening step is done inside `trace_pixel`, not in
  a separate module, because it is only wiring.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M`. To build and run one with plain
Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/osc_pkg.sv tb/tb_osc_top.sv --top-module tb_osc_top
./obj_dir/Vtb_osc_top
```

`tb_osc_top` runs the whole controller at its default sizes and takes about
a few seconds. It feeds a triangle wave through the ADC model and runs three
frames: 500 kHz, 200 kHz and the slowest rate, 10 kHz. A second trigger comes in the middle of the first
frame. After each frame it checks every pixel of one full screen: one blue
pixel per column at the expected row, and the exact grid. It also checks the
notWE pulse width and spacing, the frame length in clocks, and that 640
conversions and 640 writes took place. It counts how often each of these
happened: frames taken, triggers ignored, trace pixels blanked by a write,
saturated samples and rate switches. The test fails if any count is zero.

The block testbenches cover the rest:

* `tb_control_adc` checks the pulse count, width and spacing, and a trigger
  latency of 4 clocks.
* `tb_data2mem` checks the write sequence against `notINT` edges at random
  times.
* `tb_displayer` checks the blanking of trace pixels while `busy` is high.
* `tb_vga_sync` checks two full frames of timing.

Sub-blocks take parameters (`SAMPLES`, `FLUSH_CYCLES`, `PULSE_CYCLES`,
`DIVS`, `SAT_ROW`, the VGA porch lengths, the grid spacing). Some testbenches
set `SAMPLES` smaller to keep runs short.

## Limits

* There is no volts/div scaling in logic; the input attenuator is analogue.
* The 500 kHz maximum sampling rate cannot show a 1 MHz signal. Such a signal
  would need more than 2 MHz sampling.
* Triggering comes entirely from outside: a comparator against a set level,
  then a one-shot. The logic sees only the resulting pulse.
* The ADC model's conversion time (600 ns after notWE rises) is a typical
  value, not a worst case. At 500 kHz the write for sample *k* must finish
  before sample *k+1* starts, 2 us later. That leaves room for about 800 ns
  between the end of the notWE pulse and notINT falling.
