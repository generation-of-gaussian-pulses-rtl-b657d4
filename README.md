# Gaussian-pulse nuclear counting system on one FPGA

Testing a radiation counter with a live source exposes people to radiation. This design
puts a stand-in for the detector and the counter itself into one FPGA. A generator
synthesises a train of Gaussian pulses, which resemble shaped detector pulses, and plays
them out through a DAC. The analog output is wired back into the board's ADC. From there
the counting half treats the pulses as if they came from a detector:

- A single-channel window discriminator keeps only the pulses whose peak lies between a
  lower level (LLD, 0.86 V) and an upper level (ULD, 1.6 V).
- Two 16-bit counters count the kept pulses per second and in total.
- The counts per second, the total and the largest peak are shown on a 2×16 character LCD.

A rotary switch changes the pulse rate (454.5 Hz to 2 kHz) and the pulse amplitude. You
can then check that the count follows the generated rate, and that pulses outside the
window are rejected.

The target board is a Spartan-3E Starter-class board with a 50 MHz clock and these parts:

- LTC2624 quad 12-bit DAC
- LTC6912-1 programmable-gain preamplifier
- LTC1407A-1 two-channel 14-bit ADC
- HD44780-compatible character LCD
- quadrature rotary switch with a push button

All of the RTL is SystemVerilog in `rtl/`. Every module has a self-checking testbench in
`tb/`, except the shared SPI shifter, which is exercised through the three device
controllers.

## Signal path

```
 rotary switch ─► rotary_decoder ─► pulse_settings ──period, amplitude──┐
                                                                       ▼
                                          gaussian_pulse_gen ─► 12-bit sample
                                                                       │
                 ┌────────────────────── spi_sequencer ◄───────────────┘
                 │  spi_amp_ltc6912   spi_dac_ltc2624   spi_adc_ltc1407a
                 │        │                 │                  ▲
  SPI_SCK/MOSI ◄─┘     AMP_CS            DAC_CS             AD_CONV/MISO
                          ▼                 ▼                  │
                     [ LTC6912 ] ◄──── DAC out ──wire──► [ LTC1407A ]   (board)
                                                                       │
                     pulse_discriminator ◄── 14-bit code ──────────────┘
                       │ peak_found, peak mV
                       ▼
   prescaler (1 s) ─► count_unit ─► 3 × bin2bcd ─► display_formatter ─► lcd_driver ─► LCD
```

`nuclear_counting_system` is the top module. `ncs_pkg` holds the shared constants: the
clock, the converter transfer functions, the window and the LCD character type.

## The sample loop: one SPI bus, three devices

This is the part that sets the timing of everything else. The DAC, the preamplifier and
the ADC share SCK and MOSI, and each has its own select line: DAC_CS, AMP_CS, and AD_CONV
for the ADC. `spi_sequencer` owns the bus:

1. After reset it programs the preamplifier once, with gain −1 on both channels (word
   `0x11`). The sample clock does not start until this has finished.
2. Then a counter starts a sample period every `FRAME_CLKS` = 500 cycles, which is
   100 k samples/s at 50 MHz. Each period runs these steps:
   - It pulses `gen_step`, and the generator moves to its next sample.
   - It writes that sample to DAC channel A as a 32-bit frame, 194 cycles:
     `8'h00, 4'b0011 (write and update), 4'b0000 (channel A), code[11:0], 4'h0`.
     Raising DAC_CS starts the conversion.
   - It pulses AD_CONV and clocks the 34-bit ADC frame, 209 cycles:
     2 idle bits, channel 0 (14 bits), 2 idle bits, channel 1, 2 idle bits.
     Channel 0 goes to the discriminator.

The two transfers take about 405 of the 500 cycles. SCK runs at 8.3 MHz for the DAC and
ADC (`SPI_HALF` = 3 cycles per half period) and at 5 MHz for the amplifier
(`AMP_HALF` = 5). Idle controllers hold SCK and MOSI low, so the bus lines are simply
the OR of the three controllers' lines. Two assertions check the sharing rules:

- at most one controller is busy at a time;
- a sample period never starts before the previous one has finished.

If you shorten `FRAME_CLKS` below about 410 cycles, or slow the SPI clock, the second
assertion fires. All three controllers use `spi_shifter`: mode 0, MSB first, data placed
while SCK is low and MISO sampled in the cycle SCK rises.

The ADC is read right after the DAC write in the same period, so the counting side sees
each generated sample about 200 cycles (4 µs) after it was produced.

## Pulse generation

`gaussian_pulse_gen` holds a 32-entry table of exp(−x²/2) sampled over ±3σ (σ = 32/6
samples). The table is computed at elaboration time, with a peak of 1024:

    g[i] = round(1024 · exp(−0.5 · ((i − 16) / (32/6))²))

A pulse period lasts `period` samples:

- The first 32 samples are `(g[i] · amplitude) >> 10`, so the centre sample equals the
  amplitude code exactly.
- The remaining samples sit at code 0 (0 V).

At 100 k samples/s the pulse is 320 µs wide. The period range of 50 to 220 samples gives
2000 Hz down to 454.5 Hz, and a rotary step moves the period by one sample. A new
period takes effect at the end of the pulse period in progress.

`pulse_settings` holds the period and the amplitude. A press of the knob toggles which
of the two it changes:

| setting | reset value | step per detent | range |
|---|---|---|---|
| period | 50 samples (2 kHz) | 1 sample; turning up raises the rate | 50 to 220 samples |
| amplitude | DAC code 1489 (1.2 V with the 3.3 V reference) | 16 codes (about 13 mV) | 0 to 4095 |

Both settings clamp at their limits. `rotary_decoder` filters contact bounce: a detent
is accepted when both contacts close. Its direction comes from which contact closed
first.

## Counting: window, counters, timer

**Millivolts.** The discriminator first turns each ADC code back into the input
voltage. With the preamplifier at gain −1 the ADC gives
code = −(V − 1.65 V)/1.25 V · 8192, so

    mV = 1650 − (code · 1250) >>> 13        (range 400 … 2900 mV)

The 0 V baseline between pulses clips at the bottom of the ADC range and reads as about
400 mV. That is well below the LLD.

**Window.** `pulse_discriminator` acts as a single-channel analyser on the pulse peak:

- A pulse starts with the first sample above LLD (860 mV).
- It ends with the first sample at or below LLD. The largest sample in between is its
  peak.
- A peak strictly below ULD (1600 mV) gives one `peak_found` with the peak value.
- A peak at or above ULD gives `reject`.
- A pulse that never exceeds LLD gives nothing.

Each pulse therefore counts at most once. The counts per second equal the pulse rate
whenever the amplitude is inside the window.

**Counters.** `count_unit` holds two 16-bit counters:

- The per-second counter is copied to `cps` and cleared on every tick of `prescaler`.
  A tick comes every 50,000,000 cycles, which is 1 s. A pulse that lands in the tick
  cycle counts toward the second that is closing.
- The total counter runs from reset and wraps after 65535, which is 33.7 s at 2 kHz.
- The largest accepted peak of each second is latched together with `cps`.

## Display

After each tick, three serial double-dabble converters (`bin2bcd`, one bit per cycle)
turn CPS, the total and the peak into BCD. `display_formatter` lays them out as:

```
CPS=02000
T=04000 P=1200mV
```

`lcd_driver` runs the HD44780 4-bit power-up sequence and sets the display mode:

- wait 15 ms, then send nibbles 3, 3, 3, 2, followed by 4.1 ms, 100 µs, 40 µs and 40 µs;
- send bytes `0x28`, `0x06`, `0x0C` and `0x01` (clear, then 1.64 ms).

After that it rewrites both lines for ever: `0x80`, 16 characters, `0xC0`, 16 characters.
One pass takes about 1.4 ms. The text is copied at the start of each pass, so one screen
never mixes two updates. The displayed numbers change once a second.

## Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 50 MHz clock, synchronous active-high reset |
| `rot_a`, `rot_b`, `rot_center` | in | rotary switch contacts and push button (synchronised inside) |
| `spi_sck`, `spi_mosi`, `spi_miso` | out/out/in | shared SPI bus |
| `dac_cs_n`, `amp_cs_n`, `ad_conv` | out | device selects |
| `dac_clr_n`, `amp_shdn` | out | held inactive (1 and 0) |
| `lcd_e`, `lcd_rs`, `lcd_rw`, `lcd_d[3:0]` | out | LCD 4-bit bus (`lcd_rw` is always 0) |

On a Spartan-3E Starter board, the other devices on the SPI bus (serial flash, platform
flash) must also be kept deselected. The StrataFlash must be disabled while the LCD
data lines are in use. Neither is done in this RTL.

## Parameters

The top's parameters all default to the real-board values:

| parameter | default | meaning |
|---|---|---|
| `CLK_FREQ` | 50 000 000 | clock, used for the LCD timing |
| `SEC_DIV` | 50 000 000 | cycles per counting interval |
| `FRAME_CLKS` | 500 | cycles per sample period |
| `SPI_HALF`, `AMP_HALF` | 3, 5 | SCK half period in cycles for DAC/ADC and for the amplifier |
| `DEBOUNCE_CLKS` | 50 000 | push-button debounce time |
| `SHAPE_LEN` | 32 | samples in one Gaussian |
| `PERIOD_MIN`, `PERIOD_MAX`, `PERIOD_DEFAULT` | 50, 220, 50 | pulse period range in samples |
| `AMP_STEP`, `AMP_DEFAULT` | 16, 1489 | amplitude step and reset value, in DAC codes |
| `LLD`, `ULD` | 860, 1600 | window in mV |

## What follows the reference design and what is this design's own

These points come from the reference design:

- the blocks and how they connect;
- the 50 MHz clock divided to a 1 s counting interval;
- the 12-bit DAC written with 32-bit frames, and conversion started by DAC_CS going high;
- the SPI-programmed amplifier and 14-bit ADC on the same bus;
- the 0.86 V / 1.6 V window;
- two 16-bit counters, one per second and one total;
- the 454 Hz to 2 kHz pulse rate range;
- the LCD showing counts per second, total counts and the maximum peak.

These are this design's own choices:

- the sample rate, and the way the bus is shared in time;
- the shape of the pulse table;
- the use of the rotary switch (press to change mode) and the step sizes;
- amplifier gain −1;
- judging the window on the pulse peak, with strict comparisons;
- the total counter wrapping, and the peak kept per second;
- the serial BCD converter, the LCD layout and the HD44780 command sequence.

The DAC, amplifier and ADC frame formats are the parts' data-sheet formats.

Known differences from the reference design and open points:

- The reference measured rates such as 1947 Hz. This generator makes 100000/period Hz,
  so the nearest settings are 1960.8 Hz and 1923.1 Hz.
- The reference's "max value" readings (45 to 116, no unit given) cannot be matched. The
  LCD shows the peak in millivolts.
- The counting time is a parameter, not something the user can set at run time.
- The eight board LEDs are not driven.
- Nothing has been run on hardware. The converters, amplifier and LCD have only been
  exercised against behavioural models written from their data sheets.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends by itself. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl rtl/ncs_pkg.sv tb/tb_nuclear_counting_system.sv \
    --top-module tb_nuclear_counting_system -Mdir obj && obj/Vtb_nuclear_counting_system
```

Substitute any other testbench name. The models in `tb/` stand in for the board:

- `ltc2624_model`: the DAC. Its output in µV is wired to the ADC model's input.
- `ltc1407a_model`: the preamplifier and the ADC.
- `hd44780_model`: the LCD. It checks all interface timing against the data-sheet
  minimums.

| testbench | what it shows | run time |
|---|---|---|
| `tb_<block>` (13 of them) | each block against an independent reference, including cycle counts of the SPI transfers and the BCD converter | under 1 s each |
| `tb_nuclear_counting_system` | whole system, 20 ms counting interval: default, slower rate, amplitude above ULD (all rejected), below LLD (ignored), back in window, rate clamp; checks every count, the peak and the LCD text | ~10 s |
| `tb_table2_rates` | the nine measured rates 1947 to 1102 Hz: for each, the nearest period is set with the knob and the counted rate must match the generated rate (0.1 s intervals) | ~45 s |
| `tb_ncs_full_size` | all parameters at default: two real 1 s intervals at 2 kHz; CPS = 2000, peak 1200 mV, total 4000, LCD shows `CPS=02000` | ~55 s |

The design compiles without errors in Verilator lint (`-Wall`) and the Yosys slang
front end. The remaining lint warnings are unconnected optional outputs, a few status
signals the top does not use, and unused package constants.
