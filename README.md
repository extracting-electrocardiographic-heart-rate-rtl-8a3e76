# FPGA heart-rate extraction from an ECG

This is the digital part of a simple electrocardiograph. Three skin electrodes
feed an analog chain: an instrumentation amplifier with a gain of 51, a
first-order RC low-pass filter with a corner near 320 Hz, and a non-inverting
op-amp stage. The chain drives channel 0 of an MCP3002 10-bit SPI ADC. The FPGA
reads the ADC and finds the heartbeats in the time domain. It turns the spacing
between beats into beats per minute and hands that byte to a Raspberry Pi, which
shows it on a web page. Only the FPGA logic is RTL here. The analog front end,
the ADC and the Pi are outside it. The testbenches model the ADC and the Pi.

```
 electrodes -> analog front end -> MCP3002 --SPI--> ecg_top --SPI--> Raspberry Pi
                                       ^   (FPGA is master)     (FPGA is slave)
```

## Signal path inside `ecg_top`

| block | job | rate (40 MHz clock) |
|---|---|---|
| `adc_spi_master` | generates SCLK, reads one 10-bit sample per frame | SCLK 250.2 kHz, 7.8 kHz conversions (every 5115 clocks) |
| `sample_rate_divider` | keeps about 1 conversion in 20 | 396.7 Hz (`new_data` strobe) |
| `hr_find` | moving average, beat detection, bpm conversion | one sample per `new_data`, ~50 clocks of work |
| `pi_spi_slave` | returns the heart-rate byte to the Pi | Pi clock 200-250 kHz |

All flops run on the single 40 MHz clock `clk`. SCLK, chip select and the
processing rate are derived from it. They are consumed as one-cycle strobes
(`done`, `new_data`) and never used as clocks. The Pi's clock and data are
asynchronous. Each passes through a two-flop synchronizer in `pi_spi_slave`.
The `reset` switch is synchronized in `ecg_top` and resets every block
synchronously.

Both dividers are phase accumulators whose top bit is the divided clock.

* SCLK is bit 15 of a 16-bit accumulator that gains 410 per clock:
  40 MHz x 410 / 65536 = 250.2 kHz.
* The processing rate comes from a 10-bit accumulator that gains 52 per
  conversion: 7812.5 Hz x 52 / 1024 = 396.7 Hz.

The heart-rate arithmetic assumes 400 Hz, so it reads about 0.8 % high.

## How the heart rate is found (`hr_find`)

The incoming signal is a baseline with a short spike at each beat. The block
must find one point per beat and measure the distance to the same point of the
next beat. For every processed sample it does three things.

**1. Moving baseline.** The last 200 samples are kept in a delay line built as
ten 200-bit shift registers, one for each ADC bit. The bit that falls off the
end of each register forms the oldest sample. A running sum adds the new sample
and subtracts the oldest one, so no adder tree is needed. The baseline is
`sum / n`, where `n` counts the samples seen since reset and stops at 200. The
baseline is computed from the sum before the current sample is added. After
reset the sum holds 341 and `n` is 1, so this "seed" acts as one guessed sample
while the window fills. The seed is never subtracted, so once the window is full
the baseline reads about 341/200 ≈ 1.7 units high. The constant `DELTA` (2)
covers that offset plus noise.

**2. Beat spacing with a minimum separation.** A sample is *above* when
`sample > baseline + DELTA`. A small state machine, in priority order:

* above, no count running: start counting, `count = 1`;
* above, `count > MIN_SEP` (225): the count is the peak separation.
  Capture it, clear the count and stop counting;
* count running: `count + 1`. This includes samples that are above but
  within 225 samples of the start. They belong to the same beat, which can
  stay above the threshold for several samples.

The count stops after a capture. So with a wide pulse, the next sample of the
same beat restarts the count at 1, and the following separation reads one sample
short. With a one-sample pulse, the next pulse restarts the count, and only
every second interval is measured. In both cases the reported rate is
`24000 / P` or `24000 / (P-1)` for a period of P samples.

**3. Conversion.** `time = separation x 2500 us`, then
`bpm = 60 000 000 / time`. The result is saturated to 8 bits and shown on `hr`.

Both divisions, `sum / n` and `60e6 / time`, use `seq_divider`. This is a
restoring divider that produces one quotient bit per clock. It takes 19 clocks
for the 18-bit average and 28 clocks for the 27-bit rate. A sample is finished
in at most about 50 clocks, against roughly 100 000 clocks between samples.
`busy` is high while a sample is in work. A `new_data` strobe that arrives while
`busy` is high is dropped, which cannot happen at the real clock ratios.

**What follows from these numbers.** Beats closer than 226 samples are
treated as one beat. At 400 Hz the fastest rate the block can report is
24000/226 = 106 bpm. Faster rhythms are reported at half their rate, or
lower. The slowest is set by the 15-bit counter, which saturates at 32767
samples (82 s) instead of wrapping. The first reading after reset can be
wrong: the seed pulls the baseline low, so the first real samples sit above
it and start a count. That count stays pending until the first real beat,
which then ends it early. The second beat gives a correct reading. The
threshold is a fixed offset over the baseline, so it does not adapt to the
signal amplitude.

## Talking to the MCP3002 (`adc_spi_master`)

A frame is 32 SCLK periods. Chip select `CSBar` is low for 16 periods and high
for 16. In SPI mode 0, `CSBar` and `Dout` change on a falling SCLK edge, and
`Din` is sampled in the clock where SCLK rises. During the low half the master
sends `0x6000` MSB first: a leading 0, then the start bit, single-ended mode and
channel 0. The MCP3002 answers with a null bit and then B9..B0 on the last 11
clocks. So the last ten bits received are the sample, MSB first. When `CSBar`
rises, `data` is updated and `done` pulses for one clock. SCLK keeps running
while `CSBar` is high. Naming follows the FPGA: `Dout` goes to the ADC's DIN
pin, and `Din` comes from its DOUT pin.

## Reading the result (`pi_spi_slave`)

There is no chip-select wire. The Pi sends a 16-bit word in SPI mode 0 with a
single 1 in it, normally `0x0100`. At each rising Pi clock edge the slave
remembers `mosi`. At each falling edge its 8-bit shift register either loads
the heart rate (if that `mosi` was 1) or shifts left and fills with 0. `miso`
is the register's MSB. With `0x0100` the marker is the 8th bit, so the next
eight bits are the heart rate, MSB first. The Pi reads `{8'h00, hr}`. A marker
at bit position p (8..15) returns the rate in bits p-1..p-8. `miso` changes
3 clocks (75 ns) after a falling Pi clock edge. The Pi clock must stay high and
low for at least 2 FPGA clocks each.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ecg_top` | `SCLK_INC` | 410 | SCLK = clk x SCLK_INC / 65536 |
| `ecg_top` | `RATE_INC` | 52 | processing rate = conversion rate x RATE_INC / 1024 |
| `hr_find` | `WINDOW` | 200 | samples in the moving baseline |
| `hr_find` | `DELTA` | 2 | threshold over the baseline, ADC units |
| `hr_find` | `MIN_SEP` | 225 | separation must exceed this many samples |
| `hr_find` | `BASELINE_SEED` | 341 | value of the sum after reset |
| `hr_find` | `US_PER_SAMP` | 2500 | sample period assumed by the conversion |
| `hr_find` | `MINUTE` | 60 000 000 | one minute in microseconds |
| `hr_find` | `COUNT_W` | 15 | width of the separation counter |

Shared widths and constants (`ADC_W` = 10, `HR_W` = 8, and the ADC command
word) are in `ecg_pkg`. If you change `RATE_INC`, also change `US_PER_SAMP`,
or the bpm values will be scaled.

## Departures from the original design and choices made here

The block structure, the constants above, the shift-register window, the
detection rules and the marker-bit readout follow the original design. These
parts are this implementation's own:

* **One clock domain.** The original clocks flops directly on SCLK,
  chip select, the divided sample clock and the Pi's clock. Here those are
  strobes in the 40 MHz domain, and the Pi's signals are synchronized.
* **ADC sampling edge.** `Din` is sampled on the rising SCLK edge, the
  MCP3002's stable point. The original shifts it in on the falling edge.
* **`done`** is a one-clock strobe. In the original it is the chip-select
  level.
* **Divisions** are sequential. The original writes them as single-cycle
  `/` operators.
* **Reset.** The reset is synchronous, and the heart rate resets to 0. The
  original's code resets its output byte to 64 but describes the reset output
  as 0 bpm. The Pi-side shift register is also cleared on reset.
* **Overflow.** The counter saturates instead of wrapping. The heart rate
  saturates at 255 instead of being truncated to 8 bits. Neither limit is
  reached at the default parameters.
* **Minimum separation and rate.** The minimum separation is 225 samples, the
  value in the original code; its prose says "around 200". The processing rate
  uses an increment of 52, which matches the 400 Hz of the description.

The original also had a debug mode that showed the latest ADC reading on board
LEDs. That is a bring-up aid and is not part of this design.

## Verification

Each testbench checks its block against values it works out itself. It ends by
printing `TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.
The simulator must support `--timing`.

| testbench | what it shows |
|---|---|
| `tb_adc_spi_master` | random readings through the MCP3002 model; 16/16 chip-select framing; SCLK period of 159-160 clocks; conversion every 5114-5116 clocks; recovery from reset mid-frame |
| `tb_sample_rate_divider` | `new_data` exactly as the 52/1024 accumulator predicts, one clock after `done`; 104 strobes per 2048 conversions |
| `tb_pi_spi_slave` | readout with `0x0100` and other marker positions; 200 and 250 kHz; random clock phase; zeros after reset |
| `tb_hr_find` | every sample compared with an integer reference model; pulse trains of several widths; periods of 225 and 226 samples on either side of the minimum separation; noise; reset; a sine wave (75 bpm); counter saturation; at most 60 clocks per sample |
| `tb_ecg_top` | whole chain with the ADC and Pi models, at faster clock ratios (SCLK = clk/16, every 4th conversion): 75, 100, 60 bpm, beats inside the minimum separation, reset; every Pi read matches the finder; counts each mechanism (conversions, samples, full window, count starts, same-beat samples ignored, beats, Pi reads, reset) |
| `tb_ecg_full` | whole chain at the default parameters: 3.3 s of real time with a 75 bpm pulse. The Pi reads 0 before the first beat and 75 afterwards. Takes about a minute. |

The ADC model (`tb/mcp3002_model.sv`) is behavioural and follows the MCP3002
data sheet. It drives 0 where the real part would go high-impedance.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ecg_pkg.sv rtl/seq_divider.sv rtl/sync_2ff.sv rtl/adc_spi_master.sv \
  rtl/sample_rate_divider.sv rtl/hr_find.sv rtl/pi_spi_slave.sv rtl/ecg_top.sv \
  tb/mcp3002_model.sv tb/tb_ecg_full.sv --top-module tb_ecg_full
./obj_dir/Vtb_ecg_full
```

For the other testbenches, list the package, the modules under test and the
testbench, and add `tb/mcp3002_model.sv` where the ADC is modelled. The
end-to-end testbenches read internal signals of `ecg_top` through hierarchical
names to count events.

## Files

`rtl/` holds `ecg_pkg.sv` (shared widths and constants), the five blocks above,
and two helpers: `seq_divider.sv` and `sync_2ff.sv`. `tb/` holds the
testbenches and the ADC model.
