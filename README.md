# Transient-recorder / time-digitizer acquisition FPGA for neutron diagnostics

Neutron detectors on a fusion experiment produce short pulses. Their height,
shape and arrival time tell the neutron energy, whether the particle was a
neutron or a gamma ray, and the neutron flux. This RTL is the FPGA of an
acquisition module that digitises four such detector signals with 12-bit,
200 MSPS ADCs. It can trade channels for sampling rate by interleaving the
ADCs: 4 channels at 200 MSPS, 2 at 400 MSPS or 1 at 800 MSPS. Inside the FPGA
it corrects each ADC and triggers on the pulses. For each pulse it measures
the height, with a pile-up check and a histogram, and the charge in the whole
pulse and in its tail. It then stores the raw samples and the results, tagged
with channel and trigger time, in a 1 GB DDR memory and sends the processed
results over a gigabit link. A hardware time-to-digital converter (TDC) adds
precise hit times, which are recorded in the same stream.

All of it runs on one clock, the 200 MHz ADC data clock.

```
 adc_code[0..3] ─► nonlinearity_corr ─► adc_compensation ─┐  (one per ADC)
                                                          ▼
                                               interleave_gearbox
                                    (4x200 / 2x400 / 1x800 MSPS, time stamps)
                                                          │ 4-sample words
                  ┌───────────────────────────────────────┼─────── per channel
                  ▼                                       ▼
            trigger_detect ──► pulse_height_detector ──► pha_histogram
                  │        └─► psd_unit
                  ▼                 │
            data_manager ◄──────────┘ ◄── TDC hits
              │        │
          DDR port   link port

 voltage_offset_prog ─► spi_master ◄─ host SPI requests  (DAC, clock chip,
                                                          temperature, flash)
```

## Interleaving, words and time

This part is the least obvious, and everything after it depends on it.

The four ADCs always sample at 200 MHz. The clock chip gives each ADC a clock
phase that depends on the mode. ADC *k* is driven by clock output *k*+1.

| mode       | ADC0 | ADC1 | ADC2 | ADC3 | channels                  |
|------------|------|------|------|------|---------------------------|
| `MODE_4CH` | 0°   | 0°   | 0°   | 0°   | ch *k* = ADC *k*          |
| `MODE_2CH` | 0°   | 180° | 0°   | 180° | ch0 = ADC0+1, ch1 = ADC2+3 |
| `MODE_1CH` | 0°   | 90°  | 180° | 270° | ch0 = ADC0..3             |

Within a channel, reading the ADCs in index order gives the samples in time
order. `interleave_gearbox` packs each channel's samples into **words of four
signed 16-bit samples**, with element 0 the oldest. A word is 8 bytes, the
width of the memory path. A channel produces one word every 4, 2 or 1 clocks
in the three modes. So every later stage handles at most one word per clock
per channel. Channels that the mode does not use produce nothing.

Time is counted in **1.25 ns ticks**, the sample period at 800 MSPS. The time
base advances 4 ticks per clock. The sample from ADC *k* gets the clock time
plus its phase in quarter periods. Each word carries the time of its first
sample, and sample *i* lies `i * sample_step` ticks later (`sample_step` = 4,
2 or 1). `ts_clear` restarts the time base, so several modules can share one
time scale when they are given a common pulse. Changing the mode throws away
any partly filled words.

A sample on the ADC pins in clock *t* is time-stamped `4*(t+2)+phase`. The
two extra clocks are the latency of the two correction stages. The end-to-end
testbench relies on this figure.

## Correction of each ADC

* `nonlinearity_corr` turns the offset-binary code into `(code-2048)*16`, a
  signed value with 4 fractional bits. It adds a per-code correction from a
  4096-entry table (8-bit signed entries, in 1/16 LSB). The table is written
  through `inl_*`, starts at zero, and the sum saturates. Latency: 1 clock.
* `adc_compensation` matches gain and offset between the ADCs:
  `out = sat(((x - offset) * gain) >>> 14)`, with the gain in Q2.14 (16384 =
  1.0). Latency: 1 clock.
* The analogue offset of each input is set by a 16-bit quad DAC.
  `voltage_offset_prog` writes the four codes through `spi_master` as 24-bit
  frames `{4'h3 (write and update), 4-bit channel, 16-bit code}`. This frame
  format is an assumption. Match it to the DAC that is fitted.

The coefficients come from software. This RTL has no calibration algorithm.

## Triggers and the pulse window

`trigger_detect` has one source per channel:

* `TRIG_AUTO` triggers at the first sample of a word that reaches `threshold`
  while the sample before it was below. Element 0 of a word is compared with
  the last sample of the previous word.
* `TRIG_EXTERNAL` and `TRIG_SOFTWARE` hold a pulse on `ext_trig` or
  `sw_trig[c]` and trigger at the first sample of the next word.
* `TRIG_OFF` never triggers.

The trigger index within the word and the trigger time travel with the word.

A trigger opens a **window of `WIN` samples (64)**, starting at the trigger
sample. The pulse height detector and the shape discriminator use the same
helper, `pulse_window`, so both finish a pulse in the same clock. The rules:

* A trigger inside an open window opens no new window. It marks the pulse as
  **piled up**.
* A trigger in the same word as the end of a window, but after the window's
  last sample, opens the next window.
* A result comes out one clock after the word that holds the last window
  sample, so there is at most one result per window.

## Pulse measurements

* **Height** (`pulse_height_detector`): every sample is first shaped by the
  filter chosen in `cfg.filt`, and the height is the largest shaped value in
  the window. The pile-up flag comes with it. The filters are built from
  moving averages of `MA_LEN` (4) samples:
  * `FILT_MA`: one moving average (rectangular response).
  * `FILT_TRI`: that average averaged again over `MA_LEN` samples. Two equal
    boxes give a triangular response.
  * `FILT_TRAP`: the average averaged again over `2*MA_LEN` samples. Unequal
    boxes give a trapezoidal response with a flat top.

  The history runs across word boundaries, so the filters see a continuous
  sample stream. Slower shaping smooths noise more but lowers the peak of
  short pulses.
* **Histogram** (`pha_histogram`, one per channel): 4096 bins of 32 bits. A
  pulse that is not piled up increments bin `height >> 3`. Negative heights
  go to bin 0, and the bins cover the positive range at half an ADC LSB each.
  Piled-up pulses are rejected and only counted (`n_rejected`). The increment
  is a read-modify-write one clock apart, with forwarding when the same bin
  is hit twice in a row. `clear` zeroes one bin per clock (4096 clocks, with
  `busy` high). Pulses that arrive during a clear are not counted.
* **Shape** (`psd_unit`): charge integration of all window samples (total)
  and of those from position `tail_start` on (tail). The flag
  `tail_high = tail*256 >= ratio_limit*total` separates slow-tailed pulses
  from fast ones without a divider. Neutrons and gammas in organic
  scintillators differ in exactly this ratio. Which class is which depends on
  the detector. Both sums are stored with each result, so the charge of the
  rising part (`total - tail`) is available to software as well.

## Records and storage

`data_manager` writes everything as 64-bit words:

| record | word 0 | following words |
|---|---|---|
| raw | `[63:60]=1, [59:58]=channel, [57:56]=trigger index, [55:48]=16, [47:0]=trigger time` | 16 sample words, starting with the word that holds the trigger |
| result | `[63:60]=2, [59:58]=channel, [57]=pile-up, [56]=tail_high, [47:0]=trigger time` | `[63:48]=height, [47:24]=tail, [23:0]=total` (charges saturated to 24 bits) |
| TDC | `[63:60]=3, [59:58]=TDC channel, [47:0]=arrival time` | `[31:0]=TDC measurement` |

There are nine FIFOs of 64 entries each: a raw and a result FIFO for each
channel, and one for the TDC. Each has a single writer, so records never
interleave. A round-robin arbiter sends only complete records, one word per
clock (8 B at 200 MHz = 1.6 GB/s), to the DDR write port. The addresses are
consecutive and wrap around a 2^27-word (1 GB) circular buffer. Result and
TDC records are processed data. They also go out on the link port, and they
move only when both ports are ready.

Loss is counted in `dropped`, never hidden:

* A raw record starts only if its FIFO has room for all 17 words.
* A trigger during a raw capture, or in the clock right after one, starts no
  raw record. Its result is still recorded.
* A result or TDC hit that finds its FIFO full is dropped.
* A TDC hit in the clock right after another TDC hit is dropped.

## Serial peripherals

`spi_master` drives four active-low selects on a shared SPI bus: 0 = offset
DAC, 1 = clock distribution chip, 2 = temperature sensor, 3 = configuration
flash. Apart from the DAC, which select goes to which device is only a
convention of the top's host port. The bus runs in mode 0, sends MSB first,
and takes frames of 1 to 32 bits with SCLK = clk/8. A frame of L bits takes
`8L + 2` clocks. In the top, the offset programmer takes priority over the
host request port (`spi_req_*`). Responses go back to whoever issued the
frame.

## Parameters (`tdaq_top`)

| parameter | default | meaning |
|---|---|---|
| `WIN` | 64 | pulse window, samples |
| `MA_LEN` | 4 | moving-average length (1, 2, 4 or 8) |
| `RAW_WORDS` | 16 | sample words per raw record |
| `FIFO_DEPTH` | 64 | entries per data-manager FIFO |
| `HIST_BINS` | 4096 | histogram bins per channel |
| `ADDR_W` | 27 | DDR word address bits (1 GB of 8-byte words) |
| `SPI_DIV` | 4 | SCLK = clk / (2·SPI_DIV) |

These values are fixed by the hardware itself: 4 ADCs, 12 bits, 200 MHz, the
three modes and their phases, the 8-byte word at 200 MHz, 1 GB of memory and
the 16-bit quad DAC. The other numbers are choices of this design.

## What is outside this RTL

These parts have no logic to write, or are vendor parts and IP. Their signals
are ports of `tdaq_top`:

* The ADCs (`adc_code`, `adc_valid`).
* The analogue input stage and the level comparators.
* The TDC chip (`tdc_*`). Its measurement word is carried as opaque data.
* The DAC, the temperature sensor and the flash (SPI bus).
* The clock synthesiser and distribution with its delay lines. Its per-mode
  phases are the table above.
* The DDR controller and memory (`ddr_*`).
* The optical gigabit link core (`link_*`).

Configuration is a plain `tdaq_cfg_t` struct input. No register map is
defined.

## Limitations and departures

* The shaping filters are cascaded moving averages of fixed lengths, not
  programmable-coefficient filters.
* There is no baseline restoration: the offset correction is expected to
  centre the baseline at zero.
* Raw records have no pre-trigger samples.
* Inter-ADC timing skew is meant to be trimmed by fixed delay lines on the
  clocks. There is no digital phase correction.
* External and software triggers act at a word boundary, up to 4 samples
  late.
* The DAC frame format and the SPI mode are assumptions.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/tdaq_pkg.sv tb/tb_tdaq_top.sv --top-module tb_tdaq_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_nonlinearity_corr` | code conversion, table writes and saturation against a model |
| `tb_adc_compensation` | gain/offset arithmetic and saturation against a model |
| `tb_interleave_gearbox` | sample order per mode, word rate, time stamps, time-base clear |
| `tb_trigger_detect` | crossings on random data, index and time; external, software and off sources |
| `tb_pulse_height_detector` | heights with each of the three filters, pile-up flags, times and result clock against a sample model |
| `tb_psd_unit` | total and tail charge, ratio flag and result clock against a sample model |
| `tb_pha_histogram` | every bin after random hits, forwarding, clear time, counters |
| `tb_data_manager` | every record field under back-pressure, overflow accounting, link copy |
| `tb_spi_master` | bits on both lines, select, SCLK period, frame length |
| `tb_voltage_offset_prog` | the four DAC frames through a real SPI master |
| `tb_tdaq_top` | the whole design at default parameters: see below |

`tb_tdaq_top` models the analogue inputs as triangular pulses, some fast and
some slow, some in close pairs. Each ADC samples its channel at its own clock
phase. The run passes through all three modes, one shaping filter in each, with auto, external and
software triggers, TDC hits, a DDR stall long enough to overflow the FIFOs,
an offset-DAC load and a host SPI read. It checks:

* every raw sample exactly, including the corrections;
* every height, charge, ratio flag and pile-up flag, recomputed from the
  waveform;
* that every histogram sums to its accepted count;
* that the DDR port takes a whole raw record in consecutive clocks (8 B per
  clock);
* that each of these mechanisms occurs at least once.

It runs in a few seconds.
