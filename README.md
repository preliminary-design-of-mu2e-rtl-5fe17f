# Mu2e Spill Regulation System — FPGA fabric RTL

The Mu2e experiment takes its protons from the Delivery Ring (DR) by resonant
slow extraction. The ring holds one bunch. Over 43.1 ms the machine is driven
onto a third-integer resonance, and protons leak out once per revolution,
about 25,000 pulses per spill. The experiment needs those pulses to be as
equal as possible.

Two actuators set the leak rate:

- **Tune-ramp quadrupoles.** Three magnets, each on its own supply, move the
  tune toward the resonance.
- **RF knock-out (RFKO) stripline.** Frequency-modulated RF near the betatron
  sideband makes the beam grow into the unstable region.

The Spill Regulation System (SRS) measures the extracted beam turn by turn. It
closes one feedback loop around each actuator. It also keeps the spill
profiles for slower feed-forward corrections between cycles.

This repository holds the SystemVerilog for the FPGA-fabric part of the SRS:

- acquisition;
- sequencing;
- both regulation loops;
- excitation generation;
- the converter interfaces;
- the capture buffer;
- the host register file.

The top is `rtl/srs_top.sv`, which has no parameters.

## The machine cycle and how the RTL follows it

| Quantity | Value |
|---|---|
| DR revolution frequency | 590.08 kHz (one *turn*) |
| Spill | 43.1 ms = **25,432 turns** |
| Reset period (quads return, no extraction) | 5 ms = **2,950 turns** |
| Spills per cycle | 8 |
| No-beam time after the 8th spill | 1.02 s |

Every duration is counted in turns, never in clock cycles. The design stays
locked to the ring even if the fabric clock is not an exact multiple of the
revolution.

### `turn_marker_counter`

- Synchronises the turn marker with two flops.
- Emits a one-clock `turn_tick` three clocks after each rising edge.
- Counts the turns since the cycle started.
- Raises `marker_lost` after 256 clocks without a marker, for example when
  the LLRF is switched off. A lost marker disables the sequencer.

### `srs_state_machine`

- Sits in `NO_BEAM` until the timing event selected by register `EVENT`
  arrives.
- Then runs eight `RESET` → `SPILL` pairs and returns to `NO_BEAM`.
- A reset period comes before every spill, including the first. The cycle
  event is therefore expected 5 ms before the first injection.
- Inside a spill it cuts the turns into **regulation bins of 16 turns**, 1,590
  bins per spill. It flags the end of each bin with `bin_strobe`. `bin_idx`
  moves on one clock later.
- At 16 turns per bin the loops update at 36.9 kHz. That is comfortably above
  twice the 10 kHz gain-bandwidth the regulation is designed for.
- `BINS` (2,048) and `TURNS_PER_BIN` are constants in `srs_pkg`. Change them
  together.

## Measuring the spill

There are 16 ADC channels. `adc_receiver` assumes a simple serial format:

- one lane per channel;
- one bit per `clk`;
- MSB first, two's complement;
- a common `adc_frame` pulse on the first bit of each 16-bit word.

A frame pulse at the wrong bit position sets the sticky `frame_err`.

With one bit per clock, each channel delivers clk/16 samples per second. At
66 MHz that is 4.1 MSPS, about 7 samples per turn. This is well below what the
converters can do, and below the full-rate acquisition the SRS is meant to
have. A full-rate front end needs the FPGA's LVDS deserialisers, which would
hand parallel words to the rest of the design. Everything after the receiver
works unchanged on a faster `sample_valid`.

Channels 0, 1 and 2 carry the three spill monitors:

- the wall-current monitor (WCM);
- the extinction monitor (EM);
- the DC current transformer (DCCT).

Each passes through `filter_integrate`, which subtracts a programmable
baseline and sums the samples of one turn. The result is divided by 2^7 and
saturated to 16 bits. 2^7 suits up to 128 samples per turn, for example about
112 at a full 66 MSPS. This gives one "particles per pulse" number per turn.

`monitor_select` turns these into the loop measurement:

| Mode | Measurement |
|---|---|
| WCM | the WCM through a first-order low-pass filter (`lpf`, y += (x − y)·2^−shift) |
| EM | the EM through the same kind of filter |
| BOTH | the mean of the two filtered signals |
| DCCT | the decrease of the circulating-beam current from one turn to the next, i.e. the extraction rate |

## The two regulation loops

Both loops work the same way:

- They run once per bin, on the error between a host-loaded reference for that
  bin and the measured spill.
- The measurement used is the value at the end of the bin.
- Samples are 16-bit signed.
- PID gains are signed Q8.8.

In the original proposal the PID arithmetic runs on floating-point soft
processors. Here it is built in fixed point in the fabric, so both loops have
a latency of a few clocks instead of a software period.

### Tune quad loop (`tune_quad_loop`)

```
quad target = ramp[bin] + PID(e) + LMS(e, n·60 Hz refs) + S2S(e)     during SPILL
            = quad_start                                             during RESET
            = quad_pedestal                                          during NO_BEAM
quad_ref    = slew_limit(quad target, max_step per turn)
```

**Ramp table.** `ramp[bin]` is the feed-forward curve, which sets the average
shape of the spill. It is loaded by the host.

**`pid_controller`.** This is a textbook discrete PID with an integrator clamp
and a saturated output. It is cleared outside spills.

**`adaptive_filter` with `harmonic_references`.** These remove mains ripple.

- `harmonic_references` keeps a phase accumulator for 60, 120, 180 and
  240 Hz. It steps once per turn by `INC60` = 2^32·60/590080 and produces
  sine and cosine from a table.
- The accumulators are reset at the cycle start, which assumes the cycle is
  locked to the mains.
- The filter holds one weight pair per harmonic. Its output is
  Σ(w_s·sin + w_c·cos).
- The weights follow the LMS rule w += e·ref·2^−mu. Each harmonic of the error
  is thus integrated into a sinusoid of the right amplitude and phase.
- The weights are kept from spill to spill, so the filter converges over the
  cycle.

**`spill_to_spill_filter`.** This handles ripple that repeats at the same
point of every spill.

- It keeps one 24-bit word M[k] per bin, with 8 fraction bits, in a RAM.
- At the end of bin k it updates
  M[k] ← M[k] + e·2^(8−gain) − M[k]·2^−leak.
  This is an integrator across spills. The optional leak makes it forget
  slowly.
- For the coming bin k+1 it outputs M[k+1+P], where P is the *phase
  advance*. The correction is thus applied P bins early, which compensates for
  the delay through the supplies and the magnets. The index is clamped to the
  last bin.
- At `spill_start` it presents M[P] for bin 0.
- Its output changes 6 clocks after `bin_strobe`.
- A clear command zeroes the RAM in 2,048 clocks. During that time `busy` is
  high and strobes are ignored.

**`slew_limiter`.** This is stepped once per turn. With the assumed current
scale of 2.5 mA/LSB (0–163.8 A), the default `max_step` of 10 LSB per turn
gives 14,752 A/s. That is below the 16,000 A/s rating of the quad ramp. The
same reference is sent to all three supplies.

### RFKO loop (`rfko_loop`) and `fm_signal_generator`

```
alpha  = clamp(PID(e) + S2S(e), 0, 32767)   during SPILL, else 0
rf_out = (alpha · f(x)) >>> 17               14-bit, to both stripline plates
```

Outside spills the loop is off: alpha is 0 and the PID is cleared. The learned
spill-to-spill profile is kept.

`fm_signal_generator` produces f(x) with a 32-bit phase accumulator and a
1,024-entry sine table (`sine_lut`, computed at elaboration). It has three
modes:

| Mode | What it does |
|---|---|
| Carrier | a plain tone at the tracked carrier (see below) |
| Chirp | the offset sweeps linearly from −span to +span by `FM_SWEEP` per clock, then starts again |
| Noise | a 32-bit Galois LFSR (taps 0x80200003) through a first-order low-pass (2^−shift) gives coloured noise, scaled to ±span |

**Sideband tracking (`sideband_tracker`).** The carrier must stay on the
betatron sideband. The sideband moves with the tune, and the tune moves with
the quad current, so the carrier increment is recomputed every clock from the
quad loop's output:

```
carrier_inc = FM_CARRIER + (quad_ref − TRACK_REF) · TRACK_GAIN
```

- `FM_CARRIER` = 2^32·f/f_clk is the carrier at the quad current `TRACK_REF`.
- `TRACK_GAIN` is signed and gives the change of the increment per LSB of
  current.
- The result is saturated to ±2^31.
- Gain 0 gives a fixed carrier.

The linear model is this design's reading. The host keeps the two
coefficients up to date from the spill profiles.

## Feed-forward capture and the host

**`feedforward_buffer`.** On every `bin_strobe` this writes the measurement
into a RAM at {spill, bin}. It holds 8 × 2,048 words, one complete cycle. At
the end of the 8th spill it raises `full` (`irq_buffer_full`). The host reads
the profiles during the 1.02 s without beam, works out new ramp and reference
tables, writes them back, and acknowledges.

**`daq_sampler`.** This is the raw-data path.

- After an arm command, optionally held until the next spill start, it takes
  `DAQ_LEN` ADC sample periods.
- For each period it sends one 32-bit word {channel B, channel A} on an
  Avalon-ST source (`daq_st_data/valid/last/ready` on the top). The stream is
  meant for a scatter-gather DMA engine that writes to DDR memory.
- It never stalls the ADC. If the DMA is not ready when the next pair
  arrives, that pair is dropped and `overflow` is set.
- `st_last` marks the final word, after which `done` is set.

**`reference_table`.** Three copies hold the quad spill-rate reference, the
quad ramp and the RFKO spill-rate reference. Each is a dual-port RAM: the host
writes and the loop reads, with a registered read.

**`srs_registers`.** This is an Avalon-MM slave:

- 32-bit data and word addresses;
- `readdatavalid` one clock after `read`.

Address map:

| Word | Register |
|---|---|
| 0x00 | CTRL: [0] enable, [1] quad learn, [2] RFKO learn, [3] LMS adapt; write-one pulses [8] clear quad S2S, [9] clear RFKO S2S, [10] ack buffer full, [11] clear ADC frame error, [12] arm raw-data capture, [13] abort it |
| 0x01 | EVENT: timing event code that starts a cycle |
| 0x02 | MONITOR: [1:0] WCM/EM/BOTH/DCCT, [11:8] LPF shift |
| 0x03–0x05 | baselines of WCM, EM, DCCT |
| 0x06–0x08 | quad PID kp, ki, kd (Q8.8) |
| 0x09 | QUAD_S2S: [4:0] gain shift, [12:8] leak shift, [26:16] phase advance |
| 0x0A | [15:0] pedestal, [31:16] start current |
| 0x0B | max step per turn |
| 0x0C | LMS step shift |
| 0x0D | INC60 (reset value 436,709 = 60 Hz per turn) |
| 0x0E–0x10 | RFKO PID kp, ki, kd |
| 0x11 | RFKO_S2S (as 0x09) |
| 0x12 | FM: [1:0] mode, [11:8] noise colour |
| 0x13–0x15 | FM carrier increment, half span, sweep step |
| 0x16–0x18 | power-supply fault masks, magnets 0–2 |
| 0x19 | TAB_ADDR: [10:0] bin, [17:16] table (0 quad reference, 1 ramp, 2 RFKO reference) |
| 0x1A | TAB_DATA: a write stores [15:0] and increments the address |
| 0x1B / 0x1C | capture buffer address / data (read-only data) |
| 0x1D | STATUS: [1:0] state, [4:2] spill, [5] buffer full, [6] marker lost, [7] PS fault, [8] ADC frame error, [9] S2S clearing |
| 0x1E | turns since cycle start |
| 0x1F–0x21 | power-supply status bits, magnets 0–2 |
| 0x22 | ID 0x53525301 |
| 0x23 | FM_TRACK: [15:0] signed gain, [31:16] reference current |
| 0x24 | DAQ_CTRL: [3:0] channel A, [11:8] channel B, [16] start at the next spill |
| 0x25 | DAQ_LEN: sample pairs |
| 0x26 | DAQ_STAT: [0] waiting, [1] capturing, [2] done, [3] overflow (read-only) |
| 0x27 | DAQ_CNT: sample periods taken (read-only) |

Each magnet reports 24 status bits: 8 from each of its two supplies and 8 from
its controller. `ps_fault` is the OR of every status bit enabled by its mask.

## Converter interfaces and pin mapping

**`spi_dac_tx`** drives the four slow 16-bit DACs over one SPI port:

- SCLK is clk/4 (16.5 MHz at 66 MHz), under the 25 MHz limit. SCLK idles low
  and the DAC samples on the rising edge.
- Each frame is 24 bits: {command 0x3, 00, channel[1:0], value[15:0]}.
- Frames go round-robin, 101 clocks each, so every channel is refreshed at
  about 163 kHz.
- Mapping: channels 0–2 carry the quad reference of the three supplies;
  channel 3 carries alpha.
- The frame layout is an assumption. Adapt it to the DAC actually fitted.

**`hs_dac_tx`** drives the four dual 14-bit high-speed DACs:

- Each DAC has one interleaved bus clocked by `clk2x`.
- Channel A goes out on the `clk2x` edge in the middle of the `clk` period,
  with `hs_dac_sel` = 0. Channel B goes out on the next edge, with
  `hs_dac_sel` = 1.
- Coding is offset binary.
- Mapping: channels 0 and 1 carry `rf_out` to the two amplifiers. Channels
  2–7 are diagnostics: f(x), per-turn WCM, EM, DCCT, the measurement and the
  quad-loop error.

**`dig_out`** bits:

| Bits | Signal |
|---|---|
| [1:0] | state |
| [2] | spill |
| [3] | bin strobe |
| [4] | power-supply fault, intended for machine protection |
| [5] | marker lost |
| [6] | buffer full |
| [7] | turn tick |
| [10:8] | spill index |
| [11] | ADC frame error |
| [12] | slow-DAC frame done |
| [13] | S2S clearing |
| [14] | cycle done |
| [15] | spill start |

## Clocks

Everything runs on `clk`. The nominal value is 66 MHz, which is 3.5 times the
18.86 MHz LLRF reference. The high-speed DAC buses run on `clk2x`, which must
be phase-aligned with `clk`. Both clocks come from a PLL outside this RTL.

## What is not here

The following parts of the full SRS are outside this RTL. Their signals are
ports of `srs_top`.

- **TCLK / Beam Sync decoder.** It is replaced by `tclk_event_valid` and
  `tclk_event_code`.
- **Clock PLL.**
- **Multi-gigabit optical links.** These carry the spill monitors and timing
  in some configurations.
- **ARM and soft processors, and the host software.** This includes the
  cycle-to-cycle profile analysis that computes the feed-forward tables.
- **The DMA engine and the DDR4 memory behind the raw-data stream.**
- **A full-rate ADC front end** (see "Measuring the spill").

These departures from the proposal are choices of this design:

- fixed-point loops in logic;
- a feed-forward ramp table added to the quad loop output;
- LMS as the adaptive algorithm;
- the integrator form of the spill-to-spill filter;
- the linear sideband-tracking model;
- all interface formats, bin sizes, the register map and the pin mapping.

Nothing here has been run against real hardware. The only beam is the crude
model in the top-level testbench. The testbenches check the arithmetic and
the sequencing, not the regulation performance. Gains, step sizes and tables have to be tuned on the machine.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. It
prints `TB_RESULT checks=… failures=…` and stops itself with a watchdog. For
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/srs_pkg.sv tb/tb_srs_top.sv --top-module tb_srs_top -o sim
./obj_dir/sim
```

`tb_srs_top` runs the unmodified top through one complete cycle:

- 8 spills of 25,432 turns, all 12,720 bins;
- a shortened turn of 32 clocks;
- real serial ADC frames, SPI and DAC bus decoding;
- a spill model that reacts to the quad reference and the RFKO amplitude;
- loading of the tables and reading of the capture buffer over the register
  bus.

It counts how often each mechanism occurred and fails if any never happened:

- state transitions and bins;
- slew limiting;
- PID, LMS and S2S activity;
- the RFKO amplitude;
- chirp and noise FM;
- the combined monitor mode;
- carrier tracking;
- a raw-data capture of 5,000 pairs started by the first spill;
- a masked power-supply fault;
- turn-marker loss;
- an ADC framing error;
- the buffer-full interrupt;
- SPI frames.

It takes about 25 seconds.
