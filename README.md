# Passive-sonar front end: delay-and-sum beamformer, bearing-time stream and LOFAR spectrum

A passive sonar only listens. To tell where a noise source is, it combines the
signals of several spaced sensors so that sound from one chosen direction adds
up in phase and sound from other directions partly cancels. Doing that for
many directions at once gives the *bearing-time record* (BTR): how much energy
arrives from each bearing, over time. To tell *what* the source is, the signal
of one bearing is filtered and turned into a spectrum (the LOFAR display).

This RTL is the programmable-logic half of such a system, sized for a small,
portable array:

* a line of **3 sensors, 37.8 cm apart**, each digitised by an AD7476 12-bit
  serial ADC (Digilent Pmod AD1) at **500 kS/s**;
* **16 steered beams** covering the 180° field of the line array, computed in
  parallel by delay-and-sum;
* the 16 beam values streamed to a processor over a **32-bit AXI-Stream**
  master, one BTR vector per frame;
* one beam, chosen by the processor, passed through a **16-tap 20 kHz lowpass
  FIR** and a **64-point FFT**, whose bins are presented for a register
  interface.

It follows the architecture of a thesis on a portable passive-sonar processor
built on a Zynq device (ARM processor plus FPGA fabric). The processor, its
firmware (which formats the results as NMEA-0183 sentences for a display PC),
the register cores and the analog front end are not part of this RTL; their
signals are the top-level ports.

```
             +---------+  tick   +----------+  3 x 12 bit   +--------------------------+
  50 MHz --> | clk_div |-------->| adc_ctrl |--------------->| 16 x delay_sum_angle     |
             +---------+         +----------+   (done)       |  delay_rom (row k)       |
                              sclk/cs_n | ^ sdata[2:0]        |  3 x delay_fifo          |
                                        v |                   |  sum_norm  (mean of 3)   |
                                  3 x AD7476                  +------------+-------------+
                                                                16 beams   |
                         +-------------------------------------------------+
                         |                                                 |
                 +-------v--------+                                 +------v-----+
   intime ------>| axi_serializer |--> m_axis_* (BTR vector)        |  beam_mux  |<-- bearing_sel[3:0]
                 +----------------+                                 +------+-----+
                                                                           |
                                                        +-------------+    |
                                    raw_sample  <-------| fir_lowpass |<---+
                                                        +------+------+
                                                               v
                                                        +-------------+
                                    fft_* bins  <-------|    fft64    |
                                                        +-------------+
```

## Rates and timing

Everything runs on one clock. Its frequency is not fixed by the RTL, but the
defaults assume **50 MHz**: the sample-rate divider toggles its output every 50
cycles, so a sample is taken every 100 cycles (500 kS/s). All slower rates are
clock enables; nothing is clocked by a derived clock. Reset is synchronous and
active high.

| event | cycles (default) |
|---|---|
| sample period (`clk_div` tick to tick) | 100 |
| ADC conversion, start to `done` | 65 (16 SCLK periods of 4 cycles, +1) |
| ADC `done` to beam value | 2 (delay line, then sum) |
| beam to filtered sample (`raw_valid`) | 2 (mux, FIR) |
| last sample of an FFT frame to bin 0 | 194, then 64 bins on consecutive cycles |
| BTR frame (intime = 16) | 16 words + 1 idle cycle |

## Beam steering: the delay table

This is the part that decides what the design computes, so it is worth the
detail. A plane wave from bearing θ (measured from the line of the array)
reaches sensor *m*, at position *m·d*, earlier or later by *m·d·cos θ / c*. To
point a beam at θ, each channel is delayed so that all three line up, and the
three aligned samples are averaged:

    y_k[n] = (1/3) * sum_m x_m[n - D[k][m]]

    D[k][m] = round( fs * d/c * ( m*cos θk - min(0, 2*cos θk) ) )

The `min` term shifts the set so that every delay is non-negative (the sensor
the wavefront reaches last gets delay 0). With fs = 500 kHz, d = 0.378 m and
c = 333 m/s (air; the tests of the original system were done in air) the
largest delay is 1135 samples, about 2.3 ms. For water set `SOUND_MPS` to
1500; the largest delay then drops to 252 samples.

The 16 bearings are θk = 12·k degrees, k = 0..15, i.e. both end-fire
directions (0° and 180°) and 14 in between. The original design only says
"16 angles over a 180° field"; this spacing is this design's choice, and it is
the single place to change if a different grid is wanted (`delay_rom`). The
table is computed at elaboration with `$cos`, from the parameters, so it
follows any change of spacing, rate, sound speed, channel count or beam count:

| k | θ | D[k] (channels 0, 1, 2) | | k | θ | D[k] |
|---|---|---|---|---|---|---|
| 0 | 0° | 0, 568, 1135 | | 8 | 96° | 119, 59, 0 |
| 1 | 12° | 0, 555, 1110 | | 9 | 108° | 351, 175, 0 |
| 2 | 24° | 0, 518, 1037 | | 10 | 120° | 568, 284, 0 |
| 3 | 36° | 0, 459, 918 | | 11 | 132° | 760, 380, 0 |
| 4 | 48° | 0, 380, 760 | | 12 | 144° | 918, 459, 0 |
| 5 | 60° | 0, 284, 568 | | 13 | 156° | 1037, 518, 0 |
| 6 | 72° | 0, 175, 351 | | 14 | 168° | 1110, 555, 0 |
| 7 | 84° | 0, 59, 119 | | 15 | 180° | 1135, 568, 0 |

Things to know when reading the BTR output:

* With only three sensors the beams are broad. Above about 440 Hz in air the
  spacing exceeds half a wavelength and grating lobes appear: at the 1 kHz
  test tone, bearing 9 receives almost as much as the true bearing 5 (see the
  printout of `tb_sonar_top`). For a 1 kHz source at 80° (between bearings 6
  and 7) the response is 0.85 of full power at 84° but 0.95 at 132° and 0.90
  at 0° (`tb_sonar_air_test`): at that frequency in air the BTR alone cannot
  single out the source.
* The averaging (divide by 3) keeps the beam in the 12-bit range and at the
  same scale as one sensor, so a source exactly on a beam appears there
  unchanged.
* Each beam has its own three delay lines, as in the original architecture:
  48 lines of 2048 x 12 bits (1.2 Mbit). One channel of every beam has delay
  0 and its line reduces to a register after synthesis, leaving about
  0.8 Mbit. Sharing one delay line per sensor with 16 read taps would save
  most of this memory; it was not done, to keep the original structure.
* Until a delay line holds `delay` samples after reset it outputs mid-scale
  (2048), so the first 1135 samples (2.3 ms) of the BTR are a start-up
  transient.

## Blocks

**`clk_div`** counts to 50 and toggles `div_out`; `tick` is a one-cycle pulse
on each rising edge and starts an ADC conversion.

**`adc_ctrl`** drives the AD7476 converters. They share SCLK and CS; each has
its own data line. On `start` CS falls and 16 SCLK periods follow (SCLK =
clk/4, 12.5 MHz, within the part's 20 MHz limit). The AD7476 sends four
leading zeros and then the result MSB first, changing its output after each
SCLK falling edge; the controller samples each data line in the cycle in which
it drives SCLK low, i.e. just before the converter moves on. The low 12 bits
of the 16 received go to `data[]` and `done` pulses. A `start` while busy is
ignored (the top asserts that this never happens). The original design used
the board vendor's controller; this one is written from the converter's
serial protocol.

**`delay_rom`** is the table above. **`delay_fifo`** is a circular buffer:
each new sample is written at the write pointer and the output is read
`delay` words behind it, so the delay can change at any time without a flush.
A delay of 0 passes the sample straight through; a delay of DEPTH or more is
flagged by an assertion. **`sum_norm`** adds the three aligned samples and
divides by three (truncating). **`delay_sum_angle`** combines one ROM row,
three delay lines and a `sum_norm` into one beam.

**`axi_serializer`** puts one beam per cycle on the AXI-Stream in the order
0, 1, ..., 15. A frame is `intime` words; `tlast` marks the last one and the
following cycle is idle (`tvalid` low, data 0), after which the next frame
starts again at beam 0. With `intime` = 16 each frame is exactly one BTR
vector. The beam value is zero-extended to 32 bits; all byte strobes are set.
As in the original design **there is no `tready`**: the stream must be taken
one word per cycle (a DMA or FIFO that can always accept). Beams are read as
they are, so a frame can straddle a beam update (once every 100 cycles).

**`beam_mux`** picks the beam for the spectral path from the low 4 bits of
the processor's 32-bit selection word (the other bits are ignored).

**`fir_lowpass`** is a direct-form 16-tap FIR with a 20 kHz cutoff at
500 kS/s. The original coefficients came from a filter-design tool and are not
known; these are a Hamming-windowed sinc computed at elaboration:

    h[n] = 2fc/fs * sinc(2fc/fs * (n - 7.5)) * (0.54 - 0.46 cos(2πn/15)),  n = 0..15

normalised to sum 1 and rounded to 15 fractional bits. All 16 taps are
positive, so unsigned input maps onto unsigned output with unity DC gain; the
result is rounded and clamped to 0..4095. A tone at 125 kHz is attenuated to
under 4 % of its swing. The same filtered signal is the `raw_sample` output
(the "raw received signal" of the selected bearing, for recording or audio).

**`fft64`** transforms consecutive, non-overlapping 64-sample frames. The
original used a generated pipelined FFT core (64 points, 12-bit in, 12-bit
out). Because a sample only arrives every 100 cycles, this implementation is
iterative and small:

1. Input samples (offset binary) are turned into signed values by subtracting
   2048 and collected in a frame buffer.
2. A full frame is copied into a complex work array in bit-reversed order;
   collection of the next frame continues meanwhile.
3. Six radix-2 decimation-in-time stages run, one butterfly per cycle (32 per
   stage, 192 cycles): t = W^k·b, a' = (a + t)/2, b' = (a − t)/2. Halving in
   every stage keeps values inside the input range, so the outputs are
   X[m]/64 and a full-scale tone on one bin reads about ±1024 in that bin and
   its mirror. Twiddles are 14-bit values (12 fractional bits) from `$cos`/`$sin`.
4. The 64 bins are streamed out in natural order with `fft_index`; `fft_last`
   marks bin 63. Bins 33..63 mirror 1..31 (real input).

At 500 kS/s the bins are 7.8 kHz apart, so the 64-point frame resolves
coarse structure of the 0..20 kHz band only. If a frame completes while the
previous one is still waiting for the engine, the waiting frame is dropped
and `fft_overrun` pulses; at the design's rate the engine is idle long before
that (256 busy cycles per 6400-cycle frame).

## Parameters

| parameter (block) | default | meaning |
|---|---|---|
| `N_CH` (top, adc_ctrl, beams) | 3 | sensors / ADC channels |
| `N_ANGLES` (top) | 16 | beams |
| `FIFO_DEPTH` (top) | 2048 | words per delay line (power of two, > largest delay) |
| `DIV_HALF` (top) | 50 | half period of the sample-rate divider, in clock cycles |
| `SCLK_HALF` (top) | 2 | half period of SCLK, in clock cycles |
| `FS_HZ`, `SPACING_M`, `SOUND_MPS` (sonar_pkg, delay_rom) | 500000, 0.378, 333 | steering geometry |
| `FIR_TAPS`, `FIR_FC_HZ` (sonar_pkg) | 16, 20000 | lowpass |
| `FFT_N` (sonar_pkg) | 64 | FFT size |

`sonar_pkg.sv` holds the shared widths and constants. If `DIV_HALF` or the
clock frequency is changed, change `FS_HZ` to the resulting sample rate so
the delay table stays correct; a conversion takes 32·`SCLK_HALF`+1 cycles and
must fit in 2·`DIV_HALF`.

## Where this departs from the original design

Following the original: the chain and its widths (12-bit data, 32-bit stream,
12-bit frame-length input, 32-bit selection word of which 4 bits are used),
3 channels, 16 beams, one delay-sum block per beam with its own delay ROM and
delay lines, the divide-by-50 toggle, the 500 kS/s rate, the serializer's
frame and idle-cycle behaviour without `tready`, a 16-tap 20 kHz lowpass and a
64-point FFT with 12-bit input and output.

This design's own choices:

* one 50 MHz clock with clock enables (the original text is inconsistent about
  the divider's input and output rates; 500 kS/s was kept);
* the bearing grid (12° steps, end-fire included) and the sign convention of
  the delays;
* normalisation by division by 3 (the original says only that the sum is
  normalised back to 12 bits);
* mid-scale output of unprimed delay lines;
* the ADC controller, delay line, FIR and FFT are written here from their
  function; the original used vendor or generated cores for these, so their
  internal timing differs; in particular the FIR coefficients and the FFT's
  scaling (X[m]/64) and rounding are not the original's;
* the FFT converts offset-binary samples to signed ones before transforming.

Not included: the processor, the register cores, the firmware and its
NMEA-0183 output, the PC display, the microphones and preamplifiers, and the
ADC chips (a behavioural model is in `tb/`). The LOFAR window, magnitude and
normalisation steps and the DEMON (envelope) analysis are described as
background in the original but are not part of its implemented hardware, and
are not built here; the FFT bins are complex, and the magnitude is left to
software.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sonar_pkg.sv tb/tb_sonar_top.sv --top-module tb_sonar_top
./obj_dir/Vtb_sonar_top
```

Replace `tb_sonar_top` by any other testbench. What they check:

| testbench | checks |
|---|---|
| `tb_clk_div` | half period 50, tick period 100, tick on the rising edge |
| `tb_adc_ctrl` | samples from three AD7476 models, 65-cycle latency, 16 SCLK periods, SCLK rate, start ignored while busy; a 16-channel controller (inputs near mid-scale) alongside |
| `tb_delay_rom` | all 48 table entries against hand-computed values |
| `tb_delay_fifo` | every output against a history, delays 0..2047 changed on the fly, mid-scale while priming |
| `tb_sum_norm` | mean of three, corner values |
| `tb_delay_sum_angle` | beam 3 against a reference model; a plane wave from that bearing is reproduced exactly |
| `tb_beam_mux` | selection by the low 4 bits only |
| `tb_axi_serializer` | frames of 16, 5 and 20 words, `tlast`, idle cycle, reset mid-frame |
| `tb_fir_lowpass` | impulse response = coefficients, random input against a model, DC gain, stopband |
| `tb_fft64` | bins against a direct DFT (±3 LSB), 194-cycle latency, overrun on back-to-back frames |
| `tb_sonar_top` | whole design at its default size: a 1 kHz plane wave from bearing 5 through three ADC models; beam 5 equals the source, every stream word, BTR peak at bearing 5, bearing switch, every FFT frame against a DFT, 100-cycle sample period |
| `tb_sonar_air_test` | whole design, 1 kHz tone from 80° (off the bearing grid, fractional sensor offsets): BTR energy of all 16 bearings against the theoretical array response |

`tb_sonar_top` runs the full-size design (2000 samples, 4 ms of signal) in
about a minute; `tb_sonar_air_test` (3200 samples) takes somewhat longer. `tb/ad7476_model.sv` is a behavioural model of the converter
used by the ADC and top-level testbenches.
