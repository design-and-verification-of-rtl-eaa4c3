# Streaming range-Doppler processing and peak detection for FMCW radar

An FMCW radar frame is a stack of chirps. A range FFT over the samples of one
chirp turns beat frequency into distance. A Doppler FFT across the chirps, for
each range bin, turns the chirp-to-chirp phase rotation into radial velocity.
The usual next step is to store the whole range-Doppler map and then search it
in two dimensions for targets. This design skips that step. The Doppler FFT
output is squared, tagged with its own range and Doppler index, and scanned as
one linear stream. Each sample goes through a threshold test and a
three-sample local-maximum test, and the surviving peaks wait in a small FIFO
with their coordinates attached. Nothing downstream of the corner-turn memory
stores a frame, and the detector never stalls.

The RTL follows the architecture of the FPGA design published as *Design and
Verification of FPGA-based Range Processing, Peak Detection and Doppler
Processing for FMCW-RADAR*: a Zynq-7020 implementation with vendor FFT cores
(1024-point range, 64-point Doppler), a corner-turn RAM, a two-stage magnitude
unit and a streaming peak-detection accelerator. Where that description leaves
a detail open, the choice made here is stated below and in each file's header.

## Data path

```
 ext_sample_* ─┐
               ├─ src_sel ─ fft_config_ctrl ─▶ [range FFT core, 1024 pt]
 sample_generator┘                                   │ 32-bit {im,re}, 1/clk
                                                     ▼
                                    range_fft_buffer (65536 x 32 corner turn)
                                                     │ per range bin: chirps 0..63, tlast
                          fft_config_ctrl ─▶ [Doppler FFT core, 64 pt]
                                                     │
                                 magnitude_sq (Re²+Im², 2 stages)
                                                     │
                           index_tagger ({mag, range, Doppler}, AXI4-Stream)
                                                     │
   peak_detector_axis ─ peak_detector_core: pd_threshold_reg ─ pd_local_max ─ target_fifo
                                                     │
                                      fifo_rd_en / fifo_dout[47:0]
```

Everything moves at one sample per clock with AXI4-Stream style valid/ready
and `last` markers. `radar_top` wires the whole chain. The two FFT cores are
vendor IP and are not part of the RTL. Their configuration and data channels
appear as `rfft_*` and `dfft_*` ports of `radar_top`, so the cores sit next to
it in a system. The testbenches plug in a behavioural FFT model,
`tb/xfft_model.sv`, in their place.

Sample word format everywhere: `{imag[31:16], real[15:0]}`, signed 16-bit
fixed point. Magnitudes are unsigned 32-bit `Re² + Im²`. No square root is
taken, because it does not change which bin is larger. A peak is 48 bits,
`{magnitude[47:16], range[15:6], Doppler[5:0]}`. For example, a magnitude of
200000 at range bin 12 and Doppler bin 0 reads `48'h00030d400300`.

## The corner turn (`range_fft_buffer`)

The range FFT produces data chirp by chirp. The Doppler FFT needs it range bin
by range bin. The buffer bridges the two with one frame of RAM, 1024 × 64
words of 32 bits (2 Mbit, about 64 block RAMs):

* **Write.** Every valid range-FFT output goes to the next address of a plain
  counter, so address = `chirp·1024 + range_bin`. The range FFT's `tlast` is
  checked against the counter. A mismatch sets the sticky `wr_align_error`.
* **Switch.** After the 65536th write the buffer changes to read-out. It
  holds only one frame, so it cannot accept writes again until the read-out
  ends.
* **Read.** Addresses `chirp·1024 + r`, with the chirp counter running
  fastest. For range bin 0 that gives chirps 0…63, then the same for range bin
  1, and so on. `tlast` marks every 64th beat, which closes one Doppler FFT
  frame. The RAM's registered read port doubles as the stream's output
  register. It advances only when the consumer takes a beat or the register
  is empty, so back-pressure from the Doppler FFT is honoured without a skid
  buffer. With a consumer that is always ready, read-out takes 65537 cycles.
* **Back to writing.** When the last beat is taken, `frame_done` pulses.
  Any range-FFT output that arrives during read-out is dropped and sets the
  sticky `overflow` (`buf_overflow` at the top).

**Frame protocol.** The range FFT core has no output back-pressure, so the
system must not start the next frame until `buf_frame_done` has pulsed. The
built-in generator makes one frame per `gen_start` pulse, which makes this
easy. At one sample per clock, a frame takes 65536 cycles to enter and 65537
to leave, so the average input rate is half the clock. A second frame of
storage (ping-pong) would remove that limit. It is not built, because the
reference implementation's memory use (67 of 140 BRAM36) matches a single
frame.

## Peak detection accelerator (`peak_detector_axis`, `peak_detector_core`)

`peak_detector_axis` is the packaged accelerator. It is an AXI4-Stream slave.
`s_axis_tready` is held high once out of reset. Each beat is registered, its
three fields are unpacked, and they go to the core. `s_axis_tlast` (end of a
range-Doppler frame) increments `frames_seen`.

The core has three stages. Range and Doppler indices travel with every
magnitude through all of them.

1. **Threshold register** (`pd_threshold_reg`). `threshold_val` is captured
   on `threshold_load` and applies from the next cycle. It can be rewritten at
   any time. Every sample is compared, `mag > threshold`, and passed on with an
   `above` flag. Samples below the threshold are not removed, because the next
   stage needs them as neighbours.
2. **Local maximum** (`pd_local_max`). A window holds the previous, current
   and next samples of the stream. The current sample is a peak when it is
   above the threshold and strictly greater than both neighbours. The window
   follows stream order. Coming out of the Doppler FFT, the stream is
   range-major, so the neighbours are the adjacent Doppler bins of the same
   range bin. At the edge of a range bin, the neighbour is the last or first
   bin of the next range bin. Two targets in the same range bin and in adjacent
   Doppler bins therefore give a single detection, at the stronger one. The
   window is not flushed at the end of a frame: the last sample is judged when
   the next frame's first sample arrives. The first sample after reset is
   compared with a zero "previous".
3. **Output FIFO** (`target_fifo`). It holds 16 peaks (`FIFO_DEPTH`). The
   read port is registered: `fifo_dout` updates the cycle after `fifo_rd_en`
   is accepted. A peak that arrives while the FIFO is full is dropped and sets
   the sticky `fifo_overflow`, so the detector never stalls.

Latency: a peak is written into the FIFO, and `fifo_empty` falls, 4 clock
edges after the sample that follows it enters the core. It is 5 edges when
counted from the AXI4-Stream input.

The threshold is fixed, or programmable at run time, but not adaptive. No CFAR
is built.

## Magnitude and indices

`magnitude_sq` squares the real and imaginary parts into two 32-bit registers
in stage 1 and adds them in stage 2. The result is one per clock after 2
cycles of latency, with `valid` and `last` delayed to match. The sum cannot
overflow: its largest value is 2·32768² = 2³¹.

`index_tagger` counts the Doppler index on every valid sample and restarts it
after `last`. It advances the range index once per Doppler burst and wraps it
after 1024 bursts. It sets `tlast` on the last beat of the frame. A `last`
that arrives at a Doppler index other than 63 sets the sticky
`tag_tlast_error` and restarts the count. Doppler bins come out in natural FFT
order, 0…63, without a shift to centre zero velocity.

## FFT configuration (`fft_config_ctrl`)

One instance serves each FFT core. After reset it offers the 16-bit
configuration word `0x0001` (bit 0 = forward transform) on the core's config
channel until the core accepts it, then sets `config_done`. Until then, no
sample valid reaches the core and no ready reaches the source. It also drives
the core's active-low `aresetn` = `!rst`. The reference design uses the same
configuration value for the range core. The Doppler core's value is not
known, so the same word is used.

## Sample generator (`sample_generator`)

This is a test source, synthesizable, for running the chain without an ADC.
Each target has a 32-bit phase accumulator:

* Within a chirp, the phase advances by `k_r / 1024` of a turn per sample.
  This gives a beat tone on range bin `k_r`.
* At each new chirp, the phase restarts from a per-chirp phase that advances
  by `k_d / 64` of a turn per chirp. This gives Doppler bin `k_d`.

The top 10 phase bits address a cosine table. The table holds
`round(32767·cos(2πi/1024))` and is computed at elaboration time. The sine is
read a quarter turn earlier in the same table. The output is the saturated
sum of `amplitude·e^{jφ}` over the targets. Targets, bins and amplitudes are
parameters. The defaults are two targets: (range 100, Doppler 12, amplitude
8000) and (285, 40, 6000). `src_sel = 0` selects the external `ext_sample_*`
input instead.

## Status outputs of `radar_top`

| signal | meaning |
|---|---|
| `rfft_config_done`, `dfft_config_done` | configuration word accepted by the core |
| `buf_wr_ready` | buffer is accepting a frame |
| `buf_frame_done` | one-cycle pulse: read-out finished, next frame may start |
| `buf_overflow` | sticky: range-FFT output arrived during read-out and was dropped |
| `buf_align_error` | sticky: range-FFT `tlast` not on bin 1023 |
| `tag_tlast_error` | sticky: Doppler-FFT `tlast` not on bin 63 |
| `fifo_overflow` | sticky: a peak was dropped because the FIFO was full |
| `frames_seen` | frames that reached the detector |

## Parameters

| parameter | default | where |
|---|---|---|
| `RANGE_BINS` | 1024 | top, buffer, tagger, generator |
| `NUM_CHIRPS` | 64 | top, buffer, tagger, generator |
| `FIFO_DEPTH` | 16 (power of two) | top, accelerator |
| `NUM_TARGETS`, `TGT_RANGE_BIN`, `TGT_DOPP_BIN`, `TGT_AMP` | 2, {100,285}, {12,40}, {8000,6000} | top, generator |
| `CONFIG_WORD` | 16'h0001 | fft_config_ctrl |

Index widths are fixed at 10 bits (range) and 6 bits (Doppler) in
`rtl/radar_pkg.sv`. Smaller `RANGE_BINS` and `NUM_CHIRPS` work without
changes. Larger ones need wider fields in the package.

## Timing and throughput

At the default size, in simulation with the behavioural FFT cores, 132171
cycles pass from the first sample of a frame to the last sample entering the
detector: 65536 cycles of input, 65537 of corner-turn read-out, and the
model's FFT latencies. That is 1.32 ms at 100 MHz, which is the clock the
reference implementation was timed at, or 0.53 ms at the 250 MHz the FFT cores
were configured for. The reference implementation reports about 1.1 ms per
64-chirp frame and more than 200 MSamples/s. Both figures depend on the real
cores' latencies and on the implementation clock, and neither can be confirmed
from RTL simulation. Within a frame the chain takes one sample per clock.
Averaged over frames it takes one sample every two clocks, because of the
single-frame buffer.

## How far to trust it, and departures from the reference design

Built as described: the chain and its order, the 1024 × 64 frame, 16-bit
complex samples, sequential write addressing with per-range-bin read-out, the
two-stage `Re²+Im²` unit, the programmable threshold with strict `>`, the
prev/curr/next local-maximum rule, the `{magnitude, range, Doppler}` FIFO
word, the accelerator's port widths, and the configuration registers in front
of the range FFT.

Choices of this design, where the description is silent:

* Reset is synchronous and active high.
* The FIFO is 16 deep, drops a peak when full, and has a registered read port.
* There is one frame of buffer storage, read-out starts only once the frame is
  complete, and writes during read-out are dropped and flagged.
* The local-maximum neighbours follow stream order (adjacent Doppler bins),
  not adjacent range bins at a fixed Doppler bin.
* Samples below the threshold are kept as neighbours.
* The AXI4-Stream `tdata` layout matches the FIFO word.
* Data is gated until the FFT configuration is done.
* Index counting happens after the magnitude stage.
* The source multiplexer, the generator's target set and the status flags are
  additions.

Not built:

* The vendor FFT cores, including their debug event outputs. These are
  external.
* Windowing. The reference design also leaves it out.
* CFAR thresholding.
* Any buffering of the Doppler FFT output. The design's premise is that no
  range-Doppler map is stored.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog:

| testbench | what it checks |
|---|---|
| `tb_magnitude_sq` | random and extreme samples, 2-cycle latency, valid/last alignment |
| `tb_pd_threshold_reg` | strict compare against the previously loaded threshold, reloads |
| `tb_pd_local_max` | random streams with ties and gaps against a reference list; exact latency |
| `tb_target_fifo` | queue model; full, empty, count, overflow drop |
| `tb_peak_detector_core` | a directed stream (one peak, word `00030d400300`, 4-cycle latency), random streams against a reference model, overflow |
| `tb_peak_detector_axis` | no stall, peaks with coordinates across two frames, frame count, 5-cycle latency |
| `tb_index_tagger` | indices and frame `tlast`; an early `last` sets the error flag and resynchronises |
| `tb_range_fft_buffer` | transposed order and `tlast` under random back-pressure, stall stability, overflow, full-rate read-out time, `tlast` alignment check |
| `tb_fft_config_ctrl` | one handshake, the word `0x0001`, data gating, reconfiguration after reset |
| `tb_sample_generator` | samples against floating-point `Σ A·e^{jφ}` (±3 LSB), chirp/frame markers, one frame per start |
| `tb_radar_top` | the whole chain at 64 × 16, FIFO depth 2, four targets: detections with indices and magnitudes; a weaker neighbour rejected by the local-maximum rule; FIFO overflow; a threshold reload; buffer overflow from the external input; read-out time. Every mechanism is counted and must occur |
| `tb_radar_snr` | the whole chain at 128 × 32 fed through the external input with three targets in Gaussian noise of σ = 500, 2000 and 4000 LSB (per-sample SNR +3, −9 and −15 dB for the weakest target): every target found at its exact bins with magnitude near amplitude², and no false detections at threshold 2·10⁵ |
| `tb_radar_top_full` | one frame at the default size, 1024 × 64: both default targets found with exact indices and magnitude within 3 % of amplitude², read-out time, no flags |

Run one with Verilator (5.x) from the repository root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/radar_pkg.sv tb/tb_radar_top_full.sv --top-module tb_radar_top_full
./obj_dir/Vtb_radar_top_full
```

The full-size run takes a few seconds. The behavioural FFT model computes a
direct DFT scaled by 1/N, which is enough to check bin positions and
magnitudes. It does not reproduce the vendor core's fixed-point scaling or its
latency.
