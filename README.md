# Dual-band GNSS receiver accelerators for an FPGA + processor SoC

A software GNSS receiver running on an embedded ARM processor cannot keep up with the raw
sample stream: at 12.5 million complex samples per second and 48 satellites tracked at once,
correlating every sample against every local code replica is far beyond a couple of
embedded cores. This design moves exactly that sample-rate work into programmable logic and
leaves everything that runs at the millisecond rate (loop filters, bit synchronisation,
navigation data, observables, the position fix) in software.

The logic contains:

* one **acquisition accelerator** that searches for a satellite over all code phases at once
  (FFT-based circular correlation) and over a list of Doppler bins without software help;
* **48 tracking accelerators** (multicorrelators), 12 per signal: GPS L1 C/A, Galileo E1,
  GPS L5 and Galileo E5;
* per frequency band a **downsampler**, an **A/D-or-DMA source switch** and a large
  **main FIFO**, plus a third downsampler in front of the acquisition;
* an **AXI4-Lite register port** and one interrupt line per accelerator.

Software configures an accelerator through registers, starts it, and is interrupted when the
result is ready. The central idea is the flow control between the tracking channels and the
software that drives them, described below.

The top module is `gnss_pl_top` (`rtl/gnss_pl_top.sv`); shared types, register indices and
CORDIC constants are in `rtl/gnss_pkg.sv`.

## Sample path

```
             band 0: GPS L1 C/A + Galileo E1                band 1: GPS L5 + Galileo E5
 A/D (12 b) -> downsampler -> switch <- DMA       A/D (12 b) -> downsampler -> switch <- DMA
                                |                                                |
                           main FIFO 0                                       main FIFO 1
                 +--------------+-------------+                      +-----------+---------+
          12 x L1 C/A     12 x E1      downsampler -> acquisition <- |    12 x L5     12 x E5
```

* Samples inside the logic are 8-bit complex words, 4-bit I and 4-bit Q (`sample_t`).
* `downsampler` averages 2^k A/D samples (boxcar), shifts right by k plus a programmable
  requantisation shift and saturates to 4 bits. k is a register per band (`GLB_DECIM`), and
  a separate one for the acquisition path (`GLB_ACQ_DECIM`).
* `sample_source_switch` selects the live A/D stream or a DMA stream of recorded samples per
  band (`GLB_SRC_SEL`). The DMA stream is paused when the band is full; a live A/D sample
  that finds the FIFO full is lost and sets a sticky overflow flag (`GLB_OVERFLOW`).
* `sample_fifo` is a first-word-fall-through block-RAM FIFO. It is used for the two main
  FIFOs (65536 samples each by default) and for every tracking channel's input buffer
  (16384 samples by default).

## Flow control: why channels may stall the whole band

Tracking must not lose samples, yet software needs time between two integrations to read the
correlator results, run its loops and write the new NCO settings. Each channel therefore
runs a four-phase cycle:

1. **configure** – software writes the integration length, carrier and code NCO steps and,
   optionally, new phases, then writes start;
2. **get samples** – the channel takes one sample per clock from its input buffer through the
   carrier wipe-off and into its correlators;
3. **process** – the pipeline drains (LO_ITER + 5 clocks);
4. **results** – accumulators are frozen, `irq` is raised, and the channel waits for the next
   configure/start.

While a channel waits, it takes nothing from its input buffer, which keeps filling from the
band. The main FIFO of a band releases a sample only when **every** enabled channel of that
band can accept it, so a single late channel whose buffer is full holds back all channels of
its band and, behind them, the main FIFO and the DMA. A channel that is not enabled drops
samples and never holds anything back. At a 150 MHz clock and 12.5 Msps a channel needs only
one clock in twelve for its own work, so it can spend over 90 % of the time waiting for
software and still keep up on average, provided its buffer spans the software's jitter.

The acquisition accelerator only watches samples leave main FIFO 0 (after its own
downsampler) or main FIFO 1, and never stalls them.

## Tracking channel (`trk_channel`)

* `doppler_wipeoff`: a 32-bit carrier NCO drives a pipelined CORDIC (`cordic_rotator`) that
  produces cos/sin; the sample is multiplied by exp(-j·phase). Output is 8+8 bits carrying
  two extra fractional bits. Latency LO_ITER + 2 clocks.
* `correlator` (N_PILOT + N_DATA of them): each holds its own code memory (one bit per chip or
  BOC half-chip, +1 for 0 and −1 for 1), a code NCO (integer chip index + 32-bit fraction,
  wrapping at the programmed code length) that resamples the code on the fly, and a complex
  integrate-and-dump accumulator (32 bits). The spacing between early, prompt and late
  replicas is set by software through each correlator's initial code phase. A code write
  goes to all pilot memories at once, or (CODE_WADR bit 31 set) to the data memory.
* Correlator counts in the top: GPS L1 C/A 3 (E, P, L); Galileo E1 5 pilot (VE, E, P, L, VL)
  plus 1 data; GPS L5 and Galileo E5 3 pilot plus 1 data. Code memories: 1023, 8184 (E1-B
  half-chips), 10230 and 10230 entries.
* Throughput: one sample per clock while getting samples.

## Acquisition (`acquisition`, `fft_engine`)

For a capture of NSAMP samples (up to N = 16384, i.e. 1 ms at 12.5 Msps), and for each
Doppler bin d = 0 .. NUM_DOP−1 with carrier step DOP_MIN + d·DOP_STEP:

1. wipe the carrier off the capture and write it, zero-padded to N, into the FFT memory;
2. forward FFT (decimation in frequency, natural order in, bit-reversed order out, no
   scaling);
3. multiply every bin by the conjugate of the stored code spectrum, read at the bit-reversed
   index, and shift right by PROD_SH;
4. inverse FFT (decimation in time, bit-reversed in, natural out, ×1/2 per stage);
5. scan |z|² over code phases 0 .. NSAMP−1 and keep the largest peak with its code phase and
   Doppler.

At the end the peak is compared with a 64-bit threshold, the present flag is set if it is
exceeded, the input power Σ(I²+Q²) is reported for normalisation, and `irq` is raised. The
code spectrum (16-bit real and imaginary) is computed and loaded by software: the FFT of the
resampled, zero-padded local code, not its conjugate.

`fft_engine` is one radix-2 in-place engine used in both directions. It issues one
butterfly every two clocks, reading in even and writing in odd clocks so that the two ports
of the block RAM never collide. Twiddles come from a CORDIC that rotates a constant vector, so no
twiddle table is stored. Per transform it needs about N·log2(N) + log2(N)·(ITER+4) clocks
(≈ 230 k clocks for N = 16384, 1.5 ms at 150 MHz); a Doppler bin therefore takes
roughly 3 ms.

## Register map

Byte address bits [7:2] select a register, bits [13:8] a window (slot):

| slot | contents |
|------|----------|
| 0 | global: SRC_SEL, DECIM, ACQ_DECIM, REQUANT, OVERFLOW (write 1 to clear), LEVEL0, LEVEL1 |
| 1 | acquisition: CTRL, STATUS, NSAMP, DOP_MIN, DOP_STEP, NUM_DOP, PROD_SH, THR_LO/HI, BAND, CF_WADR, CF_WDAT, results at 16..22 |
| 2 + k | tracking channel k: CTRL (b0 start, b1 enable, b2 load phases), STATUS, NSAMPLES, CARR_PH, CARR_STEP, CODE_STEP, CODE_LEN, CODE_WADR (b31 = data memory), CODE_WDAT, SAMPLE_CNT, NCORR, code phases at 16 + 2c, results at 32 + 2c |

Channels k = 0..11 are GPS L1 C/A, 12..23 Galileo E1, 24..35 GPS L5, 36..47 Galileo E5.
`irq[0]` is the acquisition and `irq[1+k]` tracking channel k. All register indices are
named in `gnss_pkg`. The AXI slave ignores byte strobes and always answers OKAY.

## What is this design's own choice

The structure (block list, counts, the back-pressure rule, the non-blocking acquisition, the
FFT-based search with a Doppler sweep in hardware, CORDIC local oscillators, resamplers in
each correlator, the A/D/DMA switch) follows the receiver this RTL implements. The following
are not specified there and were chosen here:

* 4+4-bit sample format, 12-bit A/D words, boxcar downsampling with power-of-two ratios;
* FIFO and buffer depths (65536 and 16384 samples) and the FFT size 16384;
* all word widths: CORDIC 12–16 bits, 32-bit accumulators, 24-bit FFT data, 16-bit code
  spectrum;
* the register layout, the address map and AXI4-Lite as the bus subset;
* the detection statistic (raw peak against a software threshold, power reported separately);
* Galileo E1 BOC handled by storing half-chips in the code memory.

The default parameters were not mapped to an FPGA; memory at defaults is about 10.4 Mbit of
block RAM (the main FIFOs, 48 input buffers, the acquisition capture, FFT and code-spectrum
memories, and the code memories).

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Wno-fatal rtl/gnss_pkg.sv rtl/*.sv tb/tb_fft_engine.sv \
          --top-module tb_fft_engine -o sim && ./obj_dir/sim
```

* `tb_gnss_pl_top` runs the whole top at reduced size (1 channel per signal, 256-point FFT,
  small FIFOs): an acquisition on band 1 over 5 Doppler bins, three tracking integrations, a band stall caused
  by a waiting channel, a DMA pause and release, downsampling, and the interrupts.
* `tb_gnss_pl_top_full` runs the top at its default size (48 channels, 16384-point FFT): one
  GPS L1 C/A acquisition from a DMA stream (12500 samples, 2 Doppler bins, about
  1.02 million clocks) followed by one 1 ms tracking integration (12500 samples in 12523
  clocks). It takes well under a minute of simulation.
* `tb_galileo_e1_acquisition` runs the default-size top on a Galileo E1 signal whose 4 ms
  code is brought to 12500 samples by the acquisition downsampler (ratio 4).
* `tb_galileo_e1_tracking` and `tb_gps_l5_tracking` run one default-size channel of each
  kind (5 + 1 and 3 + 1 correlators, 8184- and 10230-entry codes) over one code period and
  check the shape of the early / prompt / late outputs against the code autocorrelation.
* The block testbenches use small sizes where the block is parameterised (e.g. a 64-point
  FFT and a 256-point acquisition).
