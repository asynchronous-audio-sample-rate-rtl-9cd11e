# Asynchronous audio sample rate converter (ASRC)

This RTL converts a stream of time-division-multiplexed audio channels from one sample rate to
another when the two rates come from unrelated clocks (for example 44.1 kHz from one crystal to
48 kHz from another). The converter measures the ratio of the two rates, then keeps following it.
For every output frame it computes each channel with a windowed-sinc interpolation filter, centred
on the exact output instant between two input samples. All the arithmetic runs in a third, fast
system clock domain (100 MHz is the reference point). The filter is evaluated on the fly from a
coefficient table, so the conversion ratio can be any real number from about 1:24 to 24:1.

The core (`asrc`) has a register-controlled wrapper around it (`asrc_wrapper`, the top). The
wrapper adds clock selection, word clock dividers, input and output buffers and a register bank
for a processor bus.

## Clock domains

| domain | clock | what lives there |
|---|---|---|
| input audio | `audio_in_mclk` | writes into the sample memory, input word clock `audio_in_wclk` |
| system | `clk` | ratio estimator, resampler, reading the sample memory, the register bank |
| output audio | `audio_out_mclk` | reading the output buffer, output word clock `audio_out_wclk` |

Three mechanisms cross between the domains:

- The word clocks enter the system domain through two-register synchronizers (`asrc_sync2`).
  The rising edge of the output word clock is the `start` of a new output frame.
- Samples cross through the true dual-port sample memory (`asrc_data_mem`).
- Results leave through a Gray-pointer asynchronous FIFO (`asrc_async_fifo`).

`rst` belongs to the system domain. It is synchronized into the two audio domains.

## Data path at a glance

```
audio_in ─► data memory (1024 x 24, circular) ─► resampler ─► output FIFO ─► audio_out
            write: audio_in_mclk                 │  address generator
            read : clk                           │  coefficient ROM + interpolation
                                                 │  multiply-accumulate
ratio estimator (period meters, serial mul/div, frequency tracker) ──► rho, 1/rho
```

### Sample memory
The memory is written frame by frame: channel k of a frame always goes to `base + k`. The frame
base advances by Nc at each input word clock edge. The address wraps, so the memory is a ring.
The write counter is held at zero until the converter is synchronized. From then on, the reads
trail the writes by half the ring, 512 samples. Nc must be a power of two; `error[0]` flags any
other value.

### Ratio estimator (`asrc_ratio_estimator`)
The estimator works in two phases.

1. **Measurement.** For `sync_cycles` system clock cycles, two period meters
   (`asrc_period_meter`) add up the length of every input and output word clock period, and count
   the periods. The first partial period and the first whole period after a reset are dropped.
   A 13-state controller then computes

       rho   = (Tin_sum * Nout) / (Nin * Tout_sum)   (= fs_out / fs_in)
       1/rho = (Nin * Tout_sum) / (Tin_sum * Nout)

   It uses one serial shift-add multiplier (32 x 32) and one serial shift-subtract divider
   (94 bits) for both results. Both ratios are unsigned Q5.30 (35 bits). `sync` then rises and
   conversion starts.
2. **Frequency tracking.** An input phase adds 1.0 per input frame. An output phase adds the
   current 1/rho per output frame. Their difference, the delay, is averaged over every word clock
   event in a window of 4096 output periods (`N_OUT_LOG2 = 12`). The change of that average
   between two windows is the drift of 1/rho over the window. The tracker divides it by the
   window length and by 4 more (`ATT_SHIFT = 2`), then adds it to 1/rho. The extra division
   keeps each correction small, because a large step would be audible. The first window after
   `sync` only gives a reference. The tracker follows frequency, not phase: after a reset and a
   new synchronization the group delay can differ slightly.

`error[1]` is sticky. It rises if the delay, times Nc, reaches one eighth of the memory. That
means the reads are coming close to the writes.

### Resampler (`asrc_resampler`)
On each `start` while synchronized, the address generator (`asrc_addr_gen`) advances the output
time accumulator `y` by 1/rho (Q.30, in input frames). Let frac be the fractional part of `y`.
The output instant then lies frac after input frame floor(y), and 1 - frac before frame
floor(y)+1.

- The filter is scaled by `h_step = min(0.875, rho)`. Upsampling keeps the cutoff fixed at
  0.875 of the input Nyquist band. Downsampling stretches the filter by 1/rho, so that it also
  rejects aliases.
- For each channel the filter is walked in two sides:
  - the later side starts at frame floor(y)+1 with coefficient position `(1-frac)*h_step`;
  - the earlier side starts at frame floor(y) with `frac*h_step`;
  - each step moves one frame (Nc samples) away and adds `h_step` to the coefficient position,
    until it passes the end of the table.
- This gives `N_coeffs = 32/min(0.875, rho)` products per channel. That is 37 for upsampling and
  768 for 192 kHz to 8 kHz. The address generator needs `(N_coeffs + 10) * Nc` system clock
  cycles per output frame, and the testbench checks this bound.
- The coefficient position is Q4.30. Its top 14 bits address the ROM; the low 20 bits are the
  interpolation fraction.

### Coefficient memory (`asrc_coeff_mem`)
The ROM holds half of a symmetric Kaiser-windowed sinc:

- 32 zero crossings in total; the ROM holds one side (16 zero crossings), 1024 entries per
  zero crossing;
- 16384 entries of 24 bits;
- Kaiser beta = 14.4;
- `h(t) = sinc(t) * I0(beta*sqrt(1-(t/16)^2)) / I0(beta)`, for `t = i/1024`.

The table is computed by the RTL itself, in an initial block with real arithmetic, so there is
no data file. A coefficient between two entries is interpolated linearly:
`h[i] + (h[i+1]-h[i]) * delta`. The result is signed Q1.33. The latency is two cycles.

### MACC (`asrc_macc`)
The product of sample and coefficient is registered. The accumulator (64 bits) is loaded by the
first product of a channel and accumulates the others. After the last product, the sum is
multiplied by `h_step` to restore unit pass-band gain, then rounded and saturated to 24 bits.
Only then does `audio_out` change, so it never shows a partial sum. One pulse per channel pushes
it into the output FIFO. A full FIFO drops the sample and sets the sticky `error[2]`.

## Core interface (`asrc`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | system clock, synchronous reset |
| nc | in | NC_W | channels per frame, power of two |
| sync_cycles | in | 32 | measurement time in clk cycles (2e6 = 20 ms at 100 MHz) |
| sync | out | 1 | ratio known, converting |
| conv_ratio, inv_conv_ratio | out | RO_W | rho and tracked 1/rho, Q5.30 |
| audio_in_mclk, audio_in_wclk | in | 1 | input master clock and word clock |
| audio_in, audio_in_valid | in | SAMP_W, 1 | one sample per mclk cycle while valid; the channels of a frame follow the word clock's rising edge |
| audio_in_ready | out | 1 | writes reach the memory (sync seen in the input domain) |
| audio_out_mclk, audio_out_wclk | in | 1 | output master clock and word clock |
| audio_out_valid | in | 1 | read request of the output FIFO |
| audio_out | out | SAMP_W | sample read, valid the mclk cycle after the request |
| audio_out_ready, audio_out_empty | out | 1 | FIFO holds a sample / is empty |
| error | out | 3 | [2] output overflow, [1] pointer distance, [0] bad Nc |

Parameters: `SAMP_W = 24`, `NC_W = 8`, `RO_W = 35`, `SAMP_BUF_W = 10` (1024-sample memory),
`OUT_BUF_W = 8` (256-word output FIFO), `N_OUT_LOG2 = 12`.

## Wrapper (`asrc_wrapper`, the top)

- **Register bank.** Byte addresses on a simple bus: `iob_valid/addr/wdata/wstrb`, with
  `iob_ready/rdata` one cycle later. A write has a non-zero strobe.

  | address | register |
  |---|---|
  | 0x00 | NC |
  | 0x04 | SOFT_RESET (holds the core in reset while 1) |
  | 0x08 | DATA_IN |
  | 0x0c | WR (1 pushes DATA_IN) |
  | 0x10 | RD (1 pops a sample) |
  | 0x14 | DATA_OUT |
  | 0x18 | ERROR |
  | 0x1c, 0x20 | input and output clock select |
  | 0x24, 0x28 | input and output divider |
  | 0x2c | SYNC_CYCLES |
  | 0x30 | SYNC |
  | 0x34-0x40 | rho and 1/rho, low 32 bits and high 3 bits |
  | 0x44-0x58 | full, empty and level of the input and output buffers |
  | 0x5c-0x78 | DMA address, length, run (pulse) and ready |
  | 0x7c | OUTFIFO_SWITCH (lets samples leave the core) |
  | 0x80 | PTR_DIFF_SWITCH (lets samples enter the core) |

  Reset values: NC = 1, output clock select = 1, dividers = 500 and 1000, both switches on.
- **Clock selector and dividers.** Each master clock is `audio_mclk_0` or `audio_mclk_1`, picked
  with a plain multiplexer. Change the selection only while SOFT_RESET is set. `asrc_clk_div`
  divides a master clock by `div+1` into a word clock that is high for the first `div/2+1`
  cycles.
- **Buffers.** The input buffer (128 words) is written from the bus or the DMA port.
  `asrc_write_ctrl` restarts a counter on every input word clock edge and pops Nc samples into
  the core. The output buffer (128 words) is filled from the core whenever it holds a sample.
  Buffer levels read as 8-bit values, so a full buffer reads 128.
- **DMA.** The DMA engine is external. Its registers drive `indma_*` and `outdma_*`, and its data
  enters on `dma_in_wr/dma_in_data` and leaves on `dma_out_rd/dma_out_data`.

Configuration registers go into the audio domains without synchronizers. Set them while the core
is in reset.

## How far it can be trusted; departures

The points below are this design's own choices, or places where it departs from the reference
design:

- **Pipeline.** The resampler pipeline is shorter than the reference arrangement's 9 registers:
  registered addresses, 2 stages in the coefficient memory and 2 in the MACC, with alignment
  registers for data and flags. Rate and results are unaffected.
- **Choices where the reference design gives none:**
  - the correction attenuation (÷4 after ÷4096);
  - the pointer-distance threshold;
  - the frame-aligned write counter;
  - the 512-sample read offset;
  - rounding and saturation of the output;
  - the output FIFO depth;
  - the meaning of `audio_in_ready`;
  - the bus handshake and register read-back.
- **Filter sides.** The later side starts at `(1-frac)*h_step` and the earlier side at
  `frac*h_step`. This follows the geometry of the output instant.
- **Channel limit.** Each side of the filter needs `N_coeffs/2 + 1` frames. The reads trail the
  writes by 512 samples, that is 512/Nc frames. So 192 kHz to 8 kHz (768 coefficients) works
  with one channel, but not with two. Two channels at such ratios need a larger memory
  (`SAMP_BUF_W = 11`).
- **ROM initialisation.** The ROM is filled by an initial block with real arithmetic
  (`$sqrt`, `$sin`, a series for I0). Simulators and most FPGA flows accept this. Other targets
  need the same formula turned into a memory image.
- **Quality.** The testbenches check sine purity with the residual
  `y[n+1] + y[n-1] - 2cos(w)y[n]`. They measure 4 to 12 LSB (24-bit) for the test tones, about
  -120 dBFS per sample. This is not a THD+N figure; no FFT is run. The gain is checked from
  -1 down to -120 dBFS: the fitted output amplitude stays within 0.2 LSB of the input at every
  level. The shift in group delay after a reset is not measured.

## Simulation

Everything is plain SystemVerilog-2017; simulation needs Verilator 5 with `--timing`. From the
folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/asrc_pkg.sv tb/tb_asrc_wrapper.sv \
          --top-module tb_asrc_wrapper -Mdir obj && ./obj/Vtb_asrc_wrapper
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a watchdog.

| testbench | what it shows |
|---|---|
| tb_asrc_wrapper | Whole design at default parameters, driven through the registers. Covers register reset values, divider periods, rho and 1/rho, two tracker corrections, clean upsampled and downsampled sines, soft reset and re-sync, overflow, Nc error, pointer error, DMA control. About 5 s. |
| tb_asrc | Core only, at 44132 -> 48003 Hz and 44132 -> 16001 Hz with 91 ns / 42 ns master clocks. Shortened tracker window. Counts every mechanism. |
| tb_asrc_full | Core at default parameters: 20 ms measurement (2e6 cycles), 4096-period window, 44132 -> 48003 Hz, two corrections. About 40 s. |
| tb_asrc_conversions | Core at default parameters through eight conversions from 8000 -> 177242 Hz to 192012 -> 11022 Hz (1 to 2 channels), each after a reset and a 20 ms measurement: checks rho, sine residual and amplitude, filter length per output sample and the error flags. About 50 s. |
| tb_asrc_linearity | Core at default parameters: 1 kHz sine stepped from -1 to -120 dBFS for four conversions; least-squares output amplitude per level, gain (beta) within 1e-3 of 1 and R^2 above 99.99%. About 55 s. |
| tb_asrc_ratio_estimator | rho and 1/rho exact against the clock periods; tracking error below 2e-5. |
| tb_asrc_resampler | Resampler against a real-arithmetic model of the same filter. |
| tb_asrc_addr_gen, tb_asrc_coeff_mem, tb_asrc_macc | Addresses, interpolated coefficients and scaled sums against models; cycle bound per frame. |
| tb_asrc_data_mem, tb_asrc_async_fifo, tb_asrc_sync2 | Memory layout, FIFO order, full, overflow and levels, synchronizer delay. |
| tb_asrc_period_meter, tb_asrc_serial_mul, tb_asrc_serial_div | Measurement, products and quotients against reference arithmetic. |
| tb_asrc_clk_div, tb_asrc_write_ctrl | Word clock period and duty cycle; Nc reads per frame. |

The audio clocks in the wrapper test are fast (20 ns and 22 ns master clocks, about 800 kHz
frames). This keeps the 4096-period tracker window short in simulation. The logic is the same at
audio rates.
