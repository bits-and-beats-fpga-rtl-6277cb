# FPGA DJ: a two-deck mixer in the frequency domain

This design mixes two songs in hardware. A host processor streams the raw samples of two songs
(deck A and deck B) and the DJ's effect settings over an Avalon-MM bus. The FPGA cuts the
stream into frames of 2048 samples. It takes each song's frame into the frequency domain with
an FFT, scales and low-pass filters each song there, adds the two spectra and returns the sum to
the time domain with an inverse FFT. The result is played through the board's audio codec at
48 kHz.

The main idea is to use FPGA parallelism for the transform. A software FFT runs one
butterfly at a time. This design instead has one butterfly unit for every butterfly of the
transform: N/2 per stage and log2(N) stages. A 2048-point transform therefore finishes in 11
clock cycles. The cost of this choice is described under "Resources and limits" below; read it
before targeting a real device.

## Frame life cycle

```
 host ──Avalon──► input RAM pair A ─┐                    ┌─► freq RAM pair A ─┐
                  input RAM pair B ─┼─► register bank ─► FFT ─► freq RAM pair B ─┼─► effects + sum ─► mix RAM pair
                                    │        ▲                               │                        │
                                    │        └────────── (mix, for IFFT) ◄───┴────────────────────────┘
                                    │                    IFFT ─► output RAM pair ─► DAC serialiser ─► codec
 host ◄──Avalon── mix RAM pair (idle bank: spectrum of the last finished frame)
```

1. **Fill.** The host writes N samples for each song into the input RAM bank that the core
   is not using.
2. **Commit.** The host writes the STATUS register. The input banks swap and the core
   (`dj_engine`) starts. From then on BUSY reads 1.
3. **Process.** The core works through one frame in 7·N + 3·log2(N) + 9 cycles (14,378
   cycles for N = 2048, which is 0.29 ms at 50 MHz):
   - It reads song A from its input RAM, one sample per cycle, into an N-entry register bank.
     It starts the FFT, waits 11 cycles and writes the N bins to song A's frequency RAM.
   - It does the same for song B, using the same FFT.
   - It streams bin k of both songs through `effects`, which applies gain and the low-pass
     mask and adds the two. It writes the mixed bin to the mix RAM.
   - It reads the mix back into the register bank, runs the IFFT and writes the real part to
     the output RAM bank that the player is not using.
4. **Hand-over.** The finished frame waits ("pending") until the player (`audio_out`)
   reaches the end of the frame it is playing. The player then switches banks and BUSY
   clears, so the host may commit again. If no frame is waiting, the player outputs silence
   and flags an underrun for every sample until a frame arrives.

One frame of audio lasts 2048 / 48 kHz = 42.7 ms, and the core needs 0.29 ms of it. Throughput
is set by the codec. BUSY, which covers both "core working" and "frame waiting to be played",
is the only flow control the host needs. A commit while BUSY is set is ignored.

Frames are processed independently. They are not windowed and do not overlap. A filter that
cuts a strong component can therefore cause audible steps at frame boundaries.

## The fully parallel FFT (`fft`, `butterfly`)

`fft` is a radix-2 decimation-in-time network:

- The inputs are wired in bit-reversed order. This costs no logic.
- Stage s (s = 0 … log2(N)−1) pairs points 2^s apart. Butterfly j of a group uses twiddle
  W_N^(j·N/2^(s+1)). Each twiddle is a constant, worked out at elaboration time from
  cos/sin and rounded to signed Q1.14 (16 bits).
- Every stage's output is registered. Latency is log2(N) cycles and a new transform can
  enter every cycle. `out_valid` is `in_valid` delayed by log2(N). If the input is held, the
  output stays valid.
- `butterfly` computes x = a + w·b and y = a − w·b. It rounds the product back to the data
  width and saturates to 16 bits.

Scaling is the subtle part. With 16-bit data, an unscaled 2048-point DFT would overflow by
11 bits. The forward instance (`INVERSE = 0`) halves every butterfly output with rounding, so
it computes DFT(x)/N, and a full-scale sine becomes a bin of half its amplitude. The inverse
instance (`INVERSE = 1`) uses conjugate twiddles and does not scale. IFFT(FFT(x)) therefore
returns x, and unity gain through the mixer really is unity.

The price is precision. Each forward bin carries a few LSB of rounding error, and the inverse
adds up N of them. In the tests, the largest error of an output sample was about 40 LSB at
N = 128 and about 120 LSB at N = 512. The error grows roughly with √N, so expect a few
hundred LSB (about 1% of 16-bit full scale) at N = 2048. To improve this, widen `W` inside
the transform.

## Effects and mixing (`effects`)

For every bin k, where `LP(k, c)` is 1 when k < c or k > N − c and 0 otherwise:

```
mix[k] = gain_a · LP(k, cutoff_a) · A[k]  +  gain_b · LP(k, cutoff_b) · B[k]
```

The low-pass filter is an ideal brick wall in the frequency domain. The mirror bins
(k > N − c) are treated like their partners, so the output of a real input stays real. A
cutoff of 0 mutes a song, and any cutoff of N/2 + 1 or more lets every bin through (the reset
value is N). Gain is unsigned Q1.7: 128 is unity and 255 is about 2×. The sum is rounded and
saturated to 16 bits. The unit has one cycle of latency.

## Host interface (`dj_avalon_regs`)

This is a 32-bit Avalon-MM slave with 13 word-address bits and a fixed read latency of one
cycle.

| word address | access | meaning |
|---|---|---|
| `0x0000 + i` | write | sample i of song A, signed 16 bits in `writedata[15:0]` |
| `0x0800 + i` | write | sample i of song B |
| `0x1000 + k` | read  | bin k of the post-effect mixed spectrum of the last finished frame, `{im[15:0], re[15:0]}` |
| `0x1800` | read  | STATUS: bit 0 = BUSY |
| `0x1800` | write | commit the frame just written (ignored while BUSY) |
| `0x1801` / `0x1802` | r/w | gain of song A / B, Q1.7, reset 128 |
| `0x1803` / `0x1804` | r/w | low-pass cutoff bin of song A / B, reset N (filter open) |

The host software should run three loops:

- **Streaming:** wait for BUSY = 0, write N samples per song, commit.
- **Controls:** write the gain and cutoff registers at any time. A change takes effect from
  the next bin the effects unit processes.
- **Display:** read the spectrum window. It always shows the frame finished last, because the
  host reads the mix RAM bank that the core is not writing.

## Codec interface (`codec_config`, `i2c_master`, `audio_out`)

After reset, `codec_config` writes registers R0–R9 of the codec over I2C. It uses device
address 0x34. Each write is three bytes: `0x34`, `{reg[6:0], data[8]}`, `data[7:0]`. A write
that is not acknowledged is repeated. `codec_ready` rises when all ten registers are written.

| reg | value | effect |
|---|---|---|
| R0, R1 | 0x01A | line-in volume |
| R2, R3 | 0x07B | headphone volume |
| R4 | 0x095 | analogue path: DAC selected to the output |
| R5 | 0x006 | digital path: de-emphasis 48 kHz, DAC not muted |
| R6 | 0x020 | power: everything on except the crystal oscillator |
| R7 | 0x049 | format: codec is clock master, 24-bit, left-justified |
| R8 | 0x000 | sampling: normal mode, 256·fs, 48 kHz |
| R9 | 0x001 | activate |

`i2c_master` has open-drain outputs: `*_oe = 1` pulls the line low. The pins need tri-state
buffers and pull-ups at the board level. The bus runs at `I2C_HZ`, 100 kHz by default, and
each bit is four quarter-periods long.

Because of R7, the codec drives BCLK and DACLRCK. `audio_out` synchronises both into the
system clock, so `clk` must be several times faster than BCLK (3.07 MHz at 48 kHz, 64·fs). On
every LRCK edge it loads the current sample, padded to 24 bits. It shifts out one bit on every
falling BCLK edge, MSB first, and LRCK high is the left channel. The mono mix goes to both
channels. The codec's master clock (MCLK, 12.288 MHz) must come from a PLL outside this
design.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` / `FFT_N` | 2048 | `dj_pkg`, all modules | frame length, FFT size, RAM depth |
| `SAMPLE_W` | 16 | `dj_pkg` | sample width and each half of a complex bin |
| `TW_W` | 16 | `dj_pkg` | twiddle width (Q1.14) |
| `GAIN_W` | 8 | `dj_pkg` | gain width (Q1.7) |
| `CLK_HZ`, `I2C_HZ` | 50 MHz, 100 kHz | `dj_top`, codec blocks | I2C bit-rate divider |

`N` must be a power of two and at least 4. The register map assumes N = 2048: for a smaller
`N` the sample and spectrum windows keep their base addresses and use only their low addresses.

## Resources and limits

- **The default size does not fit the DE1-SoC class of FPGA.** Two fully parallel 2048-point
  transforms contain 22,528 butterflies, which is about 90,000 16×16 multipliers and
  1.4 Mbit of pipeline registers. A Cyclone V SE A5 has 87 DSP blocks. At the default size the
  RTL models the intended architecture. For the board, reduce `N` to a few tens of points, or
  replace `fft` with a serial one-butterfly core behind the same ports. The frame sequencer
  needs no changes, because it already loads and stores one point per cycle.
- RAM use at N = 2048 is about 590 kbit, which fits easily.
- Elaborating the full-size design is slow. The two 11,264-butterfly networks take a
  SystemVerilog front end several minutes each. Verilator needs about 40 s and 2.5 GB per
  transform to lint.
- **Intermediate storage:** the FFT input is a register bank, not a RAM. A fully parallel
  transform needs all N points in the same cycle, which a RAM port cannot deliver. The FFT
  and the IFFT share the bank.
- **RAM pairs:** each song has an input pair and a frequency pair. There is a single
  mixed-spectrum pair and a single output pair, because the inverse transform works on the sum
  of both songs. By linearity, that equals the sum of two separate inverse transforms.
- Only gain and the low-pass cutoff are built. No other effects are defined.

## Files

| file | contents |
|---|---|
| `rtl/dj_pkg.sv` | shared constants, register map, `effect_cfg_t`, twiddle and bit-reverse functions |
| `rtl/dj_top.sv` | top level: bus slave, RAM pairs, core, codec blocks, bank and BUSY logic |
| `rtl/dj_avalon_regs.sv` | Avalon-MM slave and effect registers |
| `rtl/dj_engine.sv` | frame sequencer with FFT, IFFT and effects |
| `rtl/fft.sv`, `rtl/butterfly.sv` | fully parallel FFT/IFFT and its butterfly |
| `rtl/effects.sv` | gain, low-pass and mix |
| `rtl/pingpong_ram.sv`, `rtl/sample_ram.sv` | RAM pair and RAM block |
| `rtl/codec_config.sv`, `rtl/i2c_master.sv` | codec register set-up over I2C |
| `rtl/audio_out.sv` | frame player and DAC serialiser |
| `tb/codec_model.sv` | behavioural codec (I2C slave, BCLK/LRCK master, DAC capture), testbench only |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench checks its unit against values the testbench computes itself. The FFT, engine
and top-level tests compute direct DFTs and inverse DFTs in real arithmetic. Every testbench
has a watchdog and ends with a `TB_RESULT checks=… failures=…` line.

- `tb_fft`: forward and inverse transforms, log2(N) latency, back-to-back transforms and the
  round trip, at N = 16.
- `tb_dj_engine`: frequency, mix and output RAM contents, the exact
  7·N + 3·log2(N) + 9 cycle count, and a start while busy being ignored.
- `tb_dj_top` (N = 16): the whole path from the bus to the codec model. It counts each
  mechanism and fails if one never happens: the I2C retry, an ignored commit, both input-bank
  swaps, both output-bank hand-overs, underrun silence and filter-cut bins.
- `tb_dj_top_large` (N = 512, default clock and I2C settings): one frame of two songs. It
  checks the cycle count, the spectrum read-back and the first played samples against a
  512-point reference.

The largest size simulated end to end is N = 512. At the default N = 2048, Verilator lints
the design without errors, but the generated C++ model (two networks of 11,264 butterflies)
takes over an hour to compile. No full-size simulation has been run.

To run one with plain Verilator (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dj_top \
    rtl/dj_pkg.sv $(ls rtl/*.sv | grep -v dj_pkg) tb/codec_model.sv tb/tb_dj_top.sv
./obj_dir/Vtb_dj_top
```

The N = 512 test takes about 1.5 minutes to build.
