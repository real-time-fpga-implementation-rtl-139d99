# Dual-polarization oversampled filter bank for a sub-banded coherent OFDM receiver

A coherent optical receiver for a 25 GHz DFT-spread OFDM channel samples
each polarization (X and Y) at 26.6 GS/s. Equalizing and demodulating that
stream as one wide band is the expensive part of the receiver. The idea
behind this design is *digital sub-banding*. A filter bank cuts each
polarization's spectrum into 16 slices, each 1.66 GHz wide and sampled at
3.33 GS/s. Slow, simple sub-band receivers then each handle one slice,
taking the X and Y samples of the same slice together (only 15 of the 16
slices carry data: 960 tones in 15 DFT-spread sub-bands of 64 tones).

This RTL is the high-speed part of that receiver: the **pair of analysis
filter banks**, one per polarization. It also includes the on-chip sample
memories and a burst controller, so the banks can be fed and read by a host
at full speed. It does not include the ADCs, the host link or the sub-band
receivers (coarse timing and frequency offset, 128-point FFT, 2x2 MIMO,
64-point IFFT, MSDD decoder). It ends at the sub-band sample memory.

```
            one polarization (fb_system); fb_dual_pol holds two of them
 host  ─► sample_mem_in ─► fb_core ─────────────────────────────► sample_mem_out ─► host
 (1 smp/clk)  1024 x 64 smp │  polyphase_sp ─► 8 x fb_instance    1024 x (8x16) smp  (1 smp/clk)
                            │                   ├ 8 x sido_fir
          burst_ctrl ───────┘                   └ dft16 + round/saturate
```

## The filter bank: 16 channels, decimation by 8

A classic critically sampled filter bank with M = 16 channels would
decimate by 16. Here each channel is decimated by only D = M/2 = 8, so
every sub-band comes out **twice oversampled**. Without that, the slices'
band edges would alias. With the prototype low-pass filter h[n] (48 taps),
sub-band k at decimated time m is

```
u[q][m] = sum_{l=0..2} h[q + 16 l] · x[8 m + 7 − q − 16 l]      q = 0..15  (polyphase components)
v[k][m] = sum_{q=0..15} u[q][m] · exp(−j 2π k q / 16)            k = 0..15  (16-point DFT)
```

Each polyphase component has only 48/16 = 3 taps. Decimating by 8 instead
of 16 has a useful side effect. A commutator deals the input to only **8
branches**, with branch p seeing x_p[m] = x[8m + 7 − p]. Components q = p
and q = p + 8 then read the *same* branch stream, at even and odd delays
respectively:

```
u[p][m]     = h[p] x_p[m]   + h[p+16] x_p[m−2] + h[p+32] x_p[m−4]     ("EV" output)
u[p+8][m]   = h[p+8] x_p[m−1] + h[p+24] x_p[m−3] + h[p+40] x_p[m−5]   ("OD" output)
```

So the bank is 8 **single-input dual-output (SIDO)** filters (`sido_fir`),
not 16 single-output ones. Each has a 6-deep delay line and 3 taps per
output. SIDO p feeds DFT ports p and p+8 (`fb_instance`).

The DFT is a forward DFT, so **sub-band k is centred at −k/16 of the sample
rate**: k = 0 is DC, k = 1 is −1.66 GHz, and k = 15 is +1.66 GHz. Odd
channels come out with the usual (−1)^m spectral inversion of an
oversampled bank. Downstream receivers must account for both.

`dft16` is a radix-4 decimation-in-time DFT: two stages of multiplier-free
4-point butterflies with 9 non-trivial twiddle multiplications between
them, one pipeline register per stage.

## Reaching 26.6 GS/s with a 416 MHz clock

One bank produces one 16-channel vector per 8 input samples. At 26.6 GS/s
that is 3.33 G vectors/s, far beyond an FPGA clock. The core therefore runs
**PAR = 8 identical banks side by side** at 416 MHz. Each clock brings one
*block* of LANES = 64 consecutive input samples (lane i of block b is
x[64 b + i]). Bank j computes decimated step m = 8 b + j. Every clock
therefore yields 8 × 16 sub-band samples, and 64 × 416 MHz = 26.6 GS/s.

This is the subtle part of the design. Bank j needs branch samples
x_p[8b + j − d] for delays d = 0..5. For small j these reach back into the
previous block. In a single bank the SIDO delay lines hold that history.
With block-parallel banks there is one shared history instead:
`polyphase_sp` keeps the previous HIST = ceil(5 / PAR) blocks and routes,
by fixed wiring,

```
win[j][p][d] = x_p[8b + j − d]
             = lane 8 (t − W·PAR) + 7 − p  of block b + W,   t = j − d,  W = floor(t / PAR)
```

where W = 0 is the incoming block and W < 0 is a block from the history.
The routing is generic in PAR, so other bank counts also work. PAR = 1 is
a single bank taking 8 samples per clock, and PAR = 2, 4, 6, ... trade clock
rate for area. `fb_core` wires the history to PAR copies of `fb_instance`.

| banks (PAR) | 1 | 2 | 4 | 6 | 8 (default) | 10 | 12 | 14 |
|---|---|---|---|---|---|---|---|---|
| clock for 26.6 GS/s (MHz) | 3325 | 1663 | 832 | 555 | 416 | 333 | 278 | 238 |
| input samples per clock | 8 | 16 | 32 | 48 | 64 | 80 | 96 | 112 |

When PAR is not a power of two, the host addresses below are the bit
concatenations {block, lane} and {block, bank j, sub-band k}. Some
addresses are then unused.

## Number formats

| point | width | format | notes |
|---|---|---|---|
| input sample | 5 + 5 bit | signed integer I/Q | ADC resolution |
| prototype taps | 16 bit | Q1.15 | see below |
| SIDO outputs u | 16 + 16 bit | Q.7 (sum of 3 products, rounded, >> 8) | cannot overflow; saturation is only a guard |
| twiddles | 18 bit | Q2.16 | rounded cos/sin |
| DFT result | 21 + 21 bit | no scaling, no overflow | |
| sub-band output v | 10 + 10 bit | DFT result rounded (half up), >> 5, saturated | `sat`/`clip_cnt` report clipping |

The prototype is computed at elaboration (`fb_pkg::proto_coefs`) as a
Hamming-windowed sinc, h[n] = w[n] · sinc((n − 23.5)/16) with w[n] =
0.54 − 0.46 cos(2πn/47), scaled so the peak tap is about 32767. Its
cut-off is π/16, half the channel spacing. A full-scale tone in a
sub-band's centre gives about 960 at the output, so it clips. A typical
sub-band, which carries about a quarter of the ADC's rms amplitude, stays
well inside the ±511 range. To use other taps, override the `COEFS`
parameter (48 × 16 bits, packed, tap n at `[n]`) of `fb_system`,
`fb_core` or `fb_instance`.
The scaling shifts `FIR_SHIFT` and `OUT_SHIFT` are set in `fb_pkg`.

## Burst operation and host interface

The banks run at full rate, but in bursts. The host fills the input memory
slowly, starts a burst, and reads the sub-band memory slowly afterwards.
Per polarization (`fb_system`, ports prefixed `x_`/`y_` on `fb_dual_pol`):

- **Input write:** `in_wr_en`, `in_wr_addr = block*64 + lane`, `in_wr_data`
  (`in_smp_t`: 5-bit re/im). One sample per clock, up to DEPTH = 1024
  blocks (65536 samples, 2.46 µs of signal).
- **Burst:** pulse `start` with `len` = number of blocks (0..1024). The
  pulse is ignored while `busy`. The controller clears the delay lines for
  one cycle, then streams blocks 0..len−1 on consecutive clocks. `done`
  rises exactly **len + 8 cycles** after the edge that samples `start`
  (1 clear cycle, 1 memory read cycle and 6 core pipeline cycles), and stays
  high until the next start. `len = 0` finishes after one cycle. Every burst
  starts from zero history, so bursts are independent. `clip_cnt` counts the
  output words of the burst in which some sample saturated.
- **Output read:** `out_rd_en`, `out_rd_addr = (block*8 + j)*16 + k` for
  sub-band k at decimated time 8·block + j. `out_rd_data` (`out_smp_t`:
  10-bit re/im) arrives one cycle after `out_rd_en`.

`fb_dual_pol` shares `start`/`len` between the polarizations, so X and Y
are processed as time-aligned bursts. `done` needs both. The two polarizations
are independent apart from that shared control. To put each polarization
on its own device, use one `fb_system` per device, as the reference
demonstration did with one FPGA board per polarization.

Pipeline latencies are: `polyphase_sp` 1, `sido_fir` 1, `dft16` 3, and the
output register 1. The core takes 6 cycles from `in_valid` to `out_valid`,
one block per clock with no stalls. Gaps in `in_valid` are allowed; the
history advances only on valid blocks.

## Files

| file | contents |
|---|---|
| `rtl/fb_pkg.sv` | sizes, sample structs, prototype and twiddle tables |
| `rtl/sido_fir.sv` | one SIDO polyphase filter (EV/OD outputs) |
| `rtl/dft16.sv` | pipelined radix-4 16-point DFT |
| `rtl/fb_instance.sv` | one bank: 8 SIDO filters + DFT + output scaling |
| `rtl/polyphase_sp.sv` | commutator and shared branch history for PAR banks |
| `rtl/fb_core.sv` | PAR block-parallel banks |
| `rtl/sample_mem_in.sv`, `rtl/sample_mem_out.sv` | burst memories |
| `rtl/burst_ctrl.sv` | burst state machine |
| `rtl/fb_system.sv` | one polarization |
| `rtl/fb_dual_pol.sv` | top: X and Y |
| `tb/fb_ref_pkg.sv` | reference model from the filter-bank equations above |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fb_table1.sv`, `tb/fb_par_check.sv` | the same filter bank built with 1, 2, 4, 6 and 14 parallel banks |
| `tb/tb_fb_fixed_point.sv` | fixed-point penalty on a DFT-spread OFDM signal |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog. For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fb_pkg.sv tb/fb_ref_pkg.sv tb/tb_fb_dual_pol.sv --top-module tb_fb_dual_pol
./obj_dir/Vtb_fb_dual_pol
```

It runs in about 15 s. `tb_fb_dual_pol` uses the default sizes. It does a
full 1024-block random burst on both polarizations, then a 24-block burst
of full-scale tones in sub-bands 2 (X) and 11 (Y), which must clip, with a
start issued while busy, then an empty burst. It compares all sub-band
samples with the reference model, checks `clip_cnt` and the start-to-done
cycle counts, and counts that each mechanism (burst, restart from cleared
history, clipping, ignored start, empty burst) happened.

The reference model (`fb_ref_pkg`) computes every output directly from the
definition of u and v above, with a floating-point DFT. It involves no
branches, no radix-4 split and no parallel banks. The hardware matches it
within 1 LSB; the only difference is twiddle rounding inside the DFT. The
block testbenches check each module the same way: `sido_fir` against
direct tap sums, `dft16` against a floating-point DFT (within 4 LSB at 21
bits), `polyphase_sp` at PAR = 8 and PAR = 2 against the lane formula, and
the memories and the controller (with a stand-in core) for addressing,
ordering and cycle counts. `tb_fb_table1` builds one polarization with
1, 2, 4, 6 and 14 banks. It checks that every configuration gives the same
sub-band samples as the reference model, with the same start-to-done count.

## Precision: fixed point against a 5-bit ADC

`tb_fb_fixed_point` builds a DFT-spread OFDM signal of 4 symbols. Each is
1024 points long and uses 960 tones, arranged as 15 sub-bands of 64 tones
carrying 64-point-DFT-spread QPSK. The signal is scaled to an rms of 4.5
per component and quantized to 5 bits. For every sub-band the test
compares three things:
- a floating-point filter bank on the unquantized signal;
- the same filter bank on the 5-bit signal;
- the hardware output.

In the data-carrying sub-bands, the 5-bit quantization leaves an SNR of
about 24 dB. The hardware's own rounding adds noise about 47 dB below the
signal, so the fixed-point datapath costs nothing measurable next to the
ADC. The test requires at least a 10 dB gap in every sub-band except the
band-edge one (k = 8), which holds no complete sub-band of tones. The
signal's sub-band outputs have an rms of about 64 LSB, well inside the
10-bit range.

## How far to trust it, and where it departs from the reference design

Taken from the reference design:
- the twice-oversampled structure: 16 channels, decimation by 8, and
  8 SIDO filters with 3 taps per output from a 48-tap prototype;
- the 16-point DFT;
- eight block-parallel banks at a 416 MHz clock for 26.6 GS/s;
- the 5-bit input, 16-bit internal and 10-bit output widths;
- one bank per polarization;
- the memory → filter bank → memory burst arrangement.

This design's own choices:
- the prototype's window and scaling, and the rounding and shift points;
- the commutator's sample order and the sign of the DFT (which sets the
  channel numbering);
- the radix-4 DFT structure;
- the shared-history scheme for the parallel banks;
- memory depth, host port widths and addressing, the burst handshake,
  `clip_cnt` and reset behaviour (asynchronous, active-low, on control and
  valid flops only).

Not established here:
- **Timing closure at 416 MHz.** The code has a register after every
  stage, but has not been through an FPGA flow. The SIDO stage does three
  5×16 multiplies and an add in one cycle, and the twiddle stage two 18×18
  multiplies and an add.
- **Resource use.** Per polarization the RTL has 8 × (96 + 36) = 1056 real
  multipliers, mostly 5×16 bit. The reference design reports 24 DSP slices
  per bank, which implies a denser packing. The mapping onto DSP slices or
  LUTs is left to synthesis.
- **Input path.** The host ports here are plain one-sample-per-clock
  buses. A real system would put an Ethernet (or other) link, or ADC
  capture logic, in front of them.

Lint notes: Verilator reports `SYNCASYNCNET` on `rst_n`. This is because
the assertions in `burst_ctrl` and `fb_dual_pol` use it in `disable iff`,
while the flops use it as an asynchronous reset. It has no effect on the
hardware. It also reports that only bit 0 of each per-instance valid
vector is read: all instances run in lock step, so one valid stands for
all.
