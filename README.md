# Blind frequency and phase synchronizer for MPSK bursts

A burst receiver that has no training sequence still has to remove the
carrier frequency offset `f_o` and the phase offset `Phi` from every burst
before it can decide symbols. This core does it blindly, from the unknown
data symbols alone, for BPSK, QPSK or any `M = 2^m` PSK. It uses one idea.
Strip the modulation from the burst and take an FFT. The **position** of
the largest bin then gives the frequency offset. The **argument** of that
same bin gives the phase offset. So a single FFT does the work of both the
usual FFT frequency estimator and the separate Viterbi & Viterbi phase
estimator, which would otherwise need a second modulation removal on the
frequency-corrected burst.

For a received burst `r(l) = s(l) e^{j(2 pi f_o l + Phi)} + n(l)`,
`l = 0..L-1`, at one sample per symbol, the core computes:

| step | operation | module |
|---|---|---|
| modulation removal | `r~(l) = |r(l)| e^{j M arg r(l)}` | `mod_removal` |
| spectrum | `X(k)`: N-point FFT of `r~`, zero padded, N = 2*MBL | `fft_sdf` |
| frequency | `k_fw = argmax |X(k)|` over the window `k <= w_u` or `k >= w_l` | `spectral_analysis` |
| phase | `Phi_hat = arg X(k_fw) / M` | `spectral_analysis` |
| correction | `u(l) = r(l) e^{-j(2 pi k_s l/(M N) + Phi_hat)}` | `pf_correction` |

`k_s` is `k_fw` read as a signed bin: bins `N/2..N-1` stand for negative
offsets. The detectable range is `|f_o| < 1/(2M)` of the symbol rate. One
bin is `1/(M N)` of the symbol rate.

This modulation removal keeps the received magnitude `|r|` rather than
using `|r|^M`. Strong samples then do not dominate the spectrum, and
the polar form turns "raise to the power M" into a multiplication of an
angle by M.

## Block diagram

```
            +--> mod_removal --> fft_sdf --X(k),k--> spectral_analysis
 r  ----+---+   (CORDIC, xM,    (radix-2 SDF,        (|X|^2 max in window,
 (BW)   |        SCL, 2 mult)    bit-reversed out)    serial CORDIC arg/M)
        |                                                  | k_fw, Phi_hat
        +--> burst_ram (3 bursts) --r_ram--> pf_correction <+
                                             (phase accumulator, SCL,
                                              complex multiply) --> u (BW+1)
```

`sync_core` is the top. It also holds the frame counter, the RAM slot
counter and a small queue that carries each burst's settings (length, M,
window, RAM slot) from the input to the FFT output.

## Burst framing and timing

This part takes the most care when integrating the core.

**Frame grid.** The FFT is a streaming pipeline that never stops. The
core therefore cuts time into fixed frames of `N = 2*MBL` cycles, counted
from reset. A frame holds either one burst or nothing:

* A burst can start only on the first cycle of a frame. `in_ready` is high
  on that cycle, whether or not a burst comes. The source presents the first
  sample with `in_valid` there, together with its settings: `cfg_len` (L),
  `cfg_log2m` (log2 M), `cfg_wu` and `cfg_wl`. These are sampled on that
  cycle only.
* The other `L-1` samples are taken on the next `L-1` cycles, while
  `in_ready` stays high. The burst cannot be stalled. A cycle inside the
  burst without `in_valid` enters a zero sample, which the output carries
  as a zero.
* The rest of the frame feeds zeros into the FFT. These are the zero
  padding of the burst to N points.
* `cfg_len = 0`, or a length above MBL, means MBL.

A source that has a burst ready waits at most N-1 cycles for the next
frame. Back-to-back full bursts use half the cycles, which is
0.5 symbol per clock.

**Latency.** Take the first sample of a burst as cycle 0.

| event | cycle (defaults: BW=6, MBL=512, N=1024) |
|---|---|
| `r~` enters the FFT | 14 (CORDIC 12, table 1, multiplier 1) |
| first bin of the frame leaves the FFT | 14 + N - 1 + log2 N = 1047 |
| last bin | 2070 |
| `est_valid` with `est_k`, `est_phi` | 2N + 2 log2 N + 2 LOG2M_MAX + 15 = 2087 |
| `out_first`, first corrected sample | 2090 |
| `out_last` | 2090 + L - 1 |

The correction of burst *b* runs during the frame after next. By then
bursts *b+1* and *b+2* may be arriving. So `burst_ram` holds three
bursts, `3*MBL` words of `2*BW` bits, and the slot counter moves on only
when a burst is accepted. A slot is written again no earlier than 3N
cycles after it was filled. Its correction has ended by then. It
finishes `2N + 2 log2 N + 2 LOG2M_MAX + 18 + L - 1` cycles after the
first sample, which is less than 3N for MBL of 16 and above. Smaller
builds get a fourth slot. The slot count is
`NSLOT = 2 + ceil((2 log2 N + 2 LOG2M_MAX + 16) / N)`. At the defaults
this RAM is exactly one 18 Kbit block RAM.

Two assertions in `sync_core` guard the grid. The tag queue must stay in
step with the FFT frames. The correction must be idle when an estimate
arrives.

## Number formats

* **Angles are phase words.** A W-bit unsigned word `p` stands for
  `2 pi p / 2^W`, so wrap-around is modulo 2 pi for free. Multiplying by M
  is a left shift by log2 M. Dividing by M is a right shift.
* Modulation removal: the CORDIC angle has 10 bits. After `x M`, the 8 most
  significant bits address the sine/cosine table. The table amplitude is
  127, with 8-bit outputs.
* `r~` is `BW+2` bits. The CORDIC gain of 1.647 is not removed, because
  the argmax and the argument do not depend on a common scale.
* FFT: the input gets one guard bit, and every stage adds one bit. The
  output is `BW + 2 + log2 N + 1` bits, 19 at the defaults, and cannot
  overflow. Twiddles have 12 bits. Each stage rounds its twiddle product.
* `est_phi` has `log2 N + LOG2M_MAX` bits, 12 at the defaults. It lies in
  `[0, 2 pi / M)`.
* Correction: a phase accumulator of the same width starts at `Phi_hat`
  and adds `k_s << (LOG2M_MAX - log2 M)` per sample. This is exact and
  wraps correctly, so there is no `k*l` multiplier. The second
  sine/cosine table has a 12-bit phase and 10-bit amplitude. `u` is
  `BW+1` bits, because a rotation can raise a component by sqrt 2.

## Modules

| file | what it is |
|---|---|
| `rtl/sync_pkg.sv` | default sizes; elaboration-time helpers that compute the atan and sine ROMs |
| `rtl/sync_core.sv` | top: framing, RAM slots, tag queue, wiring, grid assertions |
| `rtl/mod_removal.sv` | CORDIC to polar form, angle x M, sine/cosine table, 2 multipliers |
| `rtl/cordic_vec_pipe.sv` | fully pipelined vectoring CORDIC (magnitude and angle), 1 sample/clock |
| `rtl/scl.sv` | sine/cosine table, quarter-wave ROM computed at elaboration, 1-cycle latency |
| `rtl/fft_sdf.sv` | streaming N-point FFT: chain of SDF stages, labels bins with their natural index |
| `rtl/fft_stage.sv` | one radix-2 single-path delay-feedback DIF stage (D-word feedback memory, twiddle ROM) |
| `rtl/spectral_analysis.sv` | windowed max of `re^2+im^2`, then arg/M through the serial CORDIC |
| `rtl/cordic_serial.sv` | iterative angle-only CORDIC, one micro-rotation per clock |
| `rtl/burst_ram.sv` | simple dual-port RAM, registered read |
| `rtl/pf_correction.sv` | RAM read sequencer, phase accumulator, sine/cosine table, complex multiplier |

The FFT does not reorder its bins. The peak search needs only the label
of each bin, so bit-reversed output order costs nothing. If two bins
have exactly the same maximum, the one that arrives first wins.

## Parameters of `sync_core`

| parameter | default | meaning |
|---|---|---|
| `BW` | 6 | input bits per I/Q component (results for 5, 6 and 7 bits were published for this architecture; 6 loses almost nothing against 7) |
| `MBL` | 512 | maximum burst length; fixes N = 2*MBL FFT points and the RAM size (three bursts, four below MBL = 16) |
| `LOG2M_MAX` | 2 | largest log2 M accepted on `cfg_log2m` (2 = QPSK) |

`N = 2*MBL` follows the rule that the FFT needs about twice as many
points as the longest burst. With fewer points, the bin spacing causes a
clear BER loss. Choosing a larger MBL than the bursts need gains only a
little. `sync_core` derives all internal widths from these three
parameters. Each submodule also has width parameters of its own. Their
defaults are the values the default build uses.

## Ports of `sync_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | burst samples; see framing above |
| `in_i`, `in_q` | in | BW | received sample, two's complement |
| `cfg_len` | in | clog2(MBL+1) | burst length L |
| `cfg_log2m` | in | clog2(LOG2M_MAX+1) | log2 M (1 = BPSK, 2 = QPSK) |
| `cfg_wu`, `cfg_wl` | in | log2 N | search window: bins `0..wu` and `wl..N-1`; `N/2-1`, `N/2` = no window |
| `est_valid`, `est_k`, `est_phi` | out | 1, log2 N, log2 N + LOG2M_MAX | estimate of each burst |
| `out_valid`, `out_i`, `out_q` | out | 1, BW+1, BW+1 | corrected burst |
| `out_first`, `out_last` | out | 1 | first and last corrected sample |

A window of +-w of the symbol rate is `wu = floor(M w N)`, `wl = N - wu`.
With MBL = 512 and QPSK, +-1.5 % gives wu = 61. For the 150-symbol bursts
below, a narrow window removes much of the noise-induced false peaks at
low SNR.

## What the output still needs

The corrected burst keeps an **M-fold phase ambiguity**. It is rotated by
an unknown multiple of `2 pi / M`, plus a constant that depends on the
constellation. For the usual QPSK points at `pi/4 + q pi/2`, the points
come out on the axes. A back end must resolve this with at least one
known symbol, for example by correlating a few known symbols. The
input also assumes a front end that is not part of this core:

* timing recovery and matched filtering, giving one sample per symbol;
* an automatic gain control, scaling the samples to `BW` bits without
  clipping the useful dynamic range. The tests use an rms amplitude of
  12 to 24 LSB at 6 bits.

## How far it can be trusted

Every module has a self-checking testbench against floating-point models,
at the module's default size:

| testbench | what it checks |
|---|---|
| `tb_scl` | every phase of the default 8-bit table and of the 12-bit table the correction uses, within 1 LSB; latency |
| `tb_cordic_vec_pipe` | all 4096 6-bit vectors: magnitude within 1 LSB, angle within 1.5 LSB; latency, rate |
| `tb_cordic_serial` | 600 vectors up to 19 bits; done after 13 cycles; a start while busy is ignored |
| `tb_mod_removal` | 2000 random samples, random M in {1,2,4}; latency 14, rate |
| `tb_fft_sdf` | N = 1024 against a direct DFT (random frames and a tone): rounding noise about 9 LSB rms on bins of about 3000, no bin off by more than 60 LSB plus 0.5 %; labels; latency N-1+log2 N |
| `tb_spectral_analysis` | 30 frames of 1024 bins up to 98 % of full scale, random windows (some exclude the peak), M, tags; bin exact, phase within 1.5 LSB; latency |
| `tb_burst_ram` | full pattern, read-during-write behaviour |
| `tb_pf_correction` | 20 bursts, both signs of k, M in {1,2,4}; 1 LSB; read addresses; timing |
| `tb_sync_core` | full default size, 7 bursts: QPSK and BPSK, positive and negative offsets, full and short bursts, windows that keep and that exclude the true offset, an idle frame, a gap, output overlapping input; exact bin, phase, per-sample residual rotation, frame rate and latencies |
| `tb_workloads` | bit error rate on noisy bursts for 4 to 7 bit inputs, MBL 256 and 512, three windows, and 8PSK; error-free decoding on the smallest builds, MBL 8 and 64; exact estimate latency in every build (below) |

### Bit error rate

`tb_workloads` runs eight core builds side by side on noisy QPSK and 8PSK
bursts. Every burst has `f_o` = 1.2 % of the symbol rate and `Phi` = 30 degrees.
The noise is white Gaussian, and the signal is scaled to a fixed rms level
of 12 * 2^(BW-6) LSB. The test's back end treats the first 8 symbols of each
burst as known. It uses them only to pick one of the M rotations left by
the ambiguity. The phase itself comes from the core. The reference is
ideal coherent detection. Each point below comes from one seed. The
bursts per point are 600 for the first two tables, 400 for the third and
300 for 8PSK. Other seeds move the figures by a few percent.

Input width, MBL = 512, L = 300:

| Es/N0 | ideal | BW = 4 | BW = 5 | BW = 6 | BW = 7 |
|---|---|---|---|---|---|
| 6 dB | 2.30e-2 | 3.5e-2 | 2.6e-2 | 2.4e-2 | 2.4e-2 |
| 8 dB | 6.00e-3 | 1.4e-2 | 8.3e-3 | 6.8e-3 | 6.3e-3 |
| 10 dB | 7.8e-4 | 4.8e-3 | 1.6e-3 | 9.8e-4 | 7.3e-4 |

Six bits is close to seven. Four bits loses clearly. At high SNR a 6-bit
build stays within about 0.2 dB of ideal. Every burst gets the right bin.

Maximum burst length, BW = 6, L = 150:

| Es/N0 | ideal | MBL = 256 | MBL = 512 |
|---|---|---|---|
| 6 dB | 2.30e-2 | 2.6e-2 | 2.5e-2 |
| 8 dB | 6.00e-3 | 7.3e-3 | 6.5e-3 |
| 10 dB | 7.8e-4 | 1.2e-3 | 1.0e-3 |

An FFT twice as long as needed gains only a little. A build whose MBL is
below the burst length cannot run that burst at all, because `cfg_len` is
limited to MBL.

Search window, MBL = 256 (N = 512), L = 150. `w_u` is in bins, `w_l = N - w_u`:

| Es/N0 | ideal | none | w_u = 30 (1.5 %) | w_u = 60 (3 %) | w_u = 120 (6 %) |
|---|---|---|---|---|---|
| 3 dB | 7.9e-2 | 0.28 | 0.18 | 0.22 | 0.27 |
| 4 dB | 5.7e-2 | 0.14 | 0.098 | 0.109 | 0.115 |
| 5 dB | 3.8e-2 | 0.057 | 0.045 | 0.043 | 0.042 |

At low SNR a short burst's largest bin is often a noise peak. About half of
the 150-symbol bursts at 3 dB get a wrong bin without a window. A window
that leaves those bins out removes many of them. The narrower the window,
the more it removes. From 5 dB upward the true peak nearly always wins, and
the window no longer matters. The testbench checks all these relations
with bounds that leave room for the spread between seeds.

Higher order, 8PSK on a build with `LOG2M_MAX = 3`, BW = 6, MBL = 512,
L = 300. The reference is `2/3 Q(sqrt(2 Es/N0) sin(pi/8))`:

| Es/N0 | reference | 8PSK | bin within +-1 |
|---|---|---|---|
| 10 dB | 2.9e-2 | 5.5e-2 | 284 of 300 |
| 12 dB | 1.0e-2 | 1.2e-2 | 300 of 300 |
| 14 dB | 2.2e-3 | 2.9e-3 | 300 of 300 |

Raising the samples to the 8th power costs more noise than raising them to
the 4th. So 8PSK needs a higher SNR before the frequency estimate becomes
reliable. Above that point, the 6-bit core stays within about 0.5 dB of
the reference.

The smallest builds, MBL = 8 (N = 16, four RAM slots) and MBL = 64, each
decode 12 full-length QPSK bursts at Es/N0 = 30 dB without a bit error
and with the right bin every time. In all eight builds, each estimate
arrives exactly `2N + 2 log2 N + 2 LOG2M_MAX + 15` cycles after its
burst's first sample. Builds as large as MBL = 8192 were not simulated.

Synthesis of the default build with a generic flow gives about 1000
word-level cells and 1555 flip-flops. It also gives 143 kbit of memory:
the FFT's 1023 feedback words, the twiddle, sine and atan ROMs, and the
18 kbit burst RAM. No timing closure has been attempted. At one sample per
two clocks, QPSK needs a 100 MHz clock for 100 Mbit/s.

## What follows the published architecture, and what does not

These parts follow the published architecture:

* the algorithm;
* the split into blocks:
  * modulation removal with a pipelined CORDIC, a sine/cosine table and
    two multipliers;
  * a streaming FFT of 2*MBL points;
  * spectral analysis with a windowed maximum search, then a small serial
    CORDIC for the one argument it needs;
  * a RAM that holds the raw bursts while the FFT works;
  * a correction with a second sine/cosine table and a complex multiplier;
* the run-time settings `L`, `M`, `w_u` and `w_l`;
* the build-time settings `BW`, `MBL` and the set of modulations.

The input goes to the modulation removal and to the RAM at the same time,
as in the block diagram above. A placement description of the original
lists the RAM ahead of the CORDIC. That is read here as placement only.

The rest is this implementation's own:

* The N-cycle frame grid, the `in_valid`/`in_ready` protocol, zero
  samples for gaps, and the three-burst RAM.
* A radix-2 SDF FFT in place of a vendor FFT core, with no output
  reordering.
* Textbook CORDICs and quarter-wave tables in place of vendor cores. All
  widths, guard bits and rounding are this implementation's choices.
* M is limited to powers of two, because multiplying an angle by M is a
  shift.
* The peak search compares `re^2 + im^2`.
* `k_fw` is read as a signed bin in the correction. Without this, a
  negative offset would leave a per-symbol rotation of `2 pi / M`.
* The correction phase comes from an accumulator, so the correction
  uses 4 multipliers in total. The original lists 5.
* The buffer holds three bursts. The original gives only a block RAM
  count: one for MBL up to 512, and 16 for MBL = 8192. Three bursts of
  6-bit samples match both counts exactly, in 18 Kbit blocks. Builds
  below MBL = 16 use four bursts, because there the fixed pipeline
  delay is no longer small against N.
* A burst may not be longer than MBL. The original also evaluated
  150-symbol bursts on a build for 128.

## Simulating

Everything is plain SystemVerilog-2017. Name the package first and let
Verilator find the modules by file name in `rtl/` and `tb/`. The
second folder holds `wl_lane`, the burst source and bit counter that
`tb_workloads` builds its lanes from. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sync_pkg.sv \
          tb/tb_sync_core.sv --top tb_sync_core -Mdir obj_core
obj_core/Vtb_sync_core
```

Replace `tb_sync_core` with any testbench in `tb/`, such as `tb_workloads`
or `tb_fft_sdf`. Each one prints a line `TB_RESULT checks=<n> failures=<n>`
and ends. Every unit testbench runs its module at its default size.
`tb_sync_core` runs the defaults in about a second. `tb_workloads` builds
eight cores with different parameters and runs for about 20 seconds. To
try another build, change `BW`, `MBL` or `LOG2M_MAX` on `sync_core`. You
can also change the defaults in `sync_pkg`, which is where `tb_sync_core`
takes its sizes from.
