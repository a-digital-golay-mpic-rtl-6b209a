# Golay-MPIC time domain equalizer (SC/OFDM, 60 GHz, 8 samples per clock)

At 60 GHz with directional antennas the channel is close to line of sight. It
has a main path `h0` and one much weaker reflection `h[tau]`, `tau` samples
later. This equalizer relies on that. It does not invert a long channel
matrix and does not run a long FIR filter. Instead it:

1. **estimates** the channel once per channel estimation field (CES, or a
   pilot CES "PCES" inside the payload). A Golay correlator does this, and it
   needs only adders.
2. **equalizes** every payload sample with one-tap multi-path interference
   cancellation (MPIC):

```
x[i] = r^[i] - r^[i-tau] * h[tau]/h0        with  r^ = r * conj(h0)/|h0|^2
```

The residue is of order `(h[tau]/h0)^2 x[i-2 tau]`, which is negligible
for a weak reflection. Dividing by the complex `h0` also removes any common phase
rotation, which a time-domain frequency-offset de-rotator upstream leaves. The cost per sample is two complex multiplications
and one subtraction. The channel's length does not change that.

The equalizer works in the time domain, so the same hardware serves both
single-carrier (SC) and OFDM frames. In SC mode the equalized samples are
de-rotated (pi/2 modulation) and demapped. In OFDM mode they go to the
receiver's FFT, and the FFT result comes back to the demapper. The data path
takes 8 samples per clock: 1760 MS/s at 220 MHz (SC) or 2640 MS/s at
330 MHz (OFDM).

This RTL follows the architecture published as "A Digital Golay-MPIC Time
Domain Equalizer for SC/OFDM Dual-Modes at 60 GHz Band" (Liu, Yeh, Wei, Chan
and Jou). That publication gives the structure, the block names, the
parallel forms and the widths at the block boundaries. Many details are this
RTL's own choices; they are listed under "Where this RTL departs from or
fills in the published design".

## Data flow

```
             +--------------------------- ogc_correlator ---------------------------+
 r[8 lanes]  |  ogc_mem_fifo (256-sample delay, 2 x sp_ram 16x144)                   |
 9+9 bit ----+->  8 x ogc_stage (D = 128,64,32,16,8,4,2,1) -> final adder, 18 bit    |
    |        +-----------------------------------------------+-------------------------+
    |                                                        v
    |                                             cir_peak_search  (register "h")
    |                                             h0, h[tau], tau, main_idx
    |                                                        v
    |        +------------------------- mpic_equalizer ------+-------------------------+
    +------->|  mpic_coef: c = conj(h0)*LUT(|h0|^2), m = c*h[tau]  (one instance)      |
             |  8 lanes: r^ = r*c -> mpic_path_delay (tau) -> *m -> r^ - replica       |
             +--------------------------------------------------+----------------------+
                                                                 | eq_out, 15+15 bit
                    SC: pi2_derotator ---------------------------+---> eq_out (to FFT)
                                 |                                        |
                    OFDM: fft_out (from FFT) --+                          |
                                 v             v
                             S/O select -> qpsk_demapper -> demap_bits[16]
 tde_ctrl: ces_start / payload -> correlator enable, peak-search start, coefficient load
```

## The Golay correlator (ogc_correlator, ogc_stage, ogc_mem_fifo)

The CES holds a Golay pair `a_256`, `b_256`. The pair is sent twice, with a
128-sample cyclic prefix and postfix: 1280 samples, or 160 words. The pair
is complementary: the autocorrelations of `a` and `b` add up to a single
peak of `2N` with no sidelobes. The correlator is a matched filter for
`a_256` followed by `b_256`. On the CES it therefore gives `512 * h[n]`
directly, and for every path `n` within +/-128 samples of the peak it gives
zero for all other paths. `tb_ogc_correlator` checks this.

A direct 512-tap filter would need 511 adders per sample. The optimized
Golay correlator instead uses the recursive structure of the Golay sequences:

```
p0 = r[n],  q0 = r[n-256]                    (the memory FIFO)
stage s (s = 7..0, D = 2^s):  p' = W_s * (q - p)      (W_s = +1 or -1)
                              q' = (p + q) delayed by D samples
y = p + q after stage 0
```

This is exactly a 512-tap filter with taps of +/-1, built from 9 butterflies
of two adders each. The weights `W_s` select the Golay pair. The published
design takes them from the standard and does not print them. Here they are
the parameter `W_VEC`, default `8'b1011_0100`. Every weight vector gives a
valid complementary pair. Transmitter and receiver only need to agree on
it; the testbenches derive their CES from the same vector.

**8 samples per clock.** Lane `j` of a word holds sample `8m+j`, so a delay
of `D` samples has two forms:

- `D >= 8` (stages 7..3, and the FIFO): a shift register of `D/8` words
  on every lane.
- `D = 4, 2, 1` (stages 2..0): no register in most lanes. Lane `j` takes
  the sum of lane `j-D` in the same word. The last `D` lanes store their
  sum for one cycle, and those stored sums feed lanes `0..D-1` of the next
  word.

Each stage has one pipeline register on both outputs. The delay difference
between the two paths is therefore kept, and the correlator's latency is 9
cycles.

**Memory FIFO.** The 256-sample delay is 32 words of 144 bits (8 lanes x
9+9 bits). It is built from two single-port memories of 16 words each. Word
`w` goes to memory `w % 2`, address `(w/2) % 16`. In every cycle one memory
writes the new word. The other memory reads the word that entered 31 cycles
ago, and its read register delivers that word one cycle later. Each memory
therefore alternates writes and reads, and neither needs a second port.

**Widths.** The input is 9 bits. The width grows by one bit per stage: the
stage-0 outputs are 17 bits and the result is 18 bits. The largest possible
value, 512 x 256, fits exactly, so nothing saturates.

**Shut-down.** `en` is a clock enable on every register of the correlator,
and it keeps both memories idle. The controller raises it only from
`ces_start` to the end of the estimate.

## Channel register (cir_peak_search)

Correlator output index `i` counts from the first CES sample. An undelayed
path peaks at `i = 639` (128 + 511), and again 512 outputs later.

- **First repetition.** The search watches the window `511..766`, which is
  the peak plus the two 128-sample zero-correlation zones. It keeps the two
  outputs of largest `|re|+|im|`, with their indexes. If two outputs are
  equal, the earlier one wins.
- **Second repetition.** The outputs 512 later at the same two indexes are
  added to the kept ones. This averages the estimate over the two
  repetitions.
- **Scaling.** Each sum is `1024 h`, so a right shift by 10 gives the 9-bit
  taps `h0` and `h[tau]`. These are in the units of the input samples.
  For one repetition this is the top 9 bits of the 18-bit correlator
  output; the extra bit comes from adding the two repetitions.
- **tau.** `tau` is the second index minus the main index. If it is not in
  `1..128`, `tau_ok` goes low and nothing is cancelled. This happens, for
  example, when the second tap comes before the main one. 128 is the length
  of the post zero-correlation zone.
- **main_idx.** `main_idx` is the main-peak index, so it also serves as the
  fine frame boundary.

## MPIC arithmetic and fixed point (mpic_coef, inv_lut, mpic_path_delay, mpic_equalizer)

The division by the complex `h0` becomes a real reciprocal:
`1/h0 = conj(h0)/|h0|^2`. The common terms do not depend on the data, so one
instance (`mpic_coef`) computes them once per estimate, in 4 pipeline steps:

| quantity | formula | format |
|---|---|---|
| `p` | `|h0|^2`, saturated | 15 bit unsigned |
| `LUT(p)` | `~ 2^24 / p` | 13 bit unsigned, saturates at 8191 for `p < 2049` |
| `c` | `conj(h0) * LUT(p)`, `~ 2^24 / h0` | 23 bit signed |
| `m` | `(c * h[tau]) >> 12`, `~ 4096 h[tau]/h0` | Q3.12, 16 bit |

`c`, `m` and `tau` switch to their new values in the same cycle, so the
lanes never mix an old term with a new one.

**Reciprocal table.** `inv_lut` has reduced resolution. The position of
the leading one of `p` and the 5 bits below it address 15 x 32 entries.
Each entry is the rounded reciprocal of the midpoint of its interval. The
table is computed from that formula at elaboration. Its relative error is
within 1/32.

**Lanes.** Each of the 8 lanes computes:

```
r^ = (r * c) >> 12                 Q3.12, 16 bit, saturating
replica = (r^[i-tau] * m) >> 12    r^[i-tau] from mpic_path_delay
x = r^ - replica                   Q2.12, 15 bit, saturating (a unit symbol is 4096)
```

The input amplitude cancels out: `r` and `h0` are in the same units, so `x`
comes out at unit scale. The amplitude only matters through the range of
`|h0|^2`. The reciprocal is exact to 1/32 for `|h0|` between about 45
(`p >= 2049`) and 181. Around `|h0| = 64`, a 9-bit input keeps about 2 bits
of headroom.

**Path delay.** `mpic_path_delay` holds the past 17 words. With the current
word it can reach 144 samples, so it covers any `tau` from 1 to 136. A
selector per lane picks sample `n - tau`. The delay line advances only on
payload words, so `tau` counts payload samples.

## Output path (pi2_derotator, qpsk_demapper)

**SC de-rotation.** In SC mode the transmitter rotates symbol `k` by `j^k`
(pi/2-M-PSK). `pi2_derotator` multiplies by `(-j)^k`. There are 8 samples
per word and the rotation repeats every 4 samples, so lane `j` always gets
`(-j)^(j mod 4)`. This assumes the payload starts on lane 0 with `k = 0`.

**OFDM.** The equalized words leave on `eq_out`/`eq_valid` for the FFT.
`fft_out`/`fft_valid` bring the result back. The mode input selects the
demapper's source.

**Demapper.** `qpsk_demapper` is a hard QPSK slicer with 2 bits per lane,
16 bits per word, and a register. Bit `2j` is the sign of the real part and
bit `2j+1` the sign of the imaginary part; a bit is 1 for negative.

## Control and timing (tde_ctrl, golay_mpic_tde)

The top has these inputs:

- `r`: one word per clock.
- `ces_start`: high for the word whose lane 0 is the first sample of a CES
  or PCES.
- `payload`: high for payload words.
- `mode_ofdm`: 1 for OFDM, 0 for SC.

Anything that is neither CES nor payload is ignored ("sleep"). The reset is
synchronous and active low.

| event | cycle (ces_start = 0) |
|---|---|
| correlator and FIFO enabled | 0 |
| peak search starts (correlator latency) | 9 |
| correlator shut down, new taps loaded | 170 |
| new `c`, `m`, `tau` in use | 174 |
| first estimate usable (`est_valid`) | 175, i.e. 15 words after a CES |

Payload word to `eq_out`: 3 cycles. To `demap_bits` in SC mode: 4 cycles.
In OFDM mode, `demap_bits` follows `fft_out` by 1 cycle. Throughput is one
word (8 samples) every cycle, with no stalls.

Payload that arrives before the first estimate is not equalized. During a
PCES the previous estimate stays in use: payload that follows the PCES
without a gap is equalized with the old taps until the new ones take over.
`est_valid` is sticky once set. A new frame's CES therefore also goes
through the old estimate until its own estimate is ready. Leave 15 words
between a CES and the first payload word of a new channel.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tde_pkg` | `N_LANES`, `SAMPLE_W`, `OGC_W`, `OUT_W`, `FRAC` | 8, 9, 18, 15, 12 | parallelism and widths |
| `ogc_correlator` | `W_VEC` | `8'b1011_0100` | Golay weights, bit s for stage s |
| `ogc_mem_fifo` | `WORD_W`, `DEPTH` | 144, 32 | FIFO word and length in words |
| `cir_peak_search` | `WIN_START`, `WIN_LEN`, `REP_DIST`, `TAU_MAX`, `H_SHIFT` | 511, 256, 512, 128, 10 | search window and scaling |
| `inv_lut` | `INV_SHIFT`, `MANT_BITS` | 24, 5 | reciprocal scale and resolution |
| `mpic_path_delay` | `WORDS` | 17 | delay-line length in words |

The top has no parameters. The sequence lengths (N = 256, two repetitions,
128-sample prefix and postfix) and the 8 stages are fixed by the structure.

## Where this RTL departs from or fills in the published design

- **Not included.** The FFT, the synchronization and the CFO de-rotator
  belong to the surrounding receiver, so the top has ports for them. The
  demapper handles only QPSK and pi/2-QPSK, like the fabricated version. A
  "full mode" demapper (pi/2-BPSK, pi/2-8-PSK, 16-QAM, 64-QAM) is only
  mentioned in the source, and it would be needed for the quoted maximum
  throughputs of 7.04 and 15.84 Gb/s.
- **Not modelled.** An unlabelled box in the published block diagram sits
  between the SC/OFDM selector and the phase shifter. Its function is not
  given, so it is treated as a plain connection here.
- **Own choices:** the Golay weight vector; the signs at the OGC
  butterfly's inputs (the weight absorbs them); the FIFO addressing; the
  pipeline registers; the magnitude measure, windows and tie rule of the
  peak search; the averaging of the second repetition for the two selected
  taps only; the reciprocal's scale and addressing; all Q formats,
  saturation and truncation; the controller's states; reuse of the old
  estimate during a PCES; the field-timing interface; the demapper's bit
  order.
- **Parallel form.** The common term is computed once and multiplied by
  `h[tau]` once, as in the published parallel version. The serial block
  diagram multiplies per sample instead.
- **Power.** Shut-down is a clock enable. Clock gating, and memory sharing
  with other receiver blocks, are not modelled.
- **Physical results.** Clock rate, area and power (413 MHz maximum,
  405 K gates, 56.7 mW SC and 91.3 mW OFDM in 65 nm) are the published
  figures. They have not been reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sp_ram` | read data, one-cycle read latency, hold |
| `tb_ogc_mem_fifo` | exact 32-word delay with a randomly gated enable |
| `tb_ogc_stage` | both delay structures (D = 4 routed, D = 16 registered) and both weight signs against a sample-stream model |
| `tb_ogc_correlator` | taps are +/-1 and complementary; every output against a direct 512-tap convolution; CES peak 512 h at index 639 with zeros +/-128 around it |
| `tb_cir_peak_search` | taps, averaging, tau (3, 21, 128), rejection of pre-cursor and tau > 128, done 160 cycles after start |
| `tb_inv_lut` | all 32767 inputs within 1/32 of `2^24/p`, saturation, monotonic |
| `tb_mpic_coef` | `c` and `m` against real arithmetic, `m = 0` without a second path, 5-cycle latency |
| `tb_mpic_path_delay` | delays 1..136 including 7, 8, 9, 128 and 136, with gaps |
| `tb_mpic_equalizer` | output against `(r - (h[tau]/h0) r[i-tau]) / h0` for tau 3, 8, 21 and 128, decisions, 3-cycle latency |
| `tb_pi2_derotator`, `tb_qpsk_demapper`, `tb_tde_ctrl` | rotation with saturation; bit mapping and register; sequencing, timing and PCES behaviour |
| `tb_golay_mpic_tde` | the full design at its defaults: three frames (SC tau 21 with PCES, OFDM tau 100, SC tau 5), channel estimates within 2 LSB, exact tau and main index, equalizer mean-square error below 1 %, every demapped bit, and latencies. It also counts each mechanism (estimation, PCES with the old estimate, sleep, shut-down, SC, OFDM, mode switch, cancellation) |

`tb_los_ber` runs the full design in SC mode over a noisy two-path
line-of-sight channel. The channel has tau = 6 (3.2 ns at 1760 MS/s) and
`|h[tau]/h0|` = 0.24; the noise is Gaussian. Each SNR point has its own
noisy CES and 96 000 payload bits. The uncoded bit-error rates:

| SNR (main-path Es/N0) | this design | ideal de-convolution, true channel | one tap, no cancellation |
|---|---|---|---|
| 6 dB | 2.7e-2 | 2.6e-2 | 3.6e-2 |
| 8 dB | 8.1e-3 | 7.6e-3 | 1.4e-2 |
| 10 dB | 1.3e-3 | 1.2e-3 | 4.4e-3 |

The published target for this mode is 1e-2 at 8 dB. The testbench checks
that target, that the design stays within 20 % of the ideal receiver
(plus a statistical margin), and that cancellation beats the one-tap
receiver. OFDM performance depends on the FFT, which is not part of this
RTL, so it is not measured.

In `tb_golay_mpic_tde` the FFT is a stand-in that only delays the data by 4
cycles. The OFDM payload is sent as time-domain QPSK so that the demapped
bits can be checked.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/tde_pkg.sv \
          tb/tb_golay_mpic_tde.sv --top-module tb_golay_mpic_tde -o sim
./obj_dir/sim
```

Replace `golay_mpic_tde` with any block name. Every testbench finishes in
well under a second. Lint a single module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/tde_pkg.sv rtl/<module>.sv`.

## Files

`rtl/tde_pkg.sv` holds the shared types (`cpx_in_t`, `cpx_h_t`,
`cpx_out_t`), widths and saturation helpers. Each other file in `rtl/` holds
one module of the same name, and `rtl/golay_mpic_tde.sv` is the top.
`tb/tb_<module>.sv` is the testbench of each module.
