# DMT baseband receiver for VDSL

This is the baseband receiver of a DMT (discrete multi-tone) modem for VDSL, in
synthesizable SystemVerilog. The line signal is split into 4096 tones spaced
4.3125 kHz apart. Each symbol is an 8192-point inverse FFT, preceded by a
640-sample cyclic prefix. The receiver takes the free-running ADC samples and
does four jobs:

1. It finds where the DMT symbols begin.
2. It locks its sampling instants to the transmitter's clock, which may be off
   by about 100 ppm.
3. It measures the channel on every tone from a known training sequence and
   keeps that estimate up to date with an LMS-adapted frequency-domain
   equalizer (FEQ).
4. It slices every tone into the bits loaded on it, up to 15 bits per tone.

The FFT is outside the receiver. The receiver marks the samples that form the
FFT window and takes the FFT's output tones back one per clock. There is no
time-domain equalizer: the 640-sample guard interval covers the channel's
impulse response, so each tone needs only a single complex coefficient.

```
 adc_data ─► interpolator ─┬─► delay correlator ─► boundary search ─┐
              ▲  (mu)       │                                        ▼
              │             └───────────► fft_in  ◄──── rx_control (fft_enable, slips,
     timing controller ◄── loop filter ◄── timing error detector     training state)
                                               ▲
 fft_out ─► tone counter ─┬─► preamble end detector ─► rx_control
                          ├─► timing error detector (pilots 600 and l)
                          └─► channel estimation / adaptive FEQ ─► decisions (dec_*)
                                 ▲ bit allocation table, coefficient RAM,
                                   training scrambler, 1/X divider, QAM decision
 scan_in ─► parameter scan chain ─► threshold, pilot l, loop gains, LMS step, averaging
```

All files are in `rtl/`, one module or package per file. Shared types and
constants live in `rtl/vdsl_pkg.sv`. The top is `vdsl_rx_top`.

## Clocking and interfaces

- **Clock and reset.** One clock domain, at one ADC sample per cycle
  (35.328 MHz for VDSL). Reset `rst_n` is asynchronous and active low.
  `restart` drops the lock and starts a new search.
- **ADC side.** `adc_valid` and a 12-bit two's-complement `adc_data`.
- **FFT side, out.** The interpolated sample is `fft_in`. `fft_enable` marks
  the 8192 samples of each FFT window.
- **FFT side, back.** The FFT returns tones 0..4095 as `fft_out`: 15-bit real
  and imaginary parts, one per cycle with `fft_out_valid`. `stating` marks
  tone 0 of each symbol. The receiver has no FFT latency requirement.
- **Bit allocation.** `bat_we`, `bat_addr` and `bat_data` load the bits per
  tone (0..15). Bit loading itself, such as water-pouring from the channel
  estimate, is host software.
- **Parameters.** `scan`, `scan_in` and `scan_out` form a serial chain holding
  a `rx_params_t` (see the table at the end). Bits go in at the least
  significant end, most significant bit first. Reset loads `PARAMS_DEFAULT`.
- **Decisions.** `dec_valid`, `dec_tone`, `dec_nbits` and `dec_bits` carry
  the demapped word of each loaded tone. `xh_re`/`xh_im` give the equalized
  point: 18 bits with 12 fraction bits, where the QPSK points are ±1.
- **Status.** `locked`, `tstate`, `sb_success`, `preamble_end`, `ce_wr`,
  `ted_valid`/`ted_err`, `timing_freq`, `slip_late` and `slip_early` let a
  host watch acquisition.

## Acquisition sequence

The transmitter starts with a run of identical training symbols, then one
synchro symbol, then channel-estimation (medley) symbols carrying the known
QPSK training sequence, then data. The receiver goes through four training
states (`train_state_e`):

| state      | entered when                                   | what runs                                                                          |
|------------|------------------------------------------------|------------------------------------------------------------------------------------|
| `TS_ACQ`   | reset / restart                                | boundary search; once locked, FFT window and timing loop                           |
| `TS_CHEST` | preamble end detector sees the synchro symbol  | channel estimate over 2^`ch_avg_log` symbols; the first one overwrites, the rest add |
| `TS_DATA`  | after the estimation symbols                   | decisions plus LMS update of every loaded tone                                     |
| `TS_HOLD`  | as `TS_DATA`, when `adapt_en` = 0              | decisions only                                                                     |

The state changes with `stating`, so a whole FFT symbol is always handled in a
single state.

## Symbol boundary: delay correlator and search

The cyclic prefix repeats the last 640 samples of the symbol body. So the
correlator computes CS(i) = Σ_{n<640} r(i+n)·r(i+n+8192) (`delay_correlator`).
It does this as a running sum: each sample adds the newest product
r(i)·r(i−8192) and subtracts the product that is 640 samples old.

- It uses two `delay_line`s, of 8192 and 640 samples (each a circular buffer
  whose output is 0 until it is full).
- Latency is 2 cycles. The output width is 2·12 + log2(640) + 1 bits.

`search_boundary` waits until CS rises above `sb_threshold`. It then looks for
the maximum over the next full symbol (8832 correlator outputs) and reports
`sb_success` together with `max_age`, the number of samples since the maximum.
The maximum falls on the last sample of a symbol body.

`rx_control` turns this into a symbol counter `sc`:

- `sc` = 0 is the first prefix sample of a symbol.
- The FFT window is `sc` in [640−80, 640−80+8192). The window is pulled 80
  samples (one eighth of the prefix) back into the prefix. This keeps it clear
  of the previous symbol's channel tail when the coarse maximum is a little
  late.
- The phase rotation this causes is the same on every symbol. The channel
  estimate absorbs it.
- The first window is the first whole one after lock.

## Timing recovery

The ADC runs freely. The loop corrects both the fixed sampling phase and the
frequency offset. It is made of a timing error detector, a loop filter, a
timing controller and an interpolator.

**Timing error detector** (`timing_error_detector`). A sampling offset τ
rotates tone k by 2πkτ/8192. The detector works on two pilot tones: tone 600,
and tone l (`pilot_second`, default 1200).

- It takes each pilot's angle and forms (θ600 − θl) for the symbol.
- It outputs the change of this difference from the previous symbol. That is
  the drift per symbol, with the channel's own phase cancelled.
- Angles are in units of 2π/4096 and wrap naturally in 12 bits.
- The angle is computed from the smaller over the larger of |I| and |Q|:
  - The ratio comes from a bit-serial divider (`seq_divider`, 8 quotient
    bits).
  - It is looked up in a 257-entry arctangent ROM over one octant
    (`atan_rom`, table round(atan(a/256)·4096/2π) in `rtl/atan_rom.hex`).
  - The result is folded to the right octant from the signs and from which
    component was larger.
- The first symbol after lock gives no output.

The detector uses the raw FFT outputs rather than the equalized ones, so the
loop can converge before the channel is estimated.

**Loop filter** (`loop_filter`). freq = kp·e + Σ ki·e, saturated to 24 bits.
freq is the delay change per sample in units of 2^−24 sample. Because the
detector already measures a rate, the integral path alone tracks a clock
offset. With 100 ppm, 0.88 samples per symbol, the integrator settles at about
±1672. The defaults are kp = 0 and ki = −2; the sign matches the detector's
sign convention. They were found by simulation. Larger |ki| makes the loop
ring, because the detector reports a symbol late.

**Timing controller and interpolator** (`timing_controller`, `interpolator`).

- A 24-bit accumulator adds freq once per sample. Its top 10 bits are the
  fractional delay mu.
- The interpolator delays the signal by 1 + mu samples. It uses a cubic
  Lagrange polynomial through the four newest samples, evaluated in Farrow
  form: three Horner steps in mu, then a divide by 6 done as a
  constant multiply. The result is saturated and registered (1 cycle), and is
  within one LSB of the exact polynomial.
- When the accumulator wraps, the controller reports a whole-sample slip.

**How slips reach the FFT window.** This is the subtle part.

- **The delay wraps up by one sample (`slip_late`).** The next interpolator
  output repeats the content of the previous one. The top drops that sample:
  it is not counted by `rx_control` and is not in the FFT window. The window
  content stays continuous. This is the case when the receiver's clock is
  faster than the transmitter's.
- **The delay wraps down (`slip_early`).** A sample is missing, and one
  sample per clock cannot make it up. `rx_control` keeps the request pending
  (up to ±15). It applies it while `sc` is in the prefix before the window
  (`sc` in [1, 558]) by advancing `sc` by two.
  - The window still has exactly 8192 samples, which any FFT needs.
  - But the mu wrap inside the window leaves a one-sample discontinuity in
    that symbol. That adds some noise to the pilot phases.

  Both drift directions are tracked. The case with a receiver clock faster
  than the transmitter's, which gives late slips, is the clean one.

## Channel estimation and adaptive FEQ

`chest_feq` handles every tone as it leaves the FFT, one per cycle. It uses
these parts:

- the coefficient RAM (`feq_coef_ram`): 4096 × complex, 24-bit components,
  G stored as G·2^30;
- the bit allocation table (`bit_alloc_table`);
- the training sequence generator (`ce_scrambler`): a 9-bit PRBS
  x^9 + x^4 + 1, all-ones seed, two bits per tone giving the QPSK point,
  restarted when the preamble end is seen;
- a pipelined reciprocal (`pipe_divider`);
- the slicer and demapper (`qam_decision`).

**Estimate** (`TS_CHEST`): G = X/Y = X·conj(Y)/|Y|².

1. X·conj(Y) and |Y|² are formed for each tone.
2. `pipe_divider` computes 2^41/|Y|² at one result per clock. It has Q_W + 1
   = 27 stages and saturates when |Y| is tiny. The tone's product travels
   with it as a tag.
3. The product is multiplied by the reciprocal and pre-shifted right by
   `ch_avg_log`.
4. The result is written, on the first estimation symbol, or added to the
   stored value on later ones. So the stored value is the average.

From tone in to RAM write takes 28 cycles. Tones arrive back to back, so this
path never stalls.

**Data** (`TS_DATA` / `TS_HOLD`). Three cycles per tone:

1. Read G.
2. Form X̂ = G·Y, shifted right by 18 to 12 fraction bits and saturated.
3. Decide: `qam_decision` slices X̂ and gives the bits and the error
   e = X − X̂. In `TS_DATA` it also writes the LMS update
   G += (e·conj(Y)) >>> (`mu_shift`), so μ = 2^−(mu_shift+18) in real terms.

The update uses conj(Y), the gradient of |e|² for complex data. An assertion
checks that the RAM's write port is never claimed by both paths.

**Decisions** (`qam_decision`, combinational).

- A b-bit tone is a rectangular QAM with ceil(b/2) bits on I and floor(b/2)
  on Q, scaled to unit average energy: level spacing 2/sqrt(E/2), with
  E = ((4^bI − 1) + (4^bQ − 1))/3.
- The slicer rounds to the nearest level and clips to the outermost one.
- The word is {Q index, I index}, in natural binary order from the most
  negative level.
- Gain and inverse-gain tables for 1..15 bits are built at elaboration by
  constant functions.

The 2048-point constellation (11 bits) fits easily in 12 fraction bits: its
levels are about 136 LSB apart.

## Parameters in the scan chain (`rx_params_t`)

| field          | bits | default | meaning                                                               |
|----------------|------|---------|-----------------------------------------------------------------------|
| `sb_threshold` | 36   | 4 000 000 | CS level that starts the boundary search (scale with signal power²) |
| `pilot_second` | 12   | 1200    | second pilot tone l                                                   |
| `lf_kp`        | 8 s  | 0       | loop proportional gain                                                |
| `lf_ki`        | 8 s  | −2      | loop integral gain                                                    |
| `mu_shift`     | 5    | 9       | LMS step 2^−(mu_shift+18)                                             |
| `ch_avg_log`   | 3    | 1       | log2 of estimation symbols averaged                                   |
| `adapt_en`     | 1    | 1       | LMS on in the data state                                              |

## Where this design departs from, or adds to, the receiver it is based on

- **Fixed choices of this implementation.** The receiver it follows gives the
  block structure and the algorithms: the correlator equation, the two-pilot
  error detector with primary pilot 600, X/Y estimation and LMS. It does not
  give any of the following:
  - word widths;
  - the interpolator type (cubic Lagrange, Farrow form, here);
  - the loop filter form and gains;
  - the scrambler polynomial of the training sequence;
  - the synchro symbol's content (taken here as the training symbol with
    every tone inverted; the detector looks for a sign change on tone 600);
  - the QAM labelling.
- **Delay lines inside.** The two long delay lines are built in
  `delay_correlator`. In the original chip they were outside, together with
  the FFT.
- **Coarse boundary only.** The boundary is the correlator maximum, backed
  off into the prefix. A finer boundary search is not implemented.
- **Not included.** The transmitter, the FFT, the ADC and the receiver back
  end (deinterleaver, Reed–Solomon decoder, descrambler) are not included.
  Neither is the device that chooses the second pilot: the pilot is a
  parameter.
- **No BER figures.** Simulated runs check bit-exact decisions over short
  symbol sequences.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each compares the module against an independent model and ends by printing
`TB_RESULT checks=… failures=…`. Run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/vdsl_pkg.sv \
          tb/tb_qam_decision.sv --top-module tb_qam_decision -o sim
./obj_dir/sim
```

`tb_vdsl_rx_top` is the end-to-end test at full size: 8192-point FFT,
640-sample prefix, every module parameter at its default. The scan chain is
loaded with the defaults, except the detection threshold. It simulates in
well under a minute.

- **Signal.** It builds a VDSL-like signal in floating point over tones
  32..2400:
  - 12 training symbols, a synchro symbol and 2 medley symbols;
  - 6 checked data symbols carrying random 1..4-bit QAM;
  - pilots 600 and 1200 carrying 1+j.
  - 12 more data symbols follow, not checked (see the clock offset below).
- **Channel.** The clock offset is applied by windowed-sinc interpolation of
  the transmitted signal, then a three-tap echo channel, then 12-bit
  quantization.
- **Clock offset.** −100 ppm during the checked part. The sign then flips to
  +100 ppm, so that both slip directions occur.
- **FFT.** A floating-point model of the external FFT.
- **Checks.** Every decision against the transmitted bits. That each
  mechanism happened at least once:
  - boundary detection;
  - preamble end;
  - channel-estimate writes for both estimation symbols;
  - timing-error outputs;
  - late slips (dropped samples) and early slips (window moves);
  - LMS updates;
  - hold mode, after the parameters are shifted in again with adaptation off
    (no LMS writes may follow, and the old word must come out of `scan_out`);
  - `restart` dropping the lock.
- **Last result.** All 14202 checked words correct, 17 late and 9 early slips,
  7 symbols in hold mode.

`tb_vdsl_rx_qam2048` runs the same link loaded for the top VDSL rate:

| tones      | bits per tone      |
|------------|--------------------|
| 32..400    | 11 (2048-QAM)      |
| ..1400     | 8                  |
| ..2400     | 4                  |

That is 16043 bits per symbol: 64 Mbit/s at 4000 symbols per second. Every
word decodes correctly, including all 2214 of the 11-bit ones.

With 2048-QAM extended up to tone 599, the first error appears: one word in
3400. Bit error rates near 1e-7 need far longer runs than an RTL simulation
allows.

## Known limits

- **Tested band.** The cubic interpolator's error grows toward half the
  sample rate. The tests pass with 1..4-bit loading up to tone 2400 (0.29 of
  the sample rate). With the band extended to tone 3400, about 2% of words
  fail. Dense constellations need the lower tones, or a longer interpolation
  filter.
- **Early-slip discontinuity.** Early slips leave the one-sample
  discontinuity inside one window described above.
- **Clock rate.** One sample per clock means the clock must run at the
  sample rate. There is no slack for a clock below it.
- **Threshold scaling.** `sb_threshold` must be set for the actual signal
  level. The end-to-end test loads 15 000 000 for a 250 LSB rms signal.
