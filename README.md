# Real-time ECG heart-rate estimator with a memory-based radix-4 FFT

This is the digital half of a wearable heart-rate monitor. An ECG from dry
textile electrodes is sampled at 512 samples/s. Its slowly wandering
baseline is removed by an adaptive subspace tracker. The heart rate then
comes from the autocorrelation of the signal's absolute value: an R wave
repeats every R-R interval, so the autocorrelation peaks at that lag. The
autocorrelation is computed as FFT, then |X|², then inverse FFT. A wearable
device runs slowly and has little power and area to spare. So the FFT is
*memory based*: one single-port RAM, one radix-4 butterfly and one complex
multiplier, reused for all 4096 points, both transforms and every stage.
The FFT uses about 0.5 % of the time available.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) running in one
25 MHz clock domain. The analog front end (instrumentation amplifier,
60 Hz notch, band-pass filter, gain-600 output stage) and the LTC1282
12-bit converter are outside this RTL. The converter's pins are ports of
the top.

```
 LTC1282 pins ─► adc_ctrl ─► bwr ─► hr_estimator ───────────────► seg7_display ─► 6 digits
 (CS,RD,HBEN,    512 Hz      baseline  |x|, 2048-sample window       Q.QQ  HHH
  BUSY,D11..0)   12-bit      removal   └► fft_r4_mem (4096-pt)
                                          fft_ram · twiddle_rom · fft_addr_gen
                                          r4_butterfly · cmul_q14
```

## The memory-based FFT (`fft_r4_mem`)

### Decomposition and schedule

N = 4096 = 4⁶, so the transform is six radix-4 decimation-in-frequency
stages, computed in place in one 4096 × 32-bit RAM. Each word holds the
16-bit real part above the 16-bit imaginary part. A butterfly reads
four words spaced N/4ˢ⁺¹ apart (its *legs*). It forms their 4-point DFT
with adders only, multiplies legs 1–3 by twiddle factors and writes the
four results back to the same four addresses.

The RAM has a single port, so a butterfly takes 8 clocks:

| clock | RAM port | processing element |
|---|---|---|
| 0–3 | read legs 0, 1, 2, 3 | legs 0–2 are registered one clock after their read |
| 4 | write leg 0 | leg 3 comes straight from the RAM output. y0 = sum of the legs (no twiddle) is written. y1–y3 are registered. Twiddle 1 is fetched. |
| 5–7 | write legs 1, 2, 3 | yₖ × Wₖ through the complex multiplier. The next twiddle is fetched. |

One stage takes 1024 × 8 = 8192 clocks, and the six stages take 49,152
clocks. The testbench measures 49,154 clocks from the last input word to
the first output word. In the controller's four states, *idle* waits.
*input* stores one sample per clock while `in_valid` is high, in natural
order. *compute* runs the stages. *output* streams the result.

### Addresses from a counter

There is no address arithmetic. A 12-bit counter `{b, leg}` runs
through each stage, with the two low bits as the leg. The RAM address is
that counter **rotated right by 2·(stage+1) bits**:

* stage 0: `{leg, b[9:0]}`, so the legs are x[n], x[n+1024], x[n+2048],
  x[n+3072];
* stage s: `{b[2s-1:0], leg, b[9:2s]}`, so each stage moves the leg one
  base-4 digit lower. The digits above it are those already transformed.

The twiddle exponent of a leg is `leg · (b >> 2s) · 4ˢ`, in units of
1/4096 of a turn. At the end, result X[k] sits at the base-4
digit-reversed address of k ("group reverse"). The output state reads
in that order, so X[k] leaves in natural order with `out_idx = k`.

### One-eighth twiddle table

`rtl/twiddle_rom.hex` holds only the first octant, m = 0…512:
`{round(16384·cos(2πm/4096)), round(16384·sin(2πm/4096))}` in Q1.14.
The exponent's top three bits select the octant. Odd octants index the
table backwards (m = 512 − r). Each octant then swaps cosine and sine
and/or negates them. The ROM returns W = cos − j·sin one clock after
its exponent.

### Scaling

With `scale_fwd[s]` set, stage s divides its outputs by 4 with
rounding. Otherwise the outputs saturate at 16 bits. With all stages
scaling, the result is X[k]/N, and overflow cannot happen. On a
full-scale 4096-point multi-tone input the error against a
double-precision DFT is at most 1 LSB.

### Correlation mode: FFT, |X|², IFFT in one memory

The estimator needs IFFT(|FFT(x)|²). The IFFT is done with the FFT
itself. For real x, |X|² is real and even, so its
forward transform equals N times its inverse transform. With
`corr_mode` high, the controller adds two steps after the forward
transform. Neither step is in the original controller description:

1. **Power pass.** Each word is read and replaced by
   `(re² + im²) >> PWR_SHIFT` (saturated, imaginary part 0). This takes
   2 clocks per word, 8192 clocks in all.
2. **Transposed second transform.** The power words are still in
   digit-reversed order, and reordering them in place through one port
   would need a second memory. So the second transform runs the *transposed*
   flow graph of the first: stages in reverse order, the same addresses,
   and each butterfly multiplies legs 1–3 by their twiddles as they are
   read (in clocks 2–4) before the adder network. The DFT matrix is
   symmetric, so this computes the same transform. It takes
   digit-reversed input to natural-order output, still at 8 clocks per
   butterfly. Its per-stage scaling comes from `scale_inv`.

A `replay` pulse in idle streams the stored result again without
recomputing it. The estimator uses this for its second peak search.

## Heart-rate estimation (`hr_estimator`)

* Each baseline-free sample is turned into its absolute value, clipped to
  2047 and written into a 2048-sample circular window (4 s). Four
  seconds are enough to hold two R waves at the lowest rate, 30 beats/min.
* Once the window is full, and then every 512 samples (about once a
  second), the window (oldest sample first, ×16) is fed to the FFT,
  followed by 2048 zeros. The zero padding makes the circular
  correlation equal the linear one.
* Pass 1 over c(l): **pos1** = lag of the largest value in 153 ≤ l ≤ 1024,
  i.e. 200 down to 30 beats/min.
* Replay, pass 2: **pos2** = lag of the largest value in
  1.5·pos1 ≤ l ≤ min(2.5·pos1, 2047).
* A sequential divider forms
  `hr_bpm = round(60·512 / pos1)` and the quality indicator
  `q_pct = round(100·(pos2 − pos1)/pos1)`. For a perfectly regular
  rhythm the second peak sits at twice the first, so Q = 1.00
  (`q_pct = 100`). Irregular beats or lost contact lower it.

One estimate takes 118,837 clocks (4.8 ms). Samples keep arriving
meanwhile.

Fixed-point settings (parameters, all this design's choice): input shift
4, `PWR_SHIFT` 6, forward transform scaled in every stage, second
transform scaled only in its first three stages (`SCALE_INV = 6'b000111`).
These suit R waves of a few hundred ADC codes. A much larger signal can
saturate power words or the last stages of the second transform.
Saturation flattens peaks and does not wrap. Adjust `IN_SHIFT` for a
different front-end gain.

## Baseline wander removal (`bwr`)

Loose dry electrodes, breathing and movement add a large, slow component.
It is tracked as the dominant eigenvector of the correlation of the last
40 samples i(n). One power-method step runs per sample, without forming
the matrix:

```
s(n) = α·s(n−1) + (1−α)·i(n)·(i(n)ᵀ z(n−1))      α = 0.99
z(n) = s(n) / ‖s(n)‖
b(n) = (i(n)ᵀ z(n))·z(n)
y    = x(n) − b_last(n)
```

The word lengths are those of the original design: i 12 bits, s 26 bits
signed, z 10 bits in units of 2⁻¹⁰, and α, 1−α in units of 2⁻¹² (4055, 41).
Every product and inner product goes through **one** multiplier and
accumulator in turn. ‖s‖ comes from a sequential square root
(`seq_sqrt`) and z from a sequential divider (`seq_divider`). A four-state
FSM (idle, BWR_in, BWR_com, BWR_out) sequences the work, about 1,800 clocks
per sample, under 4 % of the sample period.

This design's own choices:

* only the newest element of y leaves, one output per input;
* z is kept non-negative (for positive ADC codes the dominant eigenvector
  has positive entries);
* z starts at 1/√40 in every element and s at 0;
* z is held if ‖s‖ is 0.

For the constant part of the signal the block acts like subtracting the
mean of the 40-sample (78 ms) window. A constant input settles to a
residual of about 1 % of its level.

## Converter control and display

* `adc_ctrl` holds HBEN low, so all 12 bits come in parallel. Every
  25 MHz / 512 = 48,828 clocks it pulls CS and RD low, waits for BUSY
  (synchronised) to fall and rise, latches D11..D0 and releases CS and RD.
  A converter that does not answer within 1000 clocks is counted in
  `adc_err` and skipped.
* `seg7_display` shows the quality on the left three digits (`0 9 4`
  means 0.94) and the heart rate on the right three. Segments are
  active low, bit 0 = a, `hex[5]` leftmost. All digits show dashes until
  the first estimate.

## Parameters worth knowing

| module | parameter | default | meaning |
|---|---|---|---|
| heart_rate_top | CLK_HZ, FS | 25 000 000, 512 | clock and sample rate |
| fft_r4_mem | LOG4N | 6 | N = 4^LOG4N (the twiddle table always spans 4096, so smaller N uses a stride) |
| hr_estimator | WIN_LOG2, HOP | 11, 512 | window 2048, estimate every 512 samples |
| hr_estimator | LAG_MIN, LAG_MAX | 60·FS/200, 60·FS/30 (153, 1024) | R-R search range in samples |
| bwr | L, ALPHA_Q, OMA_Q | 40, 4055, 41 | window length, α and 1−α in units of 2⁻¹² |

Memory use at the defaults: FFT RAM 131,072 bits, twiddle table 16,416
bits, window buffer 22,528 bits, and three 40-element vectors in registers.

## Where this departs from the original description

* **How |X|² re-enters the FFT** is not described. The in-place power pass,
  the transposed second transform and replay are additions, chosen to keep
  the single data memory.
* **Counter bit order.** The original rotates the counter left by two bits
  per stage. Here it is rotated right, with the leg in the low bits. It is
  the same idea with a different bit assignment. The twiddle exponent uses
  a small multiplier rather than pure bit selection.
* **Butterfly cost.** The original quotes 26 adders and 4 multipliers. Here
  there are 16 adders in the butterfly plus one complex multiplier
  (4 multipliers, 2 adders, rounding).
* **Peak-search ranges**, the fixed-point scaling of the correlation path,
  the Q1.14 twiddle format, the output element of the baseline remover,
  the converter timeout and the display polarity are all this design's
  own choices.
* At the defaults the system expects its own 512 Hz converter. The
  formulas and the lag search range follow `FS` (200 and 30 beats/min);
  the window stays 2048 samples, i.e. 10.24 s at 200 samples/s.

## Simulating

Every testbench is self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Run from the
repository root, because the twiddle table is read as `rtl/twiddle_rom.hex`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/hr_pkg.sv tb/tb_fft_r4_mem.sv --top-module tb_fft_r4_mem
./obj_dir/Vtb_fft_r4_mem
```

| testbench | what it checks |
|---|---|
| tb_fft_r4_mem | 4096-point multi-tone input against a double-precision DFT (±4 LSB, observed 1). Latency of 49,154 clocks. 64-point random input. Correlation mode against a directly summed autocorrelation. Replay. |
| tb_fft_addr_gen | every stage/counter value against the radix-4 index mapping; each stage visits every address once; digit reversal |
| tb_twiddle_rom | all 4096 exponents against cos/sin within 1 LSB |
| tb_r4_butterfly | random and full-scale inputs against an integer 4-point DFT, scaled and saturated |
| tb_fft_ram | every address; one-clock read; read-before-write |
| tb_bwr | 1,200 samples of synthetic ECG with wander, bit-exact against an integer model; constant input settles to near 0; latency under one sample period |
| tb_hr_estimator | full size. Two rhythms (77 and 123 beats/min). pos1 against a floating-point autocorrelation. Both formulas. Q near 1.00. Latency. |
| tb_hr_workloads | four estimators fed in parallel with the evaluated rhythms: R-R 181 samples at 200 samples/s (66 beats/min), and at 512 samples/s 74 beats/min, the 30 beats/min limit and the 199 beats/min end of the search. Rate within 1 beat/min, Q near 1.00. |
| tb_adc_ctrl | with a converter model: the sample values, 1953-clock spacing at a 1 MHz clock, timeout on a silent converter |
| tb_seg7_display | random values decoded back from the segment patterns |
| tb_heart_rate_top | whole system at its default parameters, 25 MHz, about 125 M clocks (about 1.5 minutes in Verilator). Checks two estimates of a 73-beats/min synthetic ECG with baseline wander, the display, and that every mechanism occurred (conversions, a converter timeout, baseline removal, forward transform, power pass, correlation transform, replay, estimates, display updates). |

`tb/ltc1282_model.sv` is a behavioural model of the converter's pin
behaviour (start on CS/RD low, BUSY low for 6 µs, data on BUSY rising).
