# I/Q-corrected windowed FFT for a low-cost direct-conversion spectrum analyser

A direct-conversion (zero-IF) receiver is cheap: one mixer pair brings the RF
band straight down to baseband I and Q. Its weak point is that the two analog
branches are never quite matched. A gain mismatch ε and a phase error φ
between I and Q turn every tone at +f into a mirror image at −f. With 0.6 dB
and 4° of imbalance the image is only about 26 dB below the tone, which ruins
a spectrum display.

This RTL is the FPGA part of such an analyser. It has three stages, all on one
clock:

1. **Stat I/Q imbalance correction.** The corrector measures the imbalance
   blindly from the signal itself, using second-order statistics, and
   removes it with two multipliers and an adder.
2. **Window filter.** Each frame is multiplied by a window held in a RAM
   that the host writes.
3. **Block-floating-point FFT.** The FFT handles 8 to 8192 points, with
   16-bit data and a block exponent.

A host microcontroller does the scalar work. It computes the correction
coefficients from the sums the FPGA collects, generates the windows, and turns
FFT bins into magnitudes.

```
 ADC I/Q ──► stat_iq_imbalance ──┬──► time_i/time_q  (time-domain output)
 (14 bit)     ▲ sums ▼ coefs     │
              host               └──► ×4 ─► window_filter ─► fft_bfp ─► bins + blk_exp
                                          ▲ window_coef_ram ▲
                                          host writes       frame_start / nfft_log2
```

## 1. Blind I/Q imbalance correction (Stat)

### Model

The received branches are modelled as

    R_I = (1−ε)·(S_I cos(φ/2) − S_Q sin(φ/2))
    R_Q = (1+ε)·(S_Q cos(φ/2) − S_I sin(φ/2))

For any signal whose I and Q have equal power and no correlation, which is
true of nearly every real RF scene, the received signal itself reveals ε and φ:

    ε     = (√E[R_Q²] − √E[R_I²]) / (√E[R_Q²] + √E[R_I²])
    sin φ ≈ −2·E[R_I R_Q] / (E[R_I²] + E[R_Q²])     (measured after gain correction)

### Correction

Only one branch is changed. The stronger branch S is scaled down by (1−2|ε|),
which equalises the powers to first order. The phase is then repaired by
adding a fraction of the weaker branch W:

    C_S = (1−2|ε|)·S + sin φ · W        C_W = W

The sign of ε picks which branch is S (`iq_channel_select`). If ε < 0, I is
stronger and is corrected. Otherwise Q is corrected. This costs two
multipliers. The three running sums (ΣI², ΣQ², ΣIQ) cost three more, five in
total. Every multiplier fits an 18×18 hardware multiplier.

### The coefficient cycle

The FPGA only collects sums. The host does the square roots and the division.
`stat_control_fsm` sequences one cycle:

| state | what happens | leaves on |
|---|---|---|
| `ST_IDLE` | corrects with the coefficients held | `calc_new_coeffs` |
| `ST_GAIN_SUM` | sums raw ΣI², ΣQ², ΣIQ over `num_samples` pairs | counter reaches `num_samples` |
| `ST_GAIN_WAIT` | `sums_ready`; host reads sums, computes ε | `gain_coef_wr` (host writes ε) |
| `ST_PHASE_SUM` | sums the **gain-corrected** samples | counter reaches `num_samples` |
| `ST_PHASE_WAIT` | `sums_ready`; host computes sin φ | `phase_coef_wr` (host writes sin φ) |

Notes on the cycle:

- The sums are cleared on entry to each summing state.
- While summing, the sample stream keeps flowing and is corrected with
  whatever coefficients are loaded.
- `enable_corr = 0` passes the samples through unchanged. The sums and the
  cycle still work in that mode.
- The two coefficient registers reset to zero, which means no correction.
- With 14-bit samples, about 150,000 samples per step estimate the gain to
  well under 0.1 dB. The tests use 100,000 and 154,354 samples.

### Formats and timing

| quantity | format |
|---|---|
| samples in and out | 14-bit two's complement |
| ε, sin φ | 18-bit Q1.17 (`coef_wdata`, one register each) |
| sums | 48-bit signed; holds 2²¹ full-scale samples |
| sample counter / `num_samples` | 18 bits, up to 262,143 samples per step |

- The corrected sample comes one clock after the input sample.
- The products are cut back to 14 bits by dropping the fraction bits
  (floor). Results that would leave the 14-bit range saturate.
- The gain sums are ready `num_samples + 1` clocks after the first summed
  sample when a sample arrives every clock.

## 2. Window filter

`window_filter` multiplies the real and imaginary parts of N = 2^`nfft_log2`
samples by coefficient n, read from `window_coef_ram`.

- **Frame size.** N is chosen at run time, from 8 up to 8192 points.
- **Host.** The host fills the RAM through its own write port, using any
  window it likes: rectangular, Hann, Blackman-Harris or flat-top.
- **Control.** The filter's controller counts samples and addresses
  coefficients. It raises `out_last` with sample N−1 and `done` one clock
  later. Samples that arrive outside an armed frame are ignored.
- **Numbers.** The multipliers are 16×16 → 32 bits. Coefficients are signed
  Q2.14, so 1.0 = `0x4000` is exact and the negative lobes of a flat-top
  window are representable. The product is shifted right 14 bits (floor) and
  saturated to 16 bits. Saturation can only happen with coefficients above
  1.0.
- **Latency.** Two clocks from sample to windowed sample: one for the RAM
  read, one for the multiply.
- **Input width.** In the top, the 14-bit corrected samples enter the 16-bit
  window input multiplied by 4. A full-scale corrected sample thus uses the
  whole 16-bit range.

## 3. Block-floating-point FFT (`fft_bfp`)

The transform is a burst-I/O radix-2 decimation-in-time FFT with one
butterfly engine and one frame memory. Loading, computing and unloading are
separate phases, so the FFT accepts a new frame only after the previous one
has been read out.

### Load

Sample n is written to address bitrev(n). Because of this, the in-place stages
leave the result in natural order.

### Compute

Stage s combines pairs `N/2^(s+1)` apart with twiddles W = e^(−j2πk/N):

    A' = a + b·W,   B' = a − b·W

- **Twiddles.** They are 16-bit Q1.14 from `fft_twiddle_rom`. The table holds
  the first half circle of the largest frame, and is computed at elaboration
  time from `$cos`/`$sin`, so no data file is needed. Smaller frames use every
  2^(MAX_LOG2−log2N)-th entry.
- **Throughput.** The memory has one read and one write port, and a butterfly
  needs two reads and two writes. A butterfly therefore takes two clocks, and
  a stage takes N + 2 clocks, including the pipeline fill.

### Scaling (the part that needs care)

The data path is 16 bits, but a radix-2 butterfly can grow a value by up to
1 + √2 ≈ 2.41, which is more than one bit. Fixed scaling by ½ per stage, the usual
alternative, throws away log2 N bits even for small signals. Block floating
point scales only when it must:

- **Guard bits.** The frame memory stores 18 bits per component, which is
  16 plus 2 guard bits. No stage can overflow its storage.
- **Measuring growth.** While stage s writes, the engine records the largest
  number of bits beyond 16 that any result needs: 0, 1 or 2.
- **Shifting.** Stage s+1, or the unload, shifts every value it reads right by
  that amount. The shift is arithmetic, so it truncates. The same amount is
  added to `blk_exp`.
- **Result.** Every butterfly input is a true 16-bit value (an assertion
  checks this), and the output is exact up to the truncations:

      X[k] ≈ out_data[k] · 2^blk_exp

  A small signal comes out with `blk_exp = 0`. A full-scale tone in 8192
  points comes out with `blk_exp` near 13.

`blk_exp` is 5 bits. It holds the largest possible value, 2·13 = 26.

### Timing for N points

| phase | clocks |
|---|---|
| load | N (one sample per `in_valid`) |
| compute | log2N · (N + 2); first bin 1 clock after that |
| unload | N, one bin per clock with `out_index`, `out_last` on bin N−1 |

For 8192 points the compute phase is 106,522 clocks, about 1.64 ms at
65 MHz.

## 4. Top level (`decimator_dsp_top`)

- **Frame start.** `frame_start` with `nfft_log2` arms the window filter and
  the FFT together. It is accepted only while `frame_ready` is high, meaning
  both are idle. A start while busy is ignored.
- **Frame data.** The next N corrected samples form the frame. The host must
  have written the window first.
- **Host signals.** All Stat host signals, the window RAM write port, the
  time-domain stream and the spectrum output are plain ports of the top.
- **Magnitudes.** Magnitude and dB conversion (|X|·2^blk_exp) are left to the
  host.

| parameter | default | meaning |
|---|---|---|
| `MAX_LOG2` | 13 | largest frame 2^13 = 8192 points (RAM depths and counters follow) |
| `decimator_pkg` widths | 14 / 18 / 48 / 16 | sample, Stat coefficient, sum, window/FFT data |

### Memory

At the default size the design holds 557,056 bits of memory:

| memory | organisation | bits |
|---|---|---|
| FFT frame memory | 8192 × 36 (two 18-bit components) | 294,912 |
| window coefficient RAM | 8192 × 16 | 131,072 |
| twiddle table | 4096 × (16-bit cosine + 16-bit sine) | 131,072 |

The memories dominate the cost. Setting `MAX_LOG2 = 12` halves all three
and limits frames to 4096 points.

## 5. Where this design departs from the reference architecture

- **FFT core.** The reference architecture uses a vendor FFT core. `fft_bfp`
  is a new engine with the same external behaviour: burst I/O, radix-2,
  block floating point with a block exponent, 16-bit data, up to 8192
  points, natural-order output. Its cycle count and its way of detecting
  overflow are its own.
- **Rounding.** Truncation (floor) is used everywhere. The Stat correction
  and the window products truncate as in the reference architecture. The
  FFT's scaling and twiddle products also truncate, whereas the reference
  FFT used convergent rounding. Rounding is the obvious first improvement:
  it removes the small negative bias that flooring adds.
- **Number formats.** The Q2.14 window format, the Q1.17 coefficient format,
  the 48-bit sums and the ×4 placement of 14-bit samples into the 16-bit
  window path are this design's choices.
- **Host handshake.** The coefficient writes themselves advance the Stat
  cycle. The state machine is fully registered and infers no latches.
- **Out of scope.** The analog receiver, the ADC, the microcontroller
  firmware, the time-domain calculations and the PC link are not part of
  this RTL.

## 6. Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`, has a watchdog, and checks cycle counts where
a latency is defined.

| testbench | what it checks |
|---|---|
| `tb_iq_channel_select` | branch routing for every coefficient sign |
| `tb_iq_correct` | correction against a real-number model, pass-through, saturation |
| `tb_iq_mac` | the three sums against a reference, with gaps in `acc_en` and a clear |
| `tb_stat_sample_counter` | targets 1, 7, 1000, 154,354; done pulse timing |
| `tb_stat_control_fsm` | every transition, and holding under spurious commands |
| `tb_stat_iq_imbalance` | bit-exact sums over two full cycles (see below) |
| `tb_window_coef_ram` | write/read, read-before-write, latency |
| `tb_window_filter` | Hann and rectangular frames, exact products, `out_last`/`done` timing |
| `tb_fft_bfp` | several frame sizes against a double-precision DFT (see below) |
| `tb_decimator_dsp_top` | end to end at default parameters (see below) |
| `tb_window_fft_carrier` | window + FFT accuracy for five windows and three lengths (see below) |
| `tb_stat_accuracy` | Stat estimate accuracy against the number of samples per step (see below) |

Details for the larger testbenches:

- **`tb_stat_iq_imbalance`.** Two full cycles, with ε = 0.035, φ = 4° and
  ε = −0.02, φ = −2°. The testbench acts as the host. It checks that the
  residual imbalance is below 0.1 dB and the residual correlation below 0.02.
- **`tb_fft_bfp`.** Frames of 8 to 1024 points: impulse, small tone, tone,
  random, real-only. The testbench checks the bin order, `blk_exp`, and the
  exact compute latency.
- **`tb_decimator_dsp_top`.** This testbench acts as the ADC and the host. It
  runs four steps:
  1. An uncorrected 512-point spectrum, where the image is about −26 dB.
  2. A full Stat cycle over 154,354 samples, with the host arithmetic done
     in real numbers.
  3. A corrected 8192-point spectrum, where the image falls below −50 dB.
  4. A cycle with the I branch stronger.

  It counts each mechanism and fails if one never happens: pass-through,
  gain step, phase step, Q-strong and I-strong correction, BFP scaling, and a
  refused frame start.
- **`tb_window_fft_carrier`.** This testbench runs the frequency-domain path
  at full size. The input is a complex carrier 15 MHz above centre, sampled
  at 65 MHz.
  - Windows: rectangular, Hamming, Hann, Blackman-Harris and flat-top.
  - Lengths: 512, 2048 and 8192 points.
  - Reference: a double-precision DFT of the same samples times the
    unrounded window.

  Errors are relative to the carrier peak. Across all 15 cases they measure:

  | error | measured | limit |
  |---|---|---|
  | peak-bin magnitude | −85 to −106 dB | −75 dB |
  | mean magnitude | about −92 dB | −85 dB |
  | largest complex error, any bin | about −70 dB | −65 dB |

  No window or length shows excess error near the carrier. The testbench
  also checks the FFT latency of log2N·(N+2) + 2 clocks after the window's
  `done`.

- **`tb_stat_accuracy`.** This testbench runs complete coefficient cycles.
  - Data: random data with 0.608 dB and 4° of imbalance.
  - Samples per step: 10,000, 50,000, 100,000, 154,354 and 200,000.
  - Every sum must be bit-exact.

  Typical estimate errors:

  | samples per step | gain error | phase error |
  |---|---|---|
  | 10,000 | 0.04 dB | 0.5° |
  | 154,354 (mean of four runs) | 0.01 dB | 0.06° |

  With 14-bit data the sums are not the limit; the randomness of the signal
  is.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_decimator_dsp_top \
        rtl/decimator_pkg.sv $(ls rtl/*.sv | grep -v decimator_pkg) tb/tb_decimator_dsp_top.sv
    ./obj_dir/Vtb_decimator_dsp_top

The package goes first so that it is compiled before its users. The block
testbenches of the window filter and the FFT run at 1024 points (local
parameter `MAXL`) to stay fast. The top-level testbench runs the full
8192-point configuration.
