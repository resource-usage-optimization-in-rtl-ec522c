# GSM receive-path accelerators for a small SDR base station

A GSM base station built on a small software-defined radio (an ARM host next to
a Spartan-3A DSP class FPGA) runs out of CPU long before it runs out of FPGA.
The two most expensive receive functions are finding where a burst starts
(correlating against the known training sequence and locating the peak to a
fraction of a sample) and channel equalization (an adaptive decision-feedback
equalizer). This RTL moves both into logic, behind the existing CIC
decimation, and keeps the hardware small by sharing multipliers and by
replacing division with a short series of multiplications.

```
adc_i/adc_q ─► cic_decim (x2) ─► systolic_corr ─► burst window ─► peak_detect ─► toa_q8
  12 bit        N=4, R≤128         16 complex taps    12 lags          CORDIC + sinc
                24-bit out         3-mult products                     interpolation
eq_u/eq_d/eq_train ───────────────► rls_equalizer (16 taps, RLS) ─► eq_y, eq_dec, eq_e
                                        └─ series_recip (1/b without a divider)
```

The top is `sdr_rx_top`. It has two independent paths. The derotation and
channel-estimate steps between burst timing and equalization are not part of
this design, so the equalizer takes its input from ports, and the decimated
samples are brought out too.

## Burst timing path

### Decimation (`cic_decim`)
There are two identical CIC decimators, one for I and one for Q. Each has 4
integrators at the input rate, a down-sampler, and 4 combs with a differential
delay of 1 at the output rate. The rate is a run-time input, up to 128. At
R = 128 the internal width is 12 + 4·log2(128) = 40 bits, and the top 24 bits
are kept (`out = full >>> 16`), so a constant input x gives x·2^12. At smaller
rates the output is not rescaled. Registers wrap in two's complement. This is
harmless because the combs undo the wrap. `out_valid` rises one clock after
every R-th accepted input, and the sample it marks includes that input.

### Correlation (`systolic_corr`, `cmult3`)
The correlator is a systolic FIR with an adder cascade, one slice per training
symbol (16 slices):
- Data moves through two registers per slice (one in the first slice).
- Each slice multiplies the data by its stored coefficient.
- The product is added to the partial sum coming from the previous slice and
  registered.

Everything advances only on `in_valid`, so the array runs at the decimated
rate without stalling logic.

The taps are complex. Each one is a `cmult3`, which forms a complex product
from three real multiplications:

`common = (a_re − a_im)·b_im`, `re = common + (b_re − b_im)·a_re`, `im = common + (b_re + b_im)·a_im`

Coefficients are written through `coef_we/addr/re/im` and stored conjugated,
in reverse order. Output k is therefore Σ_j conj(c_j)·x(k+j), a correlation
rather than a convolution. The result for the window that ends at sample n
appears after sample n + 2 (NTAPS + 2 samples after its first sample). The
cascade is 54 bits, which is full precision. The conjugate of −2^23 needs 25
bits.

### Burst window
`burst_start` marks the next decimated sample as sample 0. Samples 0..26 give
the 12 lags l = 0..11 (window 27 − 16 + 1). Lag l leaves the correlator after
sample 32 + l. It is scaled to 34 bits (>>> 20) and handed to the peak
detector.

### Peak detection (`peak_detect`, `cordic_mag`, `sinc_rom`, `wide_mult35`)
This is the least obvious part. It is a four-state machine:

| state | what happens | clocks |
|---|---|---|
| `PD_IDLE` | waiting; `start` clears the lag store | – |
| `PD_CORDIC` | each lag goes through a 12-stage pipelined vectoring CORDIC; its magnitude is stored and the running maximum tracked | 14 after the last lag |
| `PD_INTERP` | early/late search on the sinc-interpolated magnitude curve | 1 + 8·16 + 8 + 1 |
| `PD_READY` | `out_valid` for one clock, then back to Idle | 1 |

How the CORDIC works:
- Left-half-plane inputs are folded into the right half-plane.
- Twelve shift-and-add micro-rotations drive y to zero.
- x is multiplied by round(2^18/1.64676) to remove the CORDIC gain.

How the interpolation works:
- The search starts at the integer peak p, with a step of 1/2 sample.
- Each of 8 iterations evaluates the interpolated magnitude
  f(t) = Σ_k m[k]·sinc(t − k), summed over the 8 lags nearest t. It does this
  at t = pos − step (early) and at t = pos + step (late).
- pos moves toward the larger of the two, by step. On a tie it moves early.
- The step then halves: 1/2, 1/4, … 1/256.

After 8 iterations the position is known to 1/256 sample. `toa_q8` holds it,
counted from lag 0. `peak_val` is f(toa).

Hardware used by the interpolation:
- Each f(t) takes 8 multiply-accumulate clocks through one 35×35 multiplier
  (`wide_mult35`).
- `wide_mult35` is built from four 18×18-style partial products. Its lower
  17×17 unsigned product uses the full-adder array multiplier `array_mult`.
- The sinc kernel is a 1025-entry table of sinc(k/256), 24 bits wide with 22
  fraction bits. It is computed with `$sin` at elaboration, not read from a
  file.

The latency from the last lag to `out_valid` is 153 clocks.

## Equalizer path

### RLS decision-feedback equalizer (`rls_equalizer`)
The equalizer works on real samples. GMSK is detected as BPSK by a serial
receiver, so the decision is just the sign. The regressor φ holds 8 received
samples and 8 past symbol decisions, 16 taps in all. Per sample, in Q12.14 fixed point:

```
y  = wᵀφ                 e = d − y       (d = training symbol, or sign(y))
π  = Pφ                  k = π / (λ + φᵀπ)
w += k·e                 P = (P − kπᵀ) / λ     λ = 0.99, P(0) = 10·I
```

A sequencer does this with one multiply-accumulate per clock (two in the P
update). The states are IDLE → FILT → ERR → PI → DEN → DIV → GAIN → PUPD →
DONE. A sample takes 2N² + 3N + 7 clocks, which is 567 for N = 16. `in_ready`
is high only in IDLE. `train` selects training mode (d from `d_in`) or
decision-directed mode (d = ±1 from the sign of y). The weights adapt in both
modes.

Numerical stability: only the upper triangle of P is computed. It is written
to both P[i][j] and P[j][i], so P stays exactly symmetric. Without this, the
truncating Q12.14 recursion diverged after about 260 samples in simulation.
Products are truncated, and every stored word saturates.

### Division by series expansion (`series_recip`)
The one division per sample, 1/(λ + φᵀπ), is done without a divider:
- b is normalised to m·2^e, with m in [0.75, 1.5).
- With x = m − 1, 1/m = (1 − x)(1 + x²)(1 + x⁴)(1 + x⁸) + O(x^16).
- This needs 6 multipliers (x², x⁴, x⁸ and three products of the factors) and
  4 adders.
- The result is shifted back by e and saturated to Q12.14.

It is a 3-clock pipeline. The error is under 2^-14 relative plus a couple of
LSBs.

## Top-level ports (`sdr_rx_top`, defaults)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `adc_valid`, `adc_i`, `adc_q` | in | 1, 12, 12 | ADC samples; gaps in `adc_valid` are allowed |
| `dec_rate` | in | 8 | CIC rate R, 1..128 (128 for the full output scale) |
| `dec_valid`, `dec_sample` | out | 1, 48 | decimated I/Q (`cplx_t`, 24 + 24 bits) |
| `coef_we`, `coef_addr`, `coef_re`, `coef_im` | in | 1, 4, 24, 24 | load training symbol c_j at index j |
| `burst_start` | in | 1 | pulse; the next decimated sample is window sample 0 |
| `toa_valid`, `toa_q8` | out | 1, 16 | time of arrival from lag 0, in 1/256 sample |
| `peak_index`, `peak_val` | out | 4, 34 | integer peak lag; interpolated peak magnitude |
| `pd_state` | out | 2 | Idle / CORDIC / Interpolation / Output Ready |
| `eq_in_valid`, `eq_in_ready` | in/out | 1 | equalizer input handshake |
| `eq_u`, `eq_d`, `eq_train` | in | 26, 26, 1 | received sample and training symbol (Q12.14); mode |
| `eq_out_valid`, `eq_y`, `eq_dec`, `eq_e` | out | 1, 26, 1, 26 | output, decision (1 = +1), error |
| `eq_w_addr`, `eq_w_data` | in/out | 4, 26 | read one weight |
| `eq_state` | out | 4 | equalizer sequencer state |

To time a burst:
1. Load the 16 training symbols once.
2. Pulse `burst_start` between two decimated samples.
3. Wait for `toa_valid`, which arrives about 44 decimated samples + 153 clocks
   later.

Scale the coefficients so that the correlation fits the 34 bits taken after
the >>> 20 shift. The test uses ±2^20 per component with ±1400 ADC
amplitude.

## Interfaces and timing summary

| block | handshake | latency / rate |
|---|---|---|
| `cic_decim` | `in_valid` / `out_valid` | 1 output per R inputs, 1 clock after the R-th |
| `cmult3` | `en` | 1 clock |
| `systolic_corr` | `in_valid` / `out_valid` | 1 clock; output = window ending NTAPS+2 samples earlier |
| `cordic_mag` | `in_valid` / `out_valid` | 14 clocks, 1 per clock |
| `peak_detect` | `start`, `in_valid` / `out_valid` | 153 clocks after the last lag |
| `series_recip` | `in_valid` / `out_valid` | 3 clocks |
| `rls_equalizer` | `in_valid`/`in_ready` / `out_valid` | 2N²+3N+7 clocks per sample |

All blocks use one clock and a synchronous active-high reset. Shared constants,
the `cplx_t` struct and the state enums are in `rtl/sdr_pkg.sv`.

## Where this design departs from the original or fills gaps

- **Reciprocal table.** The source design stores reciprocals in block RAM,
  addressed by the series product. Here the product itself is used as 1/b,
  and there is no table.
- **Widths.** Widths follow the 24-bit data path and 12.14 equalizer format.
  Widths that the source tunes by simulation were chosen here:
  - 34-bit peak-detector magnitudes;
  - a 54-bit correlator cascade, where 48 bits were used for 18-bit DSP
    slices;
  - 22 kernel fraction bits.
- **Own choices where the source says nothing:**
  - interpolation kernel of 8 lags;
  - tie rules;
  - the peak value is interpolated once, after the last step, and the
    search always takes 8 steps;
  - λ = 0.99 and P(0) = 10·I;
  - 8/8 forward/feedback split;
  - symmetric P update;
  - CIC differential delay M = 1;
  - rate-independent output scaling;
  - the `burst_start` window control;
  - the coefficient load port;
  - returning from Output Ready to Idle.
- **Real-valued equalizer.** The complex-data equalizer is not built.
- **Equalizer sizes.** The equalizer is built at 16 taps. The 8- and 12-tap
  variants need `rls_equalizer #(.N(8))` or `#(.N(12))`.
- **Real-time throughput.** At 567 clocks per symbol, one 16-tap instance
  cannot equalize a whole GSM carrier (270.833 ksymbol/s) in real time at a
  52 MHz clock. That would take about 154 MHz. An 8-tap instance would fit.
- **Not built:**
  - the front end, the DDC mixer, VITA framing, the stream multiplexer and
    the bus master to the host (existing platform blocks);
  - valley-power and channel-estimate computation (not specified);
  - the transmit path and the analog parts.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`. Floating-point reference models shared by the
testbenches are in `tb/tb_ref_pkg.sv`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/sdr_pkg.sv tb/tb_ref_pkg.sv tb/tb_sdr_rx_top.sv --top-module tb_sdr_rx_top
./obj_dir/Vtb_sdr_rx_top
```

- `tb_sdr_rx_top` runs the top at its default sizes (decimation by 128):
  - 8 bursts with the training sequence at random fractional positions, plus
    noise and `adc_valid` gaps;
  - every decimated sample is checked against exact moving sums;
  - index, ToA (±4/256) and peak value (1%) are checked against a
    floating-point correlation and early/late search;
  - the equalizer runs 140 samples offered at random times;
  - it counts each mechanism and fails if one never happened: decimation,
    coefficient writes, lags, each FSM state, ToA on either side of the
    integer peak, valid gaps, training and decision-directed samples,
    divisions, and handshake stalls.
- `tb_rls_equalizer` runs the equalizer at 8, 12 and 16 taps side by side,
  through the helper `tb/rls_eq_run.sv`, and compares each with a
  floating-point RLS:
  - outputs must agree within 0.1;
  - the channel changes partway through training, and the equalizer must
    re-converge, which it can only do with λ < 1;
  - all decision-directed decisions must be correct;
  - each sample must take exactly 2N² + 3N + 7 clocks.
- The other testbenches cover the rest:
  - `array_mult`: exhaustive 4×4;
  - `wide_mult35`: corners and random operands;
  - `cmult3` and `systolic_corr`: exact results;
  - `cordic_mag`: tolerance and latency;
  - `series_recip`: tolerance, latency and saturation;
  - `cic_decim`: several rates, against moving sums;
  - `peak_detect`: against a floating-point search, with exact latency.
