# On-line digital correction of noise leakage in a 2-0 MASH ADC, using test-signal injection

A cascaded (MASH) delta-sigma converter cancels its first-stage quantization
noise digitally. To do that, the digital filter has to match the analog
noise transfer function of the first stage. Finite op-amp gain and
capacitor mismatch break that match, so a part of the first-stage noise
leaks into the output. In a fast, low-oversampling converter this can cost
more than 25 dB of SNR.

This RTL removes the leak while the converter runs. It produces a
pseudorandom two-level test signal `ts`, and the analog side adds it in
front of the first-stage quantizer. The test signal then takes exactly the
same leakage path as the quantization noise. The digital side knows `ts`, so
it can measure by correlation how much of it is left in the output. A
six-tap adaptive FIR filter, L_C(z), adds a correction term to the output,
and its coefficients are stepped up or down once per block of samples until
the test signal is gone from the output. Once the test signal has
disappeared, so has the leaked quantization noise. Adaptation runs in the
background during normal conversion, so the correction follows drift from
temperature and ageing.

The configuration built here is the improved 2-0 MASH. It has a
second-order first stage with a tri-level (1.5-bit) quantizer, a 10-bit
pipelined second stage, and a sampling rate of 100 MHz at OSR = 8. The
adaptive filter has 6 taps with 16-bit coefficients, and its input is
differentiated. The adaptation uses the sign-sign block LMS rule with
blocks of K = 2^16 samples.

## The converter around this logic

The analog part is not in this RTL. It consists of two switched-capacitor
integrators, the tri-level quantizer with the test-signal adder at its
input, a tri-level feedback DAC, the interstage weighting, and a 10-bit
pipelined ADC. The testbenches model it behaviourally in
`tb/mash_analog_model.sv`:

```
y1 <= y1 + a1*(u1 - b1*v1)          a1 = 1/4, b1 = 1
y2 <= y2 + a2*(y1 - b2*v1)          a2 = 1/2, b2 = 1/2
v1  = tri-level quantizer of 8*y2 + ts          (-1, 0, +1)
u2  = m0*(alpha*y2 - beta*v1)       alpha = 8, beta = 2, m0 = 1/2
v2  = 10-bit conversion of u2, available N2 = 10 samples later
```

With these gains, the first stage's output is v1 = z^-2 u1 + (1 - z^-1)^2 (e1 + ts),
and the second stage's output is v2 = -(v1 + ts + e1)/2 + e2. The digital
logic receives v1 and v2 and nothing else.

## Signal flow in `mash_adaptive_correction`

```
                 +-- stf2d_delay (z^-N2) --- v1d ----------------------------+
 v1_in ----------+                            |                              |
                                 ve_combiner: v_e = 2*v2 + v1d               (+)--> v_m
 v2_in ---------------------------------------+                              |
                                ntf1d: v_de = (1-z^-1) v_e, v_C = (1-z^-1) v_de
                                              |          |                   |
                                              |          +------ v_C --------+
                                  lc_filter: v_L = sum l_k v_de[n-k] --------+
                                              ^ up/down by 1 LSB per block
                        ssblms_correlator: sign(sum over K of v_m * r[n-k])
                                              ^                ^
 ts_gen --> ts_out (to the analog adder)      |                v_m
        \--> z^-(N2+TS_LAT), inverted ---> r -+
```

* **`stf2d_delay`** is the signal path STF_2d(z) = z^-N2. It delays v1 by the
  pipeline latency of the second stage, so that v1 and v2 of the same
  sample meet.
* **`ve_combiner`** forms v_e = m2·v2 + m1·v1, with m2 = 2 and m1 = 1. With
  the gains above, v_e = -(e1 + ts) + 2·e2, which is an estimate of the
  negative first-stage error.
* **`ntf1d`** is NTF_1d(z) = (1 - z^-1)^2, built as two first differences.
  The output of the first difference, v_de, feeds the adaptive filter.
* **`lc_filter`** is L_C(z). It is six taps on v_de, and each coefficient is a
  saturating up/down counter.
* **`ssblms_correlator`** holds six block correlators. Each one adds or
  subtracts v_m according to a delayed bit of the test-signal replica. After
  every block, it outputs the sign of each sum.
* **`ts_gen`** is the test-signal generator, a 23-bit maximal-length LFSR.
* The output adder forms v_m = v1d + v_C + v_L, and `vm_out` is registered.

If the analog circuits were ideal, v1d + v_C would hold only the delayed
input plus 2·(1 - z^-1)^2 e2. Both e1 and ts would cancel exactly, and the
coefficients would stay near zero.

### Number format

Every data word is an integer in second-stage LSBs, taking the full scale of
the second stage as ±1:

| signal | width | value of 1 LSB |
|---|---|---|
| v1 (`v1_in`) | 2 | 1 = full scale, enters the sum as v1·2^(N2-1) |
| v2 (`v2_in`) | N2 = 10 | 2^-9 |
| v_e, v_de, v_C | 13, 14, 15 | 2^-9 |
| coefficients l_k (`coeff_out`) | 16 | 2^-15, range ±1 |
| v_L, v_m (`vm_out`) | 26 | 2^-17 (VM_FRAC = 8 bits below the second-stage LSB) |

The correction term is not noise-shaped. If v_L were rounded to the
second-stage LSB, the rounding noise would land in the signal band at about
-70 dBFS. For that reason, 8 extra fraction bits are carried to the output.
The word widths are chosen so that no sum can overflow.

## How the adaptation works

This is the part that needs care.

**What is adapted.** With analog errors, v_m contains H(z)·(e1 + ts), where
the leakage filter H(z) ≈ (1 - z^-1)(A1 + A2(1 - z^-1) + …). Its constant
term is negligible, so H has a zero at DC. That is why L_C(z) is fed with
v_de = (1 - z^-1) v_e rather than with v_e. The differentiator is free,
because it is the first half of NTF_1d. It also raises the effective order
of the correction by one and lowers the coefficient ripple. The filter
converges to roughly l_k = (running sum of the leakage impulse response).

**Update rule.** Once per block of K samples, for each tap k:

    l_k <= l_k - gamma * sign( sum_{n in block} v_m[n] * r[n-k] )

Here gamma = 1 coefficient LSB and r = ±1 is the test-signal replica. Each
coefficient is therefore an up/down counter, and there are no multipliers
in the correlator. A multiplier is still needed in the FIR itself.

**Sign convention.** Since v_e ≈ -(e1 + ts), the test signal appears in v_e
with a minus sign. The replica r fed to the correlator is therefore -ts,
which the RTL implements as the inverted, delayed `ts_out` bit. With this
choice, the correlation for tap k equals (l_k - l_(k-1)) - h_k, in units of
the test-signal power. Stepping l_k against its sign drives every
correlation to zero, tap 0 first and the others after it. If the replica
were +ts with the same minus sign, the loop would run away. This was
confirmed in simulation.

**Alignment.** The replica has to line up with the test signal's path
through the analog loop, the pipelined ADC and the digital registers. The
top therefore delays `ts_out` by REF_DLY = N2 + TS_LAT clocks. TS_LAT = 2
suits a quantizer that samples `ts_out` on one edge and whose decision is
captured by this logic on the next edge. If your analog interface has a
different latency, change TS_LAT. The alignment must be exact: in the
K = 2^14 end-to-end simulation, TS_LAT set to 0, 1, 3 or 4 instead of the
true 2 made the coefficients run away instead of converging, because each
tap's correlation then depends on its neighbour's coefficient rather than
its own.

**Block timing.** A free-running LOG2K-bit counter closes a block every
2^LOG2K clocks. On the last sample, every tap's final sum is formed and its
sign is registered. `upd_valid_out` then pulses for one clock, and the
coefficients change on the following edge. The sums restart from zero
without losing a sample.

**Convergence and adaptation noise.** The coefficients move by at most 1 LSB
per block. A coefficient of 0.024 (about 780 LSB) therefore needs at least
780 blocks. At K = 2^16 and 100 MHz, that is 0.5 s. After convergence, each
coefficient performs a bounded random walk. The restoring signal grows with
the test-signal power and with K. The noise in each block sum comes mostly
from the input signal. In simulation with a 10 % full-scale tone, a test
signal of ±1/16 and K = 2^16, the coefficients of the ideal converter
wander by up to about 270 LSB (0.008). This raises its in-band noise by a
few dB compared with frozen zero coefficients. A larger K or a larger
test-signal amplitude should reduce that ripple (not simulated).

## Interface and timing (`mash_adaptive_correction`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `ts_out` | out | 1 | test signal for the analog adder: 1 = +A, 0 = -A; new value every clock |
| `v1_in` | in | 2 | first-stage quantizer decision, -1/0/+1 |
| `v2_in` | in | N2 | second-stage code for the same sample, exactly N2 clocks after its `v1_in` |
| `vm_out` | out | N2+M2_SHIFT+7+VM_FRAC | corrected output, valid one clock after the `v2_in` it uses |
| `coeff_out` | out | M × NL | current l0..l5 |
| `upd_valid_out` | out | 1 | one-clock pulse per block; coefficients change on the next edge |

The amplitude A of the test signal is set on the analog side. The intended
order is about 1 % of the full-scale signal power. The testbenches use
±1/16 of full scale.

Parameters, with their defaults:

| parameter | default | source |
|---|---|---|
| `N2` | 10 | second-stage resolution and latency |
| `M` | 6 | taps l0..l5 |
| `NL` | 16 | coefficient word length |
| `LOG2K` | 16 | block size K = 2^16 |
| `M2_SHIFT`, `M1` | 1, 1 | m2 = 2, m1 = 1 |
| `VM_FRAC` | 8 | own choice (see number format) |
| `TS_LAT` | 2 | own choice (interface latency) |
| `LFSR_W`, `LFSR_TAP`, `LFSR_SEED` | 23, 18, 1 | own choice |

The package `mash_corr_pkg` holds the defaults and the `dir_t` and
`trilevel_t` types.

## Design choices that are not taken from the source description

* The test-signal generator is an LFSR, x^23 + x^18 + 1. The source asks
  only for a deterministic, zero-mean, two-level white sequence.
* The integer number format, the 8 extra output fraction bits, and
  truncation (floor) of the FIR products.
* Coefficients saturate at ±(2^15 - 1) and reset to 0. A block sum of exactly
  zero leaves its coefficient unchanged.
* The delayed v1 feeds both the output adder and the m1 input of the v_e
  adder, so that v1 and v2 of the same sample are combined. The reference
  drawing taps m1 ahead of the z^-N2 block. Taken literally, that would
  combine samples N2 apart.
* The replica delay REF_DLY = N2 + TS_LAT, and the replica is the inverted
  test signal. The update equation in the source is written with +ts, while
  its block diagram feeds the correlator with -ts. The RTL follows the
  diagram, because that is the direction that converges.
* Only `vm_out` is registered. The path from `v2_in` through the v_e adder,
  the two differences, the six multiplies and the output sum is one
  combinational stage, so no pipelining for 100 MHz operation has been done.
* There is no adaptation-enable or coefficient-load port. The adaptation
  always runs.

Not covered:

* The 1-bit-quantizer prototype variant. It uses a simpler interstage with
  alpha = 1 and beta = 0, and L_C is fed with v_e instead of v_de.
* The 5-bit-quantizer variant, with m2 = 1/16. The v1 port is tri-level
  only, and m2 must be a power of two of at least 1.

## Verification

Each RTL module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_ts_gen` | 5000 output bits against the recurrence ts[n] = ts[n-23] ^ ts[n-18]; period 127 and balance (64 ones) of a 7-bit instance; hold and reset |
| `tb_stf2d_delay` | every output equals the input exactly 10 clocks earlier |
| `tb_ve_combiner` | v_e = 2·v2 + 512·v1 for all v1 levels and random and extreme v2 |
| `tb_ntf1d` | v_de and v_C against integer first differences |
| `tb_lc_filter` | v_L = floor(sum l_k x[n-k] / 2^7) and every coefficient, every clock; both saturation limits |
| `tb_ssblms_correlator` | sign of each tap's block sum (K = 2^6), pulse position and spacing, +1/-1/0 outcomes, full-scale inputs |
| `tb_mash_adaptive_correction` | end to end with two analog models (ideal, and 54 dB op-amp gain with 0.8 % capacitor error), K = 2^14, 49 M samples |
| `tb_mash_full_size` | the same at every default (K = 2^16), 197 M samples, about 3 minutes |
| `tb_mash_two_tone` | as `tb_mash_adaptive_correction`, with two in-band tones of 5 % of full scale each (f_S/203 and f_S/97) as input |

The end-to-end tests measure the in-band noise of the output error. To do
that, they apply a sinc^3 low-pass of length 16 and remove the input tone.
They also measure the test signal left in the output, by correlation at lags
0..23. In the K = 2^14 run, the leaky converter starts 11 dB above the ideal
one. After adaptation it sits at the ideal converter's level. The residual
test signal falls by about 26 dB, from -51 dB to -77 dB. The coefficients
settle near (-0.004, 0.024, -0.017, 0.0, -0.0005, -0.001). In the
full-size run the residual test signal falls by 44 dB (-51 dB to -95 dB) and
the corrected converter ends at -97.5 dB in-band noise against -97.7 dB for
the ideal one (both raised from about -105 dB by the adaptation noise
described above). Both tests also
check that a block update comes exactly every K samples, and they count
both test-signal levels, the block updates, and the up and down steps.
With the two-tone input the residual test signal falls from -49 dB to
-85 dB, and the corrected converter ends 1 dB below the ideal one, which
carries the same adaptation noise. A zero input is not tested. The model
has no offsets, so with a zero input the tri-level quantizer never leaves
its middle level. There is then no quantization noise to leak, and nothing
to correct.

`tb/mash_analog_model.sv` is a real-number model for simulation only. It
uses P1, P2 for the integrator pole (finite-gain) errors and G1, G2 for the
gain errors, with P = G = 1 being ideal.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mash_corr_pkg.sv \
    tb/tb_mash_adaptive_correction.sv --top-module tb_mash_adaptive_correction
./obj_dir/Vtb_mash_adaptive_correction
```

Replace the testbench name to run any other test. Each test prints one line,
`TB_RESULT checks=N failures=F`. Verilator finds the modules that a
testbench uses through `-Irtl -Itb`. The package must be listed first. To
lint the RTL alone:

```
verilator --lint-only -Wall -Irtl rtl/mash_corr_pkg.sv rtl/mash_adaptive_correction.sv
```

The only warnings are for package constants that a given module does not
use.
