# Shared-accumulator response analyzer for Σ-Δ ADC self-test (CSWF)

Measuring the SNDR of a high-resolution Σ-Δ ADC normally needs a clean
analog sine source, a quiet tester and an FFT over a stored record. This
design avoids all three. A digital generator drives the modulator with a
Σ-Δ coded sine. A second, identical generator produces a reference copy of
the expected tone. The controlled sine wave fitting (CSWF) method then works
in the time domain, one decimated sample at a time, so nothing is stored:

1. **Offset**: `Y_OS = (1/N) Σ y_DEC`
2. **Amplitude**: `Y_AMP = (1/N) Σ |y_DEC − Y_OS|`. For a sine of amplitude
   A this is 2A/π.
3. **THD+N power**: the reference tone is subtracted from the modulator's
   bit-stream before decimation, and `Y_OS` after it. What is left,
   `y_RES`, is distortion and noise, and `P_THDN = (1/N) Σ y_RES²`.

The host then computes `SNDR = (A²/2) / P_THDN` with `A = Y_AMP·π/2`.

Only one of the three sums is active at a time. So the output response
analyzer (ORA) has **one** 47-bit accumulator, and a multiplexer chooses
what feeds it. The square in step 3 comes from a shift-and-add serial
multiplier, which reuses the same accumulator to add its partial products.
Decimation by 128 leaves 128 clocks per sample, and the 24-cycle
multiplication fits easily in that time.

The RTL covers all the digital logic of the self-test system:

- the stimulus and reference generators
- the phase compensator
- the residue subtractor and its multiplexer
- a decimation filter
- the ORA
- a step sequencer

Two parts are left out: the analog modulator under test, and the serial
port through which a host writes the settings and reads the results.

## System map

```
 a_s, a21 ─► SBSG ──y_sbsg──► [analog modulator, external] ──y_mut──┐
                                                                    │
 a_r, a21 ─► RBSG ─► phase compensator z^-2 ─y_ref─► residue_mux ◄──┘
                                                          │ 2-bit, {-1,0,+1}
                                                          ▼
                                       decimation_filter (sinc^3, ÷128)
                                                          │ 24-bit y_DEC
                                              (×2 in step 3)
                                                          ▼
                        bist_ctrl ──step──►  ora (shared accumulator)
                                                          │
                                           y_os, result (acc / N) ─► host
```

| Module | File | Role |
|---|---|---|
| `cswf_bist_top` | `rtl/cswf_bist_top.sv` | System top; wires everything below |
| `ora` | `rtl/ora.sv` | Offset removal, absolute value, serial multiplier, shared accumulator |
| `bsg` | `rtl/bsg.sv` | Bit-stream generator, used twice (stimulus and reference) |
| `phase_compensator` | `rtl/phase_compensator.sv` | z^-2 delay on the reference bits |
| `residue_mux` | `rtl/residue_mux.sv` | Passes y_MUT, or (y_MUT − y_REF)/2 in step 3 |
| `decimation_filter` | `rtl/decimation_filter.sv` | Third-order CIC decimator by 128 |
| `bist_ctrl` | `rtl/bist_ctrl.sv` | Runs one BIST step per start command |
| `cswf_pkg` | `rtl/cswf_pkg.sv` | Step encoding (`bist_step_e`) and word widths |

## The analyzer (`ora`)

This is the heart of the design. Its datapath follows the published
schematic: the word widths, the three multiplexers and the two shift
registers all come from it.

- **Offset removal.** `y_RES = y_DEC − Y_OS`, in 24 bits. Step 1 computes
  `Y_OS`, and at the end of that step it is stored in a 24-bit register as
  `acc >>> LOG2N`. The register keeps it for steps 2 and 3.
- **Absolute value (MUX1).** The negative form is `~y_RES + sign`, which is
  the inverted word plus its own sign bit. The sign bit also selects the
  MUX1 output. The result is read as a 24-bit *unsigned* number, so
  −2^23 maps correctly to 2^23.
- **Serial multiplier (MUX2).** In step 3, each accepted sample loads
  `|y_RES|` into a 47-bit left shift register and a 24-bit right shift
  register. On each of the next 24 cycles:
  - MUX2 adds the left register to the accumulator if the LSB of the right
    register is 1. Otherwise it adds zero.
  - The left register then shifts up by one bit and the right register
    shifts down by one bit.

  `busy` is high during those 24 cycles, and no sample may arrive then
  (there is an assertion for this).
- **MUX3**, selected by the step code from `cswf_pkg`:
  - 1: `y_DEC`, sign-extended
  - 2: `|y_RES|`, zero-extended
  - 3: the partial product
- **Division by N** is just wiring: `result = acc[46:LOG2N]`, which is 36
  bits at N = 2^11.

Timing:

- `clear` zeroes the accumulator and the sample counter.
- In steps 1 and 2, a sample is added on the clock edge after its
  `y_dec_valid` strobe.
- Samples after the N-th are ignored.
- `done` is high once N samples are fully accumulated, including the last
  multiplication.

Limits:

- The accumulator wraps modulo 2^47. That is enough for steps 1 and 2 (35
  and 34 bits are needed).
- In step 3 it is enough while the mean residue power stays below 2^35 in
  y_DEC units (2^21 = full scale). That means a residue below about
  −21 dBFS rms, far above anything a working ADC leaves.

## Bit-stream generators (`bsg`)

Each generator is a two-integrator (LDI) resonator:

```
v1 <- v1 - a21*b
v2 <- v2 + v1
```

Here `b = ±1` is a one-bit Σ-Δ quantisation of `v2`.

- **No multiplier.** The resonator is fed with the quantised bit, so
  "multiplying" by `a21` is only an add or a subtract.
- **Quantiser.** A second-order error-feedback loop:
  - `w = v2 + 2e1 − e2`
  - `b = sign(w)`
  - `e = w − b·FS`

  It puts no delay inside the resonator loop, so the poles stay on the unit
  circle.
- **Frequency.** The tone frequency ω₀ satisfies `cos ω₀ = 1 − a21/2^33`.
  For a tone at 43/2^18 of the clock (about 1 kHz at 6.144 MHz),
  `a21 = 4562`.
- **Amplitude.** The amplitude is the initial condition: `init` loads
  `v2 = amp`, `v1 = 0`. Full scale is `2^32`.
- **Phase.** Both generators are re-initialised by the same pulse at the
  start of every step, so stimulus and reference always start in phase.

The internal state is 40 bits (`W_STATE`). The published design specifies
only what this block does and its 32-bit inputs. The resonator and
quantiser above are this design's own choice.

## Residue path and scaling

Bits code +1 as `1` and −1 as `0`. The decimation filter takes a 2-bit
signed word:

- **Steps 1 and 2:** `y_MUT` alone, as ±1.
- **Step 3:** `(y_MUT − y_REF)/2`, as −1, 0 or +1. Halving keeps the word
  at two bits.

The top therefore doubles the decimated word in step 3. Without that, the
residue would be at half the scale of the `Y_OS` it is compared with.

The phase compensator is a fixed delay of two clocks. A second-order
modulator's signal transfer function is close to z^-2.

## Decimation filter and the host's droop correction

The filter is a third-order CIC (sinc³) decimating by R = 128. Its gain is
R³ = 2^21, so a ±1 input maps to ±2^21 in a 24-bit word. The published
system names the decimation factor and the word widths but not the filter.
The CIC is the simplest decimator that suits a second-order modulator.

Its passband droop matters here. The reference tone passes through the same
filter as the response, so the host must set

```
a_r = Y_AMP · π/2 · 2^11 / droop(ω₀)
droop(ω₀) = [sin(64 ω₀) / (128 sin(ω₀/2))]³
```

Without the correction, a 0.2 % amplitude mismatch at 1 kHz would limit the
SNDR to about 53 dB. The droop is 0.998 at 1 kHz, 0.966 at 4 kHz, 0.871
at 8 kHz and 0.804 at 10 kHz.

## Step sequencing (`bist_ctrl`) and timing

One `start` with `step_cmd` (1, 2 or 3) runs one step:

1. Re-initialise both generators (`bsg_init`, one cycle).
2. Let `SETTLE` decimated samples pass, so the modulator and the filter
   settle.
3. Clear the ORA.
4. Feed it N samples.
5. Raise `done`, which stays high until the next `start`.

A step therefore takes about `(SETTLE + N)·OSR` clocks: 262,657 at the
defaults. Step 3 adds 24 clocks for the last multiplication. Steps must be
run in the order 1, 2, 3:

- Step 2 and step 3 use the `Y_OS` from step 1.
- Between steps 2 and 3 the host computes `a_r` from `Y_AMP`.

The sequencer and the settling count are this design's own choices. The
published design defines the three steps and the step-select signal.

## Top-level interface (`cswf_bist_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Modulator clock; asynchronous active-low reset |
| `a_s`, `a_r` | in | 32 | Stimulus / reference amplitude, 2^32 = full scale |
| `a21` | in | 32 | Tone coefficient, `cos ω₀ = 1 − a21/2^33` |
| `start`, `step_cmd` | in | 1, 2 | Run step 1 (offset), 2 (amplitude) or 3 (THD+N) |
| `y_sbsg` | out | 1 | Stimulus bits to the modulator under test |
| `y_mut` | in | 1 | Output bits of the modulator under test |
| `busy` | out | 1 | Serial multiplier active |
| `done` | out | 1 | Step finished |
| `y_os` | out | 24 | Offset from step 1 (y_DEC units, 2^21 = full scale) |
| `result` | out | 36 | Accumulator / N: Y_OS, Y_AMP or P_THDN |

Parameters, with defaults:

- `LOG2N = 11`: 2^11 decimated samples per step, which is 2^18 modulator
  samples.
- `OSR = 128`
- `SETTLE = 4`

The published system returns the ORA result over a 24-bit path. Here
`result` is 36 bits, so that `P_THDN` is never truncated. A serial port
would read it in pieces.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| Testbench | What it checks |
|---|---|
| `tb_ora` | All three steps on random samples (N = 16) against 64-bit sums; the −2^23 residue; 24 cycles per square; samples beyond N ignored |
| `tb_bsg` | Bit-exact match with a reference model; tone amplitude within 3 % by correlation over four periods; zero mean; identical restart |
| `tb_decimation_filter` | Direct convolution with the sinc³ impulse response; one output per 128 inputs; DC gain 2^21 |
| `tb_phase_compensator`, `tb_residue_mux`, `tb_bist_ctrl` | Delay, coding table, step sequence and settling count |
| `tb_cswf_bist_top` | Whole system at default size, −6 dBFS, ~1 kHz: every result against independent sums; step length; residue mean ≈ 0; SNDR 65–95 dB; each mechanism (three steps, settling discards, both MUX1 paths, zero and non-zero partial products, zero and non-zero residue bits) occurs |
| `tb_cswf_workloads` | Dynamic-range sweep (−60 … −4 dBFS) and frequency sweep (~1, 4, 8, 10 kHz); Y_AMP within 2 % (10 % below −30 dBFS) of the droop-corrected expectation, SNDR in a band per test, SNDR rising with amplitude and falling with frequency |

The system testbenches use `tb/mut_model.sv`, a behavioural second-order
modulator in its digital-test configuration. It has gain 0.5, an offset
of 200/2^20 of full scale and small uniform noise. The results with this
model:

| Test | Y_AMP (expected) | SNDR |
|---|---|---|
| −6 dBFS, 1 kHz | 333,834 (333,838) | 78.9 dB |
| −60 / −40 / −20 / −4 dBFS, 1 kHz | — | 25.5 / 45.0 / 65.9 / 80.4 dB |
| −6 dBFS, 4 / 8 / 10 kHz | — | 62.0 / 44.9 / 38.7 dB |

Extrapolating the amplitude sweep gives a dynamic range of about 85 dB.
The published behavioural simulation used a detailed analog modulator
model. It reports 75.8 dB peak SNDR, 87.1 dB dynamic range, and accuracy
that degrades above 8 kHz because of the generators' in-band noise. The
numbers here come from a much simpler modulator model, so they are only a
plausibility check, not a reproduction.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cswf_pkg.sv tb/tb_cswf_bist_top.sv --top-module tb_cswf_bist_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other testbench. The full-size system
test runs in under a second, and the workload sweep in a few seconds.

## What follows the source and what does not

- **Follows the published design:**
  - the three-step CSWF procedure and its equations
  - the shared 47-bit accumulator, 24-bit sample path, MUX1/MUX2/MUX3 and
    the 47/24-bit shift-register multiplier
  - N = 2^11, OSR 128, the z^-2 phase compensator
  - two identical generators with 32-bit amplitude and frequency words
  - the 2-bit filter input and the 24-bit decimated word
- **This design's own choices:**
  - the generator internals
  - the CIC decimator and the host's droop correction
  - the residue coding with the ×2 restore
  - the Y_OS register, the valid/clear/done handshake and the sequencer
    with its settling count
  - the 36-bit result port
  - reset values
- **Not included:**
  - the analog Σ-Δ modulator, which is only modelled for simulation
  - the serial I/O port, whose protocol is not specified; its signals are
    top-level ports
- **Size:** after coarse synthesis, `ora` is 56 word-level cells and 160
  flip-flop bits; the whole top is 148 cells and 671 flip-flop bits. The
  published figure for the analyzer is 1.9k gates in a 0.18 µm library.
  The two are not directly comparable.
