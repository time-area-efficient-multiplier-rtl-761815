# Multiplier-free pipelined IIR filter: a 10th-order Butterworth low-pass in five biquads

A recursive (IIR) filter is usually built from multipliers, and its feedback loop
limits the clock rate: each new output depends on the previous one, so the loop cannot
be pipelined in the usual way. This design avoids both problems:

* **No multipliers.** Every coefficient is restricted to at most two signed powers of
  two (SPT), `±2^-p ± 2^-q`. Multiplying by it is then two wired shifts and one
  adder or subtractor.
* **Short loops.** The filter is a cascade of second-order sections (biquads). Each
  biquad is pipelined and retimed so that no register-to-register path holds more
  than two adders. Each section ends in a register, so the cascade is a linear
  systolic array: adding sections never lengthens a path.

The result takes one sample per clock. The longest combinational path is two 17-bit
adders, and the only arithmetic units are adders and registers. The default
configuration is a 10th-order low-pass Butterworth filter: five sections, 17-bit
words, latency 15 clocks.

## Number format and arithmetic

* Words are `W` = 17 bits, two's complement. The most significant bit has weight
  2^0, so a word holds a value in [-1, 1) with 16 fractional bits. The ports carry
  raw words: full scale is 2^16.
* A coefficient term `2^-p` is an arithmetic right shift by `p`. The bits shifted
  out are dropped, which truncates towards minus infinity. In a two-term coefficient,
  each term is truncated on its own before the two are added. This truncation is what
  keeps the recursion finite.
* The adders wrap around on overflow, like plain ripple-carry adders. Nothing
  saturates. Overflow is avoided by a per-section input scale `S` (one power of two)
  and by keeping the input small enough. For the default filter:
  - The largest gain from the input to any internal node is about 4 (section 1,
    near the passband edge).
  - For arbitrary signals, keep `|x|` below about 0.2 of full scale.
  - A DC or low-frequency input of up to 0.4 of full scale is safe, because the
    DC gain is 2.29.

## The pipelined biquad (`biquad`)

Each section realises

    H(z) = S · (a0 + a1 z^-1 + a2 z^-2) / (b0 + b1 z^-1 + b2 z^-2)

which corresponds to two difference equations:

    v[n] = (S·x[n] − b1·v[n−1] − b2·v[n−2]) / b0      (all-pole part)
    y[n] = a0·v[n] + a1·v[n−1] + a2·v[n−2]             (all-zero part)

In the direct form, the path from the state register through the coefficient
products, the two feedback additions and the 1/b0 product and back holds six adders.
The section here removes four of them from the loop:

1. Each part (all-pole and all-zero) is pipelined. The state delays are shared
   between the two parts.
2. The b2 feedback addition is moved to the front. A cut-set retiming then places a
   register (R1) after it. Another register (R3) goes inside the numerator sum.

The result is six adders and five registers:

| unit    | computes                                      | register | holds (while S·x[n] is at the input) |
|---------|-----------------------------------------------|----------|---------------------------|
| C2      | \|b2\| · R2 (coefficient adder)                 | –        | –                         |
| A1 / R1 | S·x − b2·R2                                   | R1       | S·x[n−1] − b2·v[n−3]      |
| C1 / R4 | \|b1\| · R2; R4 is a plain delay of R2          | R4       | v[n−3]                    |
| A2 / R2 | (R1 − b1·R2) · (1/b0), with 1/b0 a wired shift | R2       | v[n−2]                    |
| A4 / R3 | a1·R2 + a2·R4                                 | R3       | a1·v[n−3] + a2·v[n−4]     |
| A3 / R5 | a0·R2 + R3                                    | R5 = y   | y[n−3]                    |

Reading the table:

* Substituting R1 into R2's update gives the all-pole equation, delayed by two
  clocks.
* R3 and the current R2 together form the numerator, and R5 registers it. The section
  latency is therefore **3 clocks**.
* The register-to-register paths with the most adders are:
  - R2 → C1 → A2 → (shift) → R2
  - R2 → C2 → A1 → R1

  Each has **two adders**, because S, 1/b0 and the numerator coefficients of the
  Butterworth sections are single powers of two, and so are only wiring.

**Signs.** A coefficient unit produces a magnitude: `(v>>>p) ± (v>>>q)`, with the
leading term taken as positive. The adder that uses the magnitude applies the signs
(`iir_pkg::fold_signs`). It does this in one of three ways:

* it subtracts instead of adding;
* it swaps its operands and subtracts, for `−A + B`;
* it produces the negated sum.

The negated-sum case appears only in A4. R3 then holds `−(a1·v + a2·v)`, and A3
subtracts it. The only case that cannot be folded is a numerator whose three
coefficients all have negative leading terms. Elaboration rejects it (negate the
section instead). Elaboration also rejects a zero or negative 1/b0.

For section 1 of the default filter, the folding gives the following, which matches
the published bit-level graph of that section:

* C2 and A1 subtract: b2 = 1 − 2^-2, applied as `x − (v − v>>>2)`.
* C1, A2, A4 and A3 add.

**General sections.** Any coefficient may have zero, one or two terms, including 1/b0
and a0 … a2:

* A zero numerator coefficient gives an all-pole section.
* A two-term 1/b0 puts one more adder into the R2 loop, so the longest path becomes
  three adders.
* A two-term numerator coefficient adds one adder in front of A4 or A3, so the path
  stays at two adders.

## Processing elements

Every adder sits in one of two element types, each an adder/subtractor and a 17-bit
register:

* **PA** (`pe_pa`): the adder feeds its register. It holds A1/R1, A4/R3 and A3/R5.
* **PB** (`pe_pb`): the sum leaves the element as a combinational output, and the
  register has its own input. It holds:
  - C2 alone (its register is unused);
  - A2/R2 (the 1/b0 shift sits between sum and register);
  - C1/R4 (two unrelated parts that share one element).

Whether an element adds or subtracts is a parameter, `SUB`, fixed at elaboration.
A Butterworth section therefore uses six elements: PA, PB, PB, PB, PA, PA in the
order A1 C2 A2 C1 A4 A3.

`spt_coef` is the coefficient unit. It wraps a PB element with the two wired shifts
in front of it. For a one-term coefficient, its adder sees a zero operand and its
spare register loads zero, so synthesis removes both.

## The 10th-order filter (`iir_butterworth10`)

Coefficients, section 1 first (`iir_pkg::BQ1` … `BQ5`). In every section
a0 = a2 = 1/2 and a1 = 1, which puts all ten zeros at z = −1:

| section | S    | 1/b0 | b1          | b2           |
|---------|------|------|-------------|--------------|
| 1       | 2^-1 | 1    | −1 − 2^-4   | 1 − 2^-2     |
| 2       | 2^-1 | 2^-1 | −1 − 2^-1   | 1 − 2^-5     |
| 3       | 2^-1 | 2^-1 | −1 − 2^-1   | 2^-1 + 2^-5  |
| 4       | 1    | 2^-1 | −1 − 2^-2   | 2^-2 + 2^-5  |
| 5       | 2^-1 | 2^-1 | −1 − 2^-1   | 2^-2 + 2^-4  |

Response computed from these coefficients (frequency as a fraction of Nyquist):

* DC gain is 2.29.
* The passband is flat within about ±2.5 % up to 0.25. The response is −0.8 dB at
  0.28 and −3.4 dB at 0.30.
* Attenuation is −30 dB at 0.4, −57 dB at 0.5 and −85 dB at 0.6.
* Because the coefficients are coarsely quantised, the passband is not maximally flat.
* The overall gain is not normalised to 1. Scale the output if unity gain is needed.

The top splits the sections the way a two-FPGA build would: `u_fpga1` holds sections
1–3 and `u_fpga2` holds sections 4–5. Each is a `biquad_cascade`. The signal between
them (`chip_link`) comes straight from section 3's output register, so the split adds
neither delay nor logic.

Ports of the top (`W` = 17):

| port  | dir | width | meaning                                                 |
|-------|-----|-------|---------------------------------------------------------|
| clk   | in  | 1     | sample clock: one sample in and one out per rising edge |
| rst   | in  | 1     | synchronous, active high; clears every register          |
| x     | in  | W     | input sample, MSB weight 2^0                            |
| y     | out | W     | output sample, 15 clocks after the matching input       |

There is no valid or enable signal: the filter runs every clock.

## Using other coefficients

The coefficients live in `rtl/iir_pkg.sv`:

* `spt1(neg, sh)` builds a one-term coefficient and `spt2(neg0, sh0, neg1, sh1)` a
  two-term one. `SPT_ZERO` is a zero coefficient.
* `biquad_cfg_t` gathers `s_sh`, `b0inv`, `b1`, `b2`, `a0`, `a1` and `a2`.
* `biquad_cascade #(.N(n), .CFG(cfgs))` builds any chain of sections, with `CFG[0]`
  first.

Shift fields are 4 bits, so each term is between 2^0 and 2^-15. Choose S so that no
internal value can reach ±1 for your inputs. Nothing in the hardware detects an
overflow.

## Files

| file                      | contents                                                   |
|---------------------------|------------------------------------------------------------|
| `rtl/iir_pkg.sv`          | types, sign folding, Butterworth coefficients              |
| `rtl/pe_pa.sv`            | PA element: add/sub followed by a register                  |
| `rtl/pe_pb.sv`            | PB element: combinational add/sub plus an independent register |
| `rtl/spt_coef.sv`         | coefficient unit: two wired shifts and a PB element         |
| `rtl/biquad.sv`           | pipelined, retimed section                                  |
| `rtl/biquad_cascade.sv`   | systolic chain of sections                                  |
| `rtl/iir_butterworth10.sv`| top: the 10th-order filter as two chains                    |
| `tb/iir_ref_pkg.sv`       | reference model: difference equations on 64-bit integers, and the ideal magnitude response |
| `tb/*_tb.sv`              | one self-checking testbench per module                      |

## Simulating

Run from the repository root. The packages go first, and `-y` finds the rest:

    verilator --binary --timing -y rtl -y tb rtl/iir_pkg.sv tb/iir_ref_pkg.sv \
        tb/iir_butterworth10_tb.sv --top-module iir_butterworth10_tb -o sim
    ./obj_dir/sim

Use the same command for `pe_pa_tb`, `pe_pb_tb`, `spt_coef_tb`, `biquad_tb`,
`biquad_cascade_tb` and `iir_response_tb`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops by itself, with a watchdog. All of them finish in well under a second.

## What the testbenches check

The reference model (`tb/iir_ref_pkg.sv`) evaluates the plain difference equations,
sample by sample and without any pipelining, on 64-bit integers. It truncates each
term the way the wired shifts do. If the model sees a value outside the 17-bit range,
it counts an overflow, and each testbench treats an overflow as a failure of its
stimulus.

* `pe_pa_tb`, `pe_pb_tb`: sum and difference modulo 2^17, including wrap-around; the
  register timing; reset.
* `spt_coef_tb`: the magnitude output for a zero, a one-term and two-term
  coefficients of every sign pattern, including the most negative input; the spare
  register.
* `biquad_tb`: six sections at once.
  - Sections 1 and 4 of the filter.
  - Four others that together use every add/subtract/swap/negate case, zero and
    two-term numerator coefficients, an all-pole section and a two-term 1/b0.
  - Each output must match the model bit for bit, 3 clocks later. An impulse must
    produce its first output exactly 3 clocks later.
  - Section 1's add/subtract settings are checked against the values listed above.
  - A reset in mid-stream must clear the state.
* `biquad_cascade_tb`: all five sections, bit-exact, with a latency of 15.
* `iir_butterworth10_tb` (every parameter at its default):
  - Output and `chip_link` must be bit-exact against the model for an impulse, a
    step, two sines, white noise and a reset in mid-stream.
  - Latency must be 15 clocks.
  - The measured DC gain must be within 1 % of the value computed from the
    coefficients (2.290 against 2.292).
  - The amplitude at 0.1 of Nyquist must be within 3 % of the ideal response.
  - The amplitude at 0.6 must be below 1 % of the passband amplitude. It is about
    −63 dB relative, which is the truncation-noise floor; the ideal value is −85 dB.
  - The testbench also counts each of the following and fails if any never occurs:
    an impulse response that rings on after the numerator taps, activity on the
    chip link, and the reset.
* `iir_response_tb` (default size): frequency-response sweep at nine frequencies
  from 0.05 to 0.5 of Nyquist. Each gain is measured by correlating the output with
  a sine and a cosine, then compared with the ideal response. The limits are 0.5 %
  up to 0.30, 2 % at 0.40 and 10 % at 0.50. The measured values agree to four
  digits down to −57 dB.

## Departures, limits and open points

* **Where S is applied.** The input scale of each section is a wired shift at the
  section input, before A1. Applying it elsewhere would give the same transfer
  function but different overflow margins and truncation noise.
* **Rounding.** Every shift truncates, and each term of a coefficient is truncated
  on its own. A rounding variant would change the bit-exact results, though not the
  structure.
* **No overflow protection.** The adders wrap around. The filter is correct only
  while the input stays inside the range described above.
* **Reset and handshake.** The synchronous reset and the absence of a valid or enable
  signal are choices of this design.
* **Numerator signs.** A numerator whose three coefficients are all negative is not
  accepted (negate the section). Coefficients have at most two terms. S must be a
  single, positive power of two.
* **Third element type.** The FPGA mapping this structure was made for also has a
  third element type. It is not used by the section and is not provided.
* **Not modelled.** Timing on a particular device, CLB counts and placement are not
  represented. The two-chip split survives only as the two `biquad_cascade`
  instances.
* **Lint.** Verilator lint (`-Wall`) reports three kinds of warning, all expected:
  - `zero_q` in `biquad` is never read: these are the spare registers of the
    coefficient units, constant zero.
  - `iir_pkg` has unused bits in a helper function argument (`coef_neg` reads only
    the leading term).
  - Package constants (`W_DEFAULT`, `SPT_ZERO`, `BUTTERWORTH10`) are unused when a
    lower-level module is linted on its own.
