# Online histogram calibration of a Nyquist-rate ADC

A converter's static errors (offset and integral nonlinearity, INL) can be
measured from a code-density histogram. But that normally needs a test input
whose amplitude distribution is known, such as a ramp or a full-scale sine,
and the converter has to stop its real work while the test runs. This design
calibrates the ADC while it keeps converting its normal, unknown input.

The trick is a second converter, the E-ADC. It sees the same input, scaled by
an attenuator of gain alpha (about 0.5). Samples landing on ADC level n and
samples landing on E-ADC level alpha·n come from the same input amplitudes.
The ratio of the two histograms therefore cancels the unknown input
distribution, and what remains is the ADC's level widths, i.e. its DNL/INL.
Chaining that ratio toward the origin, which is where the attenuated input
lands after repeated halving, gives the differential error of every level.
The INL values are then written into a look-up table (LUT) that corrects
every output code on the fly.

The E-ADC is itself imperfect and not matched to the ADC. So before each
nonlinearity measurement the system runs a second phase without the
attenuator (alpha = 1). In that phase it learns how the E-ADC's levels map
onto the ADC's, and it uses the map to "precondition" the E-ADC histogram as
if the E-ADC had the ADC's level edges.

The RTL here is the digital part: histogram counters, working memories, the
calibration sequencer/arithmetic and the correction LUT. Four parts of the
system are analog and are not in the RTL: the ADC, the E-ADC, the attenuator,
and the switch S that bypasses the attenuator. The switch is controlled from
the `phase` output. The testbenches model all four behaviourally.

## Blocks

| file | module | role |
|---|---|---|
| `rtl/cal_pkg.sv` | `cal_pkg` | word widths, fixed-point formats, `phase_e` |
| `rtl/hist_counter.sv` | `hist_counter` | one saturating hit counter per level, stored in a memory; clear sweep |
| `rtl/cal_ram.sv` | `cal_ram` | simple 1-write/1-read memory used for the mapping, the preconditioned histogram and the INL |
| `rtl/seq_divider.sv` | `seq_divider` | restoring shift-subtract divider, one quotient bit per clock |
| `rtl/cal_dsp.sv` | `cal_dsp` | the sequencer and all the calibration arithmetic |
| `rtl/correction_block.sv` | `correction_block` | the LUT and the output adder |
| `rtl/online_cal_adc.sv` | `online_cal_adc` | top: wires the above together |

### Top-level interface (`online_cal_adc`)

- `adc_code`, `eadc_code` (`QB` bits, offset binary, code 0 = lowest level)
  and `adc_valid`: one sample pair per clock when valid.
- `phase`: drives switch S. `PHASE_MISMATCH` means the E-ADC sees the
  unattenuated input. `PHASE_NONLINEARITY` means it sees the input through the
  attenuator. The analog side must settle before the collection; the
  sequencer clears the histograms (2^QB clocks) after every phase change,
  which gives it time.
- `corr_out`, `corr_valid`: the corrected sample, one clock after the input.
  It is signed, in LSB with 8 fraction bits, and 0 is the converter's nominal
  midscale. Level `n = code - N/2 + 1` has nominal centre `n - 1/2`. Before
  the first calibration finishes the output is exactly that centre. After it
  finishes, the output is the centre plus the LUT value.
- `enable`: while high, calibration cycles run back to back and each one
  rewrites the LUT. Conversion never stops.
- Status: `offset_est` (LSB, 16 fraction bits), `offset_found`, `alpha_est`
  (24 fraction bits), a `cal_done` pulse and `cal_count`.

Parameters: `QB` = 12 bits, `N_SAMPLES` = 5,000,000 samples per phase,
`M_AVG` = 8 levels each side for the alpha average, and `R_TERMS` = 25
product terms. All four are the values used in the method's published
evaluation.

## The calibration cycle

`cal_dsp` is one state machine. Every step reads memories one word per clock,
and all reads go through registered addresses, so the memories can be
ordinary synchronous RAM with a registered read.

1. **Mismatch collection.** S is set to bypass the attenuator, both
   histograms are cleared, and `N_SAMPLES` valid samples are counted.
2. **Mapping.** Walking both cumulative histograms S_a and S_e together, the
   sequencer finds for each ADC level `a` the E-ADC level `e_a` that contains
   the ADC level's upper edge, i.e. `S_e(e_a) <= S_a(a) < S_e(e_a+1)`. It
   also finds the fraction `f_a = (S_e(e_a+1) - S_a(a)) / H_e(e_a)` of that
   E-ADC bin lying below the edge. Each ADC level's entry is stored as
   `{e_a - a (10 bits, signed), f_a (1.16 fixed point)}`. The 10-bit field
   holds offsets and gain mismatch of up to ±511 levels between the two
   converters.
3. **Nonlinearity collection.** S is set to the attenuator, the histograms
   are cleared and `N_SAMPLES` are counted again.
4. **Preconditioning.** For each ADC level the E-ADC hits are regrouped by
   the stored map. The new bin is the part of E-ADC bin `e_(a-1)` above the
   previous edge, plus every whole E-ADC bin in between, plus the part of bin
   `e_a` below this edge. The result H_e' is what an E-ADC with the ADC's
   level edges would have counted. It goes to its own memory with 8 fraction
   bits. The ADC histogram is used unchanged.
5. **Offset.** The ADC histogram and H_e' accumulate side by side.
   Without offset, an input amplitude that is positive through the ADC is also
   positive through the attenuator. So the difference `dS = S_a - S_e'` grows
   while below the offset and shrinks above it. The first change of sign of
   `dS` is located, and the offset is interpolated between the two levels
   either side: `V_off = (n-1) + |dS(n)| / (|dS(n)| + |dS(n+1)|)`. If no
   change of sign exists, `offset_found` stays low and the cycle goes on with a zero offset.
6. **alpha and alpha·k.** The histograms are re-centred on `V_off`. alpha is
   the ratio of the ADC hits to the E-ADC hits in the M levels either side of
   the new origin, where the input density is taken as flat. The same window
   gives the scale `alpha·k` used in step 7.
7. **INL.** For each level n:

       1 + D(n) = H_A(n) / (alpha k) · Π_{p=1..R} H_A(alpha^p v_n) / (alpha H_E(alpha^p v_n))

   Here `v_n` is the level's centre relative to the offset, and H_A and H_E
   are the re-centred histograms read at non-integer positions by linear
   interpolation between level centres. The INL is then summed outward from
   `I(0) = 0`: upward with `I(n) = I(n-1) + D(n)` and downward with
   `I(n-1) = I(n) - D(n)`. It is stored with 16 fraction bits.
8. **LUT.** For each code, `err(n) = -V_off + (I(n-1-V_off) + I(n-V_off))/2`,
   interpolated at the non-integer position. It is written to the correction
   block with 8 fraction bits, clamped to ±128 LSB.

All divisions share one `seq_divider` (80-bit dividend, 64-bit divisor, 80
clocks). At 12 bits one cycle is about 2 × (5e6 + 4096) collection clocks
plus roughly 4096 × 25 × 90 ≈ 9e6 clocks of INL arithmetic. Together with
the other steps a cycle is about 15–20 million clocks. The INL part is
shorter in practice because the product usually stops before 25 terms. The
collection takes longer when `adc_valid` is not high every clock, because
only valid samples are counted.

### Index convention

Level index k (the code) stands for level `n = k - N/2 + 1`, whose centre is
at `n - 1/2` LSB. An amplitude v in LSB relative to the estimated offset
sits at index `v + V_off + N/2 - 1/2`. Reads outside the N levels return
zero hits. The INL is held at its end values outside the range.

### Why the INL product is the delicate part

Each factor of the product compares how densely the ADC and the attenuated
E-ADC are hit at the same input amplitude. The factors telescope, so the
unknown input density cancels. They cancel only if alpha is exact, though.
A relative error ε in alpha scales 1 + D(n) by about (1+ε)^-K, so D(n) is
off by about K·ε. Here K ≈ log2(|v_n|) is the number of factors before
`alpha^p v_n` reaches the origin. Summing D then turns this into an INL
error that grows roughly as `ε·K·n`. With noisy histograms the alpha estimate is therefore what limits
the result.

Two choices in this design follow from that:

- The product stops as soon as `|alpha^p v_n|` is within 1/2 LSB of the
  origin. Every remaining factor is then `H_A(0)/(alpha H_E(0))`, which is 1
  by the definition of alpha and k. Computing it from one noisy bin would
  multiply the same noise into the result up to 25 times.
- A factor whose denominator is zero (empty E-ADC bins far out) is skipped.

With the same 12-bit conditions as the published evaluation, the full-size
testbench gets the following. The modelled ADC has gain 0.95, offset +20
LSB and DNL σ 0.1 LSB. The E-ADC has gain 1.03, offset −22 LSB and its own
DNL. alpha is 0.494, the input is Gaussian with σ = full scale / 6, and each
phase uses 5e6 random samples. Results:

- offset: 19.58 LSB, against 20 modelled
- alpha: 0.4972, against 0.494 modelled
- RMS output error over the central half of the range: 19.5 LSB before
  correction and 6.5 LSB after

The 0.6 % error in alpha is about twice the binomial spread expected from the
roughly 95,000 E-ADC hits inside the averaging window. It accounts for most
of the remaining error. With noise-free (expected-value) histograms at 10
bits, the corrected level centres match the model to 0.56 LSB RMS, against
20 LSB before correction (`tb_cal_dsp`). So the arithmetic itself is sound,
and more samples per phase, or a wider `M_AVG` window, buy accuracy.

## Number formats and memory

| store | words | bits/word | content |
|---|---|---|---|
| ADC histogram | 2^QB | 24 | hit counts (saturating) |
| E-ADC histogram | 2^QB | 24 | hit counts |
| mapping | 2^QB | 27 | `e_a - a` (10) and `f_a` (17, 16 fraction bits) |
| preconditioned E-ADC histogram | 2^QB | 32 | 8 fraction bits |
| INL | 2^QB | 32 | 16 fraction bits |
| LUT (correction block) | 2^QB | 16 | 8 fraction bits |

At 12 bits that is 4096 × 155 = 634,880 bits. The two histograms, the
mapping and the LUT alone take 372,736 bits. At 14 bits the same layout
would need about 2.5 Mbit. Storing H_e' and the INL over the histogram
memories, instead of in separate memories, would bring that down to about
1.5 Mbit.

Positions `alpha^p v_n` use 16 fraction bits, alpha 24 fraction bits and
alpha·k 8 fraction bits. The product runs with 16 fraction bits. The formats
are in `cal_pkg`.

## Where this design departs from the method

- **Iteration near the origin.** The method's exact relation for
  D(n) is implicit near n = 0. There the INL at the scaled positions depends
  on itself, and the method suggests iterating from the explicit estimate.
  This design uses the explicit form for every level and does not iterate.
  For a converter whose INL is a few LSB or less, the difference is confined
  to the first few levels.
- **Product end.** The product stops within 1/2 LSB of the origin, and
  zero-denominator factors are skipped (see above).
- **Interpolation.** Histograms are read between level centres by linear
  interpolation. The method only says interpolation is used where needed.
- **Offset search.** The search scans upward from the lowest level and
  takes the first change of sign.
- **Memory organisation, word widths, divider and latencies** are this
  design's own. The method gives only the storage formula
  2^q(2d + x + y + b).
- **The sine-wave SFDR evaluation** of the method is not reproduced. The
  testbenches measure level-centre errors directly instead of computing a
  spectrum.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/cal_pkg.sv tb/adc_model_pkg.sv \
  rtl/seq_divider.sv rtl/hist_counter.sv rtl/cal_ram.sv \
  rtl/correction_block.sv rtl/cal_dsp.sv rtl/online_cal_adc.sv \
  tb/tb_online_cal_adc.sv --top-module tb_online_cal_adc
./obj_dir/Vtb_online_cal_adc
```

The block testbenches need only their own module and `cal_pkg`. `tb_cal_dsp`
also needs `seq_divider` and `adc_model_pkg`.

- `tb_hist_counter` (4 bits): counting, the count enable, saturation,
  clearing, and valid gating.
- `tb_cal_ram`: random writes to every address and read-back, including
  read-during-write behaviour.
- `tb_correction_block` (6 bits): the pass-through before calibration, the
  output arithmetic with random LUT values, and the one-clock latency of
  output and valid.
- `tb_cal_dsp` (10 bits, M = 8, R = 25): the testbench plays the histogram
  counters. It loads expected-value histograms of the two modelled
  converters and compares every intermediate against a real-valued
  reference:
  - mapping and H_e' exactly
  - offset to 2^-14 LSB
  - alpha to 1e-5
  - INL to 0.02 LSB
  - LUT to 0.03 LSB

  It then checks the corrected centres against the model (below 1 LSB RMS)
  and checks the phase sequence.
- `tb_online_cal_adc`: the whole design at its default size, with
  behavioural converters, attenuator and switch, running one full cycle
  (about 20 s of simulation). It checks:
  - the uncalibrated pass-through
  - the offset within 1.5 LSB
  - alpha within 0.008
  - the cycle count and phase sequence
  - the corrected output: per-sample error below 25 LSB, mean below 6 LSB,
    RMS at most half the uncorrected

  It also counts that each mechanism was exercised: both switch positions,
  all three mapping cases (one ADC level inside one E-ADC level, spanning
  two, spanning several), the offset change of sign, every LUT entry written,
  and output delivered during collection.

`tb/adc_model_pkg.sv` holds the converter model: level edges from a random
walk of Gaussian DNL with its trend removed, then gain and offset. It also
has the expected-hits function used to build noise-free histograms.
