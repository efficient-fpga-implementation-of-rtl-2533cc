# Adaptive IQ-imbalance corrector with reduced range multipliers

A quadrature receiver splits the signal into an in-phase (I) and a quadrature
(Q) branch. If the two local-oscillator phases are not exactly 90 degrees
apart, or the two branches have different gains, each branch picks up part of
the other. Seen at baseband, the received pair is a mixture of the two
components that were sent:

    r_I = s_I + h1 s_Q
    r_Q = h2 s_I + s_Q

This crosstalk shows up as an image of the signal, and it degrades the
bit-error rate of dense constellations such as 32-PSK and 256-QAM.

The corrector undoes the mixture blindly. It needs no pilot or test tone. It
relies only on the fact that the sent I and Q components are uncorrelated. It
has two coefficients:

    c_I = r_I - w1 r_Q
    c_Q = r_Q - w2 r_I

Both coefficients adapt by LMS until c_I and c_Q are uncorrelated. When
w1 = h1 and w2 = h2, the outputs are the sources scaled by (1 - h1 h2), a
factor close to 1 that is left alone.

The multipliers w*r are the costly part, so the design does not use
general-purpose 8x16 multipliers. It uses **reduced range multipliers**
(RRMs): a short chain of reconfigurable add/subtract stages. They can form
only a subset of the 256 possible 8-bit coefficients, but for this
application that subset is enough.

## Number formats

| quantity | width | format |
|---|---|---|
| samples r_I, r_Q, c_I, c_Q | 16 | two's complement, read as Q1.15 |
| coefficients w1, w2 (as multiplied) | 8 | two's complement fraction, Q1.7 |
| coefficient accumulator | 24 | Q1.23, saturating; its top 8 bits are w |
| LMS step size mu | - | 2^-13, a fixed shift, no multiplier |
| RRM internal sums / product | 22 | exact product x * w_eff, 7 extra fraction bits |

The 16-bit data, the 8-bit coefficients and mu = 2^-13 are the design's
specification. The 24-bit accumulator is this implementation's choice, and it
is needed. One LMS step is 2^-13 times a product of two Q1.15 samples, which is
far below one LSB of an 8-bit coefficient. An 8-bit register would never move.
The 16 guard bits hold the fine part of the coefficient, and the multiplier
sees the truncated top byte.

## The reduced range multiplier (`rrm`, `rrm_stage`, `rrm_coef_map`)

The multiplier is a chain of four *basic structures* (`rrm_stage`). Each one
is an adder/subtractor whose operation is chosen by two select lines S1,S0. On
an FPGA, one result bit is one 4-input LUT (A_i, B_i, S1, S0) feeding the
carry chain. The data word x enters every stage, shifted:

```
            x, 2x              4x                8x                16x
              |                 |                 |                  |
         +---------+      +-----------+     +-----------+      +-----------+
         | stage 1 | y1   |  stage 2  | y2  |  stage 3  | y3   |  stage 4  |--> p = x * w_eff
         | 0,x,2x, |----->| y, y+4x,  |---->| y, y+8x,  |----->| y, y+16x, |
         |  3x     |      | y-4x,4x-y |     | y-8x,8x-y |      |y-16x,16x-y|
         +---------+      +-----------+     +-----------+      +-----------+
             S1S0              S1S0              S1S0              S1S0
```

Eight select lines pick one of 256 combinations. With these operation sets,
the products the chain can form are exactly x times every integer from -28 to
+31. These are the **covered** coefficients: w in [-0.21875, +0.2421875] in
exact steps of 2^-7. The covered range is dense near zero, where the
coefficients of an IQ corrector lie, and missing at large magnitudes, which
the corrector rarely needs. The data path has only four add/subtract levels
whatever the data width (parameter `WX`, 16 by default; the product is
`WX + 6` bits wide), and this is where the saving in area and delay over
a general multiplier comes from.

`rrm_coef_map` turns the 8-bit coefficient into the select lines. A
coefficient outside the covered set is replaced by the **nearest covered
coefficient**, which acts as a non-linear quantiser. With the stage set above,
this is a clamp to -28..31. The map is a 256-entry table of select lines,
applied coefficient and covered flag. It is computed at elaboration: all 256
select words are evaluated once, and then two sweeps find the nearest covered
value below and above each coefficient. Ties go to the smaller value. A value
that several select words can form uses the lowest select word.

To cover a different part of the range, change the operation sets in
`rrm_stage`, the function `rrm_stage_value` in `iqc_pkg` (they must agree) or
the shifts `RRM_SH2..4`. The table follows by itself. The covered set changes
with them, and so do the expected values in `tb_rrm` and `tb_rrm_coef_map`.

What follows the specification:

- four stages;
- two select lines per stage;
- data shifted by 2, 3 and 4 bits into the later stages;
- nearest-covered quantisation.

The operation set inside each structure, and therefore the exact covered
range, is this implementation's own choice. The first stage forming 0/x/2x/3x
from x and 2x is also its own choice. The shift labelled "2" in the
specification is taken as a 2-bit shift (x4), as its text says.

## The processing element and the adaptation (`iqc_pe`, `lms_coef_update`)

The two branches are mirror images, so one processing element serves each.
For the I branch, with d = r_I, x = r_Q and peer output c_Q:

```
c(k)    = sat16( d(k) - (x(k) * w_eff(k) >>> 7) )      combinational
acc     = sat24( acc + (c(k) * c_peer(k) >>> 20) )      at the clock edge, if in_valid
w       = acc[23:16]
```

The shift by 20 is mu = 2^-13 applied to a Q2.30 product and aligned to the
Q1.23 accumulator: 30 + 13 - 23 = 20.

The adaptation is **symmetric adaptive decorrelation**. Each element
multiplies its own output by the other element's output of the same sample,
and the two coefficients climb until E[c_I c_Q] = 0. The specification says
that LMS is used and that the algorithm is symmetric. It leaves open which
signal multiplies the error. The peer output was chosen here because it is the
only choice that drives the outputs to be uncorrelated.

The plain LMS choice, multiplying by the other raw input, was rejected. It
minimises each output's power instead, which settles near twice the mixing
coefficient and does not remove the crosstalk.

**Consequence, and the main limit of this implementation.** With this update
both elements receive the same increment c_I c_Q, so w1 and w2 stay equal
(both start at 0 after reset). One shared coefficient can cancel the part of
the crosstalk due to the phase error, but not the part due to an amplitude
imbalance, because then h1 differs from h2. The outputs end up uncorrelated,
but each still holds some of the other component. Measured over random
imbalances of 0-30 degrees and 1-3 dB:

- the crosstalk rejection improves by about 10-12 dB;
- the image-rejection ratio (which also counts the unequal branch gains) goes
  from about 15 dB to about 19 dB.

This is far from the 73-78 dB reported for the reference design. To make w1
and w2 converge separately to h1 and h2, another statistic is needed: a
different regressor per branch, lagged correlations, or higher-order terms.
None of these is specified, so the shared update was kept.

Other choices made here:

- The product w*x is scaled back by truncation (arithmetic shift).
- c is saturated to 16 bits.
- The accumulator saturates rather than wraps.
- Reset clears both coefficients to 0, so the corrector starts as a straight
  pass-through.

## Top level (`iq_corrector`)

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid | in | 1 | a sample pair is presented this cycle |
| r_i, r_q | in | 16 | received I and Q samples |
| out_valid | out | 1 | in_valid delayed by one clock |
| c_i, c_q | out | 16 | corrected samples of the pair given one clock earlier |
| w1, w2 | out | 8 | coefficient registers (Q1.7) |
| w1_eff, w2_eff | out | 8 | coefficients the multipliers apply (nearest covered) |
| w1_covered, w2_covered | out | 1 | the register value is inside the covered range |

Timing:

- The corrector accepts one sample pair per clock, with no stalls.
- The outputs and the updated coefficients appear at the clock edge that takes
  the sample, so sample k+1 already uses w(k+1), exactly as in the LMS
  equations.
- When in_valid is low, everything holds.
- The critical path runs from the coefficient register through the select
  table, four add/subtract stages, the output subtractor, the 16x16 update
  multiplier and the accumulator adder. It is not pipelined.

Package `iqc_pkg` holds:

- the word lengths (`WD_DP`, `WD_CF`, `MU_SHIFT`, `WD_ACC`, `WD_RRM`);
- the sample and coefficient types;
- the RRM select struct and its operation enum;
- the functions that give the coefficient a select word forms.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. All of them pass.

| testbench | what it checks |
|---|---|
| `tb_rrm_stage` | all four operations of both stage kinds, random 20-bit operands |
| `tb_rrm_coef_map` | all 256 coefficients: select word decodes to the applied coefficient, which is the nearest that any select word forms; covered set is exactly -28..31 |
| `tb_rrm` | all 256 coefficients x 40 data values (corners and random): p = x * clamp(w, -28, 31) exactly |
| `tb_lms_coef_update` | cycle-by-cycle against a model, en gaps, both saturation limits, reset mid-run |
| `tb_iqc_pe` | cycle-by-cycle against a model, output saturation, coefficients driven beyond the covered range |
| `tb_iq_corrector` | end to end at the default sizes, against a bit-exact model every cycle (details below) |
| `tb_iq_workloads` | Monte-Carlo over random imbalances (details below) |

`tb_iq_corrector` uses a front-end model:

    r_I = g1 (u_I cos(phi/2) + u_Q sin(phi/2))
    r_Q = g2 (u_I sin(phi/2) + u_Q cos(phi/2))
    g1,2 = 1 +- alpha/2
    beta = 20 log10(g1/g2)

It runs these cases:

- 256-QAM at 15 degrees / 3 dB;
- 32-PSK at 10 degrees / 1 dB, with gaps in in_valid;
- the plain scalar mixture r_I = s_I + h s_Q, r_Q = h s_I + s_Q with
  h = -0.15, where both coefficients must settle within 2 LSB of h and the
  modelling error |w - h|^2 / |h|^2 must fall below 1% (it reaches about
  1e-4);
- a 40-degree imbalance that drives the coefficients past the covered range;
- a fully correlated full-scale input that saturates the outputs and then the
  accumulator.

It counts each of these mechanisms and requires every one to occur: updates,
idle hold, uncovered-coefficient quantisation, output saturation, accumulator
saturation, reset. Typical results are in the table below.

| case | w1 = w2 | correlation of outputs (inputs) |
|---|---|---|
| 256-QAM, 15 deg, 3 dB | 16/128 | 0.008 (0.27) |
| 32-PSK, 10 deg, 1 dB | 11/128 | 0.001 (0.17) |

`tb_iq_workloads` runs 100 experiments each of 32-PSK at 26.1 dB SNR and
256-QAM at 30 dB SNR with AWGN. Each experiment draws a phase error of 0-30
degrees and an amplitude imbalance of 1-3 dB and runs 150 000 samples. It
checks, in every experiment whose coefficients stay covered, that w1 and w2
settle within 2 LSB of the analytic decorrelation point
w = (S - sqrt(S^2 - 4P^2)) / (2P), where P = a11 a21 + a12 a22 and S is the
sum of the squared front-end matrix entries.

It reports:

- the image-rejection ratio before and after, K1^2/K2^2 of the overall 2x2
  map;
- the crosstalk rejection;
- the settling time.

For 32-PSK and 256-QAM at 15 degrees / 3 dB, it also compares symbol error
rates after adaptation: ideal decisions, uncorrected decisions and corrected
decisions. Each branch is normalised by its own gain first, so that only the
crosstalk is judged.

Typical results:

| | IRR before | IRR after | crosstalk before | crosstalk after | settling (samples) |
|---|---|---|---|---|---|
| 32-PSK | 15.3 dB | 18.9 dB | 20.3 dB | 31.6 dB | ~40 000 |
| 256-QAM | 15.0 dB | 18.4 dB | 20.3 dB | 31.0 dB | ~57 000 |

| 15 deg / 3 dB | SER ideal | SER uncorrected | SER corrected |
|---|---|---|---|
| 32-PSK, 26.1 dB SNR | 5.5e-3 | 0.43 | 6.2e-2 |
| 256-QAM, 30 dB SNR | 1.1e-3 | 0.77 | 6.3e-2 |

The IRR before correction agrees with the 14-15 dB expected for this range of
imbalances. Phase errors close to 30 degrees need a coefficient of about 0.25.
That lies at the edge of the covered range, so a few experiments (4 of 100
PSK, 5 of 100 QAM) end at the clamp. The corrected error rates show the
residual amplitude-imbalance crosstalk described above. The design removes
most of the damage but does not reach the ideal error rate.

To simulate with Verilator, list the package first:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
    rtl/iqc_pkg.sv tb/tb_iq_corrector.sv --top-module tb_iq_corrector -o sim
obj_dir/sim
```

Replace the testbench name to run any of the others. All of them finish in
well under a minute; `tb_iq_workloads` takes about 30 s.

## Known departures and open points

- **Shared decorrelation update.** w1 and w2 are always equal, which leaves
  the amplitude-imbalance crosstalk in place (see above). Coefficients that
  converge separately would need an update rule that is not specified.
- **Covered range.** -28..31 LSB is this implementation's RRM. Phase errors
  above about 27 degrees want a larger coefficient and are clamped.
- **Nothing is pipelined.** The filter, the update and the accumulator
  complete in one clock. On an FPGA, a register between the RRM and the
  update multiplier would shorten the path, at the cost of a one-sample delay
  in the LMS loop.
- **Not included.** The analogue front end (splitter, mixers, filters, ADCs)
  is modelled only in the testbenches. The general-purpose-multiplier baseline
  is not included.
- **Select table.** The coefficient-to-select table is one more logic level
  ahead of the four add/subtract stages. A design that drives the select
  lines straight from coefficient bits could save that level, but only for
  a covered set chosen to allow it.
- **Area and delay.** No FPGA-specific primitives are instantiated, so area
  and delay depend on how the synthesis tool maps the add/subtract chain and
  the select table.
