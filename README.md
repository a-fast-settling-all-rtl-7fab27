# Fast-settling ADPLL with temperature-compensated OTW estimation

A ring-oscillator all-digital PLL spends most of its wake-up time walking its oscillator
tuning word (OTW) from wherever it was to the word for the new channel. This design removes
most of that walk. When the frequency control word (FCW) changes, a small controller, the
TCPC (temperature compensation PLL controller), computes the right OTW from a
four-coefficient model of the DCO and forces it onto the oscillator. The loop then only has
to trim a residual error of a fraction of an OTW step.

The key point is that the model is normalised. Temperature scales the ring's charge and
discharge currents by the same factor, so the DCO curve divided by its value at OTW = 255,

    NF(OTW) = (a*OTW + b) / (c*OTW + d),

does not depend on temperature. The coefficients a, b, c, d are fitted once, by an external
processor, from a sweep of all tuning words. At run time the controller needs no table. It
uses the word the loop was locked at (OTW_LOCK) and the frequency it measured there (FC_OUT).
Together these fix the current temperature's scale, and the new word follows in closed form:

    A = a*OTW_LOCK + b,   B = c*OTW_LOCK + d
    OTW_EST = (d*FCW*A - b*FC_OUT*B) / (a*FC_OUT*B - c*FCW*A)

Everything except the oscillator is synthesizable SystemVerilog. The oscillator is a
behavioural model.

## Loop structure

```
             +-----------------------------------------------------------+
             |                                                           |
 FCW ---+--> pfd --ferr/PFD_OUT--> loop_filter --otw_dlf--+              |
        |     ^  ^                     ^                  v              |
        |     |  |                     | INIT, OTW_INIT  otw_register --OTW--> dco_model
        +--> tcpc (controller + estimator) ---------------^                  |  12 phases
              ^ FC_OUT                                                       |
              |                                                              v
              +------ 12*cnt_delta + FD_OUT <-- freq_counter (DCO_OUT[0]) <--+
                                            <-- phase_converter (all 12) <---+
```

| module | role |
|---|---|
| `adpll_top` | the whole PLL; the DCO model inside, all other blocks below |
| `dco_model` | 12-phase ring DCO, behavioural (real-valued delays) |
| `edge_detector` | synchronises F_REF into the DCO_OUT[0] domain; one-cycle latch enable a fixed 2-3 DCO cycles after each F_REF rise |
| `freq_counter` | 10-bit counter on DCO_OUT[0], latched by the edge detector; `cnt_delta` = DCO cycles per reference period |
| `phase_converter` | latches the 12 phases and T_CHECK at F_REF rise; phase code and fine frequency code |
| `phase_decoder` | 12-phase pattern to 4-bit phase, with latch-error correction |
| `pfd` | FC_OUT, frequency error, accumulated phase error PFD_OUT |
| `loop_filter` | PI filter with gain shift, loads OTW_INIT while INIT is high |
| `otw_register` | selector (TCPC or filter) and the register in front of the DCO |
| `tcpc_controller` | sequencer: OTW sweep and the seven-cycle estimation sequence |
| `tcpc_estimator` | the OTW_EST formula above, two cycles |
| `tcpc` | controller and estimator wired together |
| `adpll_pkg` | widths, number formats, the coefficient struct, sweep sample struct, state enum |

### Number formats

- **FCW, FC_OUT**: unsigned Q12.4. The unit is a *phase step*, 1/12 of a DCO period, per
  reference period. At F_REF = 15 MHz, 2.4 GHz is 1920.0 (30720) and 2.415 GHz is 1932.0.
  The resolution is 15 MHz/12/16 ≈ 78 kHz.
- **OTW**: unsigned Q8.8. The integer part covers 0..255 (OTW_MAX = 255). The full 16 bits
  drive the DCO's current source.
- **Errors**: signed 20-bit, in the FCW scale.
- **Coefficients a, b, c, d**: unsigned Q6.10. The fitted values 1.11, 2.613, 1.0 and 31.27
  are 1137, 2676, 1024 and 32020.

## Timing within one reference period

Everything in the F_REF domain is placed on one of its two edges:

- **F_REF rising edge**
  - The phase converter latches the 12 phases (PL) and DCO_OUT[0] (T_CHECK).
  - The OTW register applies the new OTW to the DCO.
  - A few DCO cycles later, the counter value is latched in the DCO domain.
- **F_REF falling edge**
  - The PFD phase-error register, the loop filter accumulator and the TCPC all update.
  - So do the "previous value" registers of the counter and the phase code.
  - The differences `cnt_delta` and `FD_OUT` are combinational between the two edges, so
    they are consumed at the same falling edge they refer to.

An OTW applied at rising edge *k* is measured over period *k*. It is corrected at the
falling edge half a period later and takes effect at rising edge *k+2*: two cycles of loop
delay. Every half-cycle path is a register-to-register path in one domain. The only
crossing, counter latch to F_REF fall, is safe by construction: the latch settles within
about 3 DCO cycles of the rising edge, and the reader waits half a reference period.

## Measuring frequency without a TDC

The measured frequency is FC_OUT = 12 * cnt_delta + FD_OUT phase steps.

- **Coarse part.** The counter counts DCO_OUT[0] rising edges. It is latched a fixed number
  of DCO edges after each F_REF rise, set by the synchroniser in `edge_detector`. The
  offset is the same at both ends of the period, so it cancels.
- **Fine part.** The phase code PC_OUT is the number of twelfths of a DCO period elapsed
  since the last DCO_OUT[0] rise at the F_REF edge. FD_OUT = PC_OUT − previous PC_OUT
  (−11..11).

The decoder follows the usual phase table: Phase = p where PL[p] = L and PL[p+1] = H
(indices mod 12). With DCO_OUT[k] lagging DCO_OUT[0] by k/12 of a period, the high half of
DCO_OUT[0] decodes to Phase 6..11 and the low half to 0..5. PC_OUT is therefore Phase + 6
mod 12.

**Latch-error correction.** T_CHECK tells which half of the DCO_OUT[0] cycle the F_REF edge
fell in. If the only L→H boundary lies in the wrong half, the sample was caught across a
transition, and it is moved to the nearest code of the right half. Examples: boundary 5 with
T_CHECK = 1 becomes 6; boundary 0 with T_CHECK = 1 becomes 11. A pattern with no boundary
gives the first code of the half. The DCO model has a 15 ps late falling edge on phase 6.
This gives the corrector real errors to fix in closed-loop simulation: a few percent of samples
are corrected.

## Loop filter and gain shift

Each cycle the accumulator changes by `Ka*ferr + Kb*PFD_OUT`:

- `ferr` = FCW − FC_OUT is the frequency error.
- PFD_OUT is the phase error: the running sum of `ferr`, i.e. the reference phase minus the
  DCO phase.

The gains depend on the phase error:

| phase error | Ka | Kb |
|---|---|---|
| more than 3 phase steps | 2^-1 | 2^-3 |
| 3 phase steps or less | 2^-3 | 2^-5 |

Before the gains are applied, one phase step of error weighs 1/8 OTW LSB
(`ERR_SCALE_SHIFT = 1`). This scale is this design's own choice. It keeps the coarse loop
stable with the two-cycle delay: the DCO gain is about 4.4 phase steps per OTW LSB near
2.4 GHz. The output saturates to 0..255.996.

While INIT is high:

- the accumulator is loaded with OTW_INIT;
- the phase error is held at zero.

So the loop restarts from the estimate with no stale phase.

## The TCPC sequence

**On an FCW change** (with `tcpc_en` and `coef_valid` high), INIT is high for exactly seven
reference cycles. Each cycle starts at a falling edge:

| cycle | state | action |
|---|---|---|
| 1 | `S_LOCK` | OTW_LOCK ← loop filter output; filter frozen; INIT rises |
| 2 | `S_WAIT` | DCO runs one full period at OTW_LOCK |
| 3 | `S_FC` | FC_OUT of that period captured; FLAG_EST |
| 4 | `S_EST1` | estimator stage 1: A, B and the four products |
| 5 | `S_EST2` | estimator stage 2: division; OTW_EST ready |
| 6 | `S_OTW` | FLAG_OTW; OTW_INIT = OTW_EST; the DCO takes it at the next rising edge |
| 7 | `S_REL` | loop filter loaded with OTW_EST; INIT falls at the end of the cycle |

An FCW change during a sequence is picked up when the sequence ends.

**Initialization** (a `cal_start` pulse):

- INIT rises, and the TCPC steps OTW_INIT through 0..255.
- Each word is held for two cycles.
- The FC_OUT of the second cycle is sent out on `cal` (valid, OTW, FC) for the external
  processor that fits a, b, c, d.
- After OTW 255, INIT stays high until `coef_valid`. One estimation then runs from the last
  sweep point.

With `tcpc_en` low, the PLL behaves as the conventional gain-shift-only loop.

## The DCO model

`dco_model` implements

    F = Fscale * (1 + TEMPCO*(T - 25)) * NF(OTW/256)

with the fitted a, b, c, d given above. Fscale puts OTW 255 at 2.8 GHz at 25 °C, the top of
the 1.5–2.8 GHz range. Its own choices:

- a temperature coefficient of −0.15 %/°C;
- re-reading OTW every 1/12 period;
- the 15 ps phase skew.

It is not fitted to measured silicon curves. Because the model follows the estimator's law
exactly, simulation measures the quality of the digital implementation, not of the model.
The remaining estimation error comes from the ±1-step quantisation of FC_OUT and from
fixed-point rounding. The level shifters that buffer the real ring are ideal wires here.

## What the simulations show

Simulations at the default parameters, 15 MHz reference, 2.400 ↔ 2.415 GHz:

- **Estimate accuracy.** OTW_EST lands within 0.02–0.2 OTW LSB of the ideal word at every
  temperature from 10 to 50 °C with the same coefficients. That is well inside one LSB,
  about 5 MHz.
- **Settling with the TCPC:** 10–17 reference cycles from the FCW change. That is the 7
  TCPC cycles plus lock detection.
- **Settling with the gain-shift loop alone:** 25–45 cycles.
- **Whole range.** Jumps between 1.50 and 2.79 GHz, up to 220 OTW LSBs, also settle
  in about 10 cycles. The estimate stays within 0.3 LSB.
- **Fitted coefficients.** Coefficients fitted by least squares from the 25 °C sweep give
  the same accuracy at 10 and 50 °C as the exact ones.
- **Lock criterion:** |phase error| ≤ 4 phase steps (a third of a DCO period) for 8
  consecutive cycles.

**Fine-gain limit cycle.** The lock window is wider than the 0.1-period figure used for the
measured chip. With the fine gains, the loop is lightly damped (damping factor about 0.25).
FC_OUT is quantised to one phase step, and this can sustain a slow limit cycle of about ±4
phase steps with a period of about 30 cycles. The limit cycle touches the 3-step gain-shift
threshold, so the coarse gains kick in briefly. A ±1-step window is therefore met only on
some runs, with or without the TCPC. The behaviour belongs to the loop gains, not to the
estimator. A larger error-to-OTW weight damps the fine loop better, but it destabilises the
coarse gains with the two-cycle delay.

How much the estimate's accuracy matters shows when the estimator output is overridden
with an offset word (`tb_estimation_error`, 2.400 → 2.415 GHz at 25 °C, about 5.5 MHz
per OTW LSB):

| estimate offset | settling [cycles] |
|---|---|
| 0 | 10 |
| ±5 MHz | 26–37 |
| ±10 MHz | 36–37 |
| ±20 MHz | 48 |
| ±40 MHz | 47 |

Beyond about ±3 phase steps of initial error the coarse gains take over, so the settling
time saturates near that of the plain loop.

These cycle counts come from this design's loop gain scaling and the ideal DCO. They are
not a prediction of silicon settling times: 45 cycles with and 110 without were reported
for the measured chip.

## Testbenches

Each block has a self-checking testbench `tb/tb_<module>.sv` printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_adpll_top` | all defaults, about 1500 reference cycles; the main end-to-end test, see below |
| `tb_temperature_sweep` | the step at 10, 20, 25, 30, 40 and 50 °C, with and without the TCPC; prints a settling table |
| `tb_frequency_range` | steps across the output range, 1.50 to 2.79 GHz, with the TCPC; estimate, lock and mean frequency at each point |
| `tb_estimation_error` | settling against a deliberately wrong estimate (the estimator output is overridden by the ideal word plus 0 to ±40 MHz); prints the settling table shown earlier |
| `tb_calibration_flow` | the whole calibrate-then-estimate flow: sweep at 25 °C, least-squares fit, then TCPC steps at 10, 25 and 50 °C using the fitted coefficients |
| `tb_phase_decoder` | all table rows, wrong-half boundaries, bubbles, random patterns against a reference search |
| `tb_tcpc_estimator` | random points against the formula in floating point; two-cycle latency |
| `tb_tcpc_controller` | sweep samples and timing; the seven-cycle sequence and its flags; no sequence when disabled |
| `tb_tcpc` | controller and estimator together against the formula |
| `tb_pfd` | sums, errors and clear against a model |
| `tb_loop_filter` | both gain modes, the threshold edge, saturation and INIT load against a model |
| `tb_freq_counter`, `tb_edge_detector` | exact counts at commensurate clocks; latch-pulse placement |
| `tb_phase_converter` | phase codes, FD_OUT and flagged latch errors for known phase patterns |
| `tb_otw_register` | selection and rising-edge-only update |
| `tb_dco_model` | frequency law, temperature-independent NF, phase order |

`tb_adpll_top` in detail:

- It runs the sweep and checks all 256 samples against the DCO law.
- It loads the coefficients and steps FCW with and without the TCPC, at 25 °C and 50 °C,
  and with changes every 75 cycles (5 µs).
- It checks the seven-cycle INIT, the estimate against the ideal word, lock and mean
  frequency.
- It counts the sweep, the coarse and fine gains, TCPC runs and latch corrections, and
  fails any that never happened.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/adpll_pkg.sv tb/tb_adpll_top.sv \
        --top-module tb_adpll_top -Mdir obj && obj/Vtb_adpll_top

`--timing` is needed for the DCO model and the testbench clocks. The whole top-level run
takes about a second.

## Departures and open points

- The counter latch is a clock enable in the DCO domain, not a gated clock.
- Metastability in the synchroniser (a ±1 count when F_REF lands on a DCO edge) is not
  modelled. The two-state simulation cannot produce it.
- These points are this design's reading, not given for the original design:
  - the exact structure of the loop filter (which gain multiplies which error);
  - the error-to-OTW scale;
  - the fraction widths;
  - the reset values (OTW 128);
  - the placement of the seven TCPC steps;
  - the two-cycle sweep dwell.
- The coefficient fit (least squares in an external processor) is not part of the RTL. The
  top brings out the sweep sample stream and takes a, b, c, d and `coef_valid` as inputs.
  `tb/calib_processor_model.sv` is a behavioural stand-in used only by `tb_calibration_flow`.
  It fixes c = 1, fits a, b and d over OTW 8..255 from the normal equations, and returns
  a = 1.112, b = 2.607, d = 31.25 for the model DCO (true values 1.11, 2.613, 31.27).
  With those fitted values every estimate at 10, 25 and 50 °C is within 0.1 LSB of the
  ideal word, so the loop locks in about 10 cycles.
- The estimator uses a combinational 62-by-54-bit divider in its second cycle. It meets the
  half-period budget in simulation only. A synthesised version for a fast process may want a
  sequential divider clocked faster than F_REF.
- `temp_c` on the top only feeds the DCO model; it exists for simulation.
