# Background-calibrated 12-bit pipelined ADC: skip-fill and LMS

A pipelined ADC made of 1.5-bit stages is only as linear as its analog
parts. Capacitor mismatch sets each stage's gain. So does the finite gain
of its amplifier. At large swings the amplifier also compresses. This design
measures those errors while the converter keeps running and removes them in
the digital domain. It needs no accurate calibration voltage and adds no
analog circuit beyond a small resistor ladder and some switching.

The converter has fourteen 1.5-bit stages and a 2-bit flash, with a 12-bit
output at one sample per clock (80 MS/s is the intended rate). This
repository holds:

* synthesizable SystemVerilog for all the digital logic:
  reconstruction, calibration sequencing, coefficient extraction and
  gap filling;
* a behavioural (real-valued) model of the analog stages. The model lets
  the whole converter be simulated end to end.

## The idea in three equations

**Digital inverse of a stage.** A stage takes an input `Vin` and makes a
decision `D` in {-1, 0, +1} with comparators at ±Vref/4. Its multiplying DAC
(MDAC) then amplifies the residue `Vin - D·Vref/2` by about 2. The MDAC is of
the non-flip-around kind: its DAC levels are the reference voltages
themselves. Every gain error therefore sits in the amplification, and the
stage input can be recovered from its decision and its digitised output
`Dout`:

    Din = D·(1/2) + β1·Dout + β3·Dout³          (units of Vref)

An ideal stage has β1 = 1/2 and β3 = 0. Stages 1 and 2 carry large signals,
so they use both β1 and β3. Stages 3 to 14 use β1 only. Output words are built
from the back: the flash value goes into the stage 14 formula, whose result
goes into the stage 13 formula, and so on down to stage 1 (`recon_chain`).

**Measuring β without an accurate reference.** To calibrate stage *i*, one
input sample is skipped. Into its time slot a ladder voltage `V1` is fed
directly to stage *i*. This is done twice, once in each of two
configurations of the stage:

| mode | DAC level | stage output | digitised by stages i+1..14 |
|---|---|---|---|
| 1.5-bit | +Vref/2 (D = +1) | ≈ 2·(V1 − 1/2) | `Dout1` |
| multiply-by-two | 0 | ≈ 2·V1 | `Dout2` |

Both outputs invert to the same input V1. Subtracting the two inverse
equations removes V1:

    β1·(Dout2 − Dout1) + β3·(Dout2³ − Dout1³) = D·(1/2)

The exact value of V1 never enters. It only has to lie between Vref/4 and
Vref/2, so that 1.5-bit mode decides +1. Stages 1 and 2 need a second
equation for β3. For them a second voltage `V2`, close to Vref/2, is
measured the same way. Its multiply-by-two output swings close to full
scale, which is where compression shows.

**Solving by LMS.** Rather than solving these equations, the hardware
applies one least-mean-square step per measured pair (`lms_engine`):

    e   = D/2 − β1·Δ − β3·Δ3,      Δ = Dout2 − Dout1,  Δ3 = Dout2³ − Dout1³
    β1 += μ1·e·Δ,   β3 += μ3·e·Δ3

The measurements of stage *i* are digitised by the stages behind it. For
that reason calibration runs from stage 14 down to stage 1: every stage is
measured by stages that have already been calibrated.

## Skip and fill

Calibration runs in the background, taking slots from the input stream.
`cal_controller` may claim one sample period in every `SKIP_PERIOD` (64).
It raises `cmd.slot` together with:

* the stage under calibration;
* the mode;
* the voltage to use;
* the forced-DAC flag.

The analog front end carries this command down its pipeline with the sample
slot. When the slot reaches stage *i*, that stage takes the ladder voltage
in place of the previous stage's residue. The digital side keeps a copy of
the command, delayed by the front end's latency (`FE_LAT` = 15 cycles).
That copy tags the codes as they come back. The reconstruction chain sees a
tagged slot for stage *i* at the point where the partial result equals
D_out,i. It hands that value, with stage *i*'s own decision, to the
controller.

The skipped input sample still has to appear in the output. `skip_fill_fir`
holds 81 words. When the middle word is a skipped one, it replaces it with
the Lagrange interpolation through the 40 words on each side (80 taps). For
equally spaced points the weights have a closed form:

    c_k = (−1)^(k+1) · C(80, 40+k) / C(80, 40),   k = 1..40
    y(n) = Σ c_k · (x(n−k) + x(n+k))

They are computed at elaboration by the recursion c₁ = 40/41,
c_k = −c_{k−1}·(41−k)/(40+k), then rounded to 22 fractional bits. Weights
beyond about k = 24 round to zero. Any two skipped samples must be more than
40 samples apart. With one slot every 64 samples this always holds.

Each stage is visited for `STAGE_PERIODS` = 4096 sample periods. The
controller leaves a stage at the first pair boundary after that, so a full
cycle takes about 14 × 4096 periods (57,472 in simulation). Stages 3 to 14
get 32 LMS steps per visit. Stages 1 and 2 alternate V1 and V2 pairs, so
they get 16 steps per visit. After stage 1 the cycle starts again at
stage 14, and calibration never stops.

## Comparator offset and the mode control

The derivation assumes that V1 makes the 1.5-bit stage decide +1. A
comparator offset can push the threshold above V1. The decision is then 0,
the DAC level would be 0, and the pair would measure nothing.

The controller checks the decision returned by every 1.5-bit-mode
measurement. If the decision is not +1:

1. it discards that measurement;
2. it sets the stage's bit in `force_mask`;
3. from then on it asks the stage to force its DAC to +Vref/2 in 1.5-bit
   mode, whatever the comparators say (`force_dac`). The equations then use
   D = +1.

The default V1 (0.28·Vref) is close to the threshold. In the default model
this triggers the mode control for stages 1, 6 and 11.

## Hierarchy, interfaces and timing

```
pipelined_adc_top                 real vin in, 12-bit dout out
├── analog_frontend   (behavioural)  14 × mdac_stage, flash_adc_2b, V1/V2 ladder,
│                                    insertion multiplexers, code alignment
└── cal_digital_top   (synthesizable)
    ├── recon_chain      14 × stage_recon (Din = D/2 + β1·Dout + β3·Dout³), tap
    ├── cal_controller   slot schedule, pairs, V1/V2, stage order, mode control
    ├── cal_memory       Dout1, Dout2 and D for V1 and V2
    ├── lms_engine       coefficient registers and LMS step
    └── skip_fill_fir    80-tap Lagrange filler
```

Shared types and constants are in `adc_cal_pkg`:

* `fx_t`: 32 bits, 24 fractional, 1.0 = Vref;
* `scode_t`: stage decision;
* `codes_t`: all 14 decisions of one sample;
* `cal_cmd_t`: the slot command;
* the mode and voltage enums;
* `FE_LAT` and `CHAIN_LAT`.

| path | cycles |
|---|---|
| sample edge → aligned codes (analog front end) | 15 |
| codes → reconstructed value (`recon_chain`, one stage per cycle) | 15 |
| filler (`skip_fill_fir`) | 41 |
| output rounding register | 1 |
| **sample edge → `dout`** | **72** |

Calibration slot round trip: slot command → tap back at the controller is at
most 33 cycles, well inside one slot period. Only one slot is ever in
flight, and assertions in `cal_controller` check this.

`dout` is 12-bit two's complement, with +2048 = +Vref, rounded and
saturated. `dout_valid` marks valid words. `dout_filled` marks words that
were interpolated. The top also brings out β1, β3, the last LMS error, the
stage under calibration, the number of completed cycles and `force_mask`.
The digital reset is synchronous and active low. `cal_en` enables slots.

## The analog model

`mdac_stage`, `flash_adc_2b` and `analog_frontend` are behavioural models.
They use `real` arithmetic and are not synthesizable. Each stage computes:

    d    = sign-with-dead-zone(vin − offset, ±1/4)
    vout = G·x − A3·(G·x)³,   x = vin − Vdac,   G = 2·(1 + gain error)

It holds `vout` for one clock. The defaults of `analog_frontend` come from
the target circuit's figures:

* amplifier open-loop gain 38 dB, which at feedback factor 1/3 gives a
  closed-loop gain error of −3.6 % in every stage;
* capacitor mismatch up to 0.1 % per stage;
* compression in stages 1 and 2 of 0.005·Vref at full-scale output, about
  10 LSB;
* comparator offsets up to 0.06·Vref;
* V1 = 0.28, V2 = 0.47 (in Vref), each 1 % off.

Per-stage values come from a fixed integer hash of the stage number, so
runs repeat exactly. Noise, settling and capacitor sizes are not modelled.

## Verification

Each block has a self-checking bench in `tb/`. Every bench prints
`TB_RESULT checks=N failures=M`.

| bench | what it establishes |
|---|---|
| `tb_mdac_stage`, `tb_flash_adc_2b` | transfer functions, modes, forced DAC, offsets |
| `tb_analog_frontend` | codes rebuild the input to ¼ flash step; slot insertion for every stage, mode and voltage; 15-cycle alignment |
| `tb_recon_chain` | bit-accurate match to a floating-point inverse with random β; latency; tap value, decision and cycle |
| `tb_cal_memory` | random write/read against a reference copy |
| `tb_lms_engine` | one-step match to the LMS rule; convergence to known β1, β3 |
| `tb_cal_controller` | slot grid, stage order 14→1→14, dwell, pairing, V2 only for stages 1–2, memory writes, LMS strobes, forced-DAC control |
| `tb_skip_fill_fir` | pass-through words exact; filled words match the product-form Lagrange sum within 2 LSB |
| `tb_cal_digital_top` | digital part fed by an independent linear stage model: β1 = 1/G per stage, β3 ≈ 0, output within 1 LSB |
| `tb_pipelined_adc_top` | whole converter at default parameters: 56 LSB error before calibration; within 1 LSB of ideal after three cycles; every mechanism exercised |
| `tb_adc_workloads` | ramp INL and DNL; SNDR and SFDR at ~1, ~10, ~30 MHz; calibration cycle length |

Results at the default parameters, for the model's default errors:

| measure | before calibration | after calibration |
|---|---|---|
| peak INL | 69.6 LSB (604 missing codes) | 0.25 LSB (no missing codes) |
| peak \|DNL\| | 1.00 LSB (missing codes) | 0.19 LSB |
| SNDR, 0.99 MHz, 0.98 FS | 32.7 dB | 73.6 dB |
| SFDR, 0.99 MHz | 39.5 dB | 96.2 dB |
| SNDR / SFDR, 9.85 MHz | — | 73.6 dB / 96.5 dB |
| SNDR / SFDR, 29.85 MHz | — | 53.7 dB (73.6 dB excluding the filled words) / 71.5 dB |

The sine frequencies are M/8192 of the sample rate with M odd. A block of
8192 words therefore holds whole periods, and SFDR comes from a plain DFT
without a window. The model has no thermal noise or settling error. SFDR
is therefore limited only by quantization and by what calibration leaves,
and it comes out higher than a real circuit would reach.

To run a bench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal \
          rtl/adc_cal_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
          tb/tb_pipelined_adc_top.sv --top-module tb_pipelined_adc_top -o sim
./obj_dir/sim
```

Replace the bench name to run another one. The full-converter bench runs in about a second once it is built. `cal_digital_top`
and everything below it synthesize. `pipelined_adc_top` contains the real
valued model and does not.

## Choices made here, and limits

These points are this implementation's own, not fixed by the method:

* **Scaling and widths.** The sub-ADC term is weighted by 1/2, so ideal
  β1 = 1/2. Words are 32-bit fixed point. The filler works on 16-bit words
  with 14 fractional bits.
* **Step sizes.** μ1 = μ3 = 1/2. β1 settles within one visit. β3 of stages
  1 and 2 needs a few full cycles. Three cycles, about 172k samples, bring
  the output within 1 LSB.
* **Initial coefficients.** β1 = 1/2 and β3 = 0 after reset.
* **Slot spacing.** 64 samples. It must exceed the 33-cycle round trip, and
  it must exceed 40 so that the filler never sees two gaps.
* **Forced-DAC rule.** A 1.5-bit-mode result other than +1 is discarded, and
  the stage stays forced from then on.
* **Stage timing.** One clock per stage, instead of the two-phase half-period
  timing of a switched-capacitor pipeline. A slot therefore reaches stage *i*
  after i−1 clocks rather than (i−1)/2 periods.
* **Alignment.** The alignment of stage codes is done inside the front-end
  model.
* **Filler near Nyquist.** The 80-tap Lagrange filler is accurate at low and
  mid frequencies. Near 0.37·fs its error on filled words dominates the SNDR,
  as measured above.
* **Last stages.** Stages 11–14 are measured by a back end of only a few
  bits, so their β1 settles only as finely as that back end resolves. Their
  weight in the output is 2⁻¹⁰ or less, so this costs well under 0.1 LSB.
* **Transistor-level circuits.** The amplifier, the dynamic-latch
  comparators, the bootstrapped switches and the resistor ladder are not
  written as circuits. Their effect is represented by the parameters of the
  behavioural model.
