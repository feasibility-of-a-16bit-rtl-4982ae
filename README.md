# Digital section of a calibrated 16-bit, 3 MS/s pipeline ADC

A pipeline ADC whose first stage resolves 5 bits needs its 32 unit capacitors
to match to roughly 14 bits before it can reach 16-bit linearity, and silicon
does not deliver that. This design keeps the analog pipeline of a 14-bit
5-4-4-4 converter, puts a new 5-bit stage in front of it (5-5-4-4-4, 18 raw
bits), and fixes the first stage's capacitor mismatch with a small amount of
digital logic. Each capacitor's error is measured once at the factory through
the converter's own back-end and stored in fuses. In normal operation a
running-sum table turns these errors into one correction per first-stage
segment, and that correction is added to every raw code. The 18-bit
corrected code is cut to 16 bits, so the differential non-linearity (DNL)
left after calibration is a fraction of an output LSB. The target is
|DNL| ≤ 1/4 LSB.

The logic was kept deliberately simple: no multiplier, no on-chip
calibration controller, and no state beyond a few pipeline registers. The
digital switching noise it makes is over early in each amplifier settling
period. An external tester ("DSP" below) runs the calibration through the
converter's 16 output pins.

This repository holds the synthesizable RTL of that digital section and of
a calibration controller that plays the tester's part. It also holds the
testbenches and a behavioural model of the analog pipeline used to test
them.

## The correction in one page

All numbers below are in 18-bit code units. Full scale is 0 … 2^18 − 1, and
one first-stage step is 8192.

**Raw code.** Each stage's flash is thermometer-coded. An encoder turns it
into the ROM code of that stage, and the five codes are overlap-added with
two bits of redundancy between neighbouring stages:

    raw = f0·2^13 + f1·2^9 + f2·2^6 + f3·2^3 + f4

| stage | comparators | ROM code range | word width |
|------:|------------:|---------------:|-----------:|
| 1     | 32          | −2 … 30        | 6 (two's complement) |
| 2     | 32          | 14 … 46        | 6 |
| 3, 4  | 16          | 6 … 22         | 5 |
| 5     | 16          | 8 … 24         | 5 |

The offsets are chosen so that the centre level of every stage adds up to
exactly 2^17. The redundancy absorbs comparator threshold errors of the
first flash (the testbenches use up to ±1000 codes, about 1/8 of a step), so
they never show at the output.
What the redundancy cannot absorb is a wrong step height in the first MDAC
(the multiplying DAC that forms the stage's residue).

**Why a running sum.** When the input crosses from first-stage segment i−1
to segment i, unit capacitor i switches to the reference, and the residue
falls by that capacitor's step. If the step is 8192 + Error(i) instead of
8192, every code in segment i and above is off by Error(i), since the steps
add up. A code in segment i therefore needs the correction

    Correctionterm(i) = Error(1) + … + Error(i),     Correctionterm(0) = 0

There are 33 segments. The first-stage code f0 tells which segment a sample
is in: segment = f0 + 2. So the whole correction is a 33-entry table lookup
on a 6-bit index, and the table is computed continuously from 32 fuse words
by a chain of 32 adders (`pre_adder`). Each Error is a 7-bit
two's-complement word (±63 codes, about 0.8 % of a step). The sums are
11 bits.

**Offset.** The residue amplifier's offset and the calibration itself shift
the whole transfer curve. A 13-bit two's-complement offset word is
subtracted from the selected term. The result is held in a 14-bit
correction register and added to the raw code:

    corrected = raw + Correctionterm(f0 + 2) − offset

The output logic takes bits 17:2 of the corrected code. It clamps negative
codes to 0 and codes of 2^18 or more to 65535.

**Measuring an error with an 8-bit window.** During calibration the first
MDAC samples the first decision level (4096) instead of the input, so the
residue lands at a known point in the middle of the back-end range. The DSP
then reads the converter's output twice, with the correction register held
at zero:

* A: no capacitor forced high (the base case);
* B: only capacitor m forced high.

A − B equals 8192 + Error(m). Since |Error| < 128, the low 8 bits of the
difference already give Error(m):

    Error(m) = (A − B) mod 256, read as a signed byte

This is why capacitor measurements put only the 8 LSBs of the code on the
pins. The accuracy of the measurement is the linearity of the 14-bit
back-end between the two residue points. For the same reason only the first
stage is calibrated.

## Pipeline and timing

The design has one clock, `clk`, at twice the sample rate (6 MHz for
3 MS/s). Each clock cycle is one clock phase. `phase_gen` produces the
mutually exclusive enables `ph1` and `ph2`; the first cycle after reset is
phase 1. The analog section gets `ph1`/`ph2` to derive its non-overlapping
switch clocks.

The stages decide half a conversion period after one another. In cycles
counted from the phase-1 cycle t in which the first flash decides on a
sample:

| cycle | what happens |
|------:|--------------|
| t … t+4 | flash s presents its word in cycle t+s and holds it for two cycles |
| t+4 (ph1) | the five delayed words meet; `sel` = delayed f0 is valid; at the end of the cycle the raw register loads the overlap sum and the correction register loads Correctionterm(sel+2) − offset |
| t+5 (ph2) | at the end of the cycle the calibration adder loads raw + correction |
| t+6, t+7 | `io_logic` puts the clamped, truncated code on the 16 pins |

The latency is 6 phase cycles (three conversion periods), and a new code
appears every two cycles. Flash s passes through 4−s delay registers that
are clocked every cycle. In the original circuit these were latches,
transparent on alternating phases.

**Timing budget.** At 3 MS/s one phase lasts about 166 ns. The longest
per-sample path is the last stage's encoder feeding the five-word overlap
adder into the raw register: about 43 levels of two-input gates after
synthesis. Next come the selector plus offset subtraction (37 levels) and
the calibration adder (36 levels). That leaves roughly 4 ns per gate level.
The 32-adder pre-adder chain is much deeper (about 80 levels), but it only
depends on the fuses, which do not change in normal operation.

The first-MDAC switch controls `mdac1_sw[i]` (capacitor i+1 to the high
reference) follow the first flash's thermometer code without any register.
In calibration they follow the DSP's line select instead.

## Calibration interface

The `cal` pin selects calibration mode. In that mode the three top data
pins become inputs from the DSP, and the other 13 pins form a data bus:

| pin | 15 | 14 | 13 | 12 … 8 | 7 | 6 … 0 |
|-----|----|----|----|--------|---|-------|
| name | OFF | CLK | INOUT | address | — | value |

| INOUT | OFF | mode | pins 12:0 | internal effect |
|:-----:|:---:|------|-----------|-----------------|
| 1 | 0 | fuse write | DSP drives address a (12:8) and value (6:0) | a rising CLK blows the value into fuse word a |
| 1 | 1 | offset write | DSP drives the 13-bit offset | a rising CLK blows it into the offset fuse |
| 0 | 0 | capacitor measurement | DSP drives address (12:8); ADC drives code bits 7:0 | correction register cleared, first MDAC under DSP control |
| 0 | 1 | offset measurement | ADC drives code bits 12:0 | correction active, MDAC samples normally |

Write strobes are `cal & INOUT & CLK`, so the DSP raises and lowers CLK
around stable data. The `clrreg` signal is `cal & ~OFF`. It both zeroes the
correction register and puts the first MDAC in calibration sampling mode
(`calmdac`).

**Address convention.** Bus address a (0 … 31) holds Error(a+1) in the fuse
bank. In capacitor measurement mode the line decoder sees a when CLK is high
and a+1 when CLK is low. Line select n forces capacitor n high, and select 0
forces none. So the DSP measures:

* the base case with CLK high and a = 0;
* capacitor m with CLK low and a = m−1;

and it writes the result of capacitor m to address m−1.

## The calibration controller

`cal_dsp` carries out the whole factory calibration over the pins.
`adc16_system` connects it to the converter, which is the arrangement in
which the chip is calibrated. After a `start` pulse it does the following:

1. Raise `cal` and measure the base case A: CLK high, address 0.
2. For each capacitor m = 1 … 32:
   * measure B with CLK low and address m−1;
   * compute Error(m) = round(A − B) mod 256, saturated to the 7-bit range;
   * write Error(m) to fuse address m−1 right away. Fuse contents do not
     disturb later capacitor measurements, because the correction register
     is held at zero in that mode.
3. Raise `vin_mid` to ask the test set for a mid-scale input, whose ideal
   code 2^17 has zero 13 LSBs. Measure in offset mode (OFF = 1), where the
   correction is active and the offset word is still zero. The 13 LSBs of
   the reading are then the offset, less `OFS_REF` if a different input is
   used. Write the result to the offset fuse.
4. Release `cal` and raise `done`.

The controller does not trust a single reading. Every measurement skips
`SETTLE` = 8 samples after the pins change (the converter shows a new
condition after 3) and then averages 2^`AVG_LOG2` = 1024 readings, one per
phase-1 cycle. Noise equal to one output LSB RMS therefore adds only
1/32 LSB to each measurement.

The pins show only an 8-bit (or 13-bit) window of the code, so a noisy
reading can wrap around. Each reading is unwrapped against the first one of
its series: the difference is taken modulo the window and read as a signed
number. The sum keeps 10 fraction bits until the final rounding.

Each write is a three-sample pulse: setup, CLK high, CLK low. A full
calibration takes 34 · (8 + 1024) + 99 = 35,187 sample periods, about
12 ms at 3 MS/s.

The fuses can only be blown: a second write ORs into the word. Calibration
is therefore a one-time step, as on the real part.

## Modules

| file | role |
|------|------|
| `rtl/adc_pkg.sv` | widths, per-stage flash constants (comparators, ROM offset, weight), the I/O mode enum |
| `rtl/adc16_system.sv` | converter plus calibration controller sharing the pins |
| `rtl/cal_dsp.sv` | calibration controller: measurement sequencing, averaging, error extraction, fuse programming |
| `rtl/adc16_top.sv` | the converter's digital section: instantiates everything below |
| `rtl/phase_gen.sv` | phase-1/phase-2 enables from the 2× clock |
| `rtl/flash_encoder.sv` | thermometer → ROM code (counts ones, adds the stage offset); one per stage |
| `rtl/flash_delay_correct.sv` | per-stage delay registers, overlap adder, raw register, delayed f0 for the selector |
| `rtl/fuse_bank.sv` | behavioural model of the 32 × 7 fuse memory |
| `rtl/offset_fuse.sv` | behavioural model of the 13-bit offset fuse |
| `rtl/pre_adder.sv` | 32-adder chain producing Correctionterm(0 … 32) |
| `rtl/correction_selector.sv` | 33:1 selector indexed by f0 + 2 |
| `rtl/correction_register.sv` | term − offset, loaded on ph1, synchronous clear in calibration |
| `rtl/calibration_adder.sv` | raw + correction, loaded on ph2 |
| `rtl/io_logic.sv` | truncation and clamping, mode decoding, pin directions, write strobes |
| `rtl/line_decoder.sv` | 6-bit address → one of 32 capacitor lines (0 selects none) |
| `rtl/mdac_ref_mux.sv` | first-MDAC switch control: flash thermometer or DSP line |

The top's ports are the interface to the analog part of the chip: five
thermometer buses in, 32 switch controls plus `calmdac` and the phase
enables out. The bidirectional pins are split into `data_in`, `data_out` and
a per-pin `data_oe` for the pad cells. Analog parts are not in `rtl/`: the
comparators, the MDACs and residue amplifiers, the references, the
feedback-capacitor switch that `calmdac` drives, and the pads. The fuse
macro is represented by a behavioural model. In `adc16_system` the shared
pins are modelled without tri-states: each side reads what the other side
drives, and an assertion checks that they never drive the same pin.

## Testbenches

Every block has a self-checking testbench `tb/<module>_tb.sv`, which
compares against values computed independently of the block. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
it hangs. Verilator is a two-state simulator, so the testbenches are meant
to run with random initial values (`+verilator+rand+reset+2`). Every
register that is read has a reset or an initial value.

`tb/adc_frontend_model.sv` is a behavioural model of the analog pipeline,
working in code units. It models:

* random first-stage capacitor errors and first-flash threshold errors;
* a residue-amplifier offset;
* optional stage-2 step errors that make the back-end non-linear;
* Gaussian input noise;
* the exact phase schedule of the five flashes.

In calibration sampling mode it also samples the first decision level and
obeys the switch controls the design drives.

* `tb/adc16_system_tb.sv` runs the converter and the controller at default
  parameters. The controller calibrates with one output LSB RMS of input
  noise. The test checks:
  * the calibration length, to the sample;
  * every fuse word against the model's capacitor errors (within 1 code);
  * the offset;
  * every output code of a ramp before and after calibration.

  All 14,375 calibrated outputs come out exact. It runs in about 0.2 s.
* `tb/adc16_top_tb.sv` tests the converter alone. A testbench DSP carries
  out a complete calibration over the pins, following the pin protocol
  independently of `cal_dsp`. It first converts a ramp
  uncalibrated and checks that the mismatch is visible. After calibration it
  checks every output code against round(vin)/4 in the two cycles where it
  must appear. It also counts every mechanism: measurements, register clears,
  fuse and offset writes, clamping at both ends, first-flash errors absorbed
  by the redundancy, and uncalibrated errors. A mechanism that never occurs
  counts as a failure. It runs in well under a second.
* `tb/cal_dsp_tb.sv` tests the controller against a pin-level responder
  with noise and the converter's 3-sample latency. The checks include
  saturation of errors beyond 7 bits and the absence of pin contention.
* `tb/adc16_linearity_tb.sv` runs the full linearity experiment on
  `adc16_system`. The controller calibrates with one output LSB RMS of
  input noise, averaging each measurement 1024 times. Then it ramps the input over 2^20 samples from
  slightly below to slightly above full scale and builds the output code
  histogram, once before and once after calibration. With capacitor errors
  up to ±50, flash errors up to ±1000, a 37-code amplifier offset and
  back-end step errors up to ±0.25 codes, the results are:
  * before calibration: max |DNL| = 1.10 LSB, 87 missing codes, max |INL| = 20.8 LSB;
  * after calibration: max |DNL| = 0.18 LSB, no missing codes, max |INL| = 0.19 LSB.

  This run takes about 6 s.

To simulate with plain Verilator (5.x), from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/adc_pkg.sv tb/adc16_system_tb.sv --top-module adc16_system_tb -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Substitute any other testbench name. No testbench reads data files.

## Where this RTL departs from the original circuit

* **Edge-triggered phases.** The original digital block is built from
  latches on two non-overlapping clock phases. Here one clock at twice the
  sample rate drives flip-flops, which load in phase-1 or phase-2 cycles or
  (for the delay chain) every cycle. The delays and the order of operations
  are the same. Non-overlap gaps are left to the clock circuits of the
  analog section.
* **Sign of the first-stage word.** The first ROM produces −2 … 30 as a
  6-bit two's-complement word. Here it is sign-extended before the overlap
  add. The original adds it zero-extended and sorts out the wrap-around at
  the output. Both give the same clamped codes.
* **Offset width.** The offset store is 13 bits, which the fuse inputs and
  the offset-measurement pin count imply. A count of 11 fuses also
  appears in the original description.
* **Correction register clear.** The register is cleared synchronously,
  with priority over the load, instead of asynchronously. The result is the
  same one phase later, well before the controller reads.
* **Pads.** The bidirectional data bus is split into in/out/enable for
  separate pad cells. Fields the original leaves floating in a mode
  (address and value in measurement modes) are driven to zero here.
* **Flash encoders.** They count the comparators that tripped instead of
  decoding the thermometer edge, so a bubble in the thermometer code cannot
  produce a far-off word. The ROM tables (including the comparator counts of stages 2–5) are
  reconstructed from the code ranges and the requirement that the centre
  levels add up to 2^17.
* **Fuse model.** The fuse bank and offset fuse are behavioural. A write,
  sampled on the clock edge, ORs the value in, and the unprogrammed state
  is zero. A real fuse macro needs its own timed programming pulse.
* **Calibration controller.** The original calibration tester is outside
  the chip, and only its measurement procedure is specified. In
  `cal_dsp` the following details are this design's own:
  * the state sequence;
  * writing each fuse straight after its measurement;
  * the settling time;
  * the unwrapping of readings;
  * saturation of oversized errors;
  * the mid-scale input for the offset measurement.
* **Pre-adder width.** The 11-bit running sums wrap if the cumulative error
  of a part exceeds ±1023 codes. There is no saturation. The 7-bit error
  words limit each term, but not their sum.

What is not verified: gate-level timing at 6 MHz in any process, the
analog circuits themselves, and calibration with real back-end
non-linearity beyond the simple step-error model above.
