# 4CKES time-domain ADC: an all-digital ADC for low-voltage sensors

A sensor's output voltage usually needs amplification, filtering and a
rail-to-rail ADC. This converter does without them. The input voltage is used
as the **supply** of a ring of inverter delay units. A lower supply makes the
inverters slower, so the input voltage sets how fast a pulse circulates round
the ring. The ADC counts how many delay units the pulse passes in one sampling
period `Ts`:

    DT  ~  Ts / Td(Vin),        Td(Vin) = b*CL*Vin / (Vin - Vth)^a

Everything after the ring is digital logic: a lap counter, latches, encoders,
subtractors and an adder. The design has these properties:

* **No dead time, built-in low-pass filter.** The ring never stops, so each
  output is the integral of the ring frequency over one period. This is a
  moving average of `Vin`. The quantization error of one sample is carried
  into the next, so the error is first-order noise-shaped.
* **Resolution set by the clock alone.** A longer `Ts` gives more codes over
  the same input span. The RTL has no mode register: only the `cks` rate
  changes. At a 0.5-0.6 V input the ring model gives 10.2 bit at 10 MS/s,
  13.5 bit at 1 MS/s and 15.8 bit at 200 kS/s.
* **Four clock-edge shift (4CKES).** Four copies of the sampling clock, each
  a quarter of one delay-unit delay after the previous one, sample the ring.
  The sum of the four counts has two more bits of resolution than one count.
  A metastable encoder sample then affects only one of the four counts.

The RTL has two levels. `tad_4ckes` is one single-ended ADC. `tad_differential`
is the top level: two identical ADCs share the clock and take the positive and
negative inputs, and an on-chip subtractor removes both the common part and a
calibrated offset.

## Block structure

```
tad_differential                    top: two ADCs, output subtraction, offset calibration
├── tad_4ckes  (x2)                 one 17-bit ADC
│   ├── tad_rdl                     32-stage ring, supplied by vin       [behavioural]
│   ├── tad_delay_line (8 units)    P32 -> counter clock, T_RDL/4 later  [behavioural]
│   ├── tad_ckes_gen                CKs -> CK1..CK4, Td/4 apart          [behavioural]
│   ├── tad_delay_line (16 units,x4) CKn -> CKnD, T_RDL/2 later          [behavioural]
│   └── tad_time_quantizer          all digital logic of one ADC         [synthesizable]
│       ├── tad_counter             10-bit lap counter
│       ├── tad_latch_encoder (x4)  tap latch + 5-bit position encoder
│       ├── tad_count_latch   (x4)  counter latches on CKn and CKnD + selection
│       └── tad_sub_adder           per-phase difference, 4-phase sum -> 17 bit
└── tad_diff_sub                    dt_p - dt_n - offset                 [synthesizable]
tad_pkg                             widths (32, 5, 10, 15, 17) and the delay law
```

The ring, the clock-shift generator and the delay lines are analog circuits.
They are written as behavioural models with real-valued `vin` ports and `#`
delays. They simulate, but they do not synthesize. Everything under
`tad_time_quantizer`, and `tad_diff_sub`, is synthesizable RTL.

## How a sample is formed

**Ring and position.** The ring has 32 taps, P1..P32. A pulse half a ring
wide circulates, so at any moment 16 neighbouring taps are high. The
*leading edge* is the last high tap before a low one. Each latch-and-encoder
captures the taps on its clock `CKn` and encodes the leading-edge index as
`E[4:0]` (0 = P1). `E[4]` is 0 when the pulse is in P1..P16 and 1 when it is
in P17..P32.

**Lap count.** The counter is clocked by P32 through a chain of 8 delay units,
a quarter of the ring period `T_RDL`. Each phase forms the 15-bit word
`{C[9:0], E[4:0]}`: the total number of stages passed, modulo 2^15.

**Metastability cancellation (the subtle part).** The counter runs
asynchronously to `CKn`. Latching it at the wrong moment gives a wrong count
of 32 stages. The delay in front of the counter moves its update to about
position 8, which is in the first half of the ring. A sample taken by `CKn`
can therefore only catch the counter mid-update, or not yet updated for this
lap, when `E[4] = 0`. For that reason the counter is latched twice:

| copy | latched on | used when | why it is safe |
|------|-----------|-----------|----------------|
| `c1` | `CKn` | `E[4] = 1` (pulse at P17..P32) | the counter last changed 8..23 stages earlier |
| `c2` | `CKnD` = `CKn` + `T_RDL/2` | `E[4] = 0` (pulse at P1..P16) | the pulse is then at P17..P32 of the same lap, so the counter has settled and includes this lap |

Both delays are made of the same delay units as the ring. They therefore
track `T_RDL` as `Vin` changes, and the margins (8 stages on each side) do not
depend on the input. The testbenches count how often `c1` differs from `c2`
while `E[4] = 0`, which is a sample that would have been wrong without the
second latch. This happens in roughly a quarter of all samples.

**Clock-edge shift.** `CK2..CK4` lag `CK1` by `Td/4`, `Td/2` and `3Td/4`. Each
phase therefore sees the pulse at a different fraction of a stage. The sum
of the four per-period counts is a count in quarter stages:
`dt ~ 4*Ts/Td(Vin)`.

**Differences and sum.** `tad_sub_adder` is clocked by `CK1`. For each phase
it keeps the previous word and latches the modulo-2^15 difference of the new
word and the kept one. A combinational adder sums the four differences into
`dt[16:0]`.

**Latency.** The sample taken at `CK1` edge *k* appears on `dt` after `CK1`
edge *k+1*, as the difference to edge *k-1*. `dt_valid` rises after the third
`CK1` edge following reset. `CK1` lags `cks` by about two delay units. The
differential output `dout` is registered on the next `cks` edge.

**Suspend.** When `start_p` is low the ring stops and all taps go low, so the
ADC draws no switching current. Within a few samples the output reads 0.

## Top-level interface (`tad_differential`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `vin_p`, `vin_n` | in | real | input voltages, in volts; each is the supply of one ring |
| `start_p` | in | 1 | start pulse; low suspends both rings |
| `cks` | in | 1 | sampling clock; its rate selects the resolution |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `cal_en` | in | 1 | offset calibration: hold both inputs at the common mode and raise this signal |
| `dt_p`, `dt_n` | out | 17 | the single-ended outputs |
| `offset` | out | 19 signed | the stored offset |
| `dout` | out | 19 signed | `dt_p - dt_n - offset` |
| `dout_valid` | out | 1 | `dout` is a normal-mode result |

While `cal_en` is high, every valid difference is written to the offset
register, and the last one is kept.

## Parameters and the ring model

Sizes are fixed in `tad_pkg`: 32 stages, a 5-bit encoder, a 10-bit counter,
a 15-bit word per phase, 4 phases and a 17-bit output. Most modules take them
as parameters with these defaults.

The delay law `Td = BCL_PS*Vin/(Vin-VTH)^ALPHA` is the standard form for a
supply-modulated inverter. Its constants are fitted, not measured:

* `ALPHA = 1.5`, `VTH = 0.3875 V` and `BCL_PS = 30.19` give Td = 400 ps at
  0.5 V and 185 ps at 0.6 V.
* The delay ratio between the two voltages matches a published simulation of
  such a ring in 65 nm CMOS.
* The absolute scale is chosen so that the simulated resolution matches the
  published measurements: 10.2 bit at 10 MS/s and 13.5 bit at 1 MS/s over
  0.5-0.6 V.
* At 200 kS/s the model gives 15.8 bit and 1.72 uV/LSB. The published
  measurement is 15.7 bit and 1.96 uV/LSB.

Below 0.5 V the fitted law is an extrapolation and should not be trusted.

The model has no delay mismatch between stages, no jitter, no phase noise and
no temperature dependence. The three kinds of delay unit in a real ring (the
start gate, plain units and a second gate half-way round) are modelled as
equal. The model therefore shows the ideal transfer function, with the
converter's nonlinearity coming only from the delay law, and the first-order
noise shaping.

At the slowest rate, 200 kS/s, one phase counts up to 27,042 stages per
period at 0.6 V. This fits the 15-bit per-phase word (32,768), and the
17-bit sum (108,166) fits 2^17. The 10-bit counter is sized for exactly this
low-speed mode.

## Departures and own choices

These follow the published structure, but the details are this design's:

* The counter latch pair with `E[4]` selection is specified for `CK1`. It is
  used for all four phases here, each with its own `CKnD` line.
* Latches are rising-edge flip-flops. Every register has an asynchronous
  active-low reset. `dt_valid` and `dout_valid` are additions.
* The encoder's leading-edge rule is a choice: a bubble resolves to the lowest
  matching position, and an idle ring reads 31.
* The register after the encoder is the same register as the tap latch, not
  a second pipeline stage. This keeps the position and the counter word from
  the same instant.
* The subtraction of the two ADC outputs is on-chip logic clocked by `cks`,
  and the adder after the difference latches is combinational.
* The clock-shift generator has a common insertion delay of two delay units
  and an exact `Td/4` shift.
* Not included: the input buffer with common-mode feedback, the digital
  low-pass post-filter that sets the 20 kHz band, and the ratio (dual-slope)
  normalization by a divider. The testbenches drive the ring supply directly.

## Simulation

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. All files set `timescale 1ps/1fs`.
Build with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        -Irtl -Itb rtl/tad_pkg.sv tb/tb_tad_differential.sv \
        --top-module tb_tad_differential -o sim -Mdir obj
    ./obj/sim

| testbench | what it shows |
|-----------|---------------|
| `tb_tad_differential` | end to end at default parameters: calibration, symmetric differential inputs at 10 MS/s (each output against the delay law; `dout(+d) = -dout(-d)`), 200 kS/s, suspend; it counts calibrations, rejected counter samples, samples per rate and suspended samples |
| `tb_tad_differential_mismatch` | one ring 5 % slower: the stored offset matches the computed mismatch, and zero input reads 0 after calibration |
| `tb_tad_sine` | sine inputs at 10 MS/s (8.54 kHz) and 1 MS/s (9.98 kHz), with 10 mV ripple at twice the sampling rate; each output against the testbench's own integral of `1/Td(vin(t))`; the running error stays bounded (noise shaping), and the ripple integrates away |
| `tb_tad_static` | slow 0.5-0.6 V ramp at 10 MS/s: no missing codes, no backward steps, code-density DNL within +-0.5 LSB (the model has no stage mismatch) |
| `tb_tad_resolution` | resolution and uV/LSB at 200 kS/s, 1 MS/s and 10 MS/s against the published values |
| `tb_tad_4ckes` | one ADC: each output within 4 codes of `4*Ts/Td`; 8-sample sums within 6 codes, so the error does not accumulate; monotonic over 0.5-0.6 V; suspend |
| `tb_tad_time_quantizer` | digital part against an ideal ring in the testbench, with Td changing every sample; exact per-sample check |
| `tb_tad_latch_encoder`, `tb_tad_counter`, `tb_tad_count_latch`, `tb_tad_sub_adder`, `tb_tad_diff_sub` | unit tests of the digital blocks |
| `tb_tad_rdl`, `tb_tad_delay_line`, `tb_tad_ckes_gen` | timing of the behavioural models against the delay law |

A 200 kS/s sample is 5 us of simulated time, with about 27,000 ring steps
per ADC. The full testbenches run in seconds.

To change the converter, adjust the sizes in `tad_pkg`. The quarter- and
half-period delays in `tad_4ckes` are derived from `N_STAGES`. To try other
ring technologies, change the delay-law parameters of `tad_4ckes` and
`tad_differential`.
