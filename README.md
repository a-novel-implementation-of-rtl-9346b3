# Random-frequency digital controller for a synchronous buck converter

A switching converter that runs at one fixed frequency puts all of its
conducted noise into narrow lines at that frequency and its harmonics, and
those lines are what an EMC limit catches. This controller changes the
switching period pseudorandomly from one cycle to the next. The energy is
then spread over a band and the peak of the noise spectrum falls. At the same
time, it keeps the output voltage regulated with a simple digital loop.

The RTL is a complete FPGA-side controller for a 12 V to 3.3 V, 5 A
synchronous buck stage with a 300 kHz centre frequency:

```
              +--------------------+
              | prsg               |  16 parallel 16-bit m-LFSRs
              | (random 16-bit PRN)|
              +---------+----------+
                        | prn
 ADC data (8 bit) ----->+                    +--------------+
        |        +-------------------+ d(n+1)|              |--> vgs1 (high side)
        +------->|digital_compensator|------>|     dpwm     |--> vgs2 (low side)
                 +-------------------+       |              |
                        ^ rn                 +------+-------+
                 +------+------+                    | reset1 (cycle start)
 CS/WR/RD <------| adc_driver  |<-------------------+
                 +-------------+
```

`rsdc_controller` is the top. The ADC, the power stage and the gate driver
are outside the FPGA and are not part of the RTL: their signals are ports.

## One switching cycle, step by step

Everything runs from one clock, `f_clk`, 66 MHz by default. A switching cycle
is a whole number of clocks, SN.

1. **Cycle start.** The DPWM counter wraps from SN back to 1 and `reset1` is
   high for that one clock. At this instant the DPWM
   - adopts the compensator's latest duty ratio d(n+1) as this cycle's d(n),
   - samples the 16-bit pseudorandom word as the integer PRN,
   - sets this cycle's on-time DN = floor(SN · d(n)).
2. **Conversion.** `reset1` also starts the ADC driver. It pulls CS and WR low
   for `T_WR` clocks, which starts the conversion on WR's rising edge. It
   then waits `T_CONV` clocks and pulls CS and RD low for `T_RD` clocks. The
   ADC drives its result while RD is low. One clock before RD is released,
   the driver raises RN ("read now") for one clock.
3. **Compensation.** On RN the compensator reads the ADC bus and computes
   d(n+1). That value waits until the next cycle start.
4. **Gate drive.** Vgs1 is high while the counter is at or below DN, so it is
   high for exactly DN clocks. Vgs2 is its complement.
5. **Next period.** While the cycle runs, a sequential divider computes
   SN = floor(f_clk / (fL + K·PRN)) from the PRN sampled in step 1. The
   result is the length of the *next* cycle (see below).

All of this repeats every cycle: one conversion, one duty-ratio update and
one new random period per switching cycle. The ADC sequence
(12 + 12 + 6 = 30 clocks by default) must fit inside the shortest cycle.

## The random period: fL, K, SN and DN

For each cycle:

| quantity | formula | default meaning |
|---|---|---|
| switching frequency | fsw = fL + K · PRN | PRN is 0..65535, K in Hz per step |
| clocks per cycle | SN = floor(f_clk / fsw) | limited to 40..65535 |
| on-time clocks | DN = floor(SN · d / 4096) | d is a 12-bit fraction |

`f_low_hz` (fL, 20 bits) and `k_hz` (K, 8 bits) are run-time inputs. To
centre the band on 300 kHz, set fL = 300 kHz − K·65535/2. The width of the
band is commonly given as the *randomisation ratio*,
RRP = K·65535 / (2 · 300 kHz) · 100 %:

| K (Hz) | fL (Hz) | band (kHz) | RRP |
|---|---|---|---|
| 0 | 300000 | 300 (fixed) | 0 % |
| 1 | 267233 | 267–333 | 10.9 % |
| 2 | 234465 | 234–366 | 21.8 % |
| 3 | 201698 | 202–398 | 32.8 % |
| 6 | 103395 | 103–497 | 65.5 % |

The spectral benefit reported for this scheme rises up to about 20–30 % RRP
and falls again beyond that, as the spread bands of neighbouring harmonics
start to overlap. K = 2 (21.8 %) is the natural operating point.

**Resolution depends on the clock.** The period can only be a whole number of
clocks, so the set of frequencies that can actually occur is
f_clk / SN. For a 270–330 kHz band that is 14 different periods at 20 MHz
(61..74 clocks), 27 at 40 MHz and 45 at 66 MHz (200..244 clocks). A faster
clock gives a finer, more even spread, and that is why 66 MHz is the default.
`F_CLK_HZ` is a parameter: set it to the real clock frequency.

**One-cycle lookahead.** f_clk / fsw needs a division. Instead of a large
single-cycle divider, `udiv_seq` produces one quotient bit per clock
(26 clocks at 66 MHz, plus one). So the PRN sampled at the start of cycle n
sets the length of cycle n+1. The frequency sequence is still the same random
sequence, only shifted by one cycle. DN, however, is always computed from the
SN and d of the cycle that is starting. The lower limit of 40 clocks on SN
ensures that the divider always finishes inside the current cycle, and an
assertion checks this. After reset the first cycle uses SN_INIT = f_clk / 300 kHz.

## Pseudorandom stream generator

`m_lfsr` is a 16-stage Fibonacci LFSR. Stages are numbered 1 (leftmost) to
16 (output). Every clock the contents move one stage toward the output, and
stages 16, 14, 13 and 11 are XORed together into stage 1
(x^16 + x^14 + x^13 + x^11 + 1, period 65535).

`prsg` runs 16 of these in parallel on the same clock. Bit i of the 16-bit
word is the output bit of LFSR i. The DPWM samples the word once per switching
cycle, and the values in between are not used.

The seeds deserve care. All 16 registers walk the same sequence, just at
different phases, so each word bit is a linear (XOR) function of one common
state. If the 16 functions are not linearly independent, the word can take
only a fraction of the 65536 values. For example, seeds made by XORing one
base value with multiples of a constant give only about 8192 distinct words.
The seed list in `prsg` (starting with 68F3h = 0110100011110011b) was chosen
so that the bits are independent: the word visits all 65535 nonzero values
before it repeats. If you change the seeds, keep that property.

## Deadzone compensator

On each RN the compensator does the following:

- if Vo > Vref + dz: d ← d − Δd
- if Vo < Vref − dz: d ← d + Δd
- otherwise: d is held (frozen)

There is no proportional term or filter. Each cycle it takes one step in the
direction of the error, so in effect it is an integrator with a sign
nonlinearity. The deadzone keeps it from hunting when the output is close to
the set point. The result is clamped to [D_MIN, D_MAX] (default 0 to
0.95 · 4096) so that a step cannot wrap. The `dir` output reports the last
decision (up, down or frozen).

`vref`, `dz` and `delta_d` are inputs in ADC and duty-ratio units. With a 5 V
full-scale ADC, 3.3 V is code 168. The testbenches use dz = 1 and Δd = 1.

**Word width and loop behaviour.** Because the loop integrates, the step
size sets how fast it reacts, and so the size of the limit cycle it settles
into against the LC filter (about 3.5 kHz resonance for 4.3 µH / 470 µF).
In an averaged model of the power stage, a 10-bit duty word with one-LSB steps
oscillated by about ±130 mV around 3.3 V. The 12-bit word used here brings
that to about ±12 mV. If you need a faster transient response, increase
`delta_d` at run time, and the ripple of the loop will grow with it.

## ADC interface

The driver is written for an 8-bit ADC with a WR-then-RD interface: a WR pulse
starts the conversion, and RD enables the output buffers. Timing is set in
clocks by `T_WR`, `T_CONV` and `T_RD` (defaults 12, 12 and 6). Check these
against the datasheet of the real converter at your clock rate. At 66 MHz the
defaults give 182 ns WR, 182 ns conversion wait and 91 ns RD. CS is asserted
together with each strobe. The data bus goes straight to the compensator,
which latches it at the clock edge that ends RN. RD stays low for one more
clock after that edge to give data hold time. If `reset1` arrives while a
conversion is still running, it is ignored and `adc_overrun` pulses.

## Top-level interface (`rsdc_controller`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `adc_data` | in | 8 | ADC result bus |
| `adc_cs_n`, `adc_wr_n`, `adc_rd_n` | out | 1 | ADC strobes |
| `vgs1`, `vgs2` | out | 1 | high-side and low-side gate commands (no dead time, see below) |
| `vref`, `dz` | in | 8 | set point and deadzone, ADC codes |
| `delta_d` | in | 12 | duty step per cycle |
| `fb_en` | in | 1 | 1: closed loop; 0: fixed duty `d_fixed` |
| `d_fixed` | in | 12 | duty ratio in fixed mode |
| `f_low_hz`, `k_hz` | in | 20, 8 | fL and K |
| `reset1`, `rn` | out | 1 | cycle start, read-now |
| `adc_overrun` | out | 1 | conversion did not finish within a cycle |
| `sn`, `dn`, `d_cur`, `prn_used` | out | 16, 16, 12, 16 | current cycle's SN, DN, d and PRN |
| `d_comp`, `comp_dir` | out | 12, 2 | compensator output and last decision |

**Fixed duty mode.** `fb_en = 0` runs open loop at `d_fixed`. This is the
reference case for checking how much the feedback loop changes the noise
spectrum. While in this mode, RN is not passed to the compensator, so it
holds its last duty ratio rather than winding up, and closed-loop operation
resumes from there. `k_hz = 0` gives a fixed switching frequency fL.

Parameters (all with working defaults): `F_CLK_HZ` (66e6), `T_WR`, `T_CONV`,
`T_RD`, `SN_MIN` (40), `D_INIT` (1229 = 0.3), `D_MIN`, `D_MAX`. Shared widths
live in `rsdc_pkg` (ADC 8, PRN 16, duty 12, frequency 20, K 8, counter 16
bits).

## Where this RTL goes beyond, or differs from, the original controller

The block structure, the per-cycle sequence, equations for fsw, SN and DN,
the counter-and-compare PWM, the deadzone rule and the parallel-LFSR
generator follow the published controller. The following choices are this
implementation's own:

- The SN lookahead of one cycle (the original computes SN for the cycle that
  is starting).
- Floor rounding of f_clk / fsw, the SN limits of 40 and 65535, and SN_INIT.
- LFSR taps and the 15 seeds after the first.
- The ADC strobe lengths, CS with each strobe, RN one clock before RD ends,
  and the overrun flag.
- The 12-bit duty word, clamping, reset value 0.3, and the run-time `vref`,
  `dz` and `delta_d` inputs.
- The mode input and holding the compensator in fixed mode.
- No dead time between Vgs1 and Vgs2. Both are registered and never high
  together, but a real half-bridge needs dead time, which is expected from the
  external driver stage. Both gates are low during reset.
- K = 2 Hz and fL = 234465 Hz for 21.8 % RRP are derived from the RRP
  formula with a 16-bit PRN. The K values 1..6 reproduce the RRP steps of
  about 11 % used in the published measurements.

## Not in the RTL

The power stage (12 V in, 3.3 V / 5 A out, L = 4.3 µH, C = 470 µF,
C_in = 100 µF), the 8-bit ADC, the gate-driver interface, and the LISN/EMI
receiver used to measure conducted noise are analog hardware. The testbench
directory contains behavioural models of the ADC (`adc_model`) and of an
averaged buck stage (`buck_model`, with an assumed 30 mΩ series loss and
50 mΩ capacitor ESR), so that the loop can be closed in simulation. Noise
spectra cannot be obtained from this simulation.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_m_lfsr` | state against an independent stage-by-stage model; enable; never zero; period exactly 65535 |
| `tb_prsg` | every word against 16 reference LFSRs; no repeated word in 8192 clocks; mean value |
| `tb_adc_driver` | CS/WR/RD/RN/busy clock by clock over 40 conversions with the ADC model; value read equals the code of the applied voltage; overrun; no early read |
| `tb_digital_compensator` | 5000 random updates against a reference model; deadzone edges; both clamps |
| `tb_dpwm` | every cycle's length = SN and on-time = DN from a reference, Vgs2 = ¬Vgs1, SN limits, K = 0, K = 2 and 6 (≈450 cycles at 66 MHz) |
| `tb_rsdc_controller` | closed loop with ADC and buck models at default parameters: settles to 3.3 V at 5 A, holds it after a step to 2 A, fixed-d droop, K = 0 at 220 clocks, one RN per cycle, and a count of every mechanism (up/down/frozen, fixed/random frequency, fixed duty) |
| `tb_load_regulation` | 1–6 A loads at 21.8 % RRP, feedback and fixed d = 0.3: mean output within 3.3 V ± 50 mV with feedback; with fixed d it falls with every load step (about 150 mV over the range) |
| `tb_rrp_sweep` | 20, 40 and 66 MHz controllers, K = 0..6: SN stays within the band, the covered RRP matches the formula within 3 points, and 14 / 45 distinct periods in 270–330 kHz at 20 / 66 MHz |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rsdc_controller rtl/rsdc_pkg.sv tb/tb_rsdc_controller.sv
./obj_dir/Vtb_rsdc_controller
```

The end-to-end test covers about 5200 switching cycles (about 1.1 M clocks)
and takes a few seconds. In the averaged model the closed loop holds the mean
output at 3.28–3.30 V for both loads, with about ±12 mV of limit-cycle ripple.
With fixed d, the output drops by about 80 mV between 2 A and 5 A. These
voltages depend on the assumed plant losses and only indicate behaviour.
