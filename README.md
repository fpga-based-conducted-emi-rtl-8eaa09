# Randomized multistage sigma-delta PWM controller for a DC-DC buck converter

A buck converter switched by fixed-frequency PWM concentrates its conducted
noise in narrow, tall lines at the switching frequency and its harmonics.
This controller spreads that energy: every switching cycle it draws new
random values and uses them to vary the cycle's duty ratio around the
regulated value, and optionally its length and the position of the pulse
inside it. The duty ratio is not randomized directly. The regulated duty word,
plus a random offset, goes through a fourth-order 2-1-1 MASH sigma-delta
modulator and a comb (CIC) decimation filter. The result is a 16-bit
randomized duty word `d_k`, which a counter-based DPWM turns into the gate
pulse. The mean output voltage is still regulated: a dead-zone compensator
reads a 16-bit ADC once per cycle and corrects the duty.

The design follows the architecture published as "FPGA based conducted EMI
reduction using randomized multistage sigma-delta modulator with decimation
filter for DC-DC converter". That paper targets an Altera Cyclone IV
(EP4CE115) and a 12 V to 5 V, 300 kHz buck stage. It gives the block set, the
DPWM equations and the MASH and comb transfer functions. It leaves out most
widths, gains and handshakes; they are chosen here and listed under
[Design choices](#design-choices-and-departures).

## Block diagram

```
            vref, dead_zone
                  |
 ADC pins <-> adc_driver --rn,vout--> dz_compensator --duty_cmd d(n)--+
   ^                                                                   |
   | cycle_start                                                       v
   |                  lfsr_prng  stream 1 --> dither (held per cycle) --(+)
   |                     | stream 0 (IN_f)                             |
   |                     | stream 2 (IN_p)                          mash211   (every clock)
   |                     v                                             | y in -7..8
   +---------------- rand_dpwm <--- duty_k <-- clamp/shift <-- cic_decimator (K=4, N=8)
                         |
                        gate --> power-switch driver
```

One clock (50 MHz by default) drives everything. `rmsdmd_top` wires the
blocks. Each block has its own file in `rtl/`.

| file | role |
|---|---|
| `rmsdmd_pkg.sv` | duty and ADC types, `rand_mode_t`, `RAND_MODE_MAIN` |
| `rmsdmd_top.sv` | the controller |
| `adc_driver.sv` | CONVST / BUSY / RD sequence, Read Now strobe |
| `dz_compensator.sv` | integral compensator with dead zone |
| `lfsr_prng.sv` | three parallel 16-bit maximal-length LFSRs |
| `mash211.sv` | 2-1-1 MASH modulator with dither input |
| `cic_decimator.sv` | comb decimator, order K, ratio N, delay D |
| `rand_dpwm.sv` | randomized DPWM counter, equations (4)-(6) below |
| `seq_divider.sv` | restoring divider used by the DPWM for Fclk/Fsw |

## What happens in one switching cycle

Reading this timeline first makes the rest easier. Cycle k starts when the
DPWM counter restarts at 0 (`cycle_start` high for that clock):

1. **ADC.** `adc_driver` pulses CONVST (2 clocks). It waits for the ADC's
   BUSY to rise and fall, then holds RD low for 3 clocks and latches the bus.
   When RD rises it strobes `rn` ("Read Now"). With the 40-clock conversion
   of the test model, the result is ready 45 clocks into a cycle of about
   166 clocks.
2. **Compensator.** On `rn`, `dz_compensator` compares the code with `vref`.
   It updates `duty_cmd` or freezes it (see below).
3. **Dither.** In the same first clock the top draws a new dither value
   from LFSR stream 1. The value stays fixed for the whole cycle.
4. **Modulator and decimator.** These run every clock, independently of
   the cycle. The MASH input is `duty_cmd + dither`. The decimator produces a
   new `duty_k` every 8 clocks.
5. **End of cycle k (counter = SN-1).** The DPWM samples `duty_k`, `IN_f`
   (stream 0) and `IN_p` (stream 2). It loads DR and DS for cycle k+1 and the
   SN it had already computed for cycle k+1. It then starts the divider on
   the new `IN_f`. The quotient becomes the length of cycle k+2.

A measurement taken in cycle k reaches `duty_k` about 60 clocks into the
cycle: 45 clocks of ADC read, then one clock each through the compensator and
the MASH, then up to 8 clocks of decimation. It therefore sets the gate of
cycle k+1. A frequency draw affects the cycle after next.

## The randomized duty path (MASH + comb decimator)

**Dither.** `rand_level` is the randomness level R = d2 - d1. It is the width
of the band the duty may wander in, as a 16-bit fraction. The dither is
`floor(rnd1 * R / 2^16) - R/2`, which is uniform in [-R/2, R/2). With
`mode.rand_duty = 0` the dither is 0, and the path only reproduces
`duty_cmd` with shaped quantization noise.

**MASH 2-1-1** (`mash211.sv`). The input x is a 16-bit fraction; the quantizer
step is 2^16. Stage 1 is a second-order error-feedback quantizer:
`v = x + 2 e1[n-1] - e1[n-2]`, `y1 = floor(v / 2^16)`, `e1 = v mod 2^16`.
Stages 2 and 3 are first-order accumulators. Stage 2 adds `e1` and stage 3
adds the residue of stage 2. Their carries `c2` and `c3` are recombined as

```
y = y1 + (1 - z^-1)^2 c2 + (1 - z^-1)^3 c3
2^16 * Y = X - (1 - z^-1)^4 E3
```

The output is a signed integer in [-7, 8] whose average is exactly x / 2^16,
with fourth-order-shaped error. All inter-stage gains are 1. The signal delay
is one register.

**Comb decimator** (`cic_decimator.sv`). This is
`H(z) = ((1 - z^-ND)/(1 - z^-1))^K` in the recursive Hogenauer form:
K integrators at the input rate and K combs at the output rate. With K = 4,
N = 8, D = 1 the DC gain is 8^4 = 2^12. The top shifts the 17-bit output
left by 4 and clamps it to [0, 0xFFFF], which gives `duty_k` on the same scale
as `duty_cmd`. The group delay is 14 clocks, well inside a cycle, so the held
dither passes almost unchanged. `duty_k` then lies within about R/2 of
`duty_cmd`, and its long-run mean equals `duty_cmd`. The end-to-end test
confirms both.

## Randomized DPWM (`rand_dpwm.sv`)

Per cycle the DPWM uses

```
Fsw = FL + J * IN_f        (rand_freq = 1; otherwise Fsw = FC)          (4)
SN  = floor(Fclk / Fsw)    clocks in the cycle                          (5)
DR  = floor(SN * d / 2^16) gate-high clocks                             (6)
DS  = floor((SN - DR) * IN_p / 2^INW)   pulse delay (rand_pos = 1; else 0)
```

`gate` is a register. It is high while the counter is in [DS, DS+DR), which
is exactly DR clocks. The DS formula keeps the whole pulse inside the cycle.
Defaults: Fclk = 50 MHz, FC = 300 kHz (SN = 166), FL = 270 kHz, J = 1 kHz,
INW = 6. Randomized cycles then run from 270 to 333 kHz (SN 185 down to 150).
The division is a 32-step restoring divider that runs during the previous
cycle. An elaboration-time assertion checks that the shortest cycle exceeds
40 clocks. A concurrent assertion checks that the divider is idle whenever a
cycle ends.

`mode` (a `rand_mode_t`) selects what is randomized:

| mode | frequency | duty | position | scheme |
|---|---|---|---|---|
| `000` | fixed | fixed | fixed | plain PWM |
| `RAND_MODE_MAIN` (`010`) | fixed | random | fixed | the proposed scheme (duty only) |
| `110` / `111` | random | random | fixed / random | frequency and position randomization as well |

## Compensator and dead zone (`dz_compensator.sv`)

The error is e = vref - vout, in ADC codes. If |e| <= `dead_zone`, the duty
is frozen and `frozen` goes high. This stops hunting around the set point.
Otherwise e is added to an integrator that has 8 fraction bits below the duty
LSB, so the duty moves by e/256 per cycle. The fraction bits keep small
errors from being lost to truncation. The duty is limited to [0, 0.9].
Because the gain is small, the loop is stable with a 33 uH / 100 uF output
filter, whose resonance is about 2.8 kHz. With a different filter, retune
`KI_SHIFT`. In the test plant, a 12 V ADC full scale makes the plant gain
from duty to code 1, so 5 V is code 27307.

## ADC interface (`adc_driver.sv`)

The driver talks to a parallel 16-bit ADC with CONVST, BUSY, RD and a data bus
(no chip select). RD is never low while CONVST is high; a concurrent
assertion checks this. If BUSY never rises or never falls, the driver reads
anyway after `T_TIMEOUT` (120) clocks, so the control loop never stalls. A
`start` that arrives during a read is ignored.

## Pseudorandom streams (`lfsr_prng.sv`)

There are three 16-bit Fibonacci LFSRs with the same maximal-length polynomial
x^16 + x^15 + x^13 + x^4 + 1 and different seeds. Each is clocked every cycle,
with the XOR of the taps shifted into the LSB. Because the polynomial is the
same, the three streams are shifted copies of one m-sequence, so they are
correlated at a lag of a few thousand steps. If that matters, give them
different polynomials through `TAPS`.

## Design choices and departures

The paper gives the block list, equations (4)-(6), the MASH noise transfer,
the comb transfer function, the 16-bit ADC, the RD / Read Now read, the
dead-zone freeze, the 300 kHz centre frequency and the parallel-LFSR
generator. Everything below is this design's own choice:

- 50 MHz clock. The paper gives no clock frequency.
- The MASH and decimator are placed in the duty path, as a dithered
  modulator that rebuilds a randomized duty word. The paper's figure shows
  an analog-input modulator; here it is all digital.
- The MASH signal delay is 1 clock instead of z^-4. The comb decimator uses
  the recursive form, not a non-recursive structure. K = 4, N = 8, D = 1.
- The dither is drawn once per cycle and held. Stream use is 0 for
  frequency, 1 for duty and 2 for position.
- FL = 270 kHz, J = 1 kHz, 6-bit random integers, and the DS formula.
- Compensator: integral law, gain 2^-8, limits 0-0.9, reset duty 0.
- ADC handshake signals, pulse lengths and timeout.
- One ADC conversion per switching cycle. A free-running 400 kHz sampling
  rate, mentioned for the paper's experiment, is not built.

Not built: the buck power stage, the gate driver, the ADC chip and the EMI
measurement set-up. They are analog parts or test equipment. The testbenches
model the ADC (`tb/adc_model.sv`) and an averaged buck stage.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `lfsr_prng_tb` | every stream against a bit-recurrence model with random enable; period exactly 2^16-1 |
| `mash211_tb` | running sums of order 1 to 4 of (2^16 y - x) stay bounded, which holds only for a fourth-order noise transfer; output range; dither and clamping |
| `cic_decimator_tb` | two configurations (4/8/1 and 3/4/2) against a direct FIR built from the impulse response; one output per N samples |
| `rand_dpwm_tb` | each cycle's length, on-time and pulse offset against equations (4)-(6), with the k+1 / k+2 pipeline, in all mode combinations and at 0 % and ~100 % duty |
| `adc_driver_tb` | CONVST length, RD after BUSY falls, RD length, Read Now timing, 45-clock latency, data, the timeout path with a dead ADC |
| `dz_compensator_tb` | duty and frozen flag against a reference model, hitting both limits and the dead zone |
| `rmsdmd_top_tb` | the full controller at default parameters closed around a buck model (12 V in, 33 uH, 100 uF, 2.5 ohm) for 4 x 10 ms; see below |

The end-to-end test runs four phases: plain PWM, the main scheme,
duty + frequency, and duty + frequency + position randomization, each with
R = 0.1. In each phase the mean output must settle within 0.5 % of 5 V; in
simulation it lands within about 0.15 %. Every cycle's gate-high count and
length must match the DPWM's DR and SN. `duty_k` must stay near `duty_cmd`
and average to it. ADC reads, compensator updates, dead-zone freezes,
dithered cycles, frequency changes and delayed pulses are each counted and
must all occur.

`rmsdmd_spectrum_tb` compares the schemes. It regulates the same buck model
and records the converter input current (gate x inductor current). It then
estimates the spectrum the way a spectrum analyzer with a 40 kHz resolution
bandwidth would: Hann-windowed 25 us DFTs averaged over 80 windows, from
160 kHz to 30 MHz. Highest line within +-280 kHz of each frequency, in dB
relative to an arbitrary reference:

| scheme | 5 MHz | 10 MHz | 15 MHz | whole band |
|---|---|---|---|---|
| plain PWM | 25.4 | 17.7 | 18.2 | 50.4 (300 kHz) |
| random duty (main), R = 0.1 | 23.0 | 16.6 | 13.9 | 50.5 |
| random duty + frequency | 18.7 | 13.2 | 10.2 | 50.2 |
| random duty + frequency + position | 19.4 | 13.0 | 10.2 | 47.5 |

In this model, duty-only randomization lowers the high harmonics by 1 to 4 dB.
Adding frequency randomization lowers them by 4.5 to 8 dB. The fundamental
barely moves, because a 270-333 kHz spread is only about 1.5 resolution
bandwidths wide. A larger `J_HZ` or `INW` widens the spread. The test
requires at least 0.5 dB of reduction for duty-only randomization and 3 dB
for the frequency-randomized schemes at 5, 10 and 15 MHz. It also requires
that no scheme raises the highest line.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/rmsdmd_pkg.sv tb/rmsdmd_top_tb.sv --top-module rmsdmd_top_tb
./obj_dir/Vrmsdmd_top_tb
```

Replace the testbench name to run the others. The full-size end-to-end run
takes about a second and the spectrum test a few seconds.

## Resources

After generic synthesis the whole controller has about 560 flip-flops and
200 word-level cells (adders, multipliers, muxes). It uses no memories. The
largest parts are the DPWM (about 190 flip-flops, 104 of them in its
divider) and the comb decimator (about 160).
