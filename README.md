# Variance-based detector for voltage-drop fault attacks on multi-tenant FPGAs

When several tenants share one FPGA, they also share its power delivery
network. A malicious tenant can switch on a large bank of power wasters, for
example ring oscillators, for a few clock cycles. The supply sags for a short
time and the logic of a neighbouring tenant, such as an AES core, misses its
timing and produces faulty results. Such attacks can succeed within a few
cycles, so a detector has to react within a few cycles too.

This RTL implements an embedded detector for these drops. On-chip
time-to-digital converters (TDCs) measure the supply. Each TDC reading is
reduced to its Hamming weight, and the detector tracks **the variance of the
last 4 Hamming weights**. A steady supply gives a variance near zero, whatever
level the sensor sits at. A steep drop or rebound inside the window makes the
variance jump. An attack is flagged when the variance reaches **64**.

Why use the variance instead of a fixed threshold on the reading itself?
Every sensor has a different resting level, because that level depends on
where the sensor is placed and on what logic surrounds it. In the reference
system, three identical 128-tap sensors rest at Hamming weights of 8, 69 and
107. A fixed threshold would have to be calibrated for each placement. The
variance ignores the resting level, so one threshold serves every sensor.

## The detection chain

Each sensor has one chain. All chains run on one clock, 200 MHz in the
reference system:

```
            taps_q[127:0]        hw[7:0]            variance[15:0]
 tdc_sensor ─────────────► hamming_weight ─────► running_variance ─────► threshold_detector ──► alarm[s]
   (vdd_mv)                  (hw_valid) ──────────► (in_valid)                                   │
                                                                                   OR over sensors ▼
                                                                                  attack_detected
```

`va_detection_top` instantiates `NUM_SENSORS` = 3 chains, one per sensor
placement, and ORs their alarms into `attack_detected`. Each chain's Hamming
weight, variance and valid flag are also output ports, so they can be
observed.

### TDC sensor (`tdc_sensor`, behavioural model)

The real sensor feeds the clock into a delay line and samples every tap of
the line in a register on the same clock. The delay line starts with a few
LUTs of initial delay, followed by a carry chain of 128 taps (16 carry blocks
of 8). The clock edge travels a certain distance down the chain before the
capture edge. That distance is shorter when the supply is low, because the
logic is slower. The number of set taps is therefore a reading of the supply
voltage.

This propagation is analog timing and cannot be written as logic. The module
is a model of it. It takes the local supply voltage as a model-only input,
`vdd_mv`, and computes how many taps the edge reaches:

```
reached = BASELINE_TAPS + (vdd_mv - 850) * 2      clamped to 0..128
```

It then registers a thermometer code with the first `reached` taps set.
Three things about this model are assumptions, not measured data:

- the linear law;
- the nominal voltage of 850 mV;
- the slope of 2 taps per mV.

The rest of the chain uses only the number of set taps, not their pattern. So
a real sensor with bubbles in its code fits behind the same Hamming-weight
stage. On an FPGA, replace this module with the placed carry-chain sensor. Its
port list is the same except that `vdd_mv` goes away.

### Hamming weight (`hamming_weight`)

This stage counts the set taps and registers the count. For 128 taps the
count is 8 bits wide. The count is written as a loop, and synthesis builds an
adder tree from it. `hw_valid` is low during reset and goes high on the first
edge after reset. It keeps the reset value of `hw` out of the variance window.

### Running variance (`running_variance`), the core of the design

The metric over the last T samples is

```
var = (1/T)·Σ HW²  −  ((1/T)·Σ HW)²
    = (T·Σ HW² − (Σ HW)²) / T²          T = 2^LOG2_T = 4
```

**Where the shift goes.** T is a power of two, so the division is a right
shift. The shift matters. You could shift each sum first and then square the
shifted mean. That drops the fraction of the mean before it is squared, and
the error grows with the signal level. For example, take the samples 107, 107,
107, 105, which are only jitter at the highest-placed sensor:

| | mean of squares | squared mean | result |
|---|---|---|---|
| shift each sum first | 45372 >> 2 = 11343 | (426 >> 2)² = 106² = 11236 | **107**: false alarm |
| one shift after the subtraction | | | (4·45372 − 426²) >> 4 = 0 |

The exact variance of that window is 0.75. This design subtracts first and
shifts once at the end, by 2·LOG2_T bits. The result is the exact variance
rounded down. The numerator is never negative (Cauchy–Schwarz inequality), so
the subtraction needs no sign handling.

**Running sums.** The block does not re-add the whole window every cycle. It
keeps `Σ HW` and `Σ HW²` as running sums, plus a history of the last T
samples. For each accepted sample it adds the sample and its square, then
subtracts the oldest sample and the square of the oldest sample. It also
needs two squarers (for the new and the oldest sample) and one multiplier for
`(Σ HW)²`.

Widths for 8-bit samples and T = 4:

| signal | width |
|---|---|
| `Σ HW` | 10 bits |
| `Σ HW²` | 17 bits |
| numerator | 20 bits |
| `var_out` | 16 bits; the variance of 8-bit samples is at most 64² = 4096 |

**Timing.** `in_valid` qualifies `hw_in`. In normal operation the block
accepts one sample every cycle. Each accepted sample enters the window and
the sums on one edge. `var_out` follows on the next edge. `var_valid` goes
high once T samples have been accepted since reset. Until then, the rise from
0 to the sensor's resting level is not reported.

The window size is a parameter. `LOG2_T` = 2, 3, 4, 5 and 6 give windows of
4, 8, 16, 32 and 64 samples, the sizes compared when T was chosen. A larger
window gives higher and longer variance peaks and costs a longer history. The
original design uses T = 4.

### Threshold (`threshold_detector`)

`alarm` is a register. It is set in the cycle after a valid variance of 64 or
more. It is not latched: it follows the variance cycle by cycle. A consumer
that needs a sticky flag must latch `attack_detected` itself.

The value 64 sits in a gap of the measured distributions:

- switching on an AES core next to a sensor, as background noise, gave
  variances of 30 to 60;
- attacks gave variances of 80 to 140.

## Latency

Take a supply change that the TDC first samples at edge e0. It then moves
through the chain as follows:

| edge | stage |
|---|---|
| e0 | TDC samples the change |
| e0+1 | `hw` |
| e0+2 | window and sums |
| e0+3 | `variance` |
| e0+4 | `alarm` and `attack_detected` |

So the alarm comes 4 cycles (20 ns at 200 MHz) after the sampling edge. An
attack starts 0 to 5 ns before that edge, so the alarm comes 20 to 25 ns
after the attack starts. The original implementation measured an average
detection delay of 23.6 ns, or 3 to 4 cycles. A very short drop can change
the first window too little. The alarm then comes a cycle later, or not at
all, but such drops are also the least likely to inject a fault.

After reset, a chain needs 5 edges before its `var_valid` rises.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_SENSORS` | 3 | detection chains |
| `TAPS` | 128 | TDC taps; the Hamming weight is clog2(TAPS+1) bits |
| `LOG2_T` | 2 | variance window T = 2^LOG2_T samples |
| `THRESHOLD` | 64 | variance at which an attack is flagged |
| `BASELINE_TAPS` | '{8, 69, 107} | resting tap count of each TDC model |

The shared constants are in `va_pkg`. Clocking is left outside the RTL: a PLL
or MMCM supplies `clk`. `rst_n` is an asynchronous, active-low reset.

## How this design relates to the original

**Taken from the original:**

- the chain TDC → Hamming weight → running variance → threshold, with one
  chain per sensor;
- three sensors;
- 128 taps;
- resting levels of 8, 69 and 107;
- the variance formula with T = 4 and shift-based division;
- the threshold of 64;
- the 200 MHz detection clock;
- the 3–4 cycle detection delay.

**Choices made in this design:**

- the TDC is a behavioural model with a linear voltage law (see above);
- the division by T² is a single shift applied after the subtraction (see
  above);
- the variance uses running sums with a sample history;
- there are two register stages in the variance block;
- `hw_valid`, `in_valid` and `var_valid` exist;
- reset is asynchronous and active low;
- the sensors are combined with an OR;
- the alarm fires "at or above" 64;
- the alarm is not latched.

**Not included:**

- the attacker's ring-oscillator banks;
- the victim AES;
- the AES noise generators;
- the debug read-out of the measurement setup;
- the clock generation.

The attacker, victim and noise generators belong to the test setup, not to
the detector. The testbenches model their effect by driving `vdd_mv`. The
original reports its resource use: about 477 LUTs, 185 registers and 1 DSP
for one chain. This RTL is written for clarity, and its register count
differs (the variance stage keeps wider running sums).

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| testbench | what it checks |
|---|---|
| `tb_tdc_sensor` | supply sweep from far below to far above nominal; thermometer length and clamping |
| `tb_hamming_weight` | corner vectors, every single bit, thermometer codes and random densities against a bit-by-bit count; `hw_valid` |
| `tb_running_variance` | steps, full-scale swings, jitter at a high level, random data and gaps in `in_valid`, against the exact floored variance; `var_valid` timing |
| `tb_threshold_detector` | sweep 0..200, the boundary 63/64/65, invalid inputs, random values |
| `tb_variance_windows` | one stream of dips and overshoots through T = 4, 8, 16, 32 and 64 at once, each checked every cycle; reports the peak variance and the cycles above 64 per window size |
| `tb_va_detection_top` | the whole detector at its default parameters; see below |

`tb_va_detection_top` runs the whole detector at its default parameters for
32768 modelled attacks and 32768 noise events. The stimulus is as follows:

- **Attack:** the supply falls by 20–40 mV for 2–10 cycles, then overshoots
  by half that for 3 cycles. The three sensors see 100 %, 80 % and 60 % of it.
- **Noise event:** the supply falls by 5–6 mV for 5–20 cycles.
- **Between events:** the supply jitters by 0 to −1 mV.

A reference model predicts every output of every sensor after every edge. It
is built only from the TDC law, the definition of the Hamming weight and the
variance formula. The test also fails if any of these never happens: an
attack detected exactly 4 cycles after the first sampling edge that sees it,
a noise event passing without alarm, the start-up window, an alarm from each
sensor, and TDC saturation. In the last run, all 32768 attacks were detected
with a 4-cycle delay, no noise event raised an alarm, and there were no
failures. The run takes a few seconds.

These rates come from the voltage model chosen here. They show that the
logic behaves as intended. They do not reproduce the silicon measurements.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl --top-module tb_va_detection_top \
    rtl/va_pkg.sv rtl/tdc_sensor.sv rtl/hamming_weight.sv rtl/running_variance.sv \
    rtl/threshold_detector.sv rtl/va_detection_top.sv tb/tb_va_detection_top.sv
./obj_dir/Vtb_va_detection_top
```

For a single block, list `rtl/va_pkg.sv`, the block's file and its
testbench. `tb_variance_windows` needs `rtl/running_variance.sv`.

## Files

- `rtl/va_pkg.sv`: shared constants (taps, window, threshold, sensor count)
  and width helpers.
- `rtl/tdc_sensor.sv`: TDC behavioural model.
- `rtl/hamming_weight.sv`: tap counter.
- `rtl/running_variance.sv`: windowed variance.
- `rtl/threshold_detector.sv`: alarm comparator.
- `rtl/va_detection_top.sv`: the three-chain detector.
- `tb/`: the testbenches listed above.
