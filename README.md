# Center-boosted sinusoidal PWM with a random carrier

This RTL generates the six gate signals of a two-level three-phase voltage source inverter.
Two changes to ordinary sine-triangle PWM make up the method, one to each of its two waveforms:

* **The reference is boosted in the centre.** Each phase reference is `ma·sin α`. In the
  middle 60° of each half cycle (π/3 < α < 2π/3 and 4π/3 < α < 5π/3), a third harmonic of
  one third the amplitude, shifted by 180°, is added to it. In those windows that harmonic has
  the same sign as the half wave, so the flat middle of the wave rises. This adds about 13.8 %
  to the fundamental for the same index.
* **The carrier is chosen at random.** A 5 kHz triangle and its inverse are both available.
  Once per carrier period an 8-bit LFSR decides which of the two the comparators use for the
  next period. The carrier's phase thus jumps by half a period at random instants. This
  spreads the harmonic energy that plain PWM piles up at multiples of the switching frequency.
  The aim is less acoustic noise from the motor.

Everything runs from one 50 MHz clock and fits in a few hundred flip-flops and six variable
multipliers.

## Data flow

```
 50 MHz ─┬─ sample_tick_gen 10 kHz ─► address_counter ×3 (start 0, 133, 67) ─┐
         │                                                                    ├─► boosted_reference ×3 ─► pwm_comparator ×3 ─► pwm[5:0]
         ├─ sample_tick_gen 30 kHz ─► address_counter (start 100) ────────────┘                                  ▲
         │                                                                                                        │
         └─ triangle_carrier ─► (triangle, −triangle, at_peak) ─► carrier_selector (lfsr_prbs + 2:1 mux) ─────────┘
```

`cbspwm_top` wires this together. Its ports are `clk`, `rst_n` (synchronous, active low),
`ma` (modulation index) and the gates `pwm[5:0]`. For observation it also brings out the three
scaled references, the selected carrier, the PRBS bit and the LFSR register.

## The reference path

**Sine memory.** `sine_rom` holds one full cycle in 200 entries, one every 1.8°. Entry k is
`round(1024·sin(2πk/200))`, a 12-bit signed number, and `sine_table.hex` holds these values.
This gives, for example, 32 at 1.8°, 724 at 45°, 1023 at 88.2° and 1024 at 90°. The read is
synchronous.

**Two sample rates.** The fundamental is 50 Hz and is read at 10 kHz: 200 samples per cycle.
The third harmonic is 150 Hz and comes from the same table, read at 30 kHz. 50 MHz/30 kHz is
not an integer, so `sample_tick_gen` is a fractional divider. An accumulator adds `OUT_HZ` each
clock and subtracts `CLK_HZ` whenever it overflows. The 30 kHz strobes come 1667, 1667 and 1666
clocks apart. Every third one falls on the same clock as a 10 kHz strobe, so the two waves stay
locked for ever. The strobes are clock enables, not separate clocks.

**The 180° shift.** The 150 Hz address counter starts at address 100, half way round the
table. The wave it reads is therefore `sin(3α + π) = −sin 3α`:

* between π/3 and 2π/3 it is positive;
* between 4π/3 and 5π/3 it is negative.

It always has the sign of the fundamental there. Note that the plain formula `+ (ma/3)·sin 3α`,
as sometimes written for this method, would lower the centre instead. The RTL uses the shifted
(inverse) harmonic, which boosts the centre.

**Window and sum** (`boosted_reference`, one per phase). Sample index i is inside a window
when `200 < 6i < 400` or `800 < 6i < 1000`, i.e. i = 34…66 and 134…166. The datapath has three
registered stages:

1. read both samples, and register `ma` and `ma/3` (integer division, truncating);
2. form `ma·sin` and, inside a window, `(ma/3)·third`; outside a window the second product is 0;
3. add the two.

**Why about 13.8 %.** The added piece contributes to the fundamental
`(1/π)·2·(ma/3)·∫[π/3,2π/3] −sin3α·sinα dα = (ma/3)·(2/π)·(3√3/8) ≈ 0.138·ma`.
Simulation of the whole design gives 1.137 at indices 0.2 to 0.6 (see below).

**Three phases.** The second and third phases read the fundamental from start addresses 133
and 67. A shift of 120° is 66.67 samples, so these addresses are rounded: phase b lags a by
120.6° and phase c by 239.4°. The third-harmonic counter is shared by all three phases. A third
harmonic shifted by 120° of the fundamental is shifted by 360°, so the harmonic is identical in
every phase. That gives two multipliers per phase, six in all.

## The carrier path

`triangle_carrier` is an up/down counter that moves one count per clock between −2500 and
+2500. One carrier period is 10 000 clocks, i.e. 5 kHz. The inverted carrier is the negated
count. `at_peak` marks the clock in which the triangle is at +2500.

`carrier_selector` contains `lfsr_prbs` and the 2:1 multiplexer:

* **Register.** Cells b1…b8 are `state[0]…state[7]`. On each step the register shifts towards
  b8 and `b4 ⊕ b5 ⊕ b6 ⊕ b8` enters b1. This is polynomial x⁸+x⁶+x⁵+x⁴+1, maximal length,
  period 255. The seed is 0x02.
* **Step.** The register steps on `at_peak`.
* **Selection.** Its newest bit b1 is the PRBS bit. From the next clock it selects the
  carrier for a whole period: 1 = triangle, 0 = inverted triangle.

The choice changes only at the triangle's peak. A change from triangle to inverse therefore
shows as a jump from +2500 to −2500, and the reverse change as a jump from −2500 to +2500 at
the same instant of the period.

## Comparison and gates

`pwm_comparator` first brings the reference into carrier units:
`ref_scaled = floor(ref · 2500 / 2^21)`. The reference format has 2^21 = 1024 × 2048 = 1.0,
so ma = 1 makes the sine peak equal to the carrier peak (ma = V_sine / V_triangle). The upper
gate is `ref_scaled > carrier`, registered, and the lower gate is its complement. There is no
dead time. An assertion checks that the two gates of a leg are never on together.

| leg | upper | lower |
|-----|-------|-------|
| a   | `pwm[0]` (gate 1) | `pwm[3]` (gate 4) |
| b   | `pwm[2]` (gate 3) | `pwm[5]` (gate 6) |
| c   | `pwm[4]` (gate 5) | `pwm[1]` (gate 2) |

## Number formats and timing

| signal | format |
|--------|--------|
| `ma` | unsigned Q1.11, 2048 = 1.0 (0.8 = 1638, 1.2 = 2458), max 1.9995 |
| sine sample | signed 12 bit, ±1024 |
| reference (`ref_t`) | signed 26 bit, 2^21 = 1.0 |
| carrier, `ref_scaled` | signed 13/14 bit, ±2500 = ±1.0 |

* A new address reaches `ref_scaled` 4 clocks after the sample strobe (counter, memory,
  multiply, add), and the gates one clock later. Against a 100 µs sample period this delay is
  negligible.
* A new `ma` takes effect within 3 clocks.
* After reset, the fundamental address is 0 and the third-harmonic address is 100. The
  triangle is at −2500 and rising, and the LFSR holds 0x02. Both gates of every leg are off
  during reset.

The package `cbspwm_pkg` holds the clock, rate, width and carrier constants. The top's
parameters allow other clock and sample rates. The table length of 200 is fixed by the memory
contents.

## Measured behaviour

`tb_modulation_sweep` runs one full 50 Hz cycle (10⁶ clocks) at each index. It takes the
fundamental of leg a's pulse train, in units of Vdc/2, from a Fourier sum over the cycle:

| ma | leg fundamental | gain over plain sine-triangle | line-to-line |
|----|-----------------|-------------------------------|--------------|
| 0.2 | 0.228 | 1.137 | 0.395 |
| 0.4 | 0.455 | 1.137 | 0.790 |
| 0.6 | 0.682 | 1.137 | 1.185 |
| 0.8 | 0.899 | 1.124 | 1.560 |
| 1.0 | 1.021 | 1.021 | 1.773 |
| 1.2 | 1.104 | 0.920 | 1.919 |

The boosted peak is `ma·4/3`, so the design over-modulates from ma ≈ 0.75 upward: pulses are
dropped near the centre of each half wave and the gain falls. (At 1.0 and 1.2 the "plain" figure
is the unclipped index, so the gain there understates what a real plain modulator, which also
clips, would give.) For comparison, the published simulation reports fundamental ratios of
boosted-random to plain PWM of 1.27, 1.18, 1.21, 1.13, 1.03 and 1.01 for the same six indices.
That simulation was on an inverter-motor model, not on the pulse train alone.

Harmonic distortion and harmonic spread factor were evaluated offline in the original work.
They are not computed by this RTL or its testbenches.

## Choices made here

These points are not fixed by the published description. Change them freely.

* Word widths, the Q1.11 index, the ±2500 carrier and the scaling multiply by 2500. The
  original counter was wider. Only its period (5 kHz at 50 MHz) is carried over.
* Fractional clock-enable dividers instead of divided clocks.
* Phase start addresses 133 and 67, the shared third-harmonic counter and the gate numbering.
* The LFSR seed 0x02 and stepping at the triangle's positive peak.
* `ma` is a port. The original build had it fixed, with eight I/O pins: clock, reset and six
  gates.
* No dead time and no protection logic beyond the assertion.

One detail could not be matched. A published waveform printout of the LFSR shows the
successive register values 02, 04, 09, 12, 24, 49, 93, 27, 4F, 9E, 3D, 7B, F7, EF. Each is a
one-bit left shift, which agrees with the structure here. But the bits shifted in cannot come
from any XOR of the taps b4, b5, b6, b8. This RTL follows the stated taps, so its sequence from
seed 0x02 is 02, 04, 08, 11, 23, 47, … .

The power stage (IGBT bridge, dc link), the motor and the 50 MHz oscillator are outside this RTL.

## Files and simulation

| file | content |
|------|---------|
| `rtl/cbspwm_pkg.sv` | constants and types |
| `rtl/sample_tick_gen.sv` | fractional-rate strobe generator |
| `rtl/address_counter.sv` | modulo-200 address counter with start value |
| `rtl/sine_rom.sv`, `rtl/sine_table.hex` | 200-entry sine memory |
| `rtl/boosted_reference.sv` | one phase's center-boosted reference |
| `rtl/triangle_carrier.sv` | 5 kHz triangle and its inverse |
| `rtl/lfsr_prbs.sv` | 8-bit PRBS register |
| `rtl/carrier_selector.sv` | PRBS plus carrier multiplexer |
| `rtl/pwm_comparator.sv` | scaling, comparison, complementary gate pair |
| `rtl/cbspwm_top.sv` | complete generator |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_modulation_sweep.sv` | index sweep above |

Run from the repository root, because the sine memory is loaded from `rtl/sine_table.hex`
relative to it:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/cbspwm_pkg.sv \
          tb/tb_cbspwm_top.sv --top-module tb_cbspwm_top -o sim
./obj_dir/sim
```

Replace `cbspwm_top` with any module name for its own testbench. Every testbench ends with
`TB_RESULT checks=N failures=M`.

`tb_cbspwm_top` runs the design at full size for two complete 50 Hz cycles, at ma = 0.8 and
ma = 1.2. It checks:

* every reference sample of the three phases against a model;
* every gate in every clock;
* the PRBS step rate and the carrier selection;
* the fundamental of the pulse train.

It also counts boosted samples, periods on each carrier, carrier jumps and dropped pulses, and
requires each of them to occur. It takes about 2 s.
