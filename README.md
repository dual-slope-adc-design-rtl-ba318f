# 8-bit dual-slope ADC with a low-power digital part

A dual-slope (integrating) converter measures a voltage as a time ratio. It
charges a capacitor from the input for a fixed number of clock cycles. Then it
discharges the capacitor with a reference of opposite effect and counts the
cycles until the capacitor is empty. The charge that goes in equals the charge
that comes out, so the count is `2^N · vin / vref`. The result depends on
neither the RC value nor the clock frequency, and noise that averages out over
the fixed period is rejected.

This RTL is the digital half of such a converter, with 8 bits of resolution.
It also has a behavioural model of the analog half, so the whole loop can be
simulated. The digital part saves power by giving flip-flops clock edges only
when they need them:

- **Counter.** It is built from T flip-flops. Each flip-flop's clock is ANDed
  with its toggle condition, so a bit that does not change sees no edge.
- **Count freeze.** All counter clocks are frozen while the comparator output
  is high.
- **Output register.** It is made of double-edge-triggered (DET) flip-flops.
  Its clock is halved, and it is ANDed with the comparator output, so the
  register is clocked only while a result is ready.
- **Sleep.** A sleep input blocks the clock of the controller and the counter.

## Block structure

```
             vin ──┐                     ┌────────────── dout[7:0]
                   ▼                     │
   vref ──► analog_unit ──co──┬──► det_register ◄── clk_div2 ◄── clk
              ▲   ▲           │        ▲ d
         s_in │   │ s_ref     ▼        │
              │   │        ctrl_fsm    │
              └───┴────────┤  │cnt_rst │
                           │  ▼        │
                           └► lp_counter ── count[7:0]
                                  │ of
                                  └──► ctrl_fsm
   clk & ~sleep ──► ctrl_fsm, lp_counter
```

| module | role |
|---|---|
| `adc_pkg` | `ADC_BITS = 8` and the controller state type |
| `ctrl_fsm` | four-state controller (A, B, C, D) |
| `tff_counter4` | 4-bit counter of clock-gated T flip-flops |
| `lp_counter` | 8-bit counter: two `tff_counter4` units, freeze on CO, overflow |
| `det_ff` | double-edge-triggered flip-flop made of two parallel latches |
| `det_register` | 8 `det_ff`s, each clocked by `clk_half AND co` |
| `clk_div2` | toggle flip-flop that makes the register's half-rate clock |
| `analog_unit` | behavioural model of integrator and comparator (not synthesizable intent) |
| `dual_slope_adc` | top level |

## The conversion cycle

The controller is a ring of four states. Each state owns one job:

| state | switches | counter | leaves when |
|---|---|---|---|
| A | reference (`s_ref`) | counts | comparator output `co` is high |
| B | open | cleared (`cnt_rst`) | next cycle |
| C | input (`s_in`) | counts | overflow `of` is high |
| D | open | cleared (`cnt_rst`) | next cycle |

A conversion runs as follows:

1. In **C** the input is integrated while the counter runs from 0 to 255.
2. The counter's carry out, `of`, ends C after exactly 256 cycles. The counter
   wraps to 0 at the same time.
3. **D** clears the counter.
4. In **A** the reference removes charge while the counter runs. When the
   capacitor is empty, the comparator raises `co`. This freezes the counter,
   and the register stores the count.
5. The controller sees `co` and moves to **B**, which clears the counter for
   the next fixed phase.

After reset the controller starts in A. The first comparator pulse only
confirms that the integrator is discharged.

The overflow flag is passed on only in the fixed phase. A de-integration
longer than 255 cycles, which means an input at or above the reference, wraps
the count. No overflow is raised then.

**Transfer function and timing** (at the default `N_BITS = 8`):

- `dout = ceil(256 · vin / vref)`, for `0 ≤ vin < vref`.
- One conversion takes `259 + dout` clock cycles, counted from one entry into
  B to the next. That is 1 reset cycle, 256 fixed cycles, 1 reset cycle and
  `dout + 1` cycles in A.
- Each conversion starts from an empty capacitor. The result therefore does
  not depend on the previous one.

## Clocking rules

These rules are what make the gated clocks safe.

- **Falling-edge logic.** Every flip-flop of the controller and the counter
  changes on the falling edge of `clk`. So do the steps of the analog model.
  All clock-gating signals therefore change while `clk` is low. These are the
  toggle conditions, `cnt_rst`, `s_in`/`s_ref` and `co`.
- **No glitches.** A gate of the form `clk AND enable` cannot glitch when its
  enable changes only while `clk` is low. The counter's flip-flops act on the
  falling edge of their gated clocks.
- **Sleep.** `sleep` must obey the same rule: change it only while `clk` is low.
- **Half-rate register clock.** The divider toggles on the rising edge of
  `clk`, so `clk_half` changes in the middle of each cycle. `co` is high for
  exactly one `clk` cycle, and within that cycle `clk_half` has one edge.
- **Register capture.** The gated register clock `clk_half AND co` has one or
  two edges in that cycle, depending on the phase of `clk_half`. Its last edge
  always falls at a time when the frozen count is settled. The DET flip-flops
  capture on every edge, so the register ends up holding the result in both
  cases. The full-design testbench runs both phases.
- **Reset.** `rst_n` is an asynchronous, active-low power-on reset for every
  flip-flop, latch and the analog model. It must see a falling edge, or start
  low at time zero in a four-state simulator.

## The building blocks

**T flip-flop counter (`tff_counter4`, `lp_counter`).** Stage *i* of a 4-bit
unit is a flip-flop with `D = not Q`. It is clocked by
`Clk_i = clk AND (clr OR T_i)`, where:

- `T0 = en`
- `T1 = en·Q0`
- `T2 = en·Q0·Q1`
- `T3 = en·Q0·Q1·Q2`

With `en = 1` these are the textbook excitation functions of a 4-bit T
counter. Only the least significant bit is clocked every cycle. A multiplexer
in front of each flip-flop selects 0 on `clr`. `clr` also opens every clock
gate, so a clear always reaches all bits, even while `co` freezes counting.

The 8-bit counter chains two units. The upper unit's enable is the AND of the
lower unit's enable and its four bits, a single 4-input AND. The lowest enable
is `(s_in OR s_ref) AND NOT co`. `N_BITS` may be any multiple of 4.

**DET flip-flop (`det_ff`).** Two transparent latches share the data input:

- one is open while the clock is high;
- the other is open while the clock is low.

The output is taken from whichever latch is currently closed. The flip-flop
therefore takes its input at both clock edges, so a clock of half the
frequency gives the same data rate. The latches are deliberate. A synthesis
tool reports 2 latch bits per DET flip-flop, and that is the intended circuit.

**Analog model (`analog_unit`).** This is a discrete-time charge balance, not
a circuit:

- while `s_in` is closed, the charge grows by `vin` per step;
- while `s_ref` is closed, it falls by `vref` per step and stops at zero;
- otherwise it is held.

`co = s_ref AND (charge == 0)`. Voltages are unsigned `VW = 16`-bit numbers in
any common unit. The model does not reproduce the RC waveform, op-amp offset,
comparator threshold or bipolar operation.

## Top-level interface (`dual_slope_adc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous power-on reset, active low |
| `sleep` | in | 1 | blocks the controller and counter clock (change while `clk` is low) |
| `vin`, `vref` | in | `VW` | input and reference for the analog model |
| `dout` | out | `N_BITS` | last conversion result, held between comparator pulses |
| `count` | out | `N_BITS` | live counter value |
| `co`, `of`, `cnt_rst`, `s_in`, `s_ref`, `state` | out | 1 / 2 | comparator output, overflow, counter reset, switch controls, controller state |
| `integ` | out | `VW+N_BITS+1` | charge held by the analog model |

The parameters are `N_BITS` (default 8, taken from `adc_pkg::ADC_BITS`) and
`VW` (default 16).

Sleep stops the controller and the counter. The analog model keeps
integrating, so a conversion interrupted by sleep gives a wrong result. The
next conversion is exact again.

## Where this RTL departs from, or adds to, the original design

The original describes an 8-bit converter built in a 0.5 µm CMOS process. It
gives the controller's state diagram, the counter's equations and gate
structure, and the DET flip-flop's transistor structure.

Choices made here, where the original is silent:

- The state encoding.
- Moore outputs, with one-cycle reset states B and D, and both switches open
  during those states.
- Falling-edge timing throughout.
- `clr` being able to pass the freeze.
- The asynchronous power-on reset.
- The divide-by-two flip-flop that produces the halved register clock.
- The `sleep` port as the way to enter sleep mode.

Where the original disagrees with itself, this RTL follows the usual
dual-slope order. One description applies the reference during the fixed
period. Its controller waveforms and switch names instead put the input
switch (`Sin`) on during the fixed period and the reference switch (`Sref`)
on during the measured period. The RTL uses the second reading.

Not built:

- **Analog parts.** The switch driver, the reference source with its polarity
  control, the clock oscillator and the two-stage op-amps. The switches are
  driven directly by `s_in`/`s_ref`, and `vref` and `clk` are inputs.
- **The conventional counter.** The D-flip-flop counter, which the original
  uses only as a baseline for comparison.
- **The area, power and speed figures.** These come from layout and SPICE and
  are not reproduced by RTL. The published conversion time is 220 µs, but no
  clock frequency is given, so it cannot be checked against the cycle count
  above.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/adc_pkg.sv tb/dual_slope_adc_tb.sv --top-module dual_slope_adc_tb -o sim
./obj_dir/sim
```

| testbench | what it proves |
|---|---|
| `dual_slope_adc_tb` | 260 conversions at the default size. It checks every result against `ceil(256·vin/vref)`, the cycle count of every conversion, that the register changes only while `co` is high, and that nothing moves during sleep. It also counts overflows, resets, freezes, captures in both half-clock phases, zero inputs and over-range wraps. |
| `ctrl_fsm_tb` | state sequence and outputs under random `co`/`of` |
| `lp_counter_tb` | count, freeze, clear during `co`, and overflow only in the `s_in` phase, against an integer model |
| `tff_counter4_tb` | count and carry, and that each stage gets a clock edge exactly when it toggles or clears |
| `det_ff_tb` | capture at both edges, and no transparency between edges |
| `det_register_tb` | capture only while `co` is high |
| `clk_div2_tb` | divide-by-two behaviour |
| `analog_unit_tb` | charge balance and comparator pulse for random `vin`/`vref` |

The testbenches use only two-state constructs and `$urandom`.
