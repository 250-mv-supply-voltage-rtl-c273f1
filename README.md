# Digital low-dropout regulator for a 250 mV supply, with fast current tracking

A low-dropout (LDO) regulator holds an output voltage V_OUT slightly below its
supply V_IN. At a 250 mV supply an analog error amplifier no longer works,
because every transistor sits below its threshold voltage. This design replaces
the amplifier and the power transistor with digital parts:

- A clocked comparator decides once per clock cycle whether V_OUT is above or
  below the reference V_REF.
- A small controller turns that decision into an on-switch number N (0..255).
- An array of PMOS switches sources a current proportional to N from V_IN into
  the output node. The node is buffered by a 1 uF capacitor.

A plain up/down counter in this loop rings. After a load step it overshoots
the needed N by as much as it was short, and then swings back. The controller
here removes the ringing with **fast current tracking**. Each time V_OUT
crosses V_REF, the controller replaces N with the mean of the N values at the
last two crossings. That mean is the switch count the new load needs.

Two extra comparators bound the excursions:

- **Under-voltage:** when V_OUT falls 2.5 % below V_REF, the counter steps by
  K = 8 instead of 1.
- **Over-voltage:** when V_OUT rises 5 % above V_REF, N is forced to 0.

A forward-biased N-well makes the subthreshold switches about three times
stronger, so the array needs only eight binary-weighted switches.

The regulator targets a 1 MHz clock, V_IN of 0.25-1.2 V and V_OUT of 0.14-0.28 V.
The load range is 20-200 uA at a 0.25 V supply and up to 1 mA at 0.30 V.

## Structure

```
                 +-------------------- ldo_regulator ---------------------+
  V_REF ------>  | voltage_sensing          fct_controller     switch_array |
  V_OUT ---+-->  |  3 x sa_comparator --sense--> N register --N[7:0]--> 8 PMOS  |--> I_SUPPLY
           |     |  (cmp, over, under)     (reg #1, reg #2)    1,2,..,128  |
           |     |                                              ^ V_BIAS   |
  V_IN ----|-->  |                         switch_bias ---------+          |
           |     +---------------------------------------------------------+
           +---- 1 uF capacitor and load (outside the regulator)
```

| File | Kind | Contents |
|---|---|---|
| `rtl/ldo_pkg.sv` | package | width of N, default K, `sense_t` bundle `{over, under, cmp}` |
| `rtl/fct_controller.sv` | synthesizable RTL | the digital controller |
| `rtl/sa_comparator.sv` | behavioural model | clocked sense-amplifier comparator with SR latch |
| `rtl/voltage_sensing.sv` | behavioural model | two resistor dividers and three comparators |
| `rtl/switch_array.sv` | behavioural model | eight binary-weighted PMOS switches |
| `rtl/switch_bias.sv` | behavioural model | N-well forward-bias generator |
| `rtl/ldo_regulator.sv` | top, behavioural | all of the above wired together |

Only `fct_controller` is digital logic. It is the part to take into a
synthesis flow. It synthesizes to two 9-bit adders, a handful of multiplexers
and 17 flip-flops. The other parts are analog circuits. Their models use
`real` ports, with voltages in volts and currents in amperes. They exist so
that the controller can be simulated in a closed loop.

The output capacitor and the load are not part of the regulator. `ldo_regulator`
takes V_OUT as an input and drives I_SUPPLY as an output. The testbench
integrates `dV_OUT/dt = (I_SUPPLY - I_LOAD) / C_EXT`.

## The controller and fast current tracking

`fct_controller` holds two 8-bit registers:

- **register #1** (`n_on`): the present on-switch number N, which drives the
  switch array;
- **register #2** (`n_cross`): the value of N at the previous crossing of V_OUT
  and V_REF.

One adder/subtractor does both the counting and the averaging. Two
multiplexers choose its operand and the result bits:

```
              update=0                     update=1
MUX1 operand  dN (1, or K if 'under')      register #2
adder mode    subtract if cmp=1, else add  add
result L      9 bits, L[8:0]               9 bits, L[8:0]
MUX2 output   L[7:0], clamped to 0..255    L[8:1]  (sum / 2, rounded down)
```

Bits here are numbered from 0. In 1-based numbering the result is L[9:1],
and MUX2 chooses between L[8:1] and L[9:2].

`update` is high for exactly one cycle, the cycle in which the latched
comparator decision differs from the decision of the cycle before. At the next
clock edge both registers load the MUX2 output.

On an update cycle, register #1 holds the N reached at this crossing and
register #2 the N of the previous crossing. Both then become their mean, and
counting resumes from there.

Why the mean is right: suppose the loop was balanced at N = I1 and the load
then rises by dI. The counter climbs until V_OUT comes back up to V_REF.
Because the capacitor first lost charge, it reaches V_OUT = V_REF only at
I3 = I1 + 2 dI. The average (I1 + I3) / 2 = I1 + dI is the new balance point,
so one step lands on it without ringing.

Priority of the cases, evaluated every cycle from the decisions latched at the
previous edge:

1. `over` (V_OUT > V_REF_H): N := 0. Register #2 keeps its value.
2. `update` (crossing): N := register #2 := (N + register #2) >> 1.
3. Otherwise N := clamp(N -/+ dN, 0, 255), with dN = K while `under` is set
   and 1 otherwise. It counts down when `cmp` = 1 (V_OUT above V_REF).

In steady state the comparator toggles almost every cycle. Each toggle is a
crossing, so the registers keep re-averaging two nearly equal values. N then
dithers by one step around the load current. Because the mean rounds down,
a dither between N and N+1 settles toward N. The next non-toggling cycle
corrects this.

Reset (`rst_n`, asynchronous, active low) clears both registers and the stored
previous decision.

## Voltage sensing: the three thresholds

`voltage_sensing` produces the three decisions from two resistor dividers, so
the design needs only one reference voltage:

- V_REF_L = R_L2 / (R_L1 + R_L2) * V_REF, which sets the under-voltage
  threshold;
- V_OUT_L = R_H2 / (R_H1 + R_H2) * V_OUT.

The over-voltage comparator compares V_OUT_L with V_REF. It therefore trips at
V_REF_H = (R_H1 + R_H2) / R_H2 * V_REF.

The defaults put V_REF_H 5 % above V_REF and V_REF_L 2.5 % below it. At
V_REF = 220 mV that is 231 mV and 214.5 mV. Only the resistor ratios matter.
The absolute values in the model are normalised.

All three comparators latch at the same rising edge. The controller uses
their decisions one cycle later, so N responds to V_OUT with one cycle
(1 us) of latency.

Each comparator has an offset parameter. The comparator offset sets the
output error, so in silicon V_REF and the dividers would be trimmed. If they
cannot be trimmed, the two detection margins (11 mV and 5.5 mV at 220 mV) must
exceed the offsets.

## Switch array and forward body bias

Switch i (i = 0..7) is 2^i unit devices wide, so the array carries N units of
current. The switch-array model uses three published figures:

- 630 uA with all switches on at V_IN = 0.25 V and a 50 mV drop, with the
  forward-biased well;
- 204 uA under the same conditions with the well at V_IN;
- 1.78 mA and 0.65 mA for the same two cases at 0.30 V.

The model fits an exponential in V_IN through each pair. It scales the result
with the subthreshold drain law 1 - exp(-(V_IN - V_OUT) / V_T), normalised to
the 50 mV drop. It blends between the two fits according to the forward bias.
It is meant for supplies of 0.2-0.35 V.

For drops well below V_T (25.9 mV) the current is proportional to the drop.
For larger drops it flattens. That flattening is what lets the array still
deliver 1.12 mA at a 20 mV drop from 0.30 V, enough for a 1 mA load at a
0.28 V output.

At 0.25 V and a 30 mV drop, one unit is about 1.98 uA and the full array is
about 506 uA. That is more than twice the 200 uA maximum load, which fast
tracking needs in order to settle quickly.

`switch_bias` models the forward-bias generator as a transfer curve, not as
devices:

- V_BIAS = 26 mV at V_IN = 0.25 V, i.e. V_FB = 224 mV;
- V_FB then rises linearly to 280 mV at 1.2 V;
- V_FB stays far below the ~0.7 V junction turn-on at every supply.

Silicon measurements of this kind of circuit show a somewhat larger forward
bias: about 250 mV at 0.25 V and 268 mV at 0.30 V. The model follows the
design-time 224 mV value.

## Timing summary

| Event | Timing |
|---|---|
| comparators sample V_OUT | rising edge t |
| controller sees the decision | cycle t .. t+1 |
| N changes | rising edge t+1 |
| `update` | combinational in the cycle after a decision change, high for 1 cycle |
| I_SUPPLY follows N | immediately (no switch dynamics modelled) |

## Where this implementation makes its own choices

These points are fixed by this RTL and not by the original circuit:

- **Crossing detector.** The original circuit only says that an update signal
  marks each crossing. Here it is the XOR of the current and previous
  latched decisions.
- **Register #2 clock.** The original design writes register #2 with a
  separate pulse (CLK2) derived from the clock and the update signal. Here
  register #2 is on the main clock with `update` as a synchronous enable.
  Both versions store the same average in the same cycle, and the enable
  avoids a gated clock.
- **Averaging adds.** During the averaging cycle the adder adds, whatever the
  comparator says.
- **Over-voltage scope.** Over-voltage clears only register #1, one edge after
  the comparator latches it.
- **Saturation.** The clamp to 0..255 is applied to the counting result. The
  averaging result cannot overflow.
- **Reset.** The reset values of all state are zero.
- **Models.** The analog models described above are approximations: the
  divider values, the exponential current fit, the drain law and the bias
  curve. The kickback-filter capacitors
  on the divider taps, comparator speed and minimum supply, switch dynamics,
  quiescent current and mismatch are not modelled.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_fct_controller.sv` | Cycle-by-cycle comparison with an integer reference model: a directed tracking example (N climbs from I1 = 45 to I3 = 65, lands on 55 at the crossing), K steps, saturation at 255 and 0, over-voltage reset, then 20,000 random cycles. |
| `tb/tb_sa_comparator.sv` | Decision at the rising edge, hold between edges, offset. |
| `tb/tb_voltage_sensing.sv` | All three decisions just above and below 231 / 220 / 214.5 mV and the equivalents at other references; random points. |
| `tb/tb_switch_array.sv` | The four full-array currents, the binary weights, linearity in N, the drain law, at least 1 mA at 0.30 V / 0.28 V, no reverse current. |
| `tb/tb_switch_bias.sv` | 26 mV at 0.25 V, forward bias between 0 and 280 mV up to 1.2 V, monotonic bias. |
| `tb/tb_ldo_regulator.sv` | Closed loop at default parameters: load steps at 0.25 V and 0.30 V, start-up, V_REF steps across the whole output range. |
| `tb/tb_ldo_k_sweep.sv` | Six regulators with K = 1, 2, 4, 8, 16, 32 side by side; undershoot after a load step. |

The closed-loop testbench, all at a 1 MHz clock and a 1 uF capacitor, gives:

| Quantity | Simulated | Published for this circuit |
|---|---|---|
| start-up, V_REF 0 -> 220 mV at 0.25 V | 329 us | 228 us (simulation) |
| 20 <-> 200 uA steps at 0.25 V: overshoot / undershoot | 6.9 / 5.8 mV | 6.8 / 5.9 mV simulated, 5 / 5 mV measured |
| 0.1 <-> 1 mA steps at 0.30 V: overshoot / undershoot | 13.3 / 13.0 mV | 11 / 14 mV simulated, 8 / 8 mV measured |
| V_REF 200 -> 220 mV at 0.2 mA, within 3 mV | 58 us | 70 us rise (measured) |
| V_REF 220 -> 260 mV at 1 mA, within 3 mV | 53 us | 90 us rise (measured) |
| regulated outputs | 140-220 mV at 0.25 V / 0.2 mA, 140-280 mV at 0.30 V / 1 mA | the same ranges (measured) |
| undershoot at K = 1 / 8 (0.30 V, 1 mA step) | 51.4 / 13.2 mV | about 40 / 11 mV (simulation) |

In every steady interval, mean V_OUT stays within 3 mV of V_REF and the mean
supply current matches the load. The testbench also counts each mechanism and
fails if one never happens: crossing averages, K steps, over-voltage resets,
saturation at 255 and the clamp at 0.

These are model results. The controller is exact RTL. The analog numbers are
only as good as the models above.

One behaviour is easy to mistake for a bug. After an over-voltage reset at a
light load, V_OUT drifts down at only I_LOAD / C_EXT (20 mV/ms at 20 uA)
before regulation resumes. The original design shows the same slow decay.

## Simulating

With Verilator 5 (any recent version with `--timing`):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ldo_pkg.sv \
          tb/tb_ldo_regulator.sv --top-module tb_ldo_regulator -o sim
./obj_dir/sim
```

Replace the testbench and top-module name to run another testbench. Every run
finishes in well under a second.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `fct_controller`, `ldo_regulator` | `N_BITS` | 8 | width of N (256 levels) |
| `fct_controller`, `ldo_regulator` | `K` | 8 | coarse step under under-voltage (1..2^N_BITS-1) |
| `voltage_sensing` | `R_H1`, `R_H2` | 5, 100 | over-voltage divider (V_REF_H = 1.05 V_REF) |
| `voltage_sensing` | `R_L1`, `R_L2` | 2.5, 97.5 | under-voltage divider (V_REF_L = 0.975 V_REF) |
| `voltage_sensing`, `sa_comparator` | `V_OFFSET*` | 0 | comparator input offsets [V] |
| `switch_array` | `I_FB_250` ... `I_NFB_300` | 630 uA, 1.78 mA, 204 uA, 0.65 mA | full-array currents at a 50 mV drop |
| `switch_array` | `V_T` | 25.9 mV | thermal voltage in the drain law |
| `switch_bias` | `V_FB_KNEE`, `V_FB_MAX` | 224 mV, 280 mV | forward bias at 0.25 V and at 1.2 V |

K is a fabrication-time constant in silicon. A larger K shortens start-up and
undershoot, at the price of coarser steps while under-voltage is active. The
K sweep above shows the trade-off levelling off beyond 8.
