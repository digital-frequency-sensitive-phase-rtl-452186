# Frequency sensitive phase detector with switchable phase-to-voltage gain

A phase-locked loop wants two different phase detectors at different times.
While the loop is far from lock, it needs a wide, frequency-sensitive range
and a moderate gain, so that it pulls in without overshooting out of range.
Once it is locked, it wants a steep phase-to-voltage slope and a high output
pulse rate, so that it reacts quickly to noise and the ripple is easy to filter.

This design gives both from one circuit. It is the classic two-flip-flop
phase/frequency detector (the 4046 "type 1" kind), with an XOR input stage
and a toggling flip-flop that make it act on both edges of its inputs
("type 2"). The toggling flip-flop has a reset input. Two Schmitt comparators
watch the filtered output voltage and hold that flip-flop in reset whenever
the voltage leaves a window around the lock point. The result:

| mode   | when                          | edges used     | linear range    | slope              | output pulse rate |
|--------|-------------------------------|----------------|-----------------|--------------------|-------------------|
| type 1 | output outside the window     | rising only    | -2*pi .. +2*pi  | 2.5 V per 2*pi     | f_in              |
| type 2 | output inside the window      | rising and falling | -pi .. +pi  | 2.5 V per pi       | 2 * f_in          |

Both numbers in the slope column assume the default 5 V logic, a 2.5 V filter
reference and unity filter gain, and type 2 assumes 50 % duty inputs.

The logic is synthesizable SystemVerilog. The analog half of the circuit is
written as behavioural models with `real` nodes, so that the complete
detector can be simulated in Verilator and its published phase sweeps
replayed. That half is the MOSFET output stage, the op-amp integrator and
the two comparators.

## Block diagram

```
            +------------------------ fspd_digital -----------------------+
 vin1 ----->| U3A XOR --clk1--> U1A D-FF (D=1) --up---+                   |
            |    ^                  ^ CLR             |-- U2A NAND --vnand-+--+
 vin2 ----->| U3B XOR --clk2--> U1B D-FF (D=1) --dn---+        |          |  |
            |    ^                  ^ CLR <--------------------+          |  |
            |    | sel                                                    |  |
            |  U4A toggle FF (D = Q bar) <--- clock: vnand ---------------+  |
            |    ^ CLR                                                       |
            |  U2B/U2C: vcomp1 AND vcomp2 = vcomp1and2                       |
            +----^----------^------------------------------------------------+
                 |          |            vout1 (= not up), vout2 (= dn)
               vcomp1     vcomp2                |
                 |          |          charge_pump (Q1, Q2, R1, R2)
             U5A Schmitt  U5B Schmitt           |  Vpoint
                 ^          ^          integrator (U6A, R3, R4, C1, 2.5 V)
                 +----------+------------------ vanalog
```

## The detector core: type 1

`pfd_core` is two D flip-flops with D tied high. A rising edge on `clk1` sets
U1A (`up`). A rising edge on `clk2` sets U1B (`dn`, brought out as `vout2`).
As soon as both are set, the NAND gate U2A pulls `vnand` low and clears both
through their asynchronous clears. The output that pulses shows which edge
came first, and the pulse lasts from that edge to the other one.

If the two frequencies differ, one input keeps arriving "twice" before the
other. The flip-flop of the faster input then stays set over long stretches,
so the output has a DC component whose sign is the sign of the frequency
difference. This is the frequency sensitivity.

With equal frequencies the mean output is linear in the phase over a full
-2*pi..+2*pi.

`vout1` is the inverted Q of U1A because it drives a P-channel transistor. The
input `init_n` is the preset of U1A. Held low at start-up, it leaves the
detector in the state "edge of vin1 seen, waiting for vin2". That state is
the -2*pi end of the characteristic, where the published sweeps start.

## Acting on both edges: type 2

`edge_select` puts an XOR gate in front of each clock input. Both gates are
driven by `sel`, the output of the "setting" flip-flop U4A. U4A is a toggle
flip-flop (D = Q bar) clocked by `vnand`, so it flips at the *end* of every
detector reset.

Follow one input period, with `sel = 0`, both inputs at 50 % duty, and vin1
leading:

1. vin1 rises. clk1 rises and `up` is set.
2. vin2 rises. clk2 rises and U1B is set. Both are now set, so `vnand` pulses
   and both flip-flops clear.
3. The rising edge of `vnand` toggles `sel` to 1. Both inputs are high, so both
   XOR outputs fall. This edge is harmless: the detector ignores falling edges.
4. vin1 falls. Through the inverting XOR, clk1 *rises* and `up` is set again.
5. vin2 falls. clk2 rises, the detector resets, and `sel` returns to 0.

The falling edges are now compared as well. The output pulse rate doubles and
so does the slope. The cost is the range: once the phase error passes +/-pi,
the toggle is no longer in step with the inputs. The detector then stops
responding and its output sits at one rail. These are the insensitive zones
of the type-2 detector.

## The mode control

The clear input of U4A is the mode control. Low holds `sel` at 0, so the XOR
gates pass the inputs unchanged and the circuit is the type-1 detector. High
lets `sel` toggle, which gives type 2. `mode_gate` drives it with
`vcomp1 AND vcomp2`. U2B is a NAND and U2C is a second NAND with its inputs
joined, used as an inverter.

The comparators are LM339 open-collector parts with 1 kOhm pull-ups. They
have 1 kOhm / 15 kOhm positive-feedback dividers, which make them Schmitt
triggers:

| comparator | input pin of Vanalog | reference | output high when | rises at  | falls at  |
|------------|----------------------|-----------|------------------|-----------|-----------|
| U5A (`vcomp1`) | inverting        | 3.3 V     | Vanalog low      | 3.094 V   | 3.400 V   |
| U5B (`vcomp2`) | non-inverting (via 1 kOhm) | 1.5 V | Vanalog high | 1.600 V   | 1.281 V   |

The thresholds follow from the resistor network. The U5A output high level is
4.9 V: the 1 kOhm pull-up is loaded by 16 kOhm to the 3.3 V reference.
- U5A: 3.3 * 15/16 = 3.094 V (output low); (3.3 * 15 + 4.9) / 16 = 3.4 V (output high).
- U5B: rises when Vanalog * 15/16 = 1.5 V, i.e. at 1.6 V. It falls at the
  solution of (15 v + Voh(v)) / 16 = 1.5, with Voh(v) = (80 + v) / 17, i.e. at
  1.281 V.

The window is therefore open between about 1.3-1.6 V and 3.1-3.4 V, depending
on the direction of travel. Near lock (around 2.5 V) the detector runs as
type 2. A large phase or frequency error drives the output out of the window
and switches to type 1.

The hysteresis matters because the two characteristics do not meet at the
switching points. Switching to the other type moves the operating point by
several hundred millivolts. Without a hysteresis wider than that step, the
circuit would chatter between the modes.

## What the complete detector does

The end-to-end testbench replays the published sweep. Vin1 has a period of
1.01 ms and Vin2 of 0.99 ms, so the phase moves by 4*pi in 99.99 ms. The
start-up preset places the detector at -2*pi, and the filter starts at 0 V.
The simulated response is:

- 0 to 34 ms: type 1. Vanalog rises at about 0.1 V per 2 ms.
- At 34 ms Vanalog reaches 1.600 V and U5B switches: type 2. Vanalog dips
  briefly to about 1.39 V, because the type-2 curve is lower at that phase,
  then climbs at the doubled slope.
- At about 63 ms Vanalog reaches 3.400 V and U5A switches: type 1. There is a
  small dip again, then the type-1 slope resumes.
- It is about 4.7 V just before +2*pi.

Reversing the frequency offset runs the same path back. The switching points
are now 3.094 V and 1.281 V.

The leak resistor R4 across C1 makes the filter lag the phase by its 4 ms time
constant. At phase 0, the output is therefore 2.13 V on the way up and 2.86 V
on the way down. The zero point of the response moves with the sweep
direction.

## The analog models

These modules are behavioural. They use `real` values and simulation time,
and they are not meant for synthesis.

- **`charge_pump`** (Q1, Q2, R1, R2). Q1 (P-channel) connects the Vpoint
  node to 5 V through 10 Ohm while `vout1` is low. Q2 (N-channel) connects it
  to ground through 10 Ohm while `vout2` is high. The model outputs the stage
  as a Thevenin pair `(v_th, r_th)`. With both transistors off, `r_th` is
  1 GOhm and no current flows: the tri-state output floats. The transistor
  on-resistances are assumed values: 5 Ohm and 2 Ohm.
- **`integrator`** (U6A, R3 = 40 kOhm, R4 = 40 kOhm, C1 = 100 nF, 2.5 V
  reference). It is an inverting leaky integrator:
  C1 du/dt = -(v_th - 2.5)/(r_th + R3) - u/R4, with u = Vanalog - 2.5.
  The DC gain is -1 and the time constant 4 ms. A full-width "up" drive gives
  0 V, and a full-width "down" drive gives 5 V. The equation is solved exactly
  between input changes, so pulse widths are never quantised. The output is
  refreshed every `STEP_NS` (100 ns) and clamped at +/-10.5 V.
- **`hyst_comparator`** (U5A or U5B with their resistors). It computes the
  non-inverting pin voltage from the feedback divider and the current output
  level, and switches when the pins cross. The comparator has no offset. Its
  output low level is 0 V.

## Modules

| file | contents | synthesizable |
|------|----------|---------------|
| `rtl/fspd_controllable.sv` | top: the complete detector | no (contains the analog models) |
| `rtl/fspd_digital.sv` | all logic: U1A, U1B, U2A-C, U3A-B, U4A | yes |
| `rtl/pfd_core.sv` | type-1 detector: U1A, U1B, U2A | yes |
| `rtl/edge_select.sv` | XOR stage and toggle flip-flop: U3A, U3B, U4A | yes |
| `rtl/mode_gate.sv` | comparator AND: U2B, U2C | yes |
| `rtl/dff74.sv` | 74F74-style D flip-flop with preset and clear | yes |
| `rtl/charge_pump.sv` | output transistors (behavioural) | no |
| `rtl/integrator.sv` | loop filter (behavioural) | no |
| `rtl/hyst_comparator.sv` | Schmitt comparator (behavioural) | no |

The top's ports are the two inputs and `init_n`, plus every named net of the
circuit as an output: `vout1`, `vout2`, `up`, `vnand`, `sel`, `vcomp1`,
`vcomp2`, `vcomp1and2`, and the real-valued `vpoint` and `vanalog` in volts.
Parameters: `VSET1` (3.3 V), `VSET2` (1.5 V), `VREF_INT` (2.5 V) and
`VANALOG_INIT` (0 V, the starting charge of C1). The resistor values are
parameters of the model modules.

To put the detector in a digital loop, use `fspd_digital` on its own. Drive
`vcomp1`/`vcomp2` from any digital decision, for example a counter on the
filtered phase error. Tie both high for type 2, or either low for type 1.

## Timing and modelling notes

- **The logic is asynchronous and zero-delay, like the TTL circuit.** The only
  clocks are the inputs and `vnand`. The detector reset therefore has zero
  width in simulation. Its falling edge clears U1A/U1B, and its rising edge
  still clocks U4A in the same time step. A gate-level or FPGA
  implementation needs the reset pulse to be wide enough to clear both
  flip-flops. Check this with real delays before building it. Lint reports
  the reset loop (Q outputs, NAND, clear inputs) as circular logic: it is
  the circuit.
- **Asynchronous clears act on edges in simulation.** A clear or preset that
  is already low at time zero has no effect until the next edge. The
  testbenches therefore start `init_n` high and pull it low at 1 ns. A `sel`
  that powers up at 1 while the mode input is low is cleared by the first
  detector reset, which is also a clock edge of U4A.
- **`dff74` differs from a real 74F74 in two corner cases.** With both preset
  and clear low, the real part drives Q and Q bar high; here Q is 1 and Q bar
  is 0. A clear still held when the preset ends takes effect on the real
  part; here it waits for its next edge. Decoding these cases would create a
  combinational path from the clear to Q, and so a combinational loop through
  U2A. In this circuit the only preset is the long start-up pulse and the
  clears are zero-width pulses, so neither case arises. Preset has priority
  over clear, so a detector reset during the start-up pulse leaves U1A set,
  as on the real part.
- **Readings of the original schematic.** The thresholds follow its
  components: 3.3 V with U5A as the upper limit and 1.5 V with U5B as the
  lower. U5B's hysteresis divider is R11/R9; R10 only feeds the reference.
  The U4A input driven by the comparators is used as its active-low clear,
  because the circuit needs that input to force Q low.
- **Synthesis of `dff74`.** A flip-flop with both an asynchronous preset and
  an asynchronous clear is standard synthesizable SystemVerilog. Some
  open-source front ends (the slang plugin for yosys among them) accept only
  one asynchronous load per flip-flop, and reject it.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.
Every file carries `` `timescale 1ns / 1ps``. Build and run one with plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          --top-module tb_fspd_controllable tb/tb_fspd_controllable.sv
./obj_dir/Vtb_fspd_controllable
```

| testbench | what it checks | run time |
|-----------|----------------|----------|
| `tb_fspd_controllable` | the full sweep up and back at default parameters: switching voltages, range ends, monotonic response, one reset per period in type 1 and two in type 2, `sel` toggling only in type 2, the moving zero point, and that every mechanism (preset, both mode switches, toggling) occurred | < 1 s for 193 ms |
| `tb_fspd_response` | the fixed type-1 and type-2 characteristics over -2*pi..+2*pi against the ideal lines (with the filter's 4 ms lag), including the insensitive zones of type 2 | < 1 s |
| `tb_fspd_digital` | the logic alone with equal-frequency inputs at ten phase offsets: pulse time per period (D in type 1, 2D in type 2), resets per period, `sel` behaviour | < 1 s |
| `tb_pfd_core` | 300 random edge pairs: exact pulse widths, one reset per pair, frequency error, start-up preset | < 1 s |
| `tb_edge_select` | XOR outputs, toggling on `vnand`, clear by the mode input, zero-width reset pulses | < 1 s |
| `tb_mode_gate` | truth table | < 1 s |
| `tb_dff74` | 4000 random input changes against a reference model | < 1 s |
| `tb_charge_pump` | the Thevenin output against a direct node solution under three loads | < 1 s |
| `tb_integrator` | closed-form step and decay responses, mean and ripple of a pulse train | < 1 s |
| `tb_hyst_comparator` | the four switching voltages of both comparators against the hand-solved thresholds | < 1 s |

## Changing it

- Thresholds: set `VSET1`/`VSET2` on the top. For other hysteresis widths,
  change `R_IN`/`R_FB` of the `hyst_comparator` instances. The switching
  voltages are given by the formulas in the comparator section.
- Filter: `R3`, `R4`, `C1` on the `integrator` instance. `tb_fspd_response`
  assumes a 4 ms time constant in its lag correction, and the sweep tests
  assume the 0-5 V output range.
- Input frequencies: the testbenches take the periods from two half-period
  variables (`half1`, `half2` in `tb_fspd_controllable`).
