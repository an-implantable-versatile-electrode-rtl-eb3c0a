# Three-wire electrode driver for epidural stimulation

This is the RTL of a small implantable chip that routes one externally generated
stimulus current to any combination of 13 electrodes: 12 on an epidural array
over a rat's spinal cord, and one placed under the skin. It connects to its hub
through only three wires:

| wire  | carries |
|-------|---------|
| `Vss` | ground |
| `Vin` | supply, switch configuration and stimulus timing, all on one line |
| `Iin` | the stimulus current itself, produced and timed in the hub |

The chip has no oscillator and no current DAC. It keeps almost no power on the
array, and every timing decision is made by the hub. What remains on chip is:

- a demodulator that turns pulses on `Vin` into bits and clock edges;
- about seventy flip-flops of control logic;
- one anodic and one cathodic high-voltage switch per electrode.

Any electrode can be an anode, a cathode or unused in a given pulse. Between two
pulses the hub can send a new pattern, which allows interleaved stimulation of
different electrode groups.

## The Vin line: power, data and time on one wire

`Vin` idles at 5 V. That keeps an on-chip storage capacitor charged, and the
capacitor powers the chip. Information travels as brief drops of `Vin` to 0 V,
one drop per bit:

| low pulse | meaning |
|-----------|---------|
| 250 ns    | `0` |
| 1.5 µs    | `1` |

Bits can come at up to 0.5 MHz, one every 2 µs, so the capacitor recharges
between pulses.

A stimulation cycle is 36 pulses:

```
 pulse   0..3    4 .. 29                         30  31    32    33    34    35
        1 1 1 1  C0 A0 C1 A1 ... C12 A12          0   0     0     0     0     0
        reset    26 switch bits                   dummies   |     |     |     |
                                                            |     |     |     end of phase 2
                                                            |     |     start of phase 2
                                                            |     end of phase 1
                                                            start of phase 1
```

- `Ck = 1` makes electrode k a cathode and `Ak = 1` makes it an anode in the
  first phase.
- The two dummy zeros complete the word (see the next section for why they are
  needed).
- The four timing pulses are ordinary `0` bits. The hub sends them whenever a
  phase should start or end, so pulse width, interphase delay and repetition
  rate are limited only by the hub.
- The hub switches `Iin` on during each phase and off between phases.

Each timing pulse moves the chip one operating mode on. The mode is visible as
the 2-bit code `U1U0`:

| U1U0 | mode                 | switches |
|------|----------------------|----------|
| 00   | data reception       | all cathodic switches closed: every electrode tied to the reference, so residual charge drains |
| 01   | first stimulus phase | the pattern as sent |
| 11   | interphase delay     | all open, electrodes floating |
| 10   | second stimulus phase| the pattern with every anode and cathode swapped: the current reverses with no second source |

The codes form a Gray sequence, so only one bit changes at each step. After the
second phase the chip returns to reception and ignores further pulses until the
next `1111`. The sequence `1111` also restarts the unit from any point, including
the middle of a word or of a stimulation cycle.

A `0` must precede the `1111` (the last timing pulse always provides one). Four
ones are a reset only when they start a run.

## Decoding without a clock

The demodulator (`data_demodulation`) works as follows:

1. A monostable fires on every falling edge of `Vin` and stays high for 800 ns.
   That is between the two pulse widths; 880 ns was measured on silicon, and
   either value works.
2. Its inverted output is the extracted clock `clk`. `clk` falls with `Vin` and
   rises 800 ns later.
3. On that rising edge a flip-flop samples the inverted `Vin` into `shr`. If
   `Vin` is still low, the pulse was long and the bit is `1`. If `Vin` is already
   back high, the bit is `0`.

All state in the digital unit changes on the falling edge of `clk`, at the start
of the next pulse. At that moment `shr` holds the bit of the previous pulse. So
the logic always runs one pulse behind the wire:

- Pulse 30, the first dummy, clocks in A12.
- Pulse 31, the second dummy, runs the safety check.
- Pulse 32 starts the first phase.

The mode changes on the very edge at which `Vin` falls, so the stimulus timing
is as accurate as the hub's pulse edges.

## Digital unit

`digital_unit` contains three blocks, all clocked on the falling edge of `clk`
and reset asynchronously by power-on reset (`por`).

### reset_block

A saturating counter of consecutive `1`s. On the edge that sees the fourth `1`,
`seq_rst` is high and resets the other two blocks synchronously. Later `1`s in
the same run do not retrigger it, so a word whose C0 is `1` is read correctly.
A valid word cannot contain `1111`: any run of three ones in it covers both
switches of one electrode, and the safety check rejects such a word anyway.

### mode_selection

A seven-state sequencer:

```
IDLE -> LOAD (26 edges) -> CHECK -> READY -> PH1 -> IPD -> PH2 -> IDLE
```

- It opens the 26-edge loading window for Reg1 and closes it; loading then stays
  stopped until the next reset sequence.
- It runs the safety check.
- It issues the Reg2 operation for each edge (`reg2_op`: hold, forward, open,
  reverse, discharge).
- It decodes `U1U0`.

The safety check rejects a word in three cases:

- an electrode has both bits set;
- no electrode is a cathode;
- no electrode is an anode.

A rejected word clears Reg1 through output `e`. The hub's timing pulses still
step the modes, but every switch stays open, so nothing is stimulated. The
`err` flag shows the verdict until the next reset sequence.

### data_storage

Two 26-bit registers:

- **Reg1** takes the serial bits. It does not shift: a 5-bit Gray-code counter
  (`gray_counter`) addresses its flip-flops, so each bit is written once into its
  own flip-flop and only one counter bit toggles per bit received. This keeps the
  switching activity, and with it the power, low. Bit k of the word ends up in
  `b[k]`, so `b[2k] = Ck` and `b[2k+1] = Ak`.
- **Reg2** drives the switches: `v_c[k]` and `v_a[k]`. It is loaded from Reg1
  forward or swapped, or forced to all-open or all-cathodes, as `reg2_op` says.
  After power-on it starts in the all-cathodes (discharge) state.

Two assertions in `digital_unit` guard the outputs:

- no electrode ever has both switches closed;
- the first phase is followed only by the interphase delay, or by a restart.

Size after coarse synthesis (yosys): 73 flip-flops and about 200 word-level cells
for the whole digital unit.

## Output stage and the current budget

Each electrode has two switches:

- an anodic PDMOS switch to node N, where `Iin` enters;
- a cathodic NDMOS switch to the return node.

A closed anodic switch needs a 5 µA bias current, and that current is taken from
`Iin`. The hub therefore has to inject the stimulus current plus 5 µA per active
anode. `output_stage` models this with equal electrode loads:

```
Istim      = Iin - 5 µA x (number of anodes)
per anode  = +Istim / anodes          (current into the tissue is positive)
per cathode= -Istim / cathodes
```

Without at least one anode and one cathode, no current flows.

Example: four anodes and two cathodes at 820 µA in. Then 800 µA is delivered:
+200 µA per anode and -400 µA per cathode. In the second phase the roles swap,
so the two new anodes need only 810 µA in for the same 800 µA.

## What is synthesizable and what is a model

| module | kind | notes |
|---|---|---|
| `rdm_pkg` | package | mode codes `mode_e`, Reg2 operations `reg2_op_e`, defaults |
| `reset_block`, `mode_selection`, `data_storage`, `gray_counter`, `digital_unit` | synthesizable RTL | clocked by the extracted clock |
| `data_demodulation` | behavioural model | the monostable is a delay; the output flip-flop is real RTL |
| `power_on_reset` | behavioural model | one reset pulse (1 µs assumed) when `vdd_ok` rises |
| `output_stage` | behavioural model | ideal switches, equal loads, currents as `real` in µA |
| `rdm1_asic` | top | all of the above; `Iin` and the electrode currents are `real` ports |

Parts with no logic function are not modelled:

- the 271 pF storage capacitor and its Schottky diode. Their state enters as the
  input `vdd_ok`, and the supply must stay down for at least 1 µs after time zero;
- the 500 nA current reference, the current mirrors and the level shifter. Only
  their 5 µA-per-anode load on `Iin` is modelled.

The hub is also outside this RTL: the microcontroller, the 8-bit DAC, the
Howland current source and the boost converter. The testbenches play its role
and generate the `Vin` pulse train and `Iin`.

The chip also exists as three smaller chips with 4, 4 and 5 electrodes that work
together as one driver. The digital unit takes the electrode count as parameter
`N_EL`. How those three chips would share a control word is not defined here, so
only the 13-electrode single-chip version is assembled.

## Choices made in this implementation

The following points are not fixed by the design's specification:

- **One timing pulse per phase boundary.** Each start or end of a phase is one
  `0` pulse; a phase is the span between a pair of them. If a two-pulse marker
  per boundary were wanted instead, `mode_selection` would count two edges per
  step.
- **Discharge state.** "Connected to the reference" is realised as closing every
  cathodic switch. This state is held through data reception and is also the
  power-on state.
- **Flip-flops instead of asynchronous dynamic logic.** The digital unit uses
  ordinary flip-flops on the extracted clock. The original logic was described as
  asynchronous dynamic logic; the behaviour at the pins is the same.
- **Reset pulse.** The width of the power-on pulse (1 µs) and the
  fire-once-per-run rule of the reset block are this implementation's own.
- **No monostable retrigger.** The monostable ignores a falling edge that comes
  while it is already running.
- **Ideal output stage.** The output stage model ignores the 25 V compliance
  limit, switch resistance, rise times and electrode impedance.

## Simulating

All files use `` `timescale 1ns/1ps``. List the package first. Every testbench
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rdm_pkg.sv tb/tb_rdm1_asic.sv \
          --top-module tb_rdm1_asic -Mdir obj_top
./obj_top/Vtb_rdm1_asic
```

Replace the testbench name to run the others:

| testbench | what it checks |
|---|---|
| `tb_rdm1_asic` | End to end at default parameters: power-up, the four published interleaved patterns (one rejected for having no cathode) with their pulse widths and currents, random patterns, all three rejection rules, a word abandoned by a new reset sequence, stray pulses, a power cycle. It checks that the mode changes on the edge of each timing pulse, and that every mechanism occurs at least once. |
| `tb_rdm1_workloads` | A single pair at 100 µA, 500 µA and 1 mA; the 250/100/250 µs cycle; twelve anodes against one cathode; ten cycles at 100 pulses per second. |
| `tb_digital_unit`, `tb_reset_block`, `tb_mode_selection`, `tb_data_storage` | Bit-level tests of the logic against reference values computed in the testbench, including exact edge counts (26 loading edges; first phase on the 33rd edge after the word starts). |
| `tb_data_demodulation` | PWM decoding at 0.5 MHz and the 800 ns clock pulse. |
| `tb_power_on_reset` | The reset pulse. |
| `tb_output_stage` | The published per-electrode currents of the four patterns, plus the discharge, open and short cases. |

Each simulation finishes in well under a second.

## Changing it

- **Electrode count.** Parameter `N_EL`. The word becomes `1111` + 2·`N_EL` bits
  + `00`, and the Gray counter widens automatically.
- **Reset sequence length.** `RESET_ONES` of `reset_block`.
- **Monostable time.** `T_MONO_NS` of `data_demodulation` and the top. It must
  lie between the two pulse widths the hub sends.
- **Bias per anode.** `I_BIAS_UA` of `output_stage`.
