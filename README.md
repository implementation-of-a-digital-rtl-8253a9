# Digital control unit for a small space probe

A small scientific spacecraft needs one unit that keeps time for everything
else: it schedules measurements, holds measured words until their turn,
digitises analogue readings, assembles the telemetry frame and shifts it out
bit by bit, issues timed commands to the radio, and sends a synchronisation
code. This RTL is a synchronous SystemVerilog model of such a unit, following
H. Hauck's description of a control unit built from integrated P-channel
MOSFET blocks (the SC1149 binary counter and three-input gates). The whole
unit is driven by one clock and a chain of binary counter stages: every
timing signal in the design is a decoded state of that chain.

```
            clk ──► freq_divider (10 × SC1149) ──► q[10:0]
                         │  central clock edges
        ┌────────────────┼─────────────────┬─────────────────┬───────────────┐
 code_generator     decode_matrix     input_sequencer     multiplexer      ps_converter
 (2 × 11-state       (commands)       (t_i, f, A-D          (slot          (4-bit shift
  counters, Barker                     timing, buffer       q[5:3])         register)
  matrices, mod-2                      strobes)                │               │
  adder, sync FF)                        │        │            │               ▼
        │                                ▼        ▼            │            tm_out
        ▼                       buffer_register  ad_converter ─┘
      code                         (× 3)         (counter + gate) ◄── adc_cmp
                                                   │
                                                   ▼ ladder_sw (to the R-2R ladder)
```

## The SC1149 counter stage and how this model treats it

Everything rests on one block, modelled in `sc1149_stage.sv`. The SC1149 is a
master-slave toggle flip-flop. On the first edge of its input the master takes
the complement of the slave; on the second edge the slave copies the master.
So the master output OUT1 (pin 8, complement pin 4) divides the input by two,
and the slave output OUT2 (pin 3, complement pin 5) does the same half an
input period later. Pin 2 resets both to 0.

The original circuit is asynchronous ripple logic. Here it is synchronous. A
discrete input edge becomes a strobe one `clk` wide: `in_rise` makes the
master load, and `in_fall` makes the slave load. Both outputs change on the
`clk` edge that ends the strobe. `counter_chain.sv` chains the stages. It works
out each stage's strobes combinationally from the stage before, so the whole
chain switches on one clock edge and there is no ripple delay. Two effects
follow:

* A stage fed from the previous *slave* (pins 3/5, the default) counts in
  binary on the trailing edge. A stage fed from the previous *master*
  (pins 8/4) is shifted by half a period of the stage before. Both cascades
  exist in the original divider. `FROM_OUT2` picks one per stage, and the
  testbench checks the slave-fed, master-fed and mixed cascades.
* The original relies on delays that this model lacks. Examples are the
  spikes of the Barker adder and the need to hold a reset flip-flop stable.
  The structures that deal with those delays are kept anyway: the reset
  flip-flop, the transient reset state and the synchronisation flip-flop.
  Their timing is reproduced at `clk` resolution.

One detail is this design's own. A reset that arrives in the same cycle as a
first input edge leaves the master set. Without that, a counter that resets
itself would lose the count of that period.

## The three-input gate blocks

The other two building blocks are three-input P-channel gates, each three
transistors with a load resistor to ground. In the SC1128 the transistors are
in series, so the output is high only when all three inputs are at 0 V. In the
SC1173 they are in parallel, so the output is low only when all three inputs
are high. Which Boolean function that is depends on how the levels are read:

| block | structure | positive direction (0 V = 0) | negative direction (0 V = 1) |
|-------|-----------|------------------------------|------------------------------|
| `sc1128_gate` | serial   | NOR3  | NAND3 |
| `sc1173_gate` | parallel | NAND3 | NOR3  |

The parameter `DIR` (`cu_pkg::signal_dir_e`) picks the reading. This RTL uses
positive direction throughout. An unused input is tied to a used one. Two
places are built from these blocks: the modulo-2 adder of the code generator
(four SC1173 NANDs) and the clock gate of the A-D converter. Everywhere else
the logic is written as ordinary RTL expressions.

## Timing: divider state and frame

`freq_divider.sv` models the central clock as a register that toggles on every
`clk`, followed by 10 slave-fed SC1149 stages. The divider state
`q = {slaves, clock}` therefore counts `clk` cycles in binary. It wraps every
2048 clk.

| divider bits | meaning                                   | period   |
|--------------|-------------------------------------------|----------|
| `q[0]`       | central clock; one telemetry bit / code chip per period | 2 clk |
| `q[2:1]`     | bit within a 4-bit word                   | 8 clk    |
| `q[5:3]`     | word slot within the frame                | 64 clk   |
| `q[7:6]`     | frame number = analogue channel measured  | 256 clk  |
| `q[10:8]`    | used only by the long command             | 2048 clk |

The frame has 8 slots of 4 bits. The sizes and the slot layout are this
design's choice; the original leaves the frame arrangement open.

| slot | word sent                                   |
|------|---------------------------------------------|
| 0    | A-D result of the previous frame's channel  |
| 1-3  | buffer registers 0-2                        |
| 4-7  | direct digital inputs 0-3                   |

Within a frame, the A-D counter is reset in slot 1 and converts in slots 2-5.
The thermistor supply `f` and the channel switch `t_i` are on during slots 1-5.
The three buffers are strobed one clk after frame times 43, 21 and 50, at
moments unrelated to when they are sent.

## Barker code generator

The synchronisation code is an 11-bit Barker code, `1 1 1 0 0 0 1 0 0 1 0`,
folded twice. The fast fold (BC2) runs through the whole code once per chip of
the slow fold (BC1), and the output is their exclusive-or:
`code[n] = B[n/11] xor B[n mod 11]`, a 121-chip period with one chip per
central-clock period.

* `barker_counter.sv` is four SC1149 stages that would count to 16, stopped
  after 11 states by a reset matrix and a reset flip-flop. The matrix fires as
  the counter leaves state 10 and sets the flip-flop. One clk later the
  flip-flop clears the counter and falls back. For that one clk the counter
  shows state 11, the same short erroneous pulse the original pulse diagram
  shows. The reset pulse is also the input of the next group, so the slow fold
  steps once each time the fast fold wraps.
* `barker_matrix.sv` decodes a counter state into its chip. The transient
  state 11 decodes like state 0, the state being entered.
* `code_sync.sv` holds the modulo-2 adder (four SC1173 NANDs) and the
  synchronisation flip-flop.
  The flip-flop takes the adder output only while the central clock is high,
  in the middle of a chip. In the original this removes the spikes that ripple
  delays put on the adder output. This synchronous model has no such delays,
  and the transient state 11 decodes like state 0, so the adder output is
  already clean. Here the flip-flop only fixes the timing of `code` to the
  chip grid.

After reset, chip 0 appears on `code` at the end of the second clk and every
chip lasts 2 clk.

## Measurement path

* `input_sequencer.sv` decodes the divider state into the analogue channel
  switches `t_an` and the frame supply `f`. It also produces the A-D reset and
  enable, and the buffer strobes, which come from a `decode_matrix`. One of the
  four analogue channels is measured per frame, in turn.
* `buffer_register.sv` takes a word when its strobe is high and keeps it until
  the next strobe. Reading it does not disturb it.
* `ad_converter.sv` is the digital half of a counting converter. A four-stage
  SC1149 counter drives the switches of an external R-2R ladder. The counter
  clock passes a gate that is the AND of the clock, the enable window and the
  comparator (`adc_cmp = 1` while the ladder is below the input). The gate is
  an SC1173 NAND followed by an SC1128 NOR, which also takes the full-scale
  and reset terms. The count
  therefore rises until the ladder reaches the input, then stops and holds.
  One step takes 2 clk, and the 32-clk window gives room for all 15 steps. The
  gate also closes at 15, so an input above full scale reads 15 rather than
  wrapping to 0. That clamp is this design's own addition.
* `multiplexer.sv` is a tree of 2:1 switch levels, one level per select bit.
  `ps_converter.sv` is a 4-bit shift register that sends MSB first. A word is
  loaded in the cycle with `q[2:0] = 0`, so its bits are on `tm_out` in the
  cycles with `q[2:0]` = 1, 3, 5 and 7 of the word.

## Commands

`decode_matrix.sv` is the command sub-unit. Each output is one product term
over the divider bits (a mask and a value). Its length and period follow from
which bits are decoded. The outputs are registered, so they lag the divider by
one clk and carry no decoding spikes. The original says only that the pattern
depends on the commands needed. The three defaults are examples:

| output   | active while         | length / period |
|----------|----------------------|-----------------|
| `cmd[0]` | `q[5:1] = 0`         | 2 clk / 64 clk  |
| `cmd[1]` | `q[7:3] = 3`         | 8 clk / 256 clk |
| `cmd[2]` | `q[10:6] = 0`        | 64 clk / 2048 clk |

## Top-level interface (`control_unit`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (twice the central-clock rate); asynchronous active-low reset |
| `buf_in` | in | 3 × 4 | digital words taken into the buffers at their strobe times |
| `direct_in` | in | 4 × 4 | digital words sampled when their slot is loaded |
| `adc_cmp` | in | 1 | comparator: ladder voltage below the selected analogue input |
| `ladder_sw` | out | 4 | A-D counter, drives the ladder switches |
| `t_an`, `f_supply` | out | 4, 1 | analogue channel switches and thermistor supply |
| `code`, `code_n` | out | 1 | synchronisation code and complement |
| `cmd` | out | 3 | command signals |
| `tm_out`, `tm_load`, `tm_slot` | out | 1, 1, 3 | serial telemetry, word-load marker, slot of the loaded word |
| `div_q` | out | 11 | divider state, for observation |

The analogue parts stay outside the RTL. These are the thermistor networks and
their bus switches, the R-2R ladder with its MOSFET switches, and the
difference-amplifier comparator. The testbenches close the loop with two
behavioural models: `tb/thermistor_bus_model.sv` and
`tb/ladder_comparator_model.sv` (625 mV per step).

`cu_pkg.sv` holds the shared constants: the Barker code, the word width, the
channel, buffer and slot counts, and the gate signal-direction type.

## Where this model departs from the original

* **Synchronous instead of ripple.** Counter stages switch on a common clock
  edge. Transient states exist only where the original circuit structure
  creates them (the 11-state counter reset), and they last one clk.
* **Reset matrix terms.** The original writes the 11-state reset as a product
  of specific counter pins. This model decodes the same step (leaving state
  10) from its own signals. The Barker matrices are likewise written as a
  decode of the 11 states, not as the original transistor network.
* **Sizes and layout that the original leaves open:** 10 divider stages,
  8-word frames, 3 buffers, 4 direct words, the strobe times, the three
  command patterns, one code chip and one telemetry bit per central-clock
  period, MSB-first shifting.
* **Additions:** the A-D full-scale clamp, the power-on reset `rst_n`, and the
  registered command outputs.
* **Not modelled:** the central oscillator, the analogue parts listed above,
  and the electrical side of the gate blocks (load resistors, speed, power).
  Only the Barker adder and the A-D clock gate are built from gate blocks.
  All other logic is written as RTL expressions, not as networks of SC1128
  and SC1173 blocks.

## Simulating

Every testbench in `tb/` checks itself, prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. Build one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_control_unit \
    -y rtl -y tb +libext+.sv -Irtl rtl/cu_pkg.sv tb/tb_control_unit.sv
./obj_dir/Vtb_control_unit
```

* `tb_control_unit` runs the whole unit at its default size for two divider
  periods (4096 clk, 64 frames). It checks every code chip and every command
  cycle, and reads back every telemetry word from the serial line against the
  expected A-D result, buffer contents and direct inputs. It also counts that
  each mechanism happened: comparator stop, full-scale clamp, buffer loads,
  code periods, every command and every channel.
* Each block has its own testbench, named `tb_<module>`. The counter-chain
  testbench checks the slave-fed, master-fed and mixed cascades against closed
  formulas. The code-generator testbench compares three full 121-chip periods
  with the folded-code formula. The A-D testbench checks the result, the
  two-clk step time and the hold.

## Changing it

* **Longer divider:** raise `control_unit.N_STAGES`. At least 7 stages are
  needed for the frame and channel bits.
* **Commands:** edit `MASK`/`VALUE` of the `decode_matrix` instance `u_cmd`.
* **Buffer strobe times:** set `BUF_TIME` of `input_sequencer`.
* **Frame layout:** the slot assignment is the `frame_words` wiring in
  `control_unit.sv`. The slot and bit fields of `q` are used in
  `control_unit.sv` and `input_sequencer.sv`.
* **Code length:** change `BARKER_LEN`/`BARKER11` in `cu_pkg`. Any code of 2 to
  15 chips fits the four-stage counters.
