# Four-cylinder electronic fuel ignition sequencer

A four-cylinder engine needs one spark per cylinder, in turn, over and over.
This design produces that pattern as a small Moore state machine. It has four
outputs, `Y[3]` to `Y[0]`, and each one drives the spark mechanism of one
cylinder. A spark fires on the rising edge of an output. A mechanic's
pushbutton (`RST`, active low) stops the sequence and holds every output low.

The target is a 50 MHz clock (20 ns period). There each spark pulse is 100 ns
wide and each cylinder fires once every 400 ns.

## The state machine

There are 21 states:

| state      | Y[3] | Y[2] | Y[1] | Y[0] |
|------------|:----:|:----:|:----:|:----:|
| S0 (reset) |  0   |  0   |  0   |  0   |
| S1 .. S5   |  1   |  0   |  0   |  0   |
| S6 .. S10  |  0   |  1   |  0   |  0   |
| S11 .. S15 |  0   |  0   |  1   |  0   |
| S16 .. S20 |  0   |  0   |  0   |  1   |

- While `RST` is low at a rising clock edge, the machine goes to S0, and all
  outputs are 0 after that edge.
- On the first rising edge with `RST` high, S0 moves to S1. `Y[3]` rises
  right after that edge, with no extra clock of latency.
- After that, each edge moves the state on by one. S20 goes back to S1, so
  the 20-state train repeats for as long as `RST` stays high.
- The outputs depend only on the state. Each output stays high for five
  consecutive states, and every waveform state has exactly one output high.

Two of these rules come from the specification: S0 is all zeros, and `Y[3]`
is high in S1 to S5. It also fixes the 5-state pulse and the 20-state train.
It does not say in which order the other three outputs follow. This design
uses the descending order `Y[2]`, `Y[1]`, `Y[0]`. To get a different firing
order, change `spark_pattern` in `rtl/engine_pkg.sv`. Each range there says
which output is high; nothing else changes.

### Reset

`RST` is sampled on the rising edge of `CLK`, which makes it a synchronous
reset. Holding the button keeps the machine in S0. The RTL has no
metastability synchronizer on `RST`. If the button feeds the pin directly, a
rare metastable sample can delay the reset or the restart by one clock.
Adding a two-flop synchronizer in front of `RST` fixes this, but it delays
the reset by two clocks.

### Encoding and unused codes

The state is a 5-bit binary number, with S0 = 0. Codes 21 to 31 are never
reached from reset. If one does appear, it outputs 0 and moves to S1 on the
next edge, so the machine cannot get stuck outside the train.

### Output timing

`Y` is decoded combinationally from the state register. Each output changes
only after a clock edge, but the decode can glitch briefly while the state
bits settle. A spark mechanism that reacts to very short pulses should get a
registered copy of `Y`, which costs one clock of latency. The pulse widths
are exact multiples of the clock: 5 × 20 ns = 100 ns wide, and 20 × 20 ns =
400 ns from one pulse of an output to the next.

## Files

- `rtl/engine_pkg.sv` holds the constants: 4 cylinders, 5 states per pulse,
  20 waveform states. It also holds the state enum `state_t`, the output type
  `spark_t`, and two functions: `next_state` (transitions) and
  `spark_pattern` (output table).
- `rtl/engine.sv` is the top module. Its ports are `CLK`, `RST` and
  `Y[3:0]`. It holds the state register, the output decode, and two
  assertions: reset clears the outputs, and exactly one output is high in
  any waveform state.
- `tb/engine_tb.sv` is the self-checking testbench. It runs the design at its
  only configuration.

After synthesis the design has 5 flip-flops and a few dozen small gates.

Board pin names, for a DE10-Lite style board: `CLK` on the 50 MHz
oscillator, `RST` on push button KEY0, and `Y[3:0]` on GPIO header pins
GPIO[3:0]. These assignments belong in the FPGA project's pin file, not in
the RTL.

## Verification

The testbench uses a 20 ns clock. It changes `RST` only halfway between
rising edges. It starts with `RST` low for two clock periods. Its reference
model is a free-running phase counter, not a copy of the state machine. After
every rising edge the testbench compares `Y` with that model. It also checks
these points in simulation time:

- Every pulse is 100 ns wide.
- Each output fires again 400 ns later.
- Outputs fire in the order 3, 2, 1, 0, 3, ..., 100 ns apart.
- `Y[3]` rises on the first edge after reset is released.

After four full trains it resets the machine in mid-train for three clocks.
It then runs 400 clocks with randomly timed resets. It counts each mechanism
and fails if one never happens: a reset event, a reset held over several
clocks, a start from reset, the wrap from S20 to S1, a reset in mid-train,
and a spark on each output. It ends with a line
`TB_RESULT checks=N failures=M`. A watchdog stops it after 2000 clocks.

To run it with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/engine_pkg.sv rtl/engine.sv \
          tb/engine_tb.sv --top-module engine_tb -o sim
./obj_dir/sim
```

The whole run takes 11 µs of simulated time and passes with about 630
checks. Swapping in a faulty state machine makes it fail. In that fault S20
wraps to S2 instead of S1, which shortens every `Y[3]` pulse after the first
by one clock.

## Limits

- The firing order after `Y[3]` is an assumption, as described above.
  Everything else in the output table follows from the specification's
  rules.
- The design does not cover the rest of the system: the 12 V or USB power
  supply, the oscillator, the pushbutton, the spark drivers, and the board.
  Those parts are analog or off-the-shelf and have no logic to write.
- Timing closure at 50 MHz on a real FPGA has not been run here. The critical
  path is a 5-bit increment and compare, so timing is not expected to be a
  concern.
