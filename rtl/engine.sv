// engine: four-cylinder electronic fuel ignition sequencer (top level).
//
// A Moore finite state machine with 21 states generates a repeating train of
// spark pulses on Y[3:0], one output per cylinder; a spark fires on each 0->1
// edge of an output. S0 is the reset state with all outputs low. S1..S20 are
// the waveform states: the machine steps through them once per clock and
// wraps from S20 back to S1, so the train repeats every 20 clocks. Each
// output is high for five consecutive states: at the specified 50 MHz clock
// (20 ns) that is a 100 ns pulse, repeated every 400 ns.
//
// Interface
//   CLK  50 MHz clock, rising edge active.
//   RST  active-low reset pushbutton, sampled on the rising edge of CLK
//        (a synchronous reset). While it is low the machine is held in S0.
//   Y    spark outputs, Y[3] for cylinder 3 down to Y[0] for cylinder 0.
//
// Timing
//   The first rising edge of CLK with RST low puts the machine in S0 and Y
//   goes to 0. The first rising edge with RST high moves it from S0 to S1,
//   and Y[3] rises right after that edge. Y is decoded from the state
//   register alone (Moore), so it changes only after a clock edge; the
//   decode is combinational, as in the specification's single-file
//   behavioural machine, and a board that needs glitch-free pins can add an
//   output register at the cost of one clock of latency.
//
// What follows the specification: the 21 states, reset behaviour, pulse
// length, Y3 high in S1..S5, and the pin names. This design's own choices:
// the binary state encoding, that the remaining outputs fire in the order
// Y2, Y1, Y0 (see engine_pkg), and that unused state codes return to S1.
`timescale 1ns / 1ps
module engine
  import engine_pkg::*;
(
  input  logic   CLK,
  input  logic   RST,
  output spark_t Y
);

  state_t state;

  // State register with synchronous active-low reset.
  always_ff @(posedge CLK) begin
    if (!RST) state <= S0;
    else      state <= next_state(state);
  end

  // Moore output decode.
  always_comb Y = spark_pattern(state);

  // Rules of the machine: reset clears every output on the next edge, and
  // every waveform state has exactly one output high.
  a_reset_clears : assert property (@(posedge CLK) !RST |=> Y == '0);
  a_one_spark    : assert property (@(posedge CLK) state != S0 |-> $onehot(Y));

endmodule
