// engine_pkg: shared types and constants of the four-cylinder ignition
// sequencer.
//
// The sequencer is a Moore machine with one reset state (S0) and twenty
// waveform states (S1..S20). Each of the four spark outputs is high for
// PULSE_STATES consecutive waveform states, and the outputs take turns, so
// the twenty waveform states hold exactly one high output each. The state
// count, the pulse length of five states and the fact that Y3 is the output
// high in S1..S5 come from the specification; the order in which the other
// three outputs follow (Y2 in S6..S10, Y1 in S11..S15, Y0 in S16..S20) is
// this design's own choice, the simplest one that gives every waveform state
// a high output.
`timescale 1ns / 1ps
package engine_pkg;

  // Number of spark outputs, one per cylinder.
  localparam int unsigned N_CYL = 4;
  // Number of consecutive states during which one output stays high.
  localparam int unsigned PULSE_STATES = 5;
  // Waveform states in one period of the pulse train (N_CYL * PULSE_STATES).
  localparam int unsigned N_WAVE_STATES = N_CYL * PULSE_STATES;

  // State encoding: plain binary, S0 = 0 is the reset state.
  typedef enum logic [4:0] {
    S0  = 5'd0,
    S1  = 5'd1,  S2  = 5'd2,  S3  = 5'd3,  S4  = 5'd4,  S5  = 5'd5,
    S6  = 5'd6,  S7  = 5'd7,  S8  = 5'd8,  S9  = 5'd9,  S10 = 5'd10,
    S11 = 5'd11, S12 = 5'd12, S13 = 5'd13, S14 = 5'd14, S15 = 5'd15,
    S16 = 5'd16, S17 = 5'd17, S18 = 5'd18, S19 = 5'd19, S20 = 5'd20
  } state_t;

  // The spark outputs, bit i drives cylinder i.
  typedef logic [N_CYL-1:0] spark_t;

  // Successor of a state while reset is released: S0 starts the train at S1,
  // S20 (the last waveform state) wraps to S1, and so do the unused codes
  // 21..31; every other state advances by one.
  function automatic state_t next_state(input state_t s);
    if (s == S0 || s >= state_t'(N_WAVE_STATES)) return S1;
    return state_t'(s + 5'd1);
  endfunction

  // Moore output of a state: all zero in S0 (and in the unused codes 21..31),
  // otherwise one-hot, Y3 first.
  function automatic spark_t spark_pattern(input state_t s);
    unique case (s) inside
      [S1:S5]:   return 4'b1000;
      [S6:S10]:  return 4'b0100;
      [S11:S15]: return 4'b0010;
      [S16:S20]: return 4'b0001;
      default:   return 4'b0000;
    endcase
  endfunction

endpackage
