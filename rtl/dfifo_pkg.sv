// dfifo_pkg: types and constants shared by the distributed-FIFO channel.
//
// The channel is a chain of self-timed control stages (GasP style) that
// pass data words from a sending module to a receiving module through
// latches spread along a long global wire. Between two neighbouring
// control stages runs one "state wire" that says whether the latch in
// front of it holds a word that still has to move on. Its encoding
// follows the control-circuit drawing: the upstream stage pulls the wire
// LOW to mark it FULL, the downstream stage pulls it HIGH to mark it
// EMPTY, and a weak keeper holds it in between.
//
// DATA_W (16 bits driven by each local clock) and N_STAGES (three
// control stages) are the figures used for the channel in the design
// description. Everything else here is this design's own choice.
package dfifo_pkg;
  timeunit 1ps;
  timeprecision 100fs;

  // Bits of the data bus driven by one local clock (enable) signal.
  parameter int unsigned DATA_W   = 16;
  // Number of control stages (local clocks) along the channel.
  parameter int unsigned N_STAGES = 3;

  // Level of a state wire. Low means a word is waiting, high means the
  // place is free, as in the transistor-level control circuit.
  typedef enum logic {
    WIRE_FULL  = 1'b0,
    WIRE_EMPTY = 1'b1
  } wire_state_t;
endpackage
