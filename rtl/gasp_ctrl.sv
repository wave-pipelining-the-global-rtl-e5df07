// gasp_ctrl: one control stage of the distributed FIFO (the minimal
// GasP-style FIFO control circuit).
//
// The stage watches two state wires: A, in front of its latch, and C,
// behind it. Node B is a NAND of "A full" (the inverted A node) and
// "C empty"; it falls when a word waits at A and the place at C is free.
// The inverted node B (here `enable`) is the local clock pulse. Following
// the modified circuit it is an AND gate output with a fan-out of three:
// it opens the stage's data latch, pulls A back high (a_pull_empty, the
// PMOS P1: the word has been taken) and pulls C low (the NMOS N4: a word
// now waits at C). The stage owns the keeper of wire C; the next stage,
// or the receiver's read, empties it through c_pull_empty (P3).
//
// In the circuit the pulse ends by itself once A has gone high, a few gate
// delays later. In this RTL the whole handshake is one cycle of clk:
// enable is high for exactly one cycle, because in the next cycle A is
// empty. Going from a request at A to a word waiting at C therefore takes
// one cycle per stage. The gate structure follows the design description;
// clocking it by clk, and the reset, are this design's choices.
//
// Ports: a_state in, c_pull_empty in; enable, a_pull_empty, node_b,
// c_state out. node_b is active low, as in the circuit.
module gasp_ctrl
  import dfifo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  wire_state_t a_state,       // state wire in front of the latch
  output logic        a_pull_empty,  // P1: mark A free again
  input  logic        c_pull_empty,  // P3 (read): next stage took the word
  output wire_state_t c_state,       // state wire behind the latch
  output logic        node_b,        // NAND output, low while firing
  output logic        enable         // local clock to the data latch
);
  timeunit 1ps;
  timeprecision 100fs;

  logic a_full_n;  // the inverted A node: high when a word waits at A
  logic c_empty;   // node C high: place behind the latch is free

  assign a_full_n = (a_state == WIRE_FULL);
  assign c_empty  = (c_state == WIRE_EMPTY);

  // NAND with fan-out of one, followed by the AND stage (fan-out three).
  assign node_b       = ~(a_full_n & c_empty);
  assign enable       = ~node_b;
  assign a_pull_empty = enable;

  // Keeper on node C, pulled low by N4 (enable) and high by P3.
  gasp_state u_c_wire (
    .clk       (clk),
    .rst_n     (rst_n),
    .pull_full (enable),
    .pull_empty(c_pull_empty),
    .state     (c_state)
  );
endmodule
