// gasp_state: one state wire of the distributed FIFO with its keeper.
//
// In the transistor-level control circuit a state node is pulled low by
// an NMOS device of the stage that puts a word in front of it (or by the
// sender's write request) and pulled high by a PMOS device of the stage
// that takes the word away (or by the receiver's read). Two back-to-back
// inverters keep the level in between. Here that node is one flip-flop
// on the handshake clock: pull_full sets it to WIRE_FULL, pull_empty
// sets it to WIRE_EMPTY, otherwise it holds. The two pulls come from the
// two stages that share the wire and are never active in the same cycle
// in a working channel; an assertion checks that.
//
// Timing: the new level is visible one clk cycle after the pull.
// Reset (not part of the original circuit) empties the wire.
module gasp_state
  import dfifo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pull_full,   // NMOS pull-down: mark a word waiting
  input  logic        pull_empty,  // PMOS pull-up: mark the place free
  output wire_state_t state
);
  timeunit 1ps;
  timeprecision 100fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state <= WIRE_EMPTY;
    else if (pull_full)  state <= WIRE_FULL;
    else if (pull_empty) state <= WIRE_EMPTY;
  end

  // A wire is never driven both ways at once (that would be a short
  // between the pull-up and the pull-down).
  a_no_fight: assert property (@(posedge clk) disable iff (!rst_n)
                               !(pull_full && pull_empty))
    else $error("state wire pulled high and low in the same cycle");
endmodule
