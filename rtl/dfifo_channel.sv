// dfifo_channel: a global interconnect given memory - a FIFO distributed
// along a long wire, moved by local clocks made on demand.
//
// Instead of repeaters that only re-drive the wire, every repeater site
// holds a data latch (fifo_data_latch) and a self-timed control stage
// (gasp_ctrl). N_STAGES stages form a chain; between neighbours runs one
// state wire, so there are N_STAGES+1 state wires S0..S[N_STAGES]:
//   S0            : set full by the sender's write request, the word
//                   itself waits on data_in (held by the sender);
//   S[i], i >= 1  : set full by stage i-1 when it stores a word in its
//                   latch, set empty by stage i (or, for the last wire,
//                   by the receiver's read) when the word moves on.
// Stage i fires when S[i] is full and S[i+1] is empty; its enable pulse
// is the local clock that loads latch i. Two neighbouring stages can
// never fire together, because they see the shared wire at opposite
// levels. No clock runs through the channel when nothing is sent: every
// enable is a pulse made by a request.
//
// Channel status for the two modules comes from the end wires:
//   in_busy   = S0 is full    (the sender must not write),
//   out_valid = S[N] is full  (the receiver may read data_out).
// The local clocks (enable), the active-low NAND nodes (node_b) and the
// level of every state wire (wire_full) are brought out for observation.
//
// Timing (this design's one-cycle-per-handshake abstraction of the
// self-timed circuit): a word written in cycle t is stored by stage 0 in
// cycle t+1, by stage i in cycle t+1+i, and out_valid rises in cycle
// t+1+N_STAGES. A wire must go empty before its upstream stage can fill it
// again, so a burst moves one word every two cycles. The channel holds up
// to N_STAGES words in its latches plus one waiting at the sender.
// Stalling the receiver just leaves words in their latches; when read
// resumes they move on at once, with no cycles lost to refill.
module dfifo_channel
  import dfifo_pkg::*;
#(
  parameter int unsigned WIDTH   = DATA_W,
  parameter int unsigned NSTAGES = N_STAGES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sending module side
  input  logic                 write,      // request pulse (NMOS N1 on S0)
  input  logic [WIDTH-1:0]     data_in,    // held stable while in_busy
  output logic                 in_busy,    // S0 full: no room to write
  // receiving module side
  input  logic                 read,       // take the word (PMOS P3 on S[N])
  output logic [WIDTH-1:0]     data_out,
  output logic                 out_valid,  // S[N] full: a word is waiting
  // observation of the local clocks and the state wires
  output logic [NSTAGES-1:0]   enable,
  output logic [NSTAGES:0]     wire_full,
  output logic [NSTAGES-1:0]   node_b      // NAND nodes, low while firing
);
  timeunit 1ps;
  timeprecision 100fs;

  wire_state_t             s_state   [NSTAGES+1];
  logic        [NSTAGES:0] pull_empty;
  logic        [WIDTH-1:0] stage_d   [NSTAGES];
  logic        [WIDTH-1:0] stage_q   [NSTAGES];

  // S0 lives at the channel input; the sender's write pulls it full.
  gasp_state u_s0 (
    .clk       (clk),
    .rst_n     (rst_n),
    .pull_full (write),
    .pull_empty(pull_empty[0]),
    .state     (s_state[0])
  );

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    gasp_ctrl u_ctrl (
      .clk         (clk),
      .rst_n       (rst_n),
      .a_state     (s_state[i]),
      .a_pull_empty(pull_empty[i]),
      .c_pull_empty(pull_empty[i+1]),
      .c_state     (s_state[i+1]),
      .node_b      (node_b[i]),
      .enable      (enable[i])
    );

    fifo_data_latch #(.WIDTH(WIDTH)) u_latch (
      .clk   (clk),
      .enable(enable[i]),
      .d     (stage_d[i]),
      .q     (stage_q[i])
    );
  end

  // Stage 0 loads the sender's word, every later stage its neighbour's.
  assign stage_d[0] = data_in;
  for (genvar i = 1; i < NSTAGES; i++) begin : g_link
    assign stage_d[i] = stage_q[i-1];
  end

  // The receiver's read empties the last wire.
  assign pull_empty[NSTAGES] = read && (s_state[NSTAGES] == WIRE_FULL);

  for (genvar i = 0; i <= NSTAGES; i++) begin : g_status
    assign wire_full[i] = (s_state[i] == WIRE_FULL);
  end

  assign in_busy   = wire_full[0];
  assign out_valid = wire_full[NSTAGES];
  assign data_out  = stage_q[NSTAGES-1];

  // The sender may only request while the channel input is free;
  // a request on a full input would overwrite a waiting word.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 write |-> !in_busy)
    else $error("write request while the channel input is full");
  // Neighbouring stages never fire in the same cycle.
  a_no_adjacent_fire: assert property (@(posedge clk) disable iff (!rst_n)
                                       (enable & (enable >> 1)) == '0)
    else $error("two neighbouring stages fired together");
endmodule
