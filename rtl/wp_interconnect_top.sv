// wp_interconnect_top: global interconnect between two far-apart
// synchronous modules, in the two forms described for it.
//
// 1. Distributed FIFO channel (the main design). The sending module's
//    valid/ready port feeds the request generator (dfifo_sender_if), which
//    starts the chain of self-timed control stages of dfifo_channel. Each
//    stage sits where a repeater would be on the long wire, holds a
//    WIDTH-bit word in its latch and makes its own local clock pulse when
//    the word ahead of it has moved on, so no clock tree runs along the
//    wire and nothing toggles while no word is sent. The receiving module
//    sees rx_valid (a word waits at the far end) and takes it with
//    rx_ready. A receiver that stops simply leaves the words stored along
//    the wire; the sender is told through tx_ready when there is no room.
//    Both modules run on clk; one handshake between neighbouring stages
//    takes one clk cycle in this RTL (see dfifo_channel for the timing).
//
// 2. Wave-pipelined repeater line (wp_repeater_channel, a behavioural
//    timing model, not synthesizable). It shows the earlier form of the
//    idea: repeaters without storage, with several words travelling down
//    the line at once between the launch clock wp_clk1 and the capture
//    clock wp_clk2, and flags launches that come too close together
//    (wp_overrun). It is independent of the FIFO channel and has its own
//    ports.
//
// The local clocks of the FIFO stages (local_clk) and the level of every
// state wire (chan_full) are brought out so the channel can be observed;
// chan_full[0] and chan_full[NSTAGES] are the status the two modules use.
module wp_interconnect_top
  import dfifo_pkg::*;
#(
  parameter int unsigned WIDTH   = DATA_W,
  parameter int unsigned NSTAGES = N_STAGES
) (
  input  logic               clk,
  input  logic               rst_n,
  // sending module
  input  logic               tx_valid,
  input  logic [WIDTH-1:0]   tx_data,
  output logic               tx_ready,
  // receiving module
  output logic               rx_valid,
  output logic [WIDTH-1:0]   rx_data,
  input  logic               rx_ready,
  // local clocks of the channel stages
  output logic [NSTAGES-1:0] local_clk,
  // level of every state wire along the channel (1 = a word waits there)
  output logic [NSTAGES:0]   chan_full,
  // wave-pipelined repeater line
  input  logic               wp_clk1,
  input  logic               wp_clk2,
  input  logic [WIDTH-1:0]   wp_d,
  output logic [WIDTH-1:0]   wp_q,
  output logic               wp_overrun  // launches closer than one stage
);
  timeunit 1ps;
  timeprecision 100fs;

  logic               write, in_busy;
  logic [WIDTH-1:0]   chan_in;

  dfifo_sender_if #(.WIDTH(WIDTH)) u_sender (
    .clk     (clk),
    .rst_n   (rst_n),
    .tx_valid(tx_valid),
    .tx_data (tx_data),
    .tx_ready(tx_ready),
    .in_busy (in_busy),
    .write   (write),
    .data_out(chan_in)
  );

  dfifo_channel #(.WIDTH(WIDTH), .NSTAGES(NSTAGES)) u_channel (
    .clk      (clk),
    .rst_n    (rst_n),
    .write    (write),
    .data_in  (chan_in),
    .in_busy  (in_busy),
    .read     (rx_ready),
    .data_out (rx_data),
    .out_valid(rx_valid),
    .enable   (local_clk),
    .wire_full(chan_full),
    .node_b   ()
  );

  wp_repeater_channel #(.WIDTH(WIDTH)) u_wave_line (
    .clk1   (wp_clk1),
    .clk2   (wp_clk2),
    .d      (wp_d),
    .q      (wp_q),
    .overrun(wp_overrun)
  );
endmodule
