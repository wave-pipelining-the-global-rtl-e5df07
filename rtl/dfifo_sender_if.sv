// dfifo_sender_if: request generation at the sending module.
//
// The synchronous sending module offers words with a valid/ready
// handshake (tx_valid, tx_data, tx_ready). This block turns an accepted
// word into the request pulse that starts the channel's first control
// stage, and holds the word on the channel's data input until the first
// stage has stored it, since the channel's input state wire only says
// that a word is waiting, not what it is. A request is made only when the
// channel reports room (in_busy low); while the sender keeps tx_valid
// high, requests follow each other as soon as the channel input frees, so
// a burst needs no further control. The handshake and the holding
// register are this design's choices; the design description only says
// that the request pulse is generated from the channel status and
// supports bursts.
//
// Timing: tx_ready = !in_busy in the same cycle; write = tx_valid &&
// tx_ready; data_out holds the word from the cycle after the request.
module dfifo_sender_if #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // synchronous sending module
  input  logic             tx_valid,
  input  logic [WIDTH-1:0] tx_data,
  output logic             tx_ready,
  // channel input
  input  logic             in_busy,
  output logic             write,
  output logic [WIDTH-1:0] data_out
);
  timeunit 1ps;
  timeprecision 100fs;

  assign tx_ready = !in_busy;
  assign write    = tx_valid && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     data_out <= '0;
    else if (write) data_out <= tx_data;
  end
endmodule
