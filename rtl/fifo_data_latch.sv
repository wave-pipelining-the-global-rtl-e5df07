// fifo_data_latch: the data storage of one distributed-FIFO stage.
//
// In the circuit each bit is a pass transistor, gated by the stage's
// local clock (enable), in front of two inverters; a second pass device,
// gated by the inverted enable, closes the loop around the inverters so
// the bit is held while enable is low. One enable drives all WIDTH bits
// (16 in the described channel). Because every local clock is a single
// pulse, this RTL stores the word at the clk edge that ends the one-cycle
// enable pulse instead of building a level-sensitive latch: the stored
// value is the same, and the design stays free of latches. There is no
// reset, as in the circuit; nothing reads a stage before a word has been
// written into it.
//
// Timing: q shows d one cycle after a cycle with enable high.
module fifo_data_latch #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             enable,  // local clock pulse of this stage
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 100fs;

  always_ff @(posedge clk) begin
    if (enable) q <= d;
  end
endmodule
