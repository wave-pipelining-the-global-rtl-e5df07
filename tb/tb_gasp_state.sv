// tb_gasp_state: self-checking test of one state wire with its keeper.
// Random pulls (never both at once, as in a working channel); the
// testbench keeps the expected level: a pull to full makes the wire
// WIRE_FULL (low) from the next cycle, a pull to empty makes it
// WIRE_EMPTY (high), and with no pull the keeper holds the level.
module tb_gasp_state;
  timeunit 1ps;
  timeprecision 100fs;
  import dfifo_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        pull_full = 1'b0, pull_empty = 1'b0;
  wire_state_t state;
  logic        exp_full;
  int          checks = 0, failures = 0, holds = 0;

  gasp_state dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_full = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (state != WIRE_EMPTY) failures++;
    rst_n = 1'b1;
    repeat (2000) begin
      int r;
      @(negedge clk);
      r = $urandom_range(3);
      pull_full  = (r == 0);
      pull_empty = (r == 1);
      if (r >= 2) holds++;
      @(posedge clk);
      if (pull_full) exp_full = 1'b1;
      else if (pull_empty) exp_full = 1'b0;
      #1;
      checks++;
      if (state != (exp_full ? WIRE_FULL : WIRE_EMPTY)) begin
        failures++;
        $display("FAIL level at %0t", $time);
      end
    end
    checks++; if (holds < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
