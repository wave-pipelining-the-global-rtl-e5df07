// tb_gasp_ctrl: self-checking test of one GasP control stage.
//
// Drives the A state wire and the downstream "take" (c_pull_empty) with
// random values and compares node B, the enable pulse, the pull on A and
// the level of the stage's own C wire with a reference model kept in the
// testbench: the stage fires exactly when A holds a word and C is free,
// firing marks C full in the next cycle, a take marks it empty. Also
// checks that a single word passes in one cycle and that the enable is a
// one-cycle pulse when A is emptied by the firing.
module tb_gasp_ctrl;
  timeunit 1ps;
  timeprecision 100fs;
  import dfifo_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  wire_state_t a_state = WIRE_EMPTY;
  logic        c_pull_empty = 1'b0;
  logic        a_pull_empty, node_b, enable;
  wire_state_t c_state;
  int          checks = 0, failures = 0;
  int          fires = 0;
  logic        ref_c_full;

  gasp_ctrl dut (.*);

  always #500 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_c_full = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(c_state == WIRE_EMPTY, "C empty after reset");
    check(node_b == 1'b1 && enable == 1'b0, "idle: no pulse after reset");

    // One word: A full, C free -> fires once, A is taken, C becomes full.
    a_state = WIRE_FULL;
    #1;
    check(enable == 1'b1 && node_b == 1'b0 && a_pull_empty == 1'b1, "fires on A full, C empty");
    @(posedge clk); #1;
    a_state = WIRE_EMPTY;  // the P1 pull took effect on the A keeper
    #1;
    check(c_state == WIRE_FULL, "C full one cycle after firing");
    check(enable == 1'b0, "enable is a single-cycle pulse");
    // Word waiting at A, C still full: the stage must hold off.
    a_state = WIRE_FULL;
    #1;
    check(enable == 1'b0 && node_b == 1'b1, "no fire while C full");
    @(posedge clk); #1;
    check(c_state == WIRE_FULL, "C keeps its level");
    c_pull_empty = 1'b1;  // next stage takes the word
    @(posedge clk); #1;
    c_pull_empty = 1'b0;
    check(c_state == WIRE_EMPTY, "take empties C");
    check(enable == 1'b1, "waiting word fires once C is free");
    @(posedge clk); #1;
    a_state = WIRE_EMPTY;
    ref_c_full = 1'b1;

    // Random stimulus against the reference model.
    repeat (2000) begin
      logic exp_fire;
      @(negedge clk);
      a_state      = ($urandom_range(1) == 1) ? WIRE_FULL : WIRE_EMPTY;
      c_pull_empty = ref_c_full && ($urandom_range(2) == 0);
      #1;
      exp_fire = (a_state == WIRE_FULL) && !ref_c_full;
      check(enable == exp_fire, "enable = A full & C empty");
      check(node_b == !exp_fire, "node B is the NAND");
      check(a_pull_empty == exp_fire, "A pulled empty on firing");
      check(c_state == (ref_c_full ? WIRE_FULL : WIRE_EMPTY), "C level");
      if (exp_fire) fires++;
      @(posedge clk);
      if (exp_fire) ref_c_full = 1'b1;
      else if (c_pull_empty) ref_c_full = 1'b0;
    end
    check(fires > 100, "stage fired often under random stimulus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
