// tb_wp_repeater_channel: self-checking test of the wave-pipelined
// repeater line model (three repeater stages of 228.5 ps each).
//
// For several clock periods it launches a new random word every cycle of
// clk1 and checks, at every falling edge of clk2, that the output holds
// the word launched a fixed number of cycles earlier: the line delay
// (685.5 ps) is longer than the clock period, so several words are on the
// wire at once and none is lost or mixed. The expected numbers are worked
// out by hand from the launch instant (10 ps after the rising edge of
// clk1) and the capture instant (falling edge of clk2, skew after clk1):
//   period 250 ps, skew   0 -> 3 cycles, 3 waves on the line
//   period 300 ps, skew   0 -> 2 cycles, 3 waves on the line
//   period 300 ps, skew 120 -> 2 cycles
//   period 500 ps, skew   0 -> 1 cycle,  2 waves on the line
//   period 1100 ps, skew  0 -> 1 cycle,  1 wave on the line
// Periods of 250 ps and more are legal; 200 ps must raise overrun.
// (The number of waves on the line is the line delay over the period,
// rounded up: 3, 2 and 1 for these periods.) A period of 300 ps with a
// two-cycle delay proves that words overlap on the wire.
module tb_wp_repeater_channel;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned W = 16;
  logic         clk1 = 1'b0, clk2 = 1'b0;
  logic [W-1:0] d = '0, q;
  logic         overrun;
  int           checks = 0, failures = 0;
  logic         done = 1'b0;

  wp_repeater_channel #(.WIDTH(W)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int period, input int skew, input int lat, input logic exp_overrun);
    logic [W-1:0] sent[64];
    for (int k = 0; k < 64; k++) sent[k] = W'($urandom);
    fork
      begin : launch
        for (int k = 0; k < 64; k++) begin
          clk1 = 1'b1;
          #10 d = sent[k];
          #(period / 2 - 10) clk1 = 1'b0;
          #(period - period / 2);
        end
      end
      begin : capture
        #(skew);
        for (int j = 0; j < 64; j++) begin
          clk2 = 1'b1;
          #(period / 2) clk2 = 1'b0;
          #1;
          if (j >= 2)
            check(overrun == exp_overrun, $sformatf("T=%0d: overrun flag %0b", period, exp_overrun));
          if (j >= lat + 2 && !exp_overrun) begin
            check(q == sent[j - lat], $sformatf("T=%0d: word %0d after %0d cycles", period, j - lat, lat));
          end
          #(period - period / 2 - 1);
        end
      end
    join
    #2000;
  endtask

  initial begin
    run(300, 0, 2, 1'b0);
    run(300, 120, 2, 1'b0);
    run(500, 0, 1, 1'b0);
    run(1100, 0, 1, 1'b0);
    // Launches 200 ps apart are closer than one repeater stage (two
    // inverter delays, 228.5 ps): the model must report overrun.
    run(200, 0, 0, 1'b1);
    run(250, 0, 3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
