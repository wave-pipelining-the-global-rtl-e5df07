// tb_fifo_data_latch: self-checking test of one distributed-FIFO data
// latch. Random words and random enable pulses; the testbench keeps the
// expected stored word and checks that the latch takes a word only in a
// cycle with enable high and holds it otherwise.
module tb_fifo_data_latch;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned W = 16;
  logic         clk = 1'b0;
  logic         enable = 1'b0;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] expected;
  int           checks = 0, failures = 0, loads = 0;

  fifo_data_latch #(.WIDTH(W)) dut (.*);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    enable = 1'b1; d = 16'hA5C3;
    @(negedge clk);
    expected = 16'hA5C3;
    enable = 1'b0; d = 16'h0000;
    checks++; if (q !== expected) begin failures++; $display("FAIL first load"); end
    repeat (2000) begin
      @(negedge clk);
      enable = ($urandom_range(3) == 0);
      d      = W'($urandom);
      @(posedge clk);
      if (enable) begin expected = d; loads++; end
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL q=%h expected %h at %0t", q, expected, $time);
      end
    end
    checks++; if (loads < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
