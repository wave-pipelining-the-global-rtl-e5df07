// tb_dfifo_sender_if: self-checking test of the request generator.
// Random tx_valid and channel status; checks that a request is issued
// exactly when the sender offers a word and the channel input is free,
// that tx_ready mirrors the channel status, and that the accepted word is
// held on the channel input until the next request, including back-to-back
// requests in a burst.
module tb_dfifo_sender_if;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned W = 16;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         tx_valid = 1'b0, in_busy = 1'b0;
  logic [W-1:0] tx_data = '0;
  logic         tx_ready, write;
  logic [W-1:0] data_out, held;
  int           checks = 0, failures = 0, writes = 0, blocked = 0;

  dfifo_sender_if #(.WIDTH(W)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      logic exp_write;
      @(negedge clk);
      tx_valid = ($urandom_range(3) != 0);
      in_busy  = ($urandom_range(2) == 0);
      tx_data  = W'($urandom);
      #1;
      exp_write = tx_valid && !in_busy;
      check(tx_ready == !in_busy, "tx_ready follows channel status");
      check(write == exp_write, "request only when offered and free");
      check(data_out == held, "word held on channel input");
      if (exp_write) writes++;
      if (tx_valid && in_busy) blocked++;
      @(posedge clk);
      if (exp_write) held = tx_data;
    end
    check(writes > 500 && blocked > 300, "both requests and blocked cycles seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
