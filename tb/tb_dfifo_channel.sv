// tb_dfifo_channel: self-checking test of the distributed FIFO channel.
//
// The testbench plays both modules. It acts as sender (request only when
// the channel input is free, word held on data_in) and as receiver, and
// checks the channel three ways:
//  * a cycle-by-cycle reference of the state wires written from the
//    firing rule (stage i fires when wire i is full and wire i+1 empty),
//    compared with the enables and the wire levels;
//  * a scoreboard: every word comes out once, unchanged and in order;
//  * directed timing: one word takes N+1 cycles from request to
//    out_valid with the enables firing in order one cycle apart, a burst
//    moves one word every two cycles, a stalled receiver lets the channel
//    fill to N+1 words and block the sender, and after the stall words
//    leave on consecutive read opportunities without refill cycles.
module tb_dfifo_channel;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned W = 16;
  localparam int unsigned N = 3;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           write = 1'b0, read = 1'b0;
  logic [W-1:0]   data_in = '0;
  logic           in_busy, out_valid;
  logic [W-1:0]   data_out;
  logic [N-1:0]   enable, node_b;
  logic [N:0]     wire_full;

  int checks = 0, failures = 0;
  logic [W-1:0] sb[$];
  logic [N:0]   ref_full;
  int           cycle = 0;

  dfifo_channel #(.WIDTH(W), .NSTAGES(N)) dut (.*);

  always #500 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model and scoreboard, sampled just before every edge.
  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] fire;
    logic         take;
    #400;  // stimulus for this cycle has settled
    for (int i = 0; i < N; i++) fire[i] = ref_full[i] && !ref_full[i+1];
    check(enable == fire, "enables follow the firing rule");
    check(node_b == ~fire, "node B low exactly while firing");
    check(wire_full == ref_full, $sformatf("state wire levels dut=%b ref=%b w=%b r=%b", wire_full, ref_full, write, read));
    take = read && ref_full[N];
    if (read && out_valid) begin
      check(sb.size() > 0, "no word out of nothing");
      if (sb.size() > 0) check(data_out == sb.pop_front(), "word order and value");
    end
    if (write) sb.push_back(data_in);
    @(posedge clk);
    for (int i = 0; i < N; i++) if (fire[i]) begin ref_full[i] = 1'b0; ref_full[i+1] = 1'b1; end
    if (take) ref_full[N] = 1'b0;
    if (write) ref_full[0] = 1'b1;
  end

  // Drive one cycle from the negative edge.
  task automatic step(input logic do_write, input logic [W-1:0] w, input logic do_read);
    @(negedge clk);
    write = do_write && !in_busy;
    if (write) data_in = w;
    read = do_read;
  endtask

  initial begin
    int t0, t_valid, n_out, first, last;
    ref_full = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. A single word: enables fire in order, one cycle apart.
    step(1, 16'h1234, 0);
    t0 = cycle;
    step(0, 0, 0);
    for (int i = 0; i < N; i++) begin
      #400;
      check(enable == (N'(1) << i), "single word: one enable at a time, in order");
      step(0, 0, 0);
    end
    #400;
    check(out_valid && data_out == 16'h1234, "single word arrives");
    t_valid = cycle;
    check(t_valid - t0 == N + 1, "latency N+1 cycles from request");
    step(0, 0, 1);
    step(0, 0, 0);
    #400;
    check(!out_valid && wire_full == '0, "channel empty again");
    check(enable == '0, "no local clock while idle");

    // 2. Burst with the receiver always reading: one word per two cycles.
    n_out = 0; first = 0; last = 0;
    for (int k = 0; k < 40; k++) begin
      step(1, W'(16'h100 + k), 1);
      #400;
      if (read && out_valid) begin
        if (n_out == 0) first = cycle;
        last = cycle;
        n_out++;
      end
    end
    check(n_out >= 15, "burst delivered words");
    check((last - first) == 2 * (n_out - 1), "burst rate one word per two cycles");
    repeat (12) step(0, 0, 1);

    // 3. Receiver stalls: channel fills to N+1 words, sender is blocked.
    for (int k = 0; k < 20; k++) step(1, W'(16'h200 + k), 0);
    #400;
    check(in_busy, "sender blocked when the channel is full");
    check(wire_full == '1, "all state wires full");
    check(sb.size() == N + 1, "channel holds N+1 words");
    // 4. Restart: the word at the end leaves at once, the next one follows
    //    two cycles later without any refill delay.
    step(0, 0, 1);
    #400; check(out_valid, "word waiting at restart");
    step(0, 0, 1);
    #400; check(!out_valid, "wire emptied by the read");
    step(0, 0, 1);
    #400; check(out_valid, "next word two cycles after restart");
    repeat (12) step(0, 0, 1);
    check(sb.size() == 0, "all stalled words delivered");

    // 5. Random traffic.
    for (int k = 0; k < 3000; k++)
      step($urandom_range(1), W'($urandom), $urandom_range(2) != 0);
    repeat (20) step(0, 0, 1);
    #400;
    check(sb.size() == 0, "random traffic drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
