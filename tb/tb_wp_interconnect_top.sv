// tb_wp_interconnect_top: end-to-end test of the interconnect at its
// default size (16-bit words, three channel stages).
//
// Distributed FIFO channel: the testbench is the sending module (random
// valid, new word after each accepted one) and the receiving module
// (random ready). A scoreboard checks that every word arrives once,
// unchanged and in order. Directed phases first measure a single word's
// trip (request to rx_valid in NSTAGES+1 cycles, the local clocks firing
// once each, in order) and a full-speed burst (one word every two
// cycles). Counted mechanisms, each of which must occur: request pulses,
// back-to-back burst requests, sender blocked by a full channel, channel
// completely full, receiver stall with a word waiting, restart after a
// stall, idle cycles with no local clock at all, and every stage's local
// clock.
//
// Wave-pipelined line: driven at the same time with a 300 ps clock; every
// captured word must be the one launched two cycles earlier and no overrun
// may be flagged. At the end a few launches 200 ps apart must raise the
// overrun flag (counted as a mechanism too).
module tb_wp_interconnect_top;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned W = 16;
  localparam int unsigned N = 3;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         tx_valid = 1'b0, rx_ready = 1'b0;
  logic [W-1:0] tx_data = '0;
  logic         tx_ready, rx_valid;
  logic [W-1:0] rx_data;
  logic [N-1:0] local_clk;
  logic [N:0]   chan_full;
  logic         wp_clk1 = 1'b0, wp_clk2 = 1'b0;
  logic [W-1:0] wp_d = '0, wp_q;
  logic         wp_overrun;
  int           n_overrun = 0;

  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] sb[$];
  // mechanism counters
  int n_request = 0, n_burst = 0, n_tx_blocked = 0, n_full = 0;
  int n_rx_stall = 0, n_restart = 0, n_idle = 0;
  int n_local[N];
  int last_req = -10, stall_len = 0, n_delivered = 0;
  logic wp_run = 1'b1, wp_done = 1'b0;

  wp_interconnect_top dut (.*);

  always #225 clk = ~clk;  // 450 ps cycle
  always @(posedge clk) cycle++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: scoreboard and mechanism counters, sampled before each edge.
  always @(negedge clk) if (rst_n) begin
    #200;
    if (tx_valid && tx_ready) begin
      sb.push_back(tx_data);
      n_request++;
      if (cycle - last_req == 2) n_burst++;
      last_req = cycle;
    end
    if (tx_valid && !tx_ready) n_tx_blocked++;
    if (chan_full == '1) n_full++;
    if (rx_valid && !rx_ready) begin n_rx_stall++; stall_len++; end
    if (rx_valid && rx_ready) begin
      if (stall_len >= 3) n_restart++;
      n_delivered++;
      stall_len = 0;
      check(sb.size() > 0, "word out of an empty channel");
      if (sb.size() > 0) check(rx_data == sb.pop_front(), "word order and value");
    end
    if (chan_full == '0 && !(tx_valid && tx_ready)) begin
      n_idle++;
      check(local_clk == '0, "no local clock while idle");
    end
    for (int i = 0; i < N; i++) if (local_clk[i]) n_local[i]++;
    check((local_clk & (local_clk >> 1)) == '0, "neighbouring local clocks never together");
  end

  // Wave-pipelined line at 300 ps, capture on the same clock.
  initial begin : wave_line
    logic [W-1:0] sent[$];
    while (wp_run) begin
      wp_clk1 = 1'b1; wp_clk2 = 1'b1;
      #10 wp_d = W'($urandom);
      sent.push_back(wp_d);
      #140 wp_clk1 = 1'b0; wp_clk2 = 1'b0;
      #1;
      check(!wp_overrun, "wave line: no overrun at 300 ps");
      if (sent.size() > 4) begin
        check(wp_q == sent[sent.size() - 3], "wave line: word of two cycles ago");
        void'(sent.pop_front());
      end
      #149;
    end
    // A few launches 200 ps apart: closer than one repeater stage.
    repeat (5) begin
      wp_clk1 = 1'b1; wp_clk2 = 1'b1;
      #100 wp_clk1 = 1'b0; wp_clk2 = 1'b0;
      #1 if (wp_overrun) n_overrun++;
      #99;
    end
    wp_done = 1'b1;
  end

  task automatic tick();
    @(negedge clk);
  endtask

  initial begin
    int t0;
    for (int i = 0; i < N; i++) n_local[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) tick();

    // Single word: latency and local clock order.
    tx_valid = 1'b1; tx_data = 16'hBEEF;
    #1; check(tx_ready, "channel free at start");
    t0 = cycle;
    tick(); tx_valid = 1'b0;
    for (int i = 0; i < N; i++) begin
      #1; check(local_clk == (N'(1) << i), "local clocks fire one after the other");
      tick();
    end
    #1;
    check(rx_valid && rx_data == 16'hBEEF, "single word arrives");
    check(cycle - t0 == N + 1, "single word: request to rx_valid in NSTAGES+1 cycles");
    rx_ready = 1'b1;
    tick(); rx_ready = 1'b0;
    repeat (3) tick();

    // Burst with a ready receiver: 60 cycles must deliver about 30 words.
    rx_ready = 1'b1;
    t0 = n_delivered;
    for (int k = 0; k < 60; k++) begin
      tx_valid = 1'b1;
      #1;
      if (tx_ready) tx_data = W'($urandom);
      tick();
    end
    tx_valid = 1'b0;
    check(n_delivered - t0 >= 28, "burst: one word every two cycles");
    repeat (10) tick();
    check(sb.size() == 0, "burst drained");

    // Receiver stall, then restart.
    rx_ready = 1'b0;
    tx_valid = 1'b1;
    for (int k = 0; k < 20; k++) begin
      #1; if (tx_ready) tx_data = W'($urandom);
      tick();
    end
    check(sb.size() == N + 1, "stalled channel holds NSTAGES+1 words");
    tx_valid = 1'b0;
    rx_ready = 1'b1;
    repeat (12) tick();
    check(sb.size() == 0, "stalled words delivered after restart");

    // Random traffic.
    for (int k = 0; k < 5000; k++) begin
      #1;
      if (!tx_valid || tx_ready) begin
        tx_valid = ($urandom_range(3) != 0);
        tx_data  = W'($urandom);
      end
      rx_ready = ($urandom_range(9) < ((k / 500) % 2 == 0 ? 8 : 3));
      tick();
    end
    tx_valid = 1'b0; rx_ready = 1'b1;
    repeat (20) tick();
    check(sb.size() == 0, "random traffic drained");
    wp_run = 1'b0;
    wait (wp_done);

    // Every mechanism must have happened.
    check(n_request > 100, "request pulses");
    check(n_burst > 10, "back-to-back burst requests");
    check(n_tx_blocked > 0, "sender blocked by the channel");
    check(n_full > 0, "channel completely full");
    check(n_rx_stall > 0, "receiver stall with a word waiting");
    check(n_restart > 0, "restart after a stall");
    check(n_idle > 0, "idle cycles without local clocks");
    check(n_overrun > 0, "wave line overrun flagged at 200 ps");
    for (int i = 0; i < N; i++) check(n_local[i] > 100, $sformatf("local clock %0d fired", i));
    $display("mechanisms: requests=%0d burst=%0d tx_blocked=%0d full=%0d rx_stall=%0d restart=%0d idle=%0d overrun=%0d",
             n_request, n_burst, n_tx_blocked, n_full, n_rx_stall, n_restart, n_idle, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
