// tb_distributed_fifo: end-to-end test of the distributed FIFO at its default
// size (32-bit words, 8 stages).
//
// The testbench plays both components. The sender writes a word with a
// one-cycle wp-clk pulse whenever it wants to and buffer_state reports the
// first entry empty; the receiver takes a word with an active-low wp-clk pulse.
// A scoreboard checks that every word arrives once, in order, unchanged.
// Phases:
//   1. latency  - one word through the empty FIFO reaches the end of the wire
//                 3*STAGES+1 cycles after the write pulse.
//   2. fill     - the receiver stalls: exactly STAGES+1 words are accepted
//                 (one per column plus the sender latch), every column reports
//                 full, the sender is stalled, and data_out holds its word.
//   3. burst    - both sides at full speed: words leave every 5 cycles.
//   4. random   - random writes and reads, including ready pulses from the
//                 receiver while the FIFO is empty.
// Each mechanism is counted; one that never happens is a failure.
module tb_distributed_fifo;
  localparam int unsigned W = dfifo_pkg::DATA_WIDTH;
  localparam int unsigned S = dfifo_pkg::NUM_STAGES;

  logic clk = 1'b0, rst_n = 1'b0;
  logic snd_wp_clk = 1'b0, rcv_wp_clk_n = 1'b1;
  logic [W-1:0] snd_data = '0;
  logic buffer_state, rcv_valid, rcv_taken;
  logic [W-1:0] data_out, rcv_data;
  logic [S-1:0] stage_enable, stage_full;

  distributed_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_full = 0, n_hold = 0, n_burst = 0, n_idle_read = 0, n_latency = 0;
  logic [W-1:0] sent[$];
  int unsigned cycle = 0, last_take = 0, received = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Free-running cycle count and scoreboard on the receiver latch.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && rcv_taken) begin
      if (sent.size() == 0) check(1'b0, "word received that was never sent");
      else begin
        logic [W-1:0] exp_w;
        exp_w = sent.pop_front();
        check(rcv_data == exp_w, $sformatf("received %h expected %h", rcv_data, exp_w));
      end
      received <= received + 1;
    end
  end

  // One cycle of stimulus: optional write and optional read, applied after an edge.
  task automatic cycle_io(input bit want_write, input bit want_read, input bit read_only_valid);
    snd_wp_clk = want_write && buffer_state;
    if (want_write && !buffer_state) n_stall++;
    if (snd_wp_clk) begin
      snd_data = $urandom();
      sent.push_back(snd_data);
    end
    rcv_wp_clk_n = !(want_read && (rcv_valid || !read_only_valid));
    if (!rcv_wp_clk_n && !rcv_valid) n_idle_read++;
    @(posedge clk); #1;
    snd_wp_clk   = 1'b0;
    rcv_wp_clk_n = 1'b1;
  endtask

  int unsigned t0, t_seen, words, n_before;
  logic [W-1:0] held;
  int gaps[$];

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(buffer_state && !rcv_valid && stage_full == '0, "reset: FIFO empty");
    rst_n = 1'b1;
    @(posedge clk); #1;

    // 1. latency through the empty FIFO
    t0 = cycle;
    cycle_io(1'b1, 1'b0, 1'b1);
    while (!rcv_valid && cycle - t0 < 100) begin @(posedge clk); #1; end
    t_seen = cycle;
    check(t_seen - t0 == 3 * S + 1, $sformatf("latency %0d cycles, expected %0d", t_seen - t0, 3 * S + 1));
    check(data_out == sent[0], "word at the end of the wire");
    n_latency++;

    // 2. fill while the receiver stalls
    words = 1;
    for (int i = 0; i < 40 * S; i++) begin
      n_before = sent.size();
      cycle_io(1'b1, 1'b0, 1'b1);
      if (sent.size() != n_before) words++;
    end
    check(words == S + 1, $sformatf("FIFO accepted %0d words, expected %0d", words, S + 1));
    check(stage_full == '1 && !buffer_state, "every column full, first entry busy");
    if (stage_full == '1 && !buffer_state) n_full++;
    held = data_out;
    repeat (50) cycle_io(1'b0, 1'b0, 1'b1);
    check(data_out == held && rcv_valid && data_out == sent[0], "data held while the receiver is away");
    if (data_out == held) n_hold++;

    // 3. burst: sender and receiver at full speed
    gaps.delete();
    last_take = 0;
    for (int i = 0; i < 60 * 4; i++) begin
      cycle_io(1'b1, 1'b1, 1'b1);
      if (rcv_taken) begin
        if (last_take != 0) gaps.push_back(cycle - last_take);
        last_take = cycle;
      end
    end
    // after the backlog drains, the stream settles at one word per 5 cycles
    for (int i = gaps.size() - 20; i < gaps.size(); i++) begin
      check(gaps[i] == 5, $sformatf("burst spacing %0d cycles, expected 5", gaps[i]));
      if (gaps[i] == 5) n_burst++;
    end

    // 4. random traffic
    for (int i = 0; i < 20000; i++)
      cycle_io($urandom_range(0, 2) == 0, $urandom_range(0, 2) == 0, $urandom_range(0, 1) == 0);

    // drain, then ready pulses into the empty FIFO
    for (int i = 0; i < 40 * S && sent.size() != 0; i++) cycle_io(1'b0, 1'b1, 1'b1);
    repeat (4) cycle_io(1'b0, 1'b1, 1'b0);
    check(sent.size() == 0, $sformatf("%0d words never arrived", sent.size()));
    check(buffer_state && !rcv_valid && stage_full == '0, "FIFO empty at the end");
    check(received > 1000, $sformatf("%0d words received", received));

    check(n_latency > 0, "latency case happened");
    check(n_stall > 0,   "sender stall happened");
    check(n_full > 0,    "FIFO full happened");
    check(n_hold > 0,    "idle hold happened");
    check(n_burst > 0,   "full-speed burst happened");
    check(n_idle_read > 0, "ready pulse on an empty FIFO happened");
    $display("mechanisms: latency=%0d stall=%0d full=%0d hold=%0d burst=%0d idle_read=%0d words=%0d",
             n_latency, n_stall, n_full, n_hold, n_burst, n_idle_read, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
