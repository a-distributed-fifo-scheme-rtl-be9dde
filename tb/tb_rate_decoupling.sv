// tb_rate_decoupling: sender and receiver working at unrelated rates.
//
// Each component issues its wave-pipelined clock pulse only on its own
// clock ticks: the sender every SND_PERIOD cycles of the model clock (and only
// while buffer_state allows), the receiver every RCV_PERIOD cycles (and only
// while a word is waiting). The FIFO has the default size. Three rate pairs are
// run: a fast sender with a slow receiver (the FIFO fills and the sender is
// held back), a slow sender with a fast receiver (the FIFO runs nearly empty),
// and two rates whose periods share no factor. In each, every word must arrive
// once and in order, and the delivered rate must be that of the slower side:
// words taken in the measuring window = window / max(periods, 5), within 2.
module tb_rate_decoupling;
  localparam int unsigned W = dfifo_pkg::DATA_WIDTH;
  localparam int unsigned S = dfifo_pkg::NUM_STAGES;
  localparam int unsigned WINDOW = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic snd_wp_clk = 1'b0, rcv_wp_clk_n = 1'b1;
  logic [W-1:0] snd_data = '0;
  logic buffer_state, rcv_valid, rcv_taken;
  logic [W-1:0] data_out, rcv_data;
  logic [S-1:0] stage_enable, stage_full;

  distributed_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  logic [W-1:0] next_word = '0;
  int unsigned taken_cnt = 0, stalls = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  always @(posedge clk)
    if (rst_n && rcv_taken) begin
      if (sent.size() == 0) check(1'b0, "word received that was never sent");
      else begin
        logic [W-1:0] exp_w;
        exp_w = sent.pop_front();
        check(rcv_data == exp_w, $sformatf("received %h expected %h", rcv_data, exp_w));
      end
      taken_cnt <= taken_cnt + 1;
    end

  task automatic run(input int unsigned sp, input int unsigned rp);
    int unsigned start_taken, got, want, slow;
    start_taken = taken_cnt;
    for (int unsigned c = 0; c < WINDOW; c++) begin
      snd_wp_clk   = (c % sp == 0) && buffer_state;
      if ((c % sp == 0) && !buffer_state) stalls++;
      if (snd_wp_clk) begin
        next_word = next_word + 32'h9e37_79b9;
        snd_data  = next_word;
        sent.push_back(snd_data);
      end
      rcv_wp_clk_n = !((c % rp == 0) && rcv_valid);
      @(posedge clk); #1;
      snd_wp_clk = 1'b0; rcv_wp_clk_n = 1'b1;
    end
    got  = taken_cnt - start_taken;
    slow = (sp > rp) ? sp : rp;
    if (slow < 5) slow = 5;
    want = WINDOW / slow;
    check(got + 2 >= want && got <= want + S + 2,
          $sformatf("sender period %0d, receiver period %0d: %0d words taken, expected about %0d",
                    sp, rp, got, want));
    $display("sender period %0d, receiver period %0d: %0d words in %0d cycles", sp, rp, got, WINDOW);
    // drain before the next pair
    for (int i = 0; i < 50 * S && sent.size() != 0; i++) begin
      rcv_wp_clk_n = !rcv_valid;
      @(posedge clk); #1;
      rcv_wp_clk_n = 1'b1;
    end
    check(sent.size() == 0, "FIFO drained");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    run(5, 17);   // fast sender, slow receiver
    check(stalls > 0, "sender was held back by a full FIFO");
    run(13, 5);   // slow sender, fast receiver
    run(7, 11);   // unrelated periods
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
