// tb_burst_transfer: the single-stage burst scenario.
//
// One control cell and one 32-bit column between sender and receiver. After
// reset the receiver signals that it is ready before any data exists; the
// sender then writes a 1 on bit 0, which appears at the end of the wire. The
// receiver takes it and then sends no pulses for a long idle period, during
// which the data line must keep its previous value. Finally sender and
// receiver run at full speed and move the pattern 0, 1, 0 back to back; the
// enable pulses of the burst must come every 4 cycles, the fastest the
// one-stage loop allows in this model (enable -> A restored -> sender's write
// -> A -> A_bar -> B, while the receiver's read restores C in parallel).
module tb_burst_transfer;
  localparam int unsigned W = 32;
  localparam int unsigned S = 1;
  localparam int unsigned IDLE = 160;

  logic clk = 1'b0, rst_n = 1'b0;
  logic snd_wp_clk = 1'b0, rcv_wp_clk_n = 1'b1;
  logic [W-1:0] snd_data = '0;
  logic buffer_state, rcv_valid, rcv_taken;
  logic [W-1:0] data_out, rcv_data;
  logic [S-1:0] stage_enable, stage_full;

  distributed_fifo #(.WIDTH(W), .STAGES(S)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  logic [W-1:0] pattern [3];
  logic [W-1:0] got[$];
  int unsigned en_cycles[$];
  int unsigned t0;
  int sent_i;

  always @(posedge clk)
    if (rst_n && stage_enable[0]) en_cycles.push_back(cycle);
  always @(posedge clk)
    if (rst_n && rcv_taken) got.push_back(rcv_data);

  initial begin
    pattern[0] = 32'h0; pattern[1] = 32'h1; pattern[2] = 32'h0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // receiver ready before data exists
    rcv_wp_clk_n = 1'b0; @(posedge clk); #1; rcv_wp_clk_n = 1'b1;
    check(!rcv_valid && en_cycles.size() == 0, "a ready pulse alone moves nothing");

    // first word
    snd_data = 32'h1; snd_wp_clk = 1'b1; t0 = cycle;
    @(posedge clk); #1; snd_wp_clk = 1'b0;
    while (!rcv_valid && cycle - t0 < 20) begin @(posedge clk); #1; end
    check(cycle - t0 == 3 * S + 1, $sformatf("first word after %0d cycles", cycle - t0));
    check(data_out == 32'h1, "first word is 1");
    rcv_wp_clk_n = 1'b0; @(posedge clk); #1; rcv_wp_clk_n = 1'b1;

    // idle period: the data line keeps its value
    for (int i = 0; i < IDLE; i++) begin
      @(posedge clk); #1;
      if (i % 16 == 0) check(data_out == 32'h1 && !rcv_valid, "line holds the previous value while idle");
    end

    // burst 0,1,0 at full speed
    en_cycles.delete();
    sent_i = 0;
    for (int i = 0; i < 40 && got.size() < 4; i++) begin
      snd_wp_clk = (sent_i < 3) && buffer_state;
      if (snd_wp_clk) begin snd_data = pattern[sent_i]; sent_i++; end
      rcv_wp_clk_n = !rcv_valid;
      @(posedge clk); #1;
      snd_wp_clk = 1'b0; rcv_wp_clk_n = 1'b1;
    end
    check(got.size() == 4, $sformatf("%0d words received", got.size()));
    if (got.size() == 4) begin
      check(got[0] == 32'h1, "first word received");
      for (int i = 0; i < 3; i++)
        check(got[i+1] == pattern[i], $sformatf("burst word %0d = %h", i, got[i+1]));
    end
    check(en_cycles.size() == 3, $sformatf("%0d enable pulses in the burst", en_cycles.size()));
    if (en_cycles.size() == 3)
      for (int i = 1; i < 3; i++)
        check(en_cycles[i] - en_cycles[i-1] == 4,
              $sformatf("enable spacing %0d cycles", en_cycles[i] - en_cycles[i-1]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
