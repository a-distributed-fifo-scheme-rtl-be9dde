// tb_receiver_input_latch: self-checking test of the receiver input latch.
//
// Drives random active-low read pulses, a random last_full flag and random
// words. A pulse must capture the word and raise taken for one cycle only when
// last_full is 1; a pulse on an empty stage must leave q alone.
module tb_receiver_input_latch;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, wp_clk_n = 1'b1, last_full = 1'b0;
  logic [W-1:0] d = '0, q, expect_q;
  logic taken;
  int checks = 0, failures = 0, takes = 0, idle_reads = 0;

  receiver_input_latch #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == '0 && !taken, "reset clears the latch");
    rst_n = 1'b1;
    expect_q = '0;
    for (int i = 0; i < 2000; i++) begin
      wp_clk_n  = ($urandom_range(0, 2) != 0);
      last_full = ($urandom_range(0, 1) == 0);
      d         = $urandom();
      @(posedge clk); #1;
      if (!wp_clk_n && last_full) begin expect_q = d; takes++; end
      else if (!wp_clk_n) idle_reads++;
      check(q == expect_q, $sformatf("q=%h expected %h", q, expect_q));
      check(taken == (!wp_clk_n && last_full), "taken strobe");
    end
    check(takes > 100 && idle_reads > 100, "both kinds of read pulse seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
