// tb_sender_output_latch: self-checking test of the sender output latch.
//
// Pulses wp_clk at random (only while first_empty is 1, as the protocol
// requires) with random words and checks that q holds the word of the last
// pulse and ignores the data input between pulses.
module tb_sender_output_latch;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, wp_clk = 1'b0, first_empty = 1'b1;
  logic [W-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0, pulses = 0;

  sender_output_latch #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == '0, "reset clears the latch");
    rst_n = 1'b1;
    expect_q = '0;
    for (int i = 0; i < 2000; i++) begin
      first_empty = ($urandom_range(0, 1) == 0);
      wp_clk      = first_empty && ($urandom_range(0, 2) == 0);
      d           = $urandom();
      @(posedge clk); #1;
      if (wp_clk) begin expect_q = d; pulses++; end
      check(q == expect_q, $sformatf("q=%h expected %h", q, expect_q));
    end
    check(pulses > 200, "enough pulses");
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
