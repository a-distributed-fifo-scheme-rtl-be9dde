// tb_buffer_cell: self-checking test of one buffer column.
//
// Drives random words and a random enable for 2000 cycles and compares q with
// a reference that copies the input only in cycles where enable is 1 and
// otherwise keeps the last copied word; also checks the cleared reset value.
module tb_buffer_cell;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [W-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0, loads = 0;

  buffer_cell #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == '0, "reset clears the column");
    rst_n = 1'b1;
    expect_q = '0;
    for (int i = 0; i < 2000; i++) begin
      d      = $urandom();
      enable = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (enable) begin expect_q = d; loads++; end
      check(q == expect_q, $sformatf("q=%h expected %h", q, expect_q));
    end
    check(loads > 200, "enough loads");
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
