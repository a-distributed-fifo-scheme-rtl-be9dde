// tb_fifo_control_cell: self-checking test of one control cell.
//
// Directed cases follow the single-cell experiment: a write into an empty
// path (enable after the third edge, as A and then A_bar change; one cycle
// wide; A back to 1 and C to 0 afterwards), a write while the next stage is
// full (no enable until a read pulse, then enable after the second edge, the
// shorter read path), a read with no pending write (no enable)
// and reset values. A random phase then issues writes (only while A is 1, as
// the protocol demands) and reads, and checks that every enable is a single
// cycle, that each one is preceded by both a write and a read credit, and that
// the number of enables equals the number of writes once all are drained.
module tb_fifo_control_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic write = 1'b0, read_n = 1'b1;
  logic enable, node_a, node_c;
  int   checks = 0, failures = 0;

  fifo_control_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Waits n cycles, recording the enable value seen in each (after the edge).
  task automatic step(input int n, output logic [15:0] seen);
    seen = '0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      seen[i] = enable;
    end
  endtask

  task automatic pulse_write();
    write = 1'b1; @(posedge clk); #1; write = 1'b0;
  endtask
  task automatic pulse_read();
    read_n = 1'b0; @(posedge clk); #1; read_n = 1'b1;
  endtask

  int unsigned writes, enables, credits, pend;
  logic [15:0] seen;
  logic prev_en;

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(node_a && node_c && !enable, "reset sets A and C to 1 and enable to 0");
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Write into an empty path: enable exactly in the 2nd cycle after the write edge.
    pulse_write();                   // edge 0 takes the write
    check(!node_a, "write pulls node A low");
    step(4, seen);                   // edges 1..4
    check(seen[3:0] == 4'b0010, $sformatf("enable one cycle wide, after A and then A_bar changed (seen %b)", seen[3:0]));
    check(node_a && !node_c, "after the transfer A is 1 and C is 0");

    // Write while the next stage is full: no transfer until a read.
    pulse_write();
    step(10, seen);
    check(seen[9:0] == '0, "no enable while the next stage is full");
    check(!node_a, "the write stays pending");
    pulse_read();
    check(node_c, "read raises node C");
    step(3, seen);
    check(seen[2:0] == 3'b001, $sformatf("enable follows the read (seen %b)", seen[2:0]));
    check(node_a && !node_c, "second transfer resets A and C");

    // Read with nothing pending: C goes high, no enable.
    pulse_read();
    step(6, seen);
    check(seen[5:0] == '0 && node_c && node_a, "read alone causes no transfer");

    // Random phase.
    writes = 0; enables = 0; credits = 0; pend = 0; prev_en = 1'b0;
    for (int cyc = 0; cyc < 4000 || (pend != 0 && cyc < 6000); cyc++) begin
      write  = (cyc < 4000) && node_a && !enable && ($urandom_range(0, 3) == 0);
      read_n = !($urandom_range(0, 4) == 0);
      @(posedge clk); #1;
      if (write) begin writes++; pend++; end
      if (enable) begin
        enables++;
        check(!prev_en, "enable is one cycle wide");
        check(pend == 1, "enable only with a write pending");
        pend = 0;
      end
      prev_en = enable;
    end
    write = 1'b0; read_n = 1'b1;
    check(writes > 100, "random phase made enough writes");
    check(enables == writes, $sformatf("every write transferred (%0d writes, %0d enables)", writes, enables));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
