// fifo_control_cell: one GasP-style control cell of the distributed FIFO.
//
// The cell keeps the state nodes of the modified GasP circuit:
//   node A  - 1 while nothing waits in the previous latch; a write pulse
//             (N1) pulls it to 0, meaning "the previous latch holds a word
//             for this stage".
//   node A_bar - the keeper inverter's output, A inverted one step later; it
//             drives the N2 pull-down, so the write path is one step longer
//             than the read path (C drives N3 directly).
//   node C  - 1 while the next stage is ready for a word; an active-low read
//             pulse (P3) raises it, this cell's own enable (N4) lowers it
//             because the word it copies makes this stage full.
//   node B  - the self-resetting NAND node; it is pulled low when A_bar is 1
//             and C is 1 (the N2/N3 pull-down), and the inverted node drives
//             enable. While B is low, A is restored to 1 (P1) and C is cleared
//             (N4); one step later B restores itself (P2 through S).
// The master reset puts A, B and C at 1 (and A_bar at 0): every stage empty,
// no transfer in flight.
//
// Timing: the transistor-level cell is self-timed. Here every node update is
// taken on the rising edge of clk, which stands for one unit of internal
// delay, so enable is a pulse exactly one clk cycle wide. Counting the edge
// that takes the pulse as edge 0, enable is high after edge 3 for a write that
// finds the next stage ready (A, A_bar, B), and after edge 2 for a read that
// finds a word waiting (C, B). After a transfer C drops one cycle before
// A_bar, as the N3 and N2 pull-downs turn off in that order.
//
// Interface:
//   write   - active-high pulse: the previous latch now holds a word
//             (the sender's wp-clk in the first cell, the previous cell's
//             enable elsewhere).
//   read_n  - active-low pulse: the next latch has been emptied
//             (the receiver's wp-clk in the last cell, the inverted enable of
//             the next cell elsewhere).
//   enable  - one-cycle pulse that copies the previous latch into this
//             stage's latch; it is also the copy signal to the next cell.
//   node_a, node_c - the state nodes, for status (node_a of the first cell
//             is the empty signal the sender watches).
// A write while A is already 0 would overwrite a word: the assertion flags it.
// The node structure follows the published cell; mapping each node to one
// clocked step and treating a protocol violation as an assertion are this
// model's own choices.
module fifo_control_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic write,
  input  logic read_n,
  output logic enable,
  output logic node_a,
  output logic node_c
);
  logic node_b, node_a_bar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node_a     <= 1'b1;
      node_a_bar <= 1'b0;
      node_b     <= 1'b1;
      node_c     <= 1'b1;
    end else begin
      // Self-resetting NAND: fire when a word waits and the next stage is ready.
      if (!node_b)                   node_b <= 1'b1;
      else if (node_a_bar && node_c) node_b <= 1'b0;

      // Node A: P1 restores it while B is low, N1 pulls it low on write.
      if (!node_b)     node_a <= 1'b1;
      else if (write)  node_a <= 1'b0;

      // Keeper inverter on node A.
      node_a_bar <= ~node_a;

      // Node C: N4 clears it while enable is high, P3 raises it on read.
      if (!node_b)      node_c <= 1'b0;
      else if (!read_n) node_c <= 1'b1;
    end
  end

  assign enable = ~node_b;

  // A write may only arrive when the previous word has already been taken.
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
                                  write |-> (node_a && node_b))
    else $error("fifo_control_cell: write while a word is still waiting");
endmodule
