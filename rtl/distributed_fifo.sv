// distributed_fifo: a FIFO spread along a global data line between two SoC
// components.
//
// Instead of driving a long wire through plain repeaters, the wire is cut into
// STAGES segments. Each segment ends in a column of WIDTH buffer cells (a
// repeater that can hold its value) gated by one GasP-style control cell. A
// word written by the sender moves from column to column whenever the column
// ahead is empty, so the wire itself becomes a STAGES-deep FIFO: the sender can
// keep writing while the receiver is busy, and both sides stay idle when there
// is nothing to move.
//
//   sender output latch -> column 1 -> ... -> column STAGES -> receiver input latch
//                 cell 1 --copy--> cell 2 ... cell STAGES
//                 cell 1 <--empty-- cell 2 ... cell STAGES
//
// Handshake between neighbouring cells: the enable pulse of cell k is the
// write (copy) input of cell k+1, and its inverse is the active-low read
// (empty) input of cell k-1. The sender's wp-clk is the write input of the
// first cell and the receiver's wp-clk is the read input of the last one.
//
// Interface:
//   snd_wp_clk, snd_data - the sender's write pulse and word. Pulse only while
//                          buffer_state is 1.
//   buffer_state         - node A of the first cell: 1 when the first entry is
//                          empty and the sender may write, 0 while its last
//                          word still waits (the FIFO is backed up).
//   rcv_wp_clk_n         - the receiver's active-low read pulse.
//   rcv_valid            - the last column holds a word not yet read.
//   data_out             - the last column's contents (the end of the wire).
//   rcv_data, rcv_taken  - the receiver input latch and its one-cycle strobe
//                          for each word taken.
//   stage_enable         - the enable pulse of every cell, for observation.
//   stage_full           - per column, node C of its cell inverted: the column
//                          holds a word the next column has not yet copied.
// node A of the inner cells duplicates stage_full of the column before and is
// left unread.
// Timing (clk is the unit of internal delay of the cycle-level model): an
// empty FIFO delivers a word to data_out 3*STAGES+1 cycles after the write
// pulse; with both ends at full speed the stream moves one word every 5
// cycles (every 4 through a single stage).
module distributed_fifo #(
  parameter int unsigned WIDTH  = dfifo_pkg::DATA_WIDTH,
  parameter int unsigned STAGES = dfifo_pkg::NUM_STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  // sending component
  input  logic              snd_wp_clk,
  input  logic [WIDTH-1:0]  snd_data,
  output logic              buffer_state,
  // receiving component
  input  logic              rcv_wp_clk_n,
  output logic              rcv_valid,
  output logic [WIDTH-1:0]  data_out,
  output logic [WIDTH-1:0]  rcv_data,
  output logic              rcv_taken,
  // observation
  output logic [STAGES-1:0] stage_enable,
  output logic [STAGES-1:0] stage_full
);
  // line[0] is the sender output latch, line[k] the k-th buffer column.
  logic [WIDTH-1:0]  line   [STAGES+1];
  logic [STAGES-1:0] write_in, read_n_in, node_a, node_c;

  sender_output_latch #(.WIDTH(WIDTH)) u_sender_latch (
    .clk, .rst_n,
    .wp_clk      (snd_wp_clk),
    .first_empty (node_a[0]),
    .d           (snd_data),
    .q           (line[0])
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    assign write_in[k]  = (k == 0)          ? snd_wp_clk   : stage_enable[k-1];
    assign read_n_in[k] = (k == STAGES - 1) ? rcv_wp_clk_n : ~stage_enable[k+1];

    fifo_control_cell u_ctrl (
      .clk, .rst_n,
      .write  (write_in[k]),
      .read_n (read_n_in[k]),
      .enable (stage_enable[k]),
      .node_a (node_a[k]),
      .node_c (node_c[k])
    );

    buffer_cell #(.WIDTH(WIDTH)) u_column (
      .clk, .rst_n,
      .enable (stage_enable[k]),
      .d      (line[k]),
      .q      (line[k+1])
    );
  end

  assign buffer_state = node_a[0];
  assign stage_full   = ~node_c;
  assign rcv_valid    = ~node_c[STAGES-1];
  assign data_out     = line[STAGES];

  receiver_input_latch #(.WIDTH(WIDTH)) u_receiver_latch (
    .clk, .rst_n,
    .wp_clk_n  (rcv_wp_clk_n),
    .last_full (rcv_valid),
    .d         (data_out),
    .q         (rcv_data),
    .taken     (rcv_taken)
  );
endmodule
