// sender_output_latch: the sending component's output latch on the data line.
//
// The sender places a word here with its wave-pipelined clock pulse (wp_clk);
// the same pulse is the write request to the first control cell, which later
// copies the word into the first buffer column. The latch holds the word
// until the next pulse. The sender may only pulse again once the FIFO reports
// its first entry empty; the assertion checks that this latch never changes
// while the first cell still waits to copy it.
//
// Timing: the word is taken on the rising edge of clk during the one-cycle
// wp_clk pulse and is on q from the next cycle. Reset to zero is this
// design's own choice.
module sender_output_latch #(
  parameter int unsigned WIDTH = dfifo_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wp_clk,
  input  logic             first_empty,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (wp_clk) q <= d;
  end

  a_write_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
                                        wp_clk |-> first_empty)
    else $error("sender_output_latch: wp-clk pulse while the FIFO's first entry is full");
endmodule
