// receiver_input_latch: the receiving component's input latch on the data line.
//
// The receiver pulses its wave-pipelined clock (wp_clk_n, active low like the
// read input of a control cell) to take a word. When the last FIFO stage holds
// a word (last_full), that pulse copies the word into this latch and, in the
// last control cell, marks the stage empty. A pulse while the last stage is
// empty only announces that the receiver is ready and leaves the latch alone.
// taken counts the words accepted, as a one-cycle strobe.
//
// Timing: the word is captured on the rising edge of clk during the
// one-cycle pulse; q and taken are valid from the next cycle. Reset to zero is
// this design's own choice.
module receiver_input_latch #(
  parameter int unsigned WIDTH = dfifo_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wp_clk_n,
  input  logic             last_full,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             taken
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      taken <= 1'b0;
    end else begin
      taken <= !wp_clk_n && last_full;
      if (!wp_clk_n && last_full) q <= d;
    end
  end
endmodule
