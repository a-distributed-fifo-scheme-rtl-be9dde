// buffer_cell: one column of data-line buffer cells driven by one enable.
//
// Each bit is a two-inverter repeater with a pass gate on its input and a
// second pass gate in its feedback loop, driven by enable and its inverse:
// with enable at 1 the input is copied into the cell, with enable at 0 the
// feedback loop holds the stored value and the cell keeps driving the next
// segment of the wire. WIDTH such cells share one control cell.
//
// Timing: the copy is taken on the rising edge of clk that ends the one-cycle
// enable pulse; the stored word appears on q the cycle after enable. The reset
// that clears the column is this design's own addition, so that the data line
// holds a known value before the first transfer.
module buffer_cell #(
  parameter int unsigned WIDTH = dfifo_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (enable) q <= d;   // pass gate on, feedback gate off
  end                          // otherwise the feedback loop keeps q
endmodule
