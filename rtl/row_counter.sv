// Row counter (RWC) with its comparator (C1 against d-1): row index j.
//
// The row advances when the column counter wraps (step = 1, the last column
// is being consumed). The comparator against d-1 clears the counter after
// the last row, and raises `last` while j = d-1, so `step && last` marks the
// final element of a block. Making the row the slow index (columns sweep
// fastest) follows the address order of the document's simulations.
// Synchronous active-high reset.
module row_counter #(
  parameter int unsigned D     = wimax_pkg::D_ROWS,
  parameter int unsigned ROW_W = wimax_pkg::ROW_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,  // column wrap: advance one row
  output logic [ROW_W-1:0] row,   // row index j
  output logic             last   // comparator C1: j == d-1
);
  always_comb last = (row == ROW_W'(D - 1));

  always_ff @(posedge clk) begin
    if (rst)
      row <= '0;
    else if (step)
      row <= last ? '0 : row + 1'b1;
  end
endmodule
