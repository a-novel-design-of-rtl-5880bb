// Column counter (CLC): column index i of the deinterleaver matrix.
//
// The counter advances by one on every enabled clock edge. When the
// comparator of the QPSK block reports the last column (last = 1) the next
// enabled edge clears it to 0 instead, which is the comparator-driven reset
// of the counter in the document's circuit. The column index is the fast
// index: one full sweep of the columns covers one row. rst is a synchronous
// active-high reset (the reset style is this implementation's choice).
module column_counter #(
  parameter int unsigned COL_W = wimax_pkg::COL_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,    // advance this cycle
  input  logic             last,  // comparator: i is the last column
  output logic [COL_W-1:0] col    // column index i
);
  always_ff @(posedge clk) begin
    if (rst)
      col <= '0;
    else if (en)
      col <= last ? '0 : col + 1'b1;
  end
endmodule
