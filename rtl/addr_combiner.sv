// Address combiner: multiplier ML and adder A of the address generator.
//
// Forms the deinterleaver address Kn = d * i' + j from the (permuted)
// column i' and the row j. The multiplier has a constant operand d, so it
// becomes a shift when d is a power of two. Purely combinational.
module addr_combiner #(
  parameter int unsigned D      = wimax_pkg::D_ROWS,
  parameter int unsigned COL_W  = wimax_pkg::COL_W,
  parameter int unsigned ROW_W  = wimax_pkg::ROW_W,
  parameter int unsigned ADDR_W = wimax_pkg::ADDR_W
) (
  input  logic [COL_W-1:0]  col_p,  // permuted column i'
  input  logic [ROW_W-1:0]  row,    // row index j
  output logic [ADDR_W-1:0] kn      // deinterleaver address
);
  logic [ADDR_W-1:0] product;       // ML: d * i'

  always_comb begin
    product = ADDR_W'(col_p) * ADDR_W'(D);
    kn      = product + ADDR_W'(row);   // A: + j
  end
endmodule
