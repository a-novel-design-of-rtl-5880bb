// 16-QAM block: column permutation for two bits per symbol.
//
// On even rows the column index passes unchanged. On odd rows neighbouring
// columns swap pairwise: an even column i becomes i+1 (adder A1) and an odd
// column becomes i-1 (adder A2). Mod-2 unit MO0 on the column selects
// between the two adders (mux M2), and Mod-2 unit MO1 on the row selects
// between the plain column and M2 (mux M3). This is the document's 16-QAM
// circuit; the sign of each adder is read from its equation for 16-QAM, and
// the counters, multiplier and address adder live outside the block so the
// integrated generator can share them. Purely combinational.
module qam16_block #(
  parameter int unsigned COL_W = wimax_pkg::COL_W,
  parameter int unsigned ROW_W = wimax_pkg::ROW_W
) (
  input  logic [COL_W-1:0] col,     // column index i
  input  logic [ROW_W-1:0] row,     // row index j
  output logic [COL_W-1:0] col_p    // permuted column i'
);
  logic             col_odd, row_odd;   // MO0, MO1
  logic [COL_W-1:0] a1, a2, m2;

  modulo_unit #(.M(2), .IN_W(COL_W), .OUT_W(1)) u_mo0 (.value(col), .residue(col_odd));
  modulo_unit #(.M(2), .IN_W(ROW_W), .OUT_W(1)) u_mo1 (.value(row), .residue(row_odd));

  always_comb begin
    a1    = col + COL_W'(1);              // A1: i + 1
    a2    = col - COL_W'(1);              // A2: i - 1
    m2    = col_odd ? a2 : a1;            // M2, select MO0
    col_p = row_odd ? m2 : col;           // M3, select MO1
  end
endmodule
