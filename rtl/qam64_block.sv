// 64-QAM block: column permutation for three bits per symbol.
//
// The row residue j mod 3 (MO3) selects, in mux M7, between
//   0: the plain column i,
//   1: mux M5, which gives i+1 (adder A4) for i mod 3 = 0 or 1 and
//      i-2 (adder A5) for i mod 3 = 2,
//   2: mux M6, which gives i+2 (adder A6) for i mod 3 = 0 and
//      i-1 (adder A7) for i mod 3 = 1 or 2,
// where the column residue i mod 3 (MO2) drives the selects of M5 and M6.
// Within every group of three columns this rotates the columns by one place
// per row, so each group is a cyclic shift and stays inside the block. The
// adder constants are the document's; their signs follow its 64-QAM
// equation and simulation waveforms. Purely combinational.
module qam64_block #(
  parameter int unsigned COL_W = wimax_pkg::COL_W,
  parameter int unsigned ROW_W = wimax_pkg::ROW_W
) (
  input  logic [COL_W-1:0] col,     // column index i
  input  logic [ROW_W-1:0] row,     // row index j
  output logic [COL_W-1:0] col_p    // permuted column i'
);
  logic [1:0]       col_m3, row_m3;   // MO2, MO3
  logic [COL_W-1:0] a4, a5, a6, a7, m5, m6;

  modulo_unit #(.M(3), .IN_W(COL_W), .OUT_W(2)) u_mo2 (.value(col), .residue(col_m3));
  modulo_unit #(.M(3), .IN_W(ROW_W), .OUT_W(2)) u_mo3 (.value(row), .residue(row_m3));

  always_comb begin
    a4 = col + COL_W'(1);               // A4: i + 1
    a5 = col - COL_W'(2);               // A5: i - 2
    a6 = col + COL_W'(2);               // A6: i + 2
    a7 = col - COL_W'(1);               // A7: i - 1
    m5 = (col_m3 == 2'd2) ? a5 : a4;    // M5, select MO2
    m6 = (col_m3 == 2'd0) ? a6 : a7;    // M6, select MO2
    case (row_m3)                       // M7, select MO3
      2'd1:    col_p = m5;
      2'd2:    col_p = m6;
      default: col_p = col;
    endcase
  end
endmodule
