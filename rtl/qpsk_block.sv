// QPSK block: column limit of the deinterleaver matrix, made of the divider
// DV0 and the comparator C0.
//
// The divider turns the block size Ncbps into the column count Ncbps/d.
// The row count d is a constant of the design, so this is a division by a
// constant that needs no iterative divider; for the standard d = 16 it
// reduces to dropping the four low bits of Ncbps. The comparator raises
// col_last while the column counter holds the last column, cols-1, so that
// the counter is cleared on its next step. For QPSK the column index reaches
// the address multiplier unchanged (Kn = d*i + j), so this divider and
// comparator are all the QPSK-specific hardware there is; in the integrated
// generator they are shared by all three modulations. Using a divider on
// Ncbps instead of a table of per-code-rate column limits follows the
// design description; building it as a constant division is this
// implementation's choice. Purely combinational.
module qpsk_block #(
  parameter int unsigned D       = wimax_pkg::D_ROWS,
  parameter int unsigned NCBPS_W = wimax_pkg::NCBPS_W,
  parameter int unsigned COL_W   = wimax_pkg::COL_W
) (
  input  logic [NCBPS_W-1:0] ncbps,     // coded bits per block
  input  logic [COL_W-1:0]   col,       // column counter value i
  output logic [COL_W-1:0]   cols,      // number of columns, ncbps / D
  output logic               col_last   // i == cols-1
);
  logic [NCBPS_W-1:0] quotient;         // DV0

  always_comb begin
    quotient = ncbps / NCBPS_W'(D);
    cols     = COL_W'(quotient);
    col_last = (col == cols - 1'b1);    // C0
  end
endmodule
