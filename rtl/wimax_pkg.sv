// Shared constants and types of the WiMAX (IEEE 802.16e) deinterleaver.
//
// The deinterleaver treats one block of Ncbps coded bits as a matrix of
// D_ROWS = 16 rows (index j) and Ncbps/16 columns (index i). Every legal
// block size is a multiple of 16 up to 576 bits, so all widths below follow
// from those two numbers. The modulation code is two bits wide: 00 selects
// QPSK, 01 16-QAM and 10 64-QAM; 11 is not used and behaves like QPSK.
package wimax_pkg;

  // Number of rows d, fixed for every block size by the standard.
  localparam int unsigned D_ROWS    = 16;
  // Largest block size (64-QAM 3/4, QPSK 1/2 and others).
  localparam int unsigned NCBPS_MAX = 576;

  // Width of an Ncbps value (0..576).
  localparam int unsigned NCBPS_W = $clog2(NCBPS_MAX + 1);
  // Width of a memory address / deinterleaver address Kn (0..575).
  localparam int unsigned ADDR_W  = $clog2(NCBPS_MAX);
  // Width of a row index (0..15).
  localparam int unsigned ROW_W   = $clog2(D_ROWS);
  // Width of a column index. The permuted column i' can exceed the last
  // column by up to 2 only transiently in the 64-QAM adders, so one spare
  // bit keeps every intermediate value exact.
  localparam int unsigned COL_W   = $clog2(NCBPS_MAX / D_ROWS) + 1;

  // Modulation selection (mux M8 select).
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'b00,
    MOD_QAM16 = 2'b01,
    MOD_QAM64 = 2'b10
  } mod_t;

  // Bits per modulation symbol s for a modulation code.
  function automatic int unsigned bits_per_symbol(mod_t m);
    case (m)
      MOD_QAM16: return 2;
      MOD_QAM64: return 3;
      default:   return 1;
    endcase
  endfunction

endpackage
