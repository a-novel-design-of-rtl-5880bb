// Integrated deinterleaver address generator for QPSK, 16-QAM and 64-QAM.
//
// One shared column counter (fast index i) and row counter (slow index j)
// sweep the 16 x Ncbps/16 matrix, one element per enabled clock. The QPSK
// block divides Ncbps by d and compares the column with the last column;
// the 16-QAM and 64-QAM blocks permute the column index from i and j. Mux
// M8, driven by the modulation code, picks one permuted column, and the
// shared multiplier and adder form
//   Kn = d * i' + j.
// This removes the floor functions of the standard's deinterleaver
// formula: every address is a small add/select on two counters.
//
// Timing: kn, row and col describe the element consumed in the current
// cycle and change after every clock edge on which en is high, so one
// address is produced per clock. `first` is high for the first element of a
// block and `last` for its final one. The block size and modulation are
// taken from ncbps/mod while `first` is high and held for the rest of the
// block, so they may change only between blocks; blk_ncbps reports the
// block size in use. Sharing the counters,
// divider/comparator, multiplier and adder between the three modulations
// follows the document's top-level circuit; the enable, first/last flags,
// configuration latch and synchronous active-high reset are this
// implementation's additions. Legal (ncbps, mod) pairs have Ncbps/16
// divisible by the bits per symbol; other pairs give addresses >= Ncbps.
module kn_addr_gen #(
  parameter int unsigned D         = wimax_pkg::D_ROWS,
  parameter int unsigned NCBPS_MAX = wimax_pkg::NCBPS_MAX
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,      // consume one address
  input  logic [$clog2(NCBPS_MAX+1)-1:0] ncbps, // block size, sampled at first
  input  wimax_pkg::mod_t              mod,     // modulation, sampled at first
  output logic [$clog2(NCBPS_MAX)-1:0] kn,      // deinterleaver address
  output logic [$clog2(NCBPS_MAX/D)  :0] col,   // column index i
  output logic [$clog2(D)-1:0]         row,     // row index j
  output logic                         first,   // first element of a block
  output logic                         last,    // last element of a block
  output logic [$clog2(NCBPS_MAX+1)-1:0] blk_ncbps // block size in use
);
  localparam int unsigned NW = $clog2(NCBPS_MAX + 1);
  localparam int unsigned AW = $clog2(NCBPS_MAX);
  localparam int unsigned CW = $clog2(NCBPS_MAX / D) + 1;
  localparam int unsigned RW = $clog2(D);

  logic [NW-1:0] ncbps_q, ncbps_eff;
  wimax_pkg::mod_t mod_q, mod_eff;
  logic [CW-1:0] cols, col_qam16, col_qam64, col_sel;
  logic          col_last, row_last;

  // Configuration used for the current block.
  always_comb begin
    first     = (col == '0) && (row == '0);
    ncbps_eff = first ? ncbps : ncbps_q;
    mod_eff   = first ? mod   : mod_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ncbps_q <= NW'(NCBPS_MAX);
      mod_q   <= wimax_pkg::MOD_QPSK;
    end else if (en && first) begin
      ncbps_q <= ncbps;
      mod_q   <= mod;
    end
  end

  // Shared counters.
  column_counter #(.COL_W(CW)) u_clc (
    .clk(clk), .rst(rst), .en(en), .last(col_last), .col(col)
  );

  row_counter #(.D(D), .ROW_W(RW)) u_rwc (
    .clk(clk), .rst(rst), .step(en && col_last), .row(row), .last(row_last)
  );

  // QPSK block: divider and column comparator.
  qpsk_block #(.D(D), .NCBPS_W(NW), .COL_W(CW)) u_qpsk (
    .ncbps(ncbps_eff), .col(col), .cols(cols), .col_last(col_last)
  );

  qam16_block #(.COL_W(CW), .ROW_W(RW)) u_qam16 (
    .col(col), .row(row), .col_p(col_qam16)
  );

  qam64_block #(.COL_W(CW), .ROW_W(RW)) u_qam64 (
    .col(col), .row(row), .col_p(col_qam64)
  );

  // M8: modulation select.
  always_comb begin
    case (mod_eff)
      wimax_pkg::MOD_QAM16: col_sel = col_qam16;
      wimax_pkg::MOD_QAM64: col_sel = col_qam64;
      default:   col_sel = col;
    endcase
  end

  // ML and A: Kn = d * i' + j.
  addr_combiner #(.D(D), .COL_W(CW), .ROW_W(RW), .ADDR_W(AW)) u_ml_a (
    .col_p(col_sel), .row(row), .kn(kn)
  );

  always_comb begin
    last      = col_last && row_last;
    blk_ncbps = ncbps_eff;
  end

  // The column count must be at least one for the counters to make sense.
  a_cols_nonzero: assert property (@(posedge clk) disable iff (rst) en |-> cols != '0);

endmodule
