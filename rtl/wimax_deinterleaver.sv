// WiMAX (IEEE 802.16e) two-dimensional channel deinterleaver for QPSK,
// 16-QAM and 64-QAM at every block size the standard permits.
//
// Received coded bits arrive one per clock. The integrated address
// generator (kn_addr_gen) gives each bit its deinterleaver address
// Kn = 16 * i' + j, where i and j are column and row counters and i' is the
// column after the modulation-dependent permutation; the bit is written to
// that address of one memory bank. Meanwhile the other bank, holding the
// previous block, is read out at addresses 0, 1, 2, ..., which is the
// deinterleaved (original) bit order. When a block is complete the banks
// swap roles (bank select sel).
//
// Interface: in_valid/in_ready/in_data accept one bit per clock; ncbps and
// mod give the size and modulation of a block and are sampled with its first
// bit. out_valid/out_data/out_last deliver the deinterleaved block, one bit
// per clock. When the read side is free, the first output bit is valid
// after the clock edge that follows the edge accepting the block's last
// input bit (bank swap on the first edge, synchronous RAM read on the
// next). in_ready drops only when a block is finished before the previous one has been
// read out (a shorter block following a longer one).
//
// The address generator and the two-bank memory follow the document; the
// read/swap control, the valid/ready handshake and the synchronous RAM
// timing are this implementation's choices.
module wimax_deinterleaver #(
  parameter int unsigned D         = wimax_pkg::D_ROWS,
  parameter int unsigned NCBPS_MAX = wimax_pkg::NCBPS_MAX,
  parameter int unsigned DATA_W    = 1
) (
  input  logic                           clk,
  input  logic                           rst,        // synchronous, active high
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [DATA_W-1:0]              in_data,
  input  logic [$clog2(NCBPS_MAX+1)-1:0] ncbps,      // block size in bits
  input  wimax_pkg::mod_t                mod,        // 00 QPSK, 01 16-QAM, 10 64-QAM
  output logic                           out_valid,
  output logic [DATA_W-1:0]              out_data,
  output logic                           out_last
);
  localparam int unsigned NW = $clog2(NCBPS_MAX + 1);
  localparam int unsigned AW = $clog2(NCBPS_MAX);

  logic          wr_en, wr_last, sel;
  logic [AW-1:0] kn, rd_addr;
  logic [NW-1:0] blk_ncbps;

  kn_addr_gen #(.D(D), .NCBPS_MAX(NCBPS_MAX)) u_agen (
    .clk(clk), .rst(rst), .en(wr_en), .ncbps(ncbps), .mod(mod),
    .kn(kn), .col(), .row(), .first(), .last(wr_last),
    .blk_ncbps(blk_ncbps)
  );

  pingpong_ctrl #(.NCBPS_MAX(NCBPS_MAX), .ADDR_W(AW), .LEN_W(NW)) u_ctrl (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .wr_en(wr_en), .wr_last(wr_last), .wr_len(blk_ncbps), .sel(sel),
    .rd_addr(rd_addr), .rd_en(), .out_valid(out_valid),
    .out_last(out_last)
  );

  pingpong_buffer #(.DEPTH(NCBPS_MAX), .DATA_W(DATA_W), .ADDR_W(AW)) u_buf (
    .clk(clk), .sel(sel), .wr_en(wr_en), .wr_addr(kn), .wr_data(in_data),
    .rd_addr(rd_addr), .rd_data(out_data)
  );

  // Every address written must lie inside the block: this fails for
  // (ncbps, mod) pairs the standard does not allow.
  a_kn_in_block: assert property (@(posedge clk) disable iff (rst)
    wr_en |-> (NW'(kn) < blk_ncbps));
endmodule
