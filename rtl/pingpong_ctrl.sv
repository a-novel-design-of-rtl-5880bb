// Read-side and bank-swap control of the two-bank deinterleaver.
//
// Produces the sequential read address and the bank select sel that go
// with the write address Kn. A completed write block is handed to the read
// side by toggling sel, as soon as the read side has finished the previous
// block (it may finish in the same cycle, so back-to-back blocks of equal
// size run without a gap). The read side then reads one word per clock,
// addresses 0 .. len-1, from the bank just filled. If a new block is
// complete before the previous one has been read out, which happens when
// the new block is shorter, in_ready drops and the input stalls until the
// swap. out_valid/out_last follow rd_en/rd_last by one clock to match the
// synchronous RAM read. The document names only the read address and Sel
// outputs; this control and its handshake are this implementation's own.
// Synchronous active-high reset; after reset M-1 is written first.
module pingpong_ctrl #(
  parameter int unsigned NCBPS_MAX = wimax_pkg::NCBPS_MAX,
  parameter int unsigned ADDR_W    = $clog2(NCBPS_MAX),
  parameter int unsigned LEN_W     = $clog2(NCBPS_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,   // a word is offered
  output logic              in_ready,   // it can be accepted
  output logic              wr_en,      // in_valid && in_ready
  input  logic              wr_last,    // offered word ends its block
  input  logic [LEN_W-1:0]  wr_len,     // size of the block being written
  output logic              sel,        // bank select
  output logic [ADDR_W-1:0] rd_addr,    // sequential read address
  output logic              rd_en,      // a read is issued this cycle
  output logic              out_valid,  // rd_data valid (one clock later)
  output logic              out_last    // last word of a block on rd_data
);
  logic             wr_full;            // a written block waits for the swap
  logic [LEN_W-1:0] pend_len, rd_len;
  logic             rd_busy, rd_last, blk_done, swap;

  always_comb begin
    in_ready = !wr_full;
    wr_en    = in_valid && in_ready;
    rd_en    = rd_busy;
    rd_last  = rd_busy && (LEN_W'(rd_addr) == rd_len - 1'b1);
    blk_done = (wr_en && wr_last) || wr_full;
    swap     = blk_done && (!rd_busy || rd_last);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel      <= 1'b1;
      wr_full  <= 1'b0;
      pend_len <= '0;
      rd_busy  <= 1'b0;
      rd_len   <= '0;
      rd_addr  <= '0;
    end else begin
      if (wr_en && wr_last)
        pend_len <= wr_len;
      if (swap) begin
        sel     <= !sel;
        wr_full <= 1'b0;
        rd_busy <= 1'b1;
        rd_len  <= wr_full ? pend_len : wr_len;
        rd_addr <= '0;
      end else begin
        if (wr_en && wr_last)
          wr_full <= 1'b1;
        if (rd_last)
          rd_busy <= 1'b0;
        else if (rd_busy)
          rd_addr <= rd_addr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= rd_en;
      out_last  <= rd_last;
    end
  end

  // No word may be accepted while a finished block waits for the swap.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) wr_full |-> !wr_en);
endmodule
