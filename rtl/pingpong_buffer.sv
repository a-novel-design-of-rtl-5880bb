// Two-bank (ping-pong) deinterleaver memory.
//
// While one bank is filled with the incoming block at the deinterleaver
// addresses, the other bank, holding the previous block, is read out in
// order. The bank select sel decides which is which:
//   sel = 1: M-1 is written (W_E = sel), M-2 is read,
//   sel = 0: M-2 is written (W_E = inverted sel), M-1 is read.
// Each bank's address mux passes the write address to the bank being
// written and the read address to the other. The output mux passes M-1's
// data for select 0 and M-2's for select 1; because the banks read
// synchronously, it is driven by sel delayed one clock so that rd_data
// belongs to the rd_addr of the previous cycle. Write enables are also
// gated with wr_en so that idle input cycles write nothing (this gating and
// the delayed output select are this implementation's choices; the rest
// follows the document's two-bank diagram).
module pingpong_buffer #(
  parameter int unsigned DEPTH  = wimax_pkg::NCBPS_MAX,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              sel,      // 1: write M-1 / read M-2
  input  logic              wr_en,    // write one word this cycle
  input  logic [ADDR_W-1:0] wr_addr,  // deinterleaver address Kn
  input  logic [DATA_W-1:0] wr_data,  // received bit
  input  logic [ADDR_W-1:0] rd_addr,  // sequential read address
  output logic [DATA_W-1:0] rd_data   // word at rd_addr, one clock later
);
  logic [ADDR_W-1:0] addr1, addr2;
  logic              we1, we2, sel_q;
  logic [DATA_W-1:0] dout1, dout2;

  always_comb begin
    addr1 = sel ? wr_addr : rd_addr;
    addr2 = sel ? rd_addr : wr_addr;
    we1   = wr_en &&  sel;
    we2   = wr_en && !sel;
  end

  bank_ram #(.DEPTH(DEPTH), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_m1 (
    .clk(clk), .we(we1), .addr(addr1), .din(wr_data), .dout(dout1)
  );

  bank_ram #(.DEPTH(DEPTH), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_m2 (
    .clk(clk), .we(we2), .addr(addr2), .din(wr_data), .dout(dout2)
  );

  always_ff @(posedge clk) sel_q <= sel;

  always_comb rd_data = sel_q ? dout2 : dout1;
endmodule
