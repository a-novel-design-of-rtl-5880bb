// Deinterleaver memory bank (M-1 / M-2): single-port RAM, one word per
// coded bit.
//
// One address port A serves both writing and reading, as in the
// deinterleaver's two-bank structure: on a clock edge with we = 1 the word
// din is stored at addr; on every edge the word at addr is read into dout
// (read-before-write), so read data appear one clock after the address. The
// synchronous read matches FPGA block RAM and is this implementation's
// choice, as is the word width (one hard bit by default; soft decisions need
// a wider DATA_W). The contents are not reset.
module bank_ram #(
  parameter int unsigned DEPTH  = wimax_pkg::NCBPS_MAX,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,    // W_E
  input  logic [ADDR_W-1:0] addr,  // A
  input  logic [DATA_W-1:0] din,   // D_IN
  output logic [DATA_W-1:0] dout   // D_OUT, one clock after addr
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
