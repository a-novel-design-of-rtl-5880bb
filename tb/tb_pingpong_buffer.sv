// Fills one bank with a block at scattered addresses while reading the
// other bank in order, then swaps the select, for several blocks. Each
// read word is compared with the block written one period earlier; the
// first period reads only zeros that were written as initial contents.
module tb_pingpong_buffer;
  localparam int DEPTH = 64;
  logic       clk = 0, sel = 1, wr_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [7:0] blk [2][DEPTH];
  int checks = 0, failures = 0;

  pingpong_buffer #(.DEPTH(DEPTH), .DATA_W(8)) dut (
    .clk(clk), .sel(sel), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_addr(rd_addr), .rd_data(rd_data)
  );

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Clear both banks: sel = 1 writes M-1, sel = 0 writes M-2.
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        sel = (b == 0); wr_en = 1; wr_addr = 6'(a); wr_data = '0;
        blk[b][a] = '0;
      end
    @(negedge clk);
    wr_en = 0;
    for (int p = 0; p < 8; p++) begin
      // Written bank this period: p even -> M-1 (sel 1), odd -> M-2 (sel 0).
      int wb;
      wb = p % 2;
      for (int n = 0; n < DEPTH; n++) begin
        @(negedge clk);
        if (n > 0) begin
          checks++;
          if (rd_data != blk[1 - wb][n - 1]) begin
            failures++;
            $display("FAIL period %0d word %0d: %0d expected %0d", p, n - 1, rd_data, blk[1 - wb][n - 1]);
          end
        end
        sel     = (wb == 0);
        wr_en   = $urandom_range(0, 4) != 0;
        wr_addr = 6'((n * 37 + p) % DEPTH);   // scattered, a permutation
        wr_data = 8'($urandom);
        if (wr_en) blk[wb][wr_addr] = wr_data;
        rd_addr = 6'(n);
      end
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data != blk[1 - wb][DEPTH - 1]) begin
        failures++; $display("FAIL period %0d last word", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
