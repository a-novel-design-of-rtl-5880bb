// Feeds blocks of changing length to the read/swap control with random
// idle input cycles and checks: sel toggles once per block, each read
// phase issues addresses 0..len-1 of the block just written without gaps,
// out_valid/out_last follow one clock later, in_ready drops only while a
// finished block waits for the read side, and equal-size blocks sent back
// to back never stall.
module tb_pingpong_ctrl;
  logic       clk = 0, rst = 1, in_valid = 0, wr_last = 0;
  logic       in_ready, wr_en, sel, rd_en, out_valid, out_last;
  logic [9:0] wr_len = '0, rd_addr;
  int checks = 0, failures = 0;
  int stalls = 0, swaps = 0, back_to_back = 0;
  int lens [$];          // lengths of completed blocks not yet read
  int wr_cnt = 0, cur_len = 0;
  int rd_len = 0, rd_exp = 0;
  logic prev_sel, prev_rd_en = 0, prev_rd_last = 0;

  pingpong_ctrl dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .wr_en(wr_en), .wr_last(wr_last), .wr_len(wr_len), .sel(sel),
    .rd_addr(rd_addr), .rd_en(rd_en), .out_valid(out_valid), .out_last(out_last)
  );

  always #5 clk = !clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Block lengths: equal pairs, long-then-short and short-then-long.
  localparam int NB = 10;
  localparam int LEN [NB] = '{96, 96, 576, 96, 192, 192, 480, 144, 288, 96};
  localparam int GAP [NB] = '{0, 0, 0, 0, 20, 0, 0, 50, 0, 0};

  initial begin
    int b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    prev_sel = sel;
    while (b < NB || lens.size() > 0 || rd_len > 0) begin
      // Drive the input at the falling edge.
      in_valid = (b < NB) && ($urandom_range(0, 99) >= GAP[b]);
      cur_len  = (b < NB) ? LEN[b] : 96;
      wr_len   = 10'(cur_len);
      wr_last  = (wr_cnt == cur_len - 1);
      #1;
      expect_eq("wr_en", int'(wr_en), int'(in_valid && in_ready));
      expect_eq("out_valid", int'(out_valid), int'(prev_rd_en));
      expect_eq("out_last", int'(out_last), int'(prev_rd_last));
      if (in_valid && !in_ready) stalls++;
      if (rd_en) begin
        expect_eq("rd_addr", int'(rd_addr), rd_exp);
        expect_eq("reading a known block", int'(rd_len > 0), 1);
      end else begin
        // The read side idles only when no finished block is waiting.
        expect_eq("read idle only when empty", int'(rd_len == 0 && lens.size() == 0), 1);
      end
      prev_rd_en   = rd_en;
      prev_rd_last = rd_en && (rd_exp == rd_len - 1);
      @(posedge clk);
      // Model update after the clock edge.
      if (rd_en) begin
        if (rd_exp == rd_len - 1) begin rd_len = 0; rd_exp = 0; end
        else rd_exp++;
      end
      if (wr_en) begin
        if (wr_last) begin
          lens.push_back(cur_len);
          wr_cnt = 0;
          b++;
        end else wr_cnt++;
      end
      #1;
      if (sel != prev_sel) begin
        swaps++;
        expect_eq("swap has a block", int'(lens.size() > 0), 1);
        expect_eq("swap after read done", rd_len, 0);
        if (lens.size() > 0) begin
          rd_len = lens.pop_front();
          rd_exp = 0;
        end
        if (wr_en && wr_last) back_to_back++;
      end
      prev_sel = sel;
      @(negedge clk);
    end
    expect_eq("swaps", swaps, NB);
    expect_eq("stall seen", int'(stalls > 0), 1);
    expect_eq("gap-free swap seen", int'(back_to_back > 0), 1);
    $display("stalls=%0d swaps=%0d back_to_back=%0d", stalls, swaps, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
