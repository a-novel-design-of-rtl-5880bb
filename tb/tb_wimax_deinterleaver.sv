// End-to-end test of the deinterleaver at its default size (576-bit
// memories, d = 16, one bit per word).
//
// Original blocks of random bits are interleaved in the testbench with the
// IEEE 802.16e interleaver formula and fed in; the output must be the
// original bits in order, with out_last on each block's final bit. The
// block sequence covers every legal (Ncbps, modulation) pair and forces
// each mechanism of the design at least once, counting it:
//   - modulation switches and block-size changes between blocks,
//   - back-to-back blocks with no idle cycle at the bank swap,
//   - input stalls (in_ready low), caused by a short block after a long one,
//   - idle input cycles (in_valid low).
// It also checks the timing: one output bit per clock within a block, and
// the first output bit of a block valid after the clock edge that follows
// the edge accepting its last input bit, when the read side is idle.
module tb_wimax_deinterleaver;
  import tb_wimax_ref_pkg::*;
  logic       clk = 0, rst = 1;
  logic       in_valid = 0, in_ready, in_data = 0;
  logic [9:0] ncbps = 10'd96;
  wimax_pkg::mod_t mod = wimax_pkg::MOD_QPSK;
  logic       out_valid, out_data, out_last;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit exp_bits [$];      // expected output bits, all blocks in order
  int exp_last [$];      // 1 where a block ends
  int blocks_out = 0, bits_out = 0;
  int mod_switches = 0, size_changes = 0, stalls = 0, idles = 0;
  int swaps_no_gap = 0, latency_checked = 0;
  int last_in_cycle = -1, prev_out_cycle = -1;
  bit in_block_out = 0;

  wimax_deinterleaver dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .ncbps(ncbps), .mod(mod), .out_valid(out_valid),
    .out_data(out_data), .out_last(out_last)
  );

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // Sends one block; gap_pct is the chance of an idle input cycle.
  task automatic send_block(int n_cbps, int s, int gap_pct);
    bit y [576];
    bit x [576];
    int n = 0;
    for (int k = 0; k < n_cbps; k++) begin
      y[k] = 1'($urandom);
      x[std_interleave(n_cbps, s, k)] = y[k];
      exp_bits.push_back(y[k]);
      exp_last.push_back(int'(k == n_cbps - 1));
    end
    while (n < n_cbps) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) >= gap_pct);
      in_data  = x[n];
      if (n == 0) begin
        ncbps = 10'(n_cbps);
        mod   = wimax_pkg::mod_t'(mod_code(s));
      end
      #1;
      if (!in_valid) idles++;
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) begin
        n++;
        if (n == n_cbps) last_in_cycle = cycle + 1;   // accepted at next edge
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // Output monitor: samples at the falling edge.
  initial begin
    forever begin
      @(negedge clk);
      if (!rst && out_valid) begin
        bit eb;
        int el;
        // First bit of a block.
        if (!in_block_out) begin
          in_block_out = 1;
          if (prev_out_cycle == cycle - 1) swaps_no_gap++;
          if (latency_checked == 0 && last_in_cycle >= 0) begin
            expect_eq("latency from last input to first output", cycle - last_in_cycle, 1);
            latency_checked++;
          end
        end else begin
          expect_eq("one bit per clock within a block", cycle - prev_out_cycle, 1);
        end
        prev_out_cycle = cycle;
        if (exp_bits.size() == 0) begin
          failures++; $display("FAIL unexpected output at cycle %0d", cycle);
        end else begin
          eb = exp_bits.pop_front();
          el = exp_last.pop_front();
          expect_eq("data", int'(out_data), int'(eb));
          expect_eq("out_last", int'(out_last), el);
        end
        bits_out++;
        if (out_last) begin
          blocks_out++;
          in_block_out = 0;
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_n = 0, prev_s = 0, nblk = 0;
    int seq_n [$];
    int seq_s [$];
    int seq_g [$];
    // Every legal configuration, no idle cycles.
    for (int c = 0; c < NCFG; c++) begin
      seq_n.push_back(CFG_N[c]); seq_s.push_back(CFG_S[c]); seq_g.push_back(0);
    end
    // Long block, then short ones: the read side is still busy -> stall.
    seq_n.push_back(576); seq_s.push_back(3); seq_g.push_back(0);
    seq_n.push_back(96);  seq_s.push_back(1); seq_g.push_back(0);
    seq_n.push_back(192); seq_s.push_back(2); seq_g.push_back(0);
    // Random configurations with idle input cycles.
    repeat (6) begin
      int c = int'($urandom_range(0, NCFG - 1));
      seq_n.push_back(CFG_N[c]); seq_s.push_back(CFG_S[c]); seq_g.push_back(25);
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (seq_n[b]) begin
      if (b > 0 && seq_s[b] != prev_s) mod_switches++;
      if (b > 0 && seq_n[b] != prev_n) size_changes++;
      prev_n = seq_n[b]; prev_s = seq_s[b];
      send_block(seq_n[b], seq_s[b], seq_g[b]);
      nblk++;
    end
    // Drain the last block.
    wait (blocks_out == nblk);
    repeat (3) @(negedge clk);
    expect_eq("all bits delivered", exp_bits.size(), 0);
    expect_eq("modulation switch seen", int'(mod_switches > 0), 1);
    expect_eq("block-size change seen", int'(size_changes > 0), 1);
    expect_eq("input stall seen", int'(stalls > 0), 1);
    expect_eq("idle input cycle seen", int'(idles > 0), 1);
    expect_eq("gap-free bank swap seen", int'(swaps_no_gap > 0), 1);
    expect_eq("latency checked", latency_checked, 1);
    $display("blocks=%0d bits=%0d mod_switches=%0d size_changes=%0d stalls=%0d idles=%0d gapless_swaps=%0d",
             blocks_out, bits_out, mod_switches, size_changes, stalls, idles, swaps_no_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
