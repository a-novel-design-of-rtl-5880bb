// Runs the integrated address generator through one block of every legal
// (Ncbps, modulation) pair, back to back, and compares each address with
// the standard's deinterleaver address computed from the floor-function
// formula. Also checks the first/last flags, that a block with no idle
// cycles takes exactly Ncbps clocks (one address per clock), that block
// size and modulation changed in the middle of a block are ignored, and
// the address sequences shown in the design's simulation waveforms.
module tb_kn_addr_gen;
  import tb_wimax_ref_pkg::*;
  logic       clk = 0, rst = 1, en = 0;
  logic [9:0] ncbps = 10'd96;
  wimax_pkg::mod_t mod = wimax_pkg::MOD_QPSK;
  logic [9:0] kn, blk_ncbps;
  logic [6:0] col;
  logic [3:0] row;
  logic       first, last;
  int checks = 0, failures = 0;
  int ref_addr [576];
  int seen [$];
  int mode_switches = 0, gaps = 0, ignored_changes = 0;

  kn_addr_gen dut (
    .clk(clk), .rst(rst), .en(en), .ncbps(ncbps), .mod(mod), .kn(kn),
    .col(col), .row(row), .first(first), .last(last), .blk_ncbps(blk_ncbps)
  );

  always #5 clk = !clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One block; gap_pct is the chance of an idle cycle.
  task automatic run_block(int n_cbps, int s, int gap_pct);
    int n = 0, cycles = 0;
    std_deint_table(n_cbps, s, ref_addr);
    seen.delete();
    while (n < n_cbps) begin
      @(negedge clk);
      cycles++;
      en = ($urandom_range(0, 99) >= gap_pct);
      if (!en) gaps++;
      if (n == 0) begin
        ncbps = 10'(n_cbps);
        mod   = wimax_pkg::mod_t'(mod_code(s));
      end else if (n == 5) begin
        // Change the configuration inputs in mid-block: must be ignored.
        ncbps = 10'(96);
        mod   = (s == 3) ? wimax_pkg::MOD_QPSK : wimax_pkg::MOD_QAM64;
        ignored_changes++;
      end
      #1;
      expect_eq("first", int'(first), int'(n == 0));
      expect_eq("blk_ncbps", int'(blk_ncbps), n_cbps);
      if (en) begin
        expect_eq($sformatf("kn N=%0d s=%0d n=%0d", n_cbps, s, n), int'(kn), ref_addr[n]);
        expect_eq("last", int'(last), int'(n == n_cbps - 1));
        seen.push_back(int'(kn));
        n++;
      end
    end
    if (gap_pct == 0) expect_eq("cycles per block", cycles, n_cbps);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // Waveform of the QPSK, 96-bit block: first twelve addresses.
    run_block(96, 1, 0);
    begin
      int exp [12] = '{0, 16, 32, 48, 64, 80, 1, 17, 33, 49, 65, 81};
      foreach (exp[k]) expect_eq("QPSK-96 sequence", seen[k], exp[k]);
    end
    // 16-QAM, 192 bits: addresses 12..23 (second row).
    run_block(192, 2, 0);
    begin
      int exp [12] = '{17, 1, 49, 33, 81, 65, 113, 97, 145, 129, 177, 161};
      foreach (exp[k]) expect_eq("16QAM-192 sequence", seen[12 + k], exp[k]);
    end
    begin
      // Integrated-generator waveform with 16-QAM selected: end of row 1
      // and start of row 2.
      int exp [10] = '{2, 18, 34, 50, 66, 82, 98, 114, 130, 146};
      expect_eq("16QAM-192 n=23", seen[23], 161);
      foreach (exp[k]) expect_eq("16QAM-192 row 2", seen[24 + k], exp[k]);
    end
    // 64-QAM, 576 bits: addresses 35..45.
    run_block(576, 3, 0);
    begin
      int exp [11] = '{560, 17, 33, 1, 65, 81, 49, 113, 129, 97, 161};
      foreach (exp[k]) expect_eq("64QAM-576 sequence", seen[35 + k], exp[k]);
    end

    // Every legal configuration, with and without idle cycles.
    for (int c = 0; c < NCFG; c++) begin
      if (CFG_S[c] != prev_s) mode_switches++;
      prev_s = CFG_S[c];
      run_block(CFG_N[c], CFG_S[c], (c % 2 == 0) ? 0 : 30);
    end

    expect_eq("mode switches seen", int'(mode_switches >= 3), 1);
    expect_eq("idle cycles seen", int'(gaps > 0), 1);
    expect_eq("mid-block changes seen", int'(ignored_changes > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
