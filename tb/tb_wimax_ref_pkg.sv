// Reference models for the deinterleaver testbenches.
//
// std_interleave() is the IEEE 802.16e channel interleaver written with its
// floor functions (first and second permutation); the deinterleaver address
// of received position n is the input index k that the interleaver sends to
// position n. paper_col() is the closed-form column permutation of the
// address equations, written as a plain case analysis on i mod s and
// j mod s. The two are independent of each other and of the RTL structure.
package tb_wimax_ref_pkg;

  localparam int D = 16;

  // Legal (Ncbps, bits per symbol) pairs of the standard.
  localparam int NCFG = 15;
  localparam int CFG_N [NCFG] = '{96, 144, 192, 288, 384, 432, 480, 576,
                                  192, 288, 384, 576,
                                  384, 432, 576};
  localparam int CFG_S [NCFG] = '{1, 1, 1, 1, 1, 1, 1, 1,
                                  2, 2, 2, 2,
                                  3, 3, 3};

  // Interleaver output position of input bit k.
  function automatic int std_interleave(int n_cbps, int s, int k);
    int m, j;
    m = (n_cbps / D) * (k % D) + (k / D);
    j = s * (m / s) + ((m + n_cbps - (D * m) / n_cbps) % s);
    return j;
  endfunction

  // Deinterleaver address table: addr[n] = k with std_interleave(k) == n.
  function automatic void std_deint_table(int n_cbps, int s, ref int addr[576]);
    for (int k = 0; k < n_cbps; k++)
      addr[std_interleave(n_cbps, s, k)] = k;
  endfunction

  // Permuted column of the closed-form address equations.
  function automatic int paper_col(int s, int i, int j);
    if (s == 2) begin
      if (j % 2 == 0) return i;
      return (i % 2 == 0) ? i + 1 : i - 1;
    end
    if (s == 3) begin
      case (j % 3)
        0: return i;
        1: return (i % 3 == 2) ? i - 2 : i + 1;
        default: return (i % 3 == 0) ? i + 2 : i - 1;
      endcase
    end
    return i;
  endfunction

  // Modulation code for s bits per symbol.
  function automatic logic [1:0] mod_code(int s);
    return (s == 3) ? 2'b10 : (s == 2) ? 2'b01 : 2'b00;
  endfunction

endpackage
