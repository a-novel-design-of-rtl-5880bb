// Mod 2 / Mod 3 unit (MO0..MO3): residue of a counter value modulo M.
//
// For M = 2 the residue is the least significant bit. For other M the value
// is reduced with a constant modulo, which synthesises to a small
// combinational network for the 4- to 7-bit counters used here. The output
// is valid in the same cycle as the input. The document shows the units as
// "Mod 2" and "Mod 3" boxes without their insides.
module modulo_unit #(
  parameter int unsigned M   = 3,
  parameter int unsigned IN_W = wimax_pkg::COL_W,
  parameter int unsigned OUT_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic [IN_W-1:0]  value,
  output logic [OUT_W-1:0] residue
);
  generate
    if (M == 2) begin : g_mod2
      assign residue = OUT_W'(value[0]);
    end else begin : g_modm
      logic [IN_W-1:0] r;
      always_comb begin
        r       = value % IN_W'(M);
        residue = OUT_W'(r);
      end
    end
  endgenerate
endmodule
