// Checks the 64-QAM column permutation for every row and column of the
// largest block against the closed-form equation, then the first four rows
// and five columns of the 576-bit block (addresses 16*i'+j).
module tb_qam64_block;
  import tb_wimax_ref_pkg::*;
  logic [6:0] col, col_p;
  logic [3:0] row;
  int checks = 0, failures = 0;
  localparam int TABLE_576 [4][5] = '{'{0, 16, 32, 48, 64},
                                      '{17, 33, 1, 65, 81},
                                      '{34, 2, 18, 82, 50},
                                      '{3, 19, 35, 51, 67}};

  qam64_block dut (.col(col), .row(row), .col_p(col_p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 16; j++)
      for (int i = 0; i < 36; i++) begin
        col = 7'(i); row = 4'(j);
        #1;
        checks++;
        if (int'(col_p) != paper_col(3, i, j)) begin
          failures++; $display("FAIL i=%0d j=%0d i'=%0d", i, j, col_p);
        end
        if (j < 4 && i < 5) begin
          checks++;
          if (16 * int'(col_p) + j != TABLE_576[j][i]) begin
            failures++; $display("FAIL table i=%0d j=%0d", i, j);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
