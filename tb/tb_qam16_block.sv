// Checks the 16-QAM column permutation for every row and column of the
// largest block against the closed-form equation, then checks the first
// four rows and five columns of the 192-bit block (addresses 16*i'+j).
module tb_qam16_block;
  import tb_wimax_ref_pkg::*;
  logic [6:0] col, col_p;
  logic [3:0] row;
  int checks = 0, failures = 0;
  localparam int TABLE_192 [4][5] = '{'{0, 16, 32, 48, 64},
                                      '{17, 1, 49, 33, 81},
                                      '{2, 18, 34, 50, 66},
                                      '{19, 3, 51, 35, 83}};

  qam16_block dut (.col(col), .row(row), .col_p(col_p));

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
        if (int'(col_p) != paper_col(2, i, j)) begin
          failures++; $display("FAIL i=%0d j=%0d i'=%0d", i, j, col_p);
        end
        if (j < 4 && i < 5) begin
          checks++;
          if (16 * int'(col_p) + j != TABLE_192[j][i]) begin
            failures++; $display("FAIL table i=%0d j=%0d", i, j);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
