// Checks the QPSK block (divider and last-column comparator) for every
// block size and every column value. The expected column limits are the
// per-code-rate constants 5, 8, 11, 17, 23, 26, 29, 35.
module tb_qpsk_block;
  logic [9:0] ncbps;
  logic [6:0] col, cols;
  logic       col_last;
  int checks = 0, failures = 0;
  localparam int N [8]     = '{96, 144, 192, 288, 384, 432, 480, 576};
  localparam int LIMIT [8] = '{5, 8, 11, 17, 23, 26, 29, 35};

  qpsk_block dut (.ncbps(ncbps), .col(col), .cols(cols), .col_last(col_last));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      ncbps = 10'(N[c]);
      for (int i = 0; i <= 36; i++) begin
        col = 7'(i);
        #1;
        checks += 2;
        if (int'(cols) != LIMIT[c] + 1) begin
          failures++; $display("FAIL ncbps=%0d cols=%0d", N[c], cols);
        end
        if (col_last != (i == LIMIT[c])) begin
          failures++; $display("FAIL ncbps=%0d col=%0d last=%0d", N[c], i, col_last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
