// Checks Kn = 16*i' + j for every column 0..35 and row 0..15.
module tb_addr_combiner;
  logic [6:0] col_p;
  logic [3:0] row;
  logic [9:0] kn;
  int checks = 0, failures = 0;

  addr_combiner dut (.col_p(col_p), .row(row), .kn(kn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 36; i++)
      for (int j = 0; j < 16; j++) begin
        col_p = 7'(i); row = 4'(j);
        #1;
        checks++;
        if (int'(kn) != i * 16 + j) begin
          failures++; $display("FAIL i'=%0d j=%0d kn=%0d", i, j, kn);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
