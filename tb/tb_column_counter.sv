// Drives the column counter with a random enable and a comparator that
// reports the last column of a randomly chosen column count, and compares
// every cycle with a software counter.
module tb_column_counter;
  logic       clk = 0, rst = 1, en = 0, last;
  logic [6:0] col;
  int limit = 5, model = 0, wraps = 0;
  int checks = 0, failures = 0;

  column_counter dut (.clk(clk), .rst(rst), .en(en), .last(last), .col(col));

  always #5 clk = !clk;
  always_comb last = (int'(col) == limit - 1);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(col) != model) begin
        failures++; $display("FAIL t=%0d col=%0d expected %0d", t, col, model);
      end
      if (t % 500 == 0 && model == 0) limit = 6 + 3 * int'($urandom_range(0, 10));
      en = ($urandom_range(0, 3) != 0);
      if (en) begin
        if (model == limit - 1) begin model = 0; wraps++; end
        else model++;
      end
    end
    checks++;
    if (wraps < 10) begin failures++; $display("FAIL only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
