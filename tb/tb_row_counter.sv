// Steps the row counter at random and checks the row value and the d-1
// comparator output against a software counter modulo 16.
module tb_row_counter;
  logic       clk = 0, rst = 1, step = 0, last;
  logic [3:0] row;
  int model = 0;
  int checks = 0, failures = 0;

  row_counter dut (.clk(clk), .rst(rst), .step(step), .row(row), .last(last));

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks += 2;
      if (int'(row) != model) begin
        failures++; $display("FAIL row=%0d expected %0d", row, model);
      end
      if (last != (model == 15)) begin
        failures++; $display("FAIL last=%0d at row %0d", last, model);
      end
      step = $urandom_range(0, 1) == 1;
      if (step) model = (model + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
