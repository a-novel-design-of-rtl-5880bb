// Checks the Mod 2 and Mod 3 units exhaustively over 7-bit inputs against
// residues computed by repeated subtraction.
module tb_modulo_unit;
  logic [6:0] value;
  logic [0:0] r2;
  logic [1:0] r3;
  int checks = 0, failures = 0;

  modulo_unit #(.M(2), .IN_W(7), .OUT_W(1)) dut2 (.value(value), .residue(r2));
  modulo_unit #(.M(3), .IN_W(7), .OUT_W(2)) dut3 (.value(value), .residue(r3));

  function automatic int slow_mod(int a, int b);
    while (a >= b) a -= b;
    return a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      value = 7'(v);
      #1;
      checks += 2;
      if (int'(r2) != slow_mod(v, 2)) begin
        failures++; $display("FAIL %0d mod 2 = %0d", v, r2);
      end
      if (int'(r3) != slow_mod(v, 3)) begin
        failures++; $display("FAIL %0d mod 3 = %0d", v, r3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
